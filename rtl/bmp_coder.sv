// bmp_coder: biphase mark encoder.
//
// Each message bit occupies one cell of CELL ticks of the coder clock. The
// line level v toggles at the first tick of every cell; when the bit is a 1 it
// toggles again MARK ticks later, at the start of the code subcell. A 0 keeps
// the level constant for the whole cell.
//
// How it works: a tick counter n runs from 0 to CELL-1 inside a cell. On the
// tick that closes a cell (n = CELL-1), or on the first tick after reset, the
// coder takes the next bit from in_bit, toggles v and restarts n at 0. A 1 puts
// the controller in the mark phase; on the tick with n = MARK-1 it toggles v
// and moves to the code phase, where it stays until the cell ends. This is the
// five-location coder automaton of the protocol model folded into three
// states: its two urgent locations (fetch bit, emit edge) happen on the same
// clock edge as the tick that leads to them.
//
// Interface: get is high in the cycle whose closing clock edge consumes in_bit
// (it is a combinational "ready"; the environment must present a valid bit
// whenever get is high, because the protocol always has a next bit to send).
// v is a registered output. Reset is synchronous and active high; it puts v at
// 0. An idle line, end of transmission and reset values are not part of the
// protocol model and are this design's own choices.
//
// Timing: the first edge comes on the first clock edge after reset; after that
// cell edges are exactly CELL ticks apart and a mid-cell edge comes exactly
// MARK ticks after the cell edge of a 1.
`timescale 1ns / 1ps
module bmp_coder
  import bmp_pkg::*;
#(
  parameter int unsigned CELL = 16,
  parameter int unsigned MARK = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic in_bit,
  output logic get,
  output logic v
);

  localparam int unsigned NW = (CELL > 1) ? $clog2(CELL) : 1;

  coder_state_e    state_q;
  logic [NW-1:0]   n_q;

  initial begin
    assert (MARK >= 1 && MARK < CELL)
      else $error("bmp_coder: MARK must lie in 1..CELL-1");
  end

  // A new cell opens after reset and on the tick that completes a cell.
  assign get = (state_q == CODER_START) || (n_q == NW'(CELL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= CODER_START;
      n_q     <= '0;
      v       <= 1'b0;
    end else if (get) begin
      // cell edge, then mark phase for a 1 or code phase for a 0
      n_q     <= '0;
      v       <= ~v;
      state_q <= in_bit ? CODER_MARK_PH : CODER_CODE_PH;
    end else begin
      n_q <= n_q + 1'b1;
      if (state_q == CODER_MARK_PH && n_q == NW'(MARK - 1)) begin
        // mid-cell edge of a 1
        v       <= ~v;
        state_q <= CODER_CODE_PH;
      end
    end
  end

  // the tick counter never leaves the cell
  a_n_in_cell: assert property (@(posedge clk) disable iff (rst) 32'(n_q) < CELL)
    else $error("bmp_coder: tick counter beyond CELL-1");

endmodule
