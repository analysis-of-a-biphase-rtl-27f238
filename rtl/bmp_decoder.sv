// bmp_decoder: biphase mark decoder.
//
// The decoder keeps the line level it last accepted in old. While it waits for
// a cell, every tick compares the sampled line new_i with old; a difference is
// taken as the edge that opens a cell: old follows the line and a tick counter
// m starts at 0. SAMPLE ticks after that detecting tick (the sampling
// distance) the decoder decides: if the line still equals old the cell carried
// a 0, otherwise the mid-cell edge of a 1 has occurred. It then loads old with
// the current sample (so the mid-cell edge of a 1 is not mistaken for the next
// cell edge), reports the bit and goes back to waiting, all on the same tick.
//
// Interface: clk (decoder clock), rst (synchronous, active high; old is reset
// to RESET_VALUE, the coder's initial line level), new_i (sampled line from
// bmp_sampler), put (one-cycle strobe, registered) and out (decoded bit, valid
// while put is high and held until the next put).
//
// Timing: put rises on the clock edge that is the SAMPLE-th tick after the
// tick that saw the cell edge. The counting convention (m cleared on detection,
// decision when the SAMPLE-th further tick arrives) follows from the protocol's
// timing constraints (2) and (3), which place the decision SAMPLE decoder
// cycles after detection; the reset value and the strobe interface are this
// design's own choices.
`timescale 1ns / 1ps
module bmp_decoder
  import bmp_pkg::*;
#(
  parameter int unsigned SAMPLE      = 11,
  parameter bit          RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic new_i,
  output logic put,
  output logic out
);

  localparam int unsigned MW = (SAMPLE > 1) ? $clog2(SAMPLE) : 1;

  decoder_state_e state_q;
  logic           old_q;
  logic [MW-1:0]  m_q;

  initial begin
    assert (SAMPLE >= 1) else $error("bmp_decoder: SAMPLE must be at least 1");
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= DEC_WAIT_EDGE;
      old_q   <= RESET_VALUE;
      m_q     <= '0;
      put     <= 1'b0;
      out     <= 1'b0;
    end else begin
      put <= 1'b0;
      unique case (state_q)
        DEC_WAIT_EDGE: begin
          if (new_i != old_q) begin
            old_q   <= new_i;
            m_q     <= '0;
            state_q <= DEC_COUNT;
          end
        end
        DEC_COUNT: begin
          if (m_q == MW'(SAMPLE - 1)) begin
            out     <= new_i ^ old_q;
            old_q   <= new_i;
            put     <= 1'b1;
            state_q <= DEC_WAIT_EDGE;
          end else begin
            m_q <= m_q + 1'b1;
          end
        end
        default: state_q <= DEC_WAIT_EDGE;
      endcase
    end
  end

  // the sampling counter never passes the sampling distance
  a_m_in_range: assert property (@(posedge clk) disable iff (rst) 32'(m_q) < SAMPLE)
    else $error("bmp_decoder: sampling counter beyond SAMPLE-1");

endmodule
