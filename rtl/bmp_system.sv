// bmp_system: a complete biphase mark link, from bit source to bit sink.
//
// The coder side runs on its own oscillator (tx_clk) and turns a stream of
// bits into the square wave v, one cell of CELL ticks per bit. The line model
// distorts every edge of v for EDGELENGTH time units and hands the observable
// value w to the receiver. The receiver runs on a second, independent
// oscillator (rx_clk) of the same nominal tolerance: the sampler registers w
// once per cycle and the decoder recovers the bits. Both oscillators may run
// anywhere between MIN and MAX time units per tick, independently and
// differently in every cycle; the protocol stays correct as long as the
// parameters satisfy the three constraints in bmp_pkg (checked here at
// elaboration, with a warning if they fail, so that deliberately broken
// parameter sets can still be simulated).
//
// The two oscillators and the line are behavioural models, so this top is a
// simulation model of the whole link; bmp_coder, bmp_sampler and bmp_decoder
// are the synthesizable parts. The defaults are the 16-cycle configuration
// with the example timing of the protocol analysis: cell 16, mark 8, sample
// distance 11, clock period 89..100 ns, 89 ns of edge distortion.
//
// Interface: rst (synchronous to each clock, active high, released for both
// sides at once); in_bit/get as in bmp_coder (sampled on the rising edge of
// tx_clk while get is high); put/out as in bmp_decoder (on rx_clk). The clocks,
// the ideal wave v, the line w and the line model's flags are brought out for
// observation. TX_MODE, RX_MODE and WIRE_MODE select random or worst-case
// behaviour of the models (see bmp_clock_model and bmp_wire_model). For valid
// parameter sets, assertions check two invariants of the protocol: no edge on
// an unstable line, and no second bit requested before the first arrived.
`timescale 1ns / 1ps
module bmp_system
  import bmp_pkg::*;
#(
  parameter int unsigned CELL       = 16,
  parameter int unsigned MARK       = 8,
  parameter int unsigned SAMPLE     = 11,
  parameter int unsigned MIN        = 89,
  parameter int unsigned MAX        = 100,
  parameter int unsigned EDGELENGTH = 89,
  parameter int unsigned TX_MODE    = 0,
  parameter int unsigned RX_MODE    = 0,
  parameter int unsigned WIRE_MODE  = 0,
  parameter int unsigned TX_PHASE   = 1,
  parameter int unsigned RX_PHASE   = 1,
  parameter int unsigned SEED       = 1
) (
  input  logic rst,
  input  logic in_bit,
  output logic get,
  output logic put,
  output logic out,
  output logic tx_clk,
  output logic rx_clk,
  output logic v,
  output logic w,
  output logic wire_unstable,
  output logic wire_collision
);

  localparam bit PARAMS_OK = params_ok(CELL, MARK, SAMPLE, MIN, MAX, EDGELENGTH);

  logic new_s;

  initial begin
    if (!PARAMS_OK)
      $warning("bmp_system: CELL=%0d MARK=%0d SAMPLE=%0d MIN=%0d MAX=%0d EDGELENGTH=%0d violate the BMP timing constraints",
               CELL, MARK, SAMPLE, MIN, MAX, EDGELENGTH);
  end

  // coder side
  bmp_clock_model #(
    .MIN(MIN), .MAX(MAX), .MODE(TX_MODE), .PHASE(TX_PHASE), .SEED(SEED)
  ) u_tx_clock (
    .clk(tx_clk)
  );

  bmp_coder #(
    .CELL(CELL), .MARK(MARK)
  ) u_coder (
    .clk   (tx_clk),
    .rst   (rst),
    .in_bit(in_bit),
    .get   (get),
    .v     (v)
  );

  // line
  bmp_wire_model #(
    .EDGELENGTH(EDGELENGTH), .MODE(WIRE_MODE), .SEED(SEED + 17)
  ) u_wire (
    .rst      (rst),
    .v        (v),
    .w        (w),
    .unstable (wire_unstable),
    .collision(wire_collision)
  );

  // decoder side
  bmp_clock_model #(
    .MIN(MIN), .MAX(MAX), .MODE(RX_MODE), .PHASE(RX_PHASE), .SEED(SEED + 101)
  ) u_rx_clock (
    .clk(rx_clk)
  );

  bmp_sampler #(
    .RESET_VALUE(1'b0)
  ) u_sampler (
    .clk  (rx_clk),
    .rst  (rst),
    .w    (w),
    .new_o(new_s)
  );

  bmp_decoder #(
    .SAMPLE(SAMPLE), .RESET_VALUE(1'b0)
  ) u_decoder (
    .clk  (rx_clk),
    .rst  (rst),
    .new_i(new_s),
    .put  (put),
    .out  (out)
  );

  // Protocol invariants, checked only for parameter sets that satisfy the
  // timing constraints (for others they are expected to fail):
  //  - the coder never starts an edge while the line is still unstable;
  //  - when the coder asks for a new bit, the previous one has been delivered,
  //    so at most one bit is ever in transit. Requests and deliveries are
  //    counted separately; reset aligns the request count with the delivery
  //    count.
  if (PARAMS_OK) begin : g_invariants
    int unsigned requested;
    int unsigned delivered;

    always @(posedge tx_clk) begin
      if (rst) begin
        requested <= delivered;
      end else if (get) begin
        a_no_pending: assert (requested == delivered)
          else $error("bmp_system: new bit requested while %0d undelivered", requested - delivered);
        requested <= requested + 1;
      end
    end

    always @(posedge put) delivered <= delivered + 1;

    a_no_collision: assert property (@(posedge tx_clk) disable iff (rst) !wire_collision)
      else $error("bmp_system: edge while the line was unstable");
  end

endmodule
