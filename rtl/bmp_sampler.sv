// bmp_sampler: samples the line once per decoder clock cycle.
//
// The protocol's sampler copies the (possibly unstable) line value w into the
// register new exactly once between two decoder clock ticks, so that the
// decoder always works on a value that cannot change during its decision.
// Here that is a register loaded from w on every rising edge of the decoder
// clock: the value taken at one tick is what the decoder sees at the next
// tick, i.e. the sample belongs to the start of the cycle the decoder then
// closes. This is one admissible schedule of the model, where sampling may
// happen at any instant of the cycle. No synchroniser stages are added: the
// protocol model ignores metastability, and so does this block.
//
// Interface: clk (decoder clock), rst (synchronous, active high, loads
// RESET_VALUE, which must equal the line level the coder starts from), w
// (line), new_o (sampled line, registered). Latency: one clock.
`timescale 1ns / 1ps
module bmp_sampler #(
  parameter bit RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic w,
  output logic new_o
);

  always_ff @(posedge clk) begin
    if (rst) new_o <= RESET_VALUE;
    else     new_o <= w;
  end

endmodule
