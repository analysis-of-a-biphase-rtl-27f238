// bmp_clock_model: behavioural model of a drifting, jittering oscillator.
// This is a simulation model, not synthesizable logic: a real design takes
// its clock from a crystal or an on-chip oscillator.
//
// The protocol assumes nothing about a hardware clock except that two
// consecutive ticks (rising edges of clk) are at least MIN and at most MAX
// time units apart; the rate may change from one cycle to the next (jitter)
// and differ from the other side's clock (drift). The model draws every
// period anew from [MIN, MAX] with a private xorshift generator, so runs are
// repeatable for a given SEED. MODE selects the schedule:
//   0  each period random in [MIN, MAX]
//   1  every period MIN (maximally fast clock)
//   2  every period MAX (maximally slow clock)
// The worst-case schedules reproduce the adversarial clocks of the
// protocol's error scenarios. The first rising edge comes after a start
// offset drawn from [1, MAX] (MODE 0) or after exactly PHASE time units
// (MODE 1 and 2, PHASE > 0). The high time is half of each period.
//
// Interface: clk only. Time unit: 1 ns.
//
// Tool notes: the delays depend on run-time values, which a linter reports as
// possibly zero (they never are: MIN > 0); a synthesis tool that ignores the
// delays sees only latches, since the model describes no logic.
`timescale 1ns / 1ps
module bmp_clock_model #(
  parameter int unsigned MIN   = 89,
  parameter int unsigned MAX   = 100,
  parameter int unsigned MODE  = 0,
  parameter int unsigned PHASE = 1,
  parameter int unsigned SEED  = 1
) (
  output logic clk
);

  logic [31:0] rng_q;
  int unsigned period;
  int unsigned periods_seen;

  function automatic logic [31:0] xorshift(logic [31:0] s);
    logic [31:0] t;
    t = s ^ (s << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  logic started;

  initial begin
    assert (MIN > 0 && MIN <= MAX) else $error("bmp_clock_model: need 0 < MIN <= MAX");
    rng_q        = (SEED == 0) ? 32'h1234_5678 : 32'(SEED) * 32'h9E37_79B9 + 32'h1;
    clk          = 1'b0;
    started      = 1'b0;
    periods_seen = 0;
  end

  // One clock period per pass; the first pass waits for the start offset.
  always begin
    if (!started) begin
      started = 1'b1;
      rng_q = xorshift(rng_q);
      if (MODE == 0) #(1 + rng_q % MAX);
      else           #(PHASE);
    end
    unique case (MODE)
      1:       period = MIN;
      2:       period = MAX;
      default: begin
        rng_q  = xorshift(rng_q);
        period = MIN + rng_q % (MAX - MIN + 1);
      end
    endcase
    periods_seen = periods_seen + 1;
    clk = 1'b1;
    #(real'(period) / 2.0);
    clk = 1'b0;
    #(real'(period) - real'(period) / 2.0);
  end

endmodule
