// bmp_wire_model: behavioural model of the physical line between coder and
// decoder. This is a simulation model of an analog effect, not synthesizable
// logic.
//
// v is the ideal square wave driven by the coder; w is what a receiver can
// observe. After every edge of v the line is unstable for EDGELENGTH time
// units: w may take any value at any time. Afterwards w settles to v. An edge
// of v that arrives while the line is still unstable is a protocol violation
// (the coder may never start a new transition before the previous one has
// settled); it raises the sticky collision flag and restarts the unstable
// window. Delivery is instantaneous apart from the distortion.
//
// How w behaves inside an unstable window is chosen per edge by MODE:
//   0  per edge, one of the three behaviours below, chosen at random
//   1  w follows v at once (shortest distortion)
//   2  w keeps the old value for the whole window (longest distortion)
//   3  w takes a new random value every 1..STEP time units (ringing)
// Modes 1 and 2 are the two extremes used in the protocol's error scenarios;
// mode 3 models an unknown signal during the edge. The window is tracked by
// polling v every 1..STEP time units, STEP being the larger of 8 and
// EDGELENGTH/32, so an edge that arrives during the window is seen up to STEP
// time units late.
//
// Interface: rst in (while high the line is idle: w follows v with no
// distortion and nothing is flagged, so the coder's power-up value is not
// taken for an edge); v in; w out; unstable (high inside a window); collision
// (sticky). Time unit: 1 ns.
//
// Tool notes: the polling delay depends on run-time values, which a linter
// reports as possibly zero (it never is: at least 1); a synthesis tool that
// ignores the delays sees only latches, since the model describes no logic.
`timescale 1ns / 1ps
module bmp_wire_model #(
  parameter int unsigned EDGELENGTH = 89,
  parameter int unsigned MODE       = 0,
  parameter int unsigned SEED       = 7
) (
  input  logic rst,
  input  logic v,
  output logic w,
  output logic unstable,
  output logic collision
);

  localparam int unsigned STEP = (EDGELENGTH / 32 > 8) ? EDGELENGTH / 32 : 8;

  logic [31:0] rng_q;
  logic        last_v;
  int unsigned behaviour;
  int unsigned remaining;
  int unsigned step;
  int unsigned edges_seen;

  function automatic logic [31:0] xorshift(logic [31:0] s);
    logic [31:0] t;
    t = s ^ (s << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  // Opens a distortion window after an edge of v.
  task automatic open_window();
    remaining = EDGELENGTH;
    unstable  = (EDGELENGTH != 0);
    edges_seen = edges_seen + 1;
    last_v    = v;
    if (MODE == 0) begin
      rng_q     = xorshift(rng_q);
      behaviour = 1 + (rng_q % 3);
    end else begin
      behaviour = MODE;
    end
    if (behaviour == 1 || EDGELENGTH == 0) w = v;
  endtask

  initial begin
    rng_q      = (SEED == 0) ? 32'hCAFE_F00D : 32'(SEED) * 32'h85EB_CA6B + 32'h1;
    w          = 1'b0;
    unstable   = 1'b0;
    collision  = 1'b0;
    last_v     = 1'b0;
    edges_seen = 0;
  end

  // One pass per event: an idle wait for an edge, or one step of a window.
  always begin
    if (rst) begin
      w         = v;
      last_v    = v;
      unstable  = 1'b0;
      collision = 1'b0;
      @(v or rst);
    end else if (!unstable) begin
      if (v == last_v) @(v or rst);
      if (!rst && v != last_v) open_window();
    end else begin
      rng_q = xorshift(rng_q);
      step  = 1 + (rng_q % STEP);
      if (step > remaining) step = remaining;
      #(step);
      remaining = remaining - step;
      if (v != last_v) begin
        // edge while the line is still unstable
        collision = 1'b1;
        open_window();
      end else if (remaining == 0) begin
        w        = v;
        unstable = 1'b0;
      end else if (behaviour == 1) begin
        w = v;
      end else if (behaviour == 3) begin
        rng_q = xorshift(rng_q);
        w     = rng_q[7];
      end
    end
  end

endmodule
