// bmp_wire_model_tb: self-checking test of the line model.
//
// Toggles the ideal level v at random, well separated instants on four
// instances (random choice per edge, immediate, late, ringing) with the
// default 89 ns distortion window, and checks: w equals v whenever no window
// is open; every window lasts exactly EDGELENGTH; in the late mode w keeps the
// old level to the end of the window, in the immediate mode it follows v at
// once; the ringing mode shows both levels inside windows. Finally one edge
// inside an open window must raise the collision flag.
`timescale 1ns / 1ps
module bmp_wire_model_tb;

  localparam int unsigned EL = 89;
  localparam int unsigned N  = 300;

  logic rst = 1'b1;
  logic v = 1'b0;
  logic w0, w1, w2, w3;
  logic u0, u1, u2, u3;
  logic c0, c1, c2, c3;
  int   checks = 0;
  int   failures = 0;
  int   ring_diff = 0;

  bmp_wire_model #(.EDGELENGTH(EL), .MODE(0), .SEED(3)) u_m0 (.rst(rst), .v(v), .w(w0), .unstable(u0), .collision(c0));
  bmp_wire_model #(.EDGELENGTH(EL), .MODE(1), .SEED(4)) u_m1 (.rst(rst), .v(v), .w(w1), .unstable(u1), .collision(c1));
  bmp_wire_model #(.EDGELENGTH(EL), .MODE(2), .SEED(5)) u_m2 (.rst(rst), .v(v), .w(w2), .unstable(u2), .collision(c2));
  bmp_wire_model #(.EDGELENGTH(EL), .MODE(3), .SEED(6)) u_m3 (.rst(rst), .v(v), .w(w3), .unstable(u3), .collision(c3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(N * 400 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic old_v;
    #10 rst = 1'b0;
    #10;
    for (int i = 0; i < N; i++) begin
      old_v = v;
      v = ~v;
      #0.5;
      check(u0 && u1 && u2 && u3, "window not open after an edge");
      check(w1 == v, "immediate mode: w does not follow v");
      check(w2 == old_v, "late mode: w changed at the edge");
      for (int t = 1; t < EL; t++) begin
        #1;
        check(w2 == old_v, "late mode: w changed inside the window");
        if (w3 != v) ring_diff++;
      end
      check(u0 && u1 && u2 && u3, "window closed early");
      #1;
      check(!u0 && !u1 && !u2 && !u3, "window did not close after EDGELENGTH");
      check(w0 == v && w1 == v && w2 == v && w3 == v, "w did not settle to v");
      #(20 + $urandom % 200);
      check(w0 == v && w1 == v && w2 == v && w3 == v, "w differs from v on a stable line");
    end
    check(!c0 && !c1 && !c2 && !c3, "collision flagged without a violation");
    check(ring_diff > 10 && ring_diff < N * (EL - 1) - 10, "ringing mode never shows both levels");
    // edge inside an open window
    v = ~v;
    #20 v = ~v;
    #20;
    check(c0 && c1 && c2 && c3, "edge during an open window not flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
