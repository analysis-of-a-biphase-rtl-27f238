// bmp_system_tb: end-to-end test of the biphase mark link at its default
// parameters (cell 16, mark 8, sample distance 11, clocks of 89..100 ns with
// independent random jitter on both sides, 89 ns of edge distortion with a
// randomly chosen distortion shape per edge).
//
// It plays the tester of the protocol: whenever the coder asks for a bit
// (get) it supplies a random one and remembers it; whenever the decoder
// delivers one (put) it compares it with the oldest bit in transit. It
// checks that
//   - every bit arrives, in order and with the right value;
//   - whenever the coder asks for a new bit, the previous one has already
//     been delivered, so at most one bit is ever in transit (the tester's
//     two-bit memory can never overflow);
//   - the coder never starts an edge while the line is still unstable;
//   - the default parameters satisfy the three timing constraints.
// It also counts that the interesting behaviour really happened: 0s and 1s,
// mid-cell edges, a distorted line (w different from v inside a window),
// clock jitter on both sides and the two clocks drifting against each other.
`timescale 1ns / 1ps
module bmp_system_tb;
  import bmp_pkg::*;

  localparam int unsigned NBITS = 20000;

  logic rst = 1'b1;
  logic in_bit = 1'b0;
  logic get, put, out, tx_clk, rx_clk, v, w, wire_unstable, wire_collision;
  int   checks = 0;
  int   failures = 0;

  bmp_system u_dut (
    .rst(rst), .in_bit(in_bit), .get(get), .put(put), .out(out),
    .tx_clk(tx_clk), .rx_clk(rx_clk), .v(v), .w(w),
    .wire_unstable(wire_unstable), .wire_collision(wire_collision)
  );

  logic    in_transit[$];
  int      sent = 0, received = 0, max_transit = 0;
  int      ones = 0, zeros = 0, v_edges = 0, distortions = 0;
  realtime last_tx = 0, last_rx = 0;
  real     tx_pmin = 1.0e9, tx_pmax = 0.0, rx_pmin = 1.0e9, rx_pmax = 0.0;
  int      tx_ticks = 0, rx_ticks = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(64'(NBITS + 10) * 16 * 100 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit source: a fresh random bit after every coder tick
  always @(negedge tx_clk) in_bit <= 1'($urandom);

  always @(posedge tx_clk) begin
    if (tx_ticks > 0) begin
      real p;
      p = $realtime - last_tx;
      if (p < tx_pmin) tx_pmin = p;
      if (p > tx_pmax) tx_pmax = p;
    end
    last_tx = $realtime;
    tx_ticks++;
    if (!rst && get) begin
      check(in_transit.size() == 0, "new bit requested before the previous one was delivered");
      check(in_transit.size() < 2, "overflow: a third bit requested before delivery");
      in_transit.push_back(in_bit);
      sent++;
      if (in_transit.size() > max_transit) max_transit = in_transit.size();
    end
  end

  // bit sink
  always @(posedge rx_clk) begin
    if (rx_ticks > 0) begin
      real p;
      p = $realtime - last_rx;
      if (p < rx_pmin) rx_pmin = p;
      if (p > rx_pmax) rx_pmax = p;
    end
    last_rx = $realtime;
    rx_ticks++;
  end

  // a bit counts as delivered when put rises, just after the deciding edge
  always @(posedge put) begin
    #0.01;
    if (!rst) begin
      if (in_transit.size() == 0) begin
        check(1'b0, "put with no bit in transit");
      end else begin
        logic e;
        e = in_transit.pop_front();
        received++;
        if (e) ones++; else zeros++;
        check(out == e, $sformatf("bit %0d decoded as %b, sent %b", received, out, e));
      end
    end
  end

  // line activity
  always @(v) if (!rst) v_edges++;
  always @(w) if (!rst && wire_unstable && w != v) distortions++;

  initial begin
    check(params_ok(16, 8, 11, 89, 100, 89), "default parameters violate the constraints");
    #1000 rst = 1'b0;
    wait (received >= NBITS);
    check(sent - received <= 1, $sformatf("sent %0d bits, received %0d", sent, received));
    check(!wire_collision, "coder produced an edge while the line was unstable");
    // every mechanism must have occurred
    check(zeros > 0, "no 0 decoded");
    check(ones > 0, "no 1 decoded");
    check(v_edges > sent, "no mid-cell edges");
    check(distortions > 0, "line never distorted");
    check(tx_pmax - tx_pmin > 5.0, "no jitter on the coder clock");
    check(rx_pmax - rx_pmin > 5.0, "no jitter on the decoder clock");
    check(tx_ticks != rx_ticks, "clocks did not drift apart");
    check(max_transit == 1, "no bit ever in transit");
    $display("bits %0d (zeros %0d ones %0d), line edges %0d, distortions %0d, max in transit %0d",
             received, zeros, ones, v_edges, distortions, max_transit);
    $display("tx period %0.1f..%0.1f ns, rx period %0.1f..%0.1f ns, ticks tx %0d rx %0d",
             tx_pmin, tx_pmax, rx_pmin, rx_pmax, tx_ticks, rx_ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
