// bmp_error_scenarios_tb: shows that each of the three timing constraints of
// the biphase mark protocol is needed, and that the link survives the same
// worst-case conditions when the constraint holds.
//
// Each scenario runs two links under the adversarial clocks of that scenario,
// one with a parameter set that violates exactly the constraint in question
// and one that differs in a single parameter and satisfies all three:
//   1 edge missed: coder always fast, decoder always slow, random line
//     distortion per edge; MARK 2 (violating) against MARK 5.
//   2 sampled too early: coder always slow, decoder always fast, line holds
//     the old value for the whole window; SAMPLE 10 against SAMPLE 12.
//   3 sampled too late: coder always fast, decoder always slow, line follows
//     at once; CELL 10 against CELL 14.
// The violating link must decode wrong bits or lose/overflow bits; the
// satisfying one must deliver every bit correctly. A worst-case decoder built
// as a clocked register samples at the start of each cycle, which gives it one
// clock period more margin than the most pessimistic sampling instant, so the
// violating parameter sets here break that margin too.
`timescale 1ns / 1ps
module bmp_error_scenarios_tb;
  import bmp_pkg::*;

  localparam int unsigned NBITS = 1500;

  logic rst = 1'b1;
  int   checks = 0;
  int   failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s", what);
    end
  endtask

  // One link with its tester. The generate index selects the parameter set.
  typedef struct packed {
    logic [31:0] ncell, mark, sample, tmin, tmax, el, txm, rxm, wm;
  } cfg_t;

  localparam cfg_t CFG[6] = '{
    // scenario 1: edge missed
    '{ncell: 24, mark: 2, sample: 11, tmin: 60, tmax: 100, el: 50, txm: 1, rxm: 2, wm: 0},
    '{ncell: 24, mark: 5, sample: 11, tmin: 60, tmax: 100, el: 50, txm: 1, rxm: 2, wm: 0},
    // scenario 2: sampled too early
    '{ncell: 20, mark: 8, sample: 10, tmin: 78, tmax: 100, el: 10, txm: 2, rxm: 1, wm: 2},
    '{ncell: 20, mark: 8, sample: 12, tmin: 78, tmax: 100, el: 10, txm: 2, rxm: 1, wm: 2},
    // scenario 3: sampled too late
    '{ncell: 10, mark: 4, sample: 8, tmin: 80, tmax: 100, el: 10, txm: 1, rxm: 2, wm: 1},
    '{ncell: 14, mark: 4, sample: 8, tmin: 80, tmax: 100, el: 10, txm: 1, rxm: 2, wm: 1}
  };

  int sent[6], received[6], wrong[6], overflows[6], pending[6];

  for (genvar i = 0; i < 6; i++) begin : g_link
    logic in_bit, get, put, out, tx_clk, rx_clk, v, w, unstable, collision;
    bmp_system #(
      .CELL(CFG[i].ncell), .MARK(CFG[i].mark), .SAMPLE(CFG[i].sample),
      .MIN(CFG[i].tmin), .MAX(CFG[i].tmax), .EDGELENGTH(CFG[i].el),
      .TX_MODE(CFG[i].txm), .RX_MODE(CFG[i].rxm), .WIRE_MODE(CFG[i].wm),
      .TX_PHASE(3), .RX_PHASE(41), .SEED(11 + i)
    ) u_link (
      .rst(rst), .in_bit(in_bit), .get(get), .put(put), .out(out),
      .tx_clk(tx_clk), .rx_clk(rx_clk), .v(v), .w(w),
      .wire_unstable(unstable), .wire_collision(collision)
    );
    bmp_tester u_tester (
      .rst(rst), .tx_clk(tx_clk), .get(get), .put(put), .out(out),
      .in_bit(in_bit), .sent(sent[i]), .received(received[i]), .wrong(wrong[i]),
      .overflows(overflows[i]), .pending_at_get(pending[i])
    );
  end

  initial begin : watchdog
    #(64'(NBITS + 20) * 24 * 100 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the parameter sets are what they claim to be
    check(!edge_detected_ok(2, 60, 100, 50) &&
          sample_not_early_ok(2, 11, 60, 100, 50) && sample_not_late_ok(24, 11, 60, 100, 50),
          "scenario 1 set does not violate constraint 1 alone");
    check(params_ok(24, 5, 11, 60, 100, 50), "scenario 1 control set not valid");
    check(edge_detected_ok(8, 78, 100, 10) && !sample_not_early_ok(8, 10, 78, 100, 10) &&
          sample_not_late_ok(20, 10, 78, 100, 10),
          "scenario 2 set does not violate constraint 2 alone");
    check(params_ok(20, 8, 12, 78, 100, 10), "scenario 2 control set not valid");
    check(edge_detected_ok(4, 80, 100, 10) && sample_not_early_ok(4, 8, 80, 100, 10) &&
          !sample_not_late_ok(10, 8, 80, 100, 10),
          "scenario 3 set does not violate constraint 3 alone");
    check(params_ok(14, 4, 8, 80, 100, 10), "scenario 3 control set not valid");
    #5000 rst = 1'b0;
    wait (sent[0] >= NBITS && sent[1] >= NBITS && sent[2] >= NBITS &&
          sent[3] >= NBITS && sent[4] >= NBITS && sent[5] >= NBITS);
    #5000;
    for (int s = 0; s < 3; s++) begin
      int bad, good;
      bad  = 2 * s;
      good = 2 * s + 1;
      $display("scenario %0d violating: sent %0d received %0d wrong %0d overflows %0d",
               s + 1, sent[bad], received[bad], wrong[bad], overflows[bad]);
      $display("scenario %0d control:   sent %0d received %0d wrong %0d overflows %0d",
               s + 1, sent[good], received[good], wrong[good], overflows[good]);
      check(wrong[bad] + overflows[bad] + (sent[bad] - received[bad] > 1 ? 1 : 0) > 0,
            $sformatf("scenario %0d: violating parameters decoded without error", s + 1));
      check(wrong[good] == 0 && overflows[good] == 0 && pending[good] == 0 &&
            sent[good] - received[good] <= 1,
            $sformatf("scenario %0d: valid parameters failed", s + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
