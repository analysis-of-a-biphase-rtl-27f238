// bmp_configs_tb: runs the biphase mark link in the cell configurations
// discussed for the protocol, each under three clock regimes.
//
// Configurations (cell/mark/sample): 16/8/11 (the Intel 82530 choice),
// 32/16/23 (conventional), 18/5/10, 11/4/7 (smallest cell for one cycle of
// edge distortion) and 14/7/10 (smallest DC-balanced cell). Each is run
//   A with one full clock cycle of distortion (EDGELENGTH = MAX = 100 ns) and
//     a clock ratio MIN/MAX of 0.95, above every lower bound of that table,
//   B with clocks of 0.999 ratio (MIN 999, MAX 1000 ns) and the largest
//     distortion below each configuration's upper bound (E = EDGELENGTH/MAX
//     of 1.985, 5.97, 2.99, 1.985 and 1.98).
// Each of those ten parameter sets runs three times: random jitter on both
// sides, coder fastest against decoder slowest, and the reverse; the line
// distortion shape is random per edge. All 30 links must deliver every bit
// correctly, never have more than one bit in transit and never start an edge
// on an unstable line. The parameter sets are also checked against the three
// constraints; the clock-ratio and distortion bounds of each layout against
// the published margins (0.91/0.82/0.73/0.91/0.93 and
// 1.989/5.977/2.994/1.988/1.985); and the optimal sampling distance and
// fastest-layout formulas against the DC-balanced configurations.
`timescale 1ns / 1ps
module bmp_configs_tb;
  import bmp_pkg::*;

  localparam int unsigned NBITS = 600;
  localparam int unsigned NL    = 30;

  typedef struct packed {
    logic [31:0] ncell, mark, sample, tmin, tmax, el;
  } cfg_t;

  localparam cfg_t CFG[10] = '{
    '{ncell: 16, mark: 8,  sample: 11, tmin: 95,  tmax: 100,  el: 100},
    '{ncell: 32, mark: 16, sample: 23, tmin: 95,  tmax: 100,  el: 100},
    '{ncell: 18, mark: 5,  sample: 10, tmin: 95,  tmax: 100,  el: 100},
    '{ncell: 11, mark: 4,  sample: 7,  tmin: 95,  tmax: 100,  el: 100},
    '{ncell: 14, mark: 7,  sample: 10, tmin: 95,  tmax: 100,  el: 100},
    '{ncell: 16, mark: 8,  sample: 11, tmin: 999, tmax: 1000, el: 1985},
    '{ncell: 32, mark: 16, sample: 23, tmin: 999, tmax: 1000, el: 5970},
    '{ncell: 18, mark: 5,  sample: 10, tmin: 999, tmax: 1000, el: 2990},
    '{ncell: 11, mark: 4,  sample: 7,  tmin: 999, tmax: 1000, el: 1985},
    '{ncell: 14, mark: 7,  sample: 10, tmin: 999, tmax: 1000, el: 1980}
  };
  // margins of the first five configurations: smallest clock ratio with one
  // cycle of distortion, and largest distortion with a 0.999 clock ratio
  localparam real RHO_TAB[5] = '{0.91, 0.82, 0.73, 0.91, 0.93};
  localparam real E_TAB[5]   = '{1.989, 5.977, 2.994, 1.988, 1.985};
  // clock regimes: {coder mode, decoder mode}
  localparam int unsigned TXM[3] = '{0, 1, 2};
  localparam int unsigned RXM[3] = '{0, 2, 1};

  logic rst = 1'b1;
  int   checks = 0;
  int   failures = 0;
  int   sent[NL], received[NL], wrong[NL], overflows[NL], pending[NL];
  logic collision[NL];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s", what);
    end
  endtask

  for (genvar i = 0; i < NL; i++) begin : g_link
    localparam cfg_t C = CFG[i / 3];
    logic in_bit, get, put, out, tx_clk, rx_clk, v, w, unstable;
    bmp_system #(
      .CELL(C.ncell), .MARK(C.mark), .SAMPLE(C.sample),
      .MIN(C.tmin), .MAX(C.tmax), .EDGELENGTH(C.el),
      .TX_MODE(TXM[i % 3]), .RX_MODE(RXM[i % 3]), .WIRE_MODE(0),
      .TX_PHASE(1 + i), .RX_PHASE(1 + 37 * i % 97), .SEED(100 + 7 * i)
    ) u_link (
      .rst(rst), .in_bit(in_bit), .get(get), .put(put), .out(out),
      .tx_clk(tx_clk), .rx_clk(rx_clk), .v(v), .w(w),
      .wire_unstable(unstable), .wire_collision(collision[i])
    );
    bmp_tester u_tester (
      .rst(rst), .tx_clk(tx_clk), .get(get), .put(put), .out(out),
      .in_bit(in_bit), .sent(sent[i]), .received(received[i]), .wrong(wrong[i]),
      .overflows(overflows[i]), .pending_at_get(pending[i])
    );
  end

  initial begin : watchdog
    #(64'(NBITS + 20) * 32 * 1000 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_sent();
    for (int i = 0; i < NL; i++) if (sent[i] < NBITS) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    for (int c = 0; c < 10; c++)
      check(params_ok(CFG[c].ncell, CFG[c].mark, CFG[c].sample, CFG[c].tmin, CFG[c].tmax, CFG[c].el),
            $sformatf("configuration %0d violates the constraints", c));
    // published margins of the five layouts, rounded to the first value that
    // works: rho in hundredths with E = 1, E in thousandths with rho = 0.999
    for (int c = 0; c < 5; c++) begin
      real r, e;
      r = rho_min(CFG[c].ncell, CFG[c].mark, CFG[c].sample, 1.0);
      e = e_max(CFG[c].ncell, CFG[c].mark, CFG[c].sample, 0.999);
      check(RHO_TAB[c] > r && RHO_TAB[c] - r <= 0.01 + 1e-9,
            $sformatf("%0d/%0d/%0d: rho bound %f against %f", CFG[c].ncell, CFG[c].mark,
                      CFG[c].sample, r, RHO_TAB[c]));
      check(E_TAB[c] < e && e - E_TAB[c] <= 0.001 + 1e-9,
            $sformatf("%0d/%0d/%0d: E bound %f against %f", CFG[c].ncell, CFG[c].mark,
                      CFG[c].sample, e, E_TAB[c]));
    end
    check(sample_opt(7) == 10 && sample_opt(8) == 11 && sample_opt(16) == 23,
          "optimal sampling distance formula");
    // fastest DC-balanced layouts: 14/7/10 for one cycle of distortion,
    // 30/15/22 for almost six
    check(fastest_mark(1.0, 0.999) == 7 && fastest_mark(5.9, 0.999) == 15 &&
          sample_opt(15) == 22, "fastest layout selection");
    check(params_ok(30, 15, 22, 999, 1000, 5900) && !params_ok(28, 14, 20, 999, 1000, 5900),
          "30/15/22 valid and 28/14/20 invalid for E = 5.9");
    // the 14/7/10 cell is not valid with the Intel timing of the 16/8/11 cell
    check(params_ok(16, 8, 11, 89, 100, 89) && !params_ok(14, 7, 10, 89, 100, 89),
          "reference timing check");
    #5000 rst = 1'b0;
    while (!all_sent()) #10000;
    #50000;
    for (int i = 0; i < NL; i++) begin
      check(wrong[i] == 0 && overflows[i] == 0 && pending[i] == 0 &&
            sent[i] - received[i] <= 1 && received[i] >= NBITS - 1 && !collision[i],
            $sformatf("link %0d (%0d/%0d/%0d, regime %0d): sent %0d received %0d wrong %0d overflows %0d pending %0d collision %b",
                      i, CFG[i / 3].ncell, CFG[i / 3].mark, CFG[i / 3].sample, i % 3,
                      sent[i], received[i], wrong[i], overflows[i], pending[i], collision[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
