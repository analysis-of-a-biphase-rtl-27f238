// bmp_clock_model_tb: self-checking test of the oscillator model.
//
// Measures the time between consecutive rising edges of three instances with
// the default 89..100 ns tolerance: random jitter, always fastest and always
// slowest. Every period must lie in [MIN, MAX]; the random one must actually
// vary and reach close to both bounds, the worst-case ones must be exact.
`timescale 1ns / 1ps
module bmp_clock_model_tb;

  localparam int unsigned MIN = 89;
  localparam int unsigned MAX = 100;
  localparam int unsigned N   = 3000;

  logic clk_r, clk_f, clk_s;
  int   checks = 0;
  int   failures = 0;

  bmp_clock_model #(.MIN(MIN), .MAX(MAX), .MODE(0), .SEED(5)) u_r (.clk(clk_r));
  bmp_clock_model #(.MIN(MIN), .MAX(MAX), .MODE(1), .PHASE(3)) u_f (.clk(clk_f));
  bmp_clock_model #(.MIN(MIN), .MAX(MAX), .MODE(2), .PHASE(7)) u_s (.clk(clk_s));

  initial begin : watchdog
    #(N * MAX * 2);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime last_r = 0, last_f = 0, last_s = 0;
  real     pmin = 1.0e9, pmax = 0.0;
  int      n_r = 0, n_f = 0, n_s = 0;

  function automatic bit near(real a, real b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  always @(posedge clk_r) begin
    if (n_r > 0) begin
      real p;
      p = $realtime - last_r;
      checks++;
      if (p < MIN - 0.01 || p > MAX + 0.01) begin
        failures++;
        $display("random clock: period %0.3f outside [%0d,%0d]", p, MIN, MAX);
      end
      if (p < pmin) pmin = p;
      if (p > pmax) pmax = p;
    end
    last_r = $realtime;
    n_r++;
  end

  always @(posedge clk_f) begin
    if (n_f > 0) begin
      checks++;
      if (!near($realtime - last_f, MIN)) begin
        failures++;
        $display("fast clock: period %0.3f, expected %0d", $realtime - last_f, MIN);
      end
    end
    last_f = $realtime;
    n_f++;
  end

  always @(posedge clk_s) begin
    if (n_s > 0) begin
      checks++;
      if (!near($realtime - last_s, MAX)) begin
        failures++;
        $display("slow clock: period %0.3f, expected %0d", $realtime - last_s, MAX);
      end
    end
    last_s = $realtime;
    n_s++;
  end

  initial begin
    wait (n_r > N && n_f > N && n_s > N);
    checks++;
    if (!(pmin < MIN + 1.01 && pmax > MAX - 1.01)) begin
      failures++;
      $display("random clock did not spread over the range: %0.3f..%0.3f", pmin, pmax);
    end
    checks++;
    if (!(n_f > n_s)) begin
      failures++;
      $display("fast clock not faster than slow clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
