// bmp_decoder_tb: self-checking test of the biphase mark decoder.
//
// Feeds the decoder an already sampled line (as the sampler would) on an ideal
// 10 ns clock. The line is generated here as a biphase mark wave measured in
// decoder ticks: cells of random length between SAMPLE+2 and SAMPLE+6 ticks
// and, for a 1, a mid-cell toggle a random 2..SAMPLE-1 ticks after the cell
// edge, so the decision sample always falls between the mid-cell edge and the
// next cell edge. Checks every decoded bit against the bit sent, and that the
// put strobe comes exactly SAMPLE ticks after the tick that saw the cell edge
// (one tick after the line changed). Runs with the default SAMPLE = 11.
`timescale 1ns / 1ps
module bmp_decoder_tb;

  localparam int unsigned SAMPLE = 11;
  localparam int unsigned NBITS  = 500;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic line = 1'b0;
  logic put, out;
  int   checks = 0;
  int   failures = 0;
  int   tick = 0;

  always #5 clk = ~clk;
  always @(posedge clk) tick <= tick + 1;

  bmp_decoder u_dut (.clk(clk), .rst(rst), .new_i(line), .put(put), .out(out));

  // expected bits and the tick at which each cell's edge was driven
  logic exp_bits[$];
  int   edge_tick[$];
  int   got = 0;
  int   ones = 0, zeros = 0;

  initial begin : watchdog
    repeat (NBITS * (SAMPLE + 8) + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: line changes just after a rising edge
  initial begin
    int len, mid;
    logic b;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < NBITS; i++) begin
      b   = 1'($urandom);
      len = SAMPLE + 2 + ($urandom % 5);
      mid = 2 + ($urandom % (SAMPLE - 2));
      @(posedge clk);
      #1;
      line = ~line;
      exp_bits.push_back(b);
      edge_tick.push_back(tick);
      for (int k = 1; k < len; k++) begin
        @(posedge clk);
        #1;
        if (b && k == mid) line = ~line;
      end
    end
    repeat (SAMPLE + 4) @(posedge clk);
    checks++;
    if (got != NBITS || exp_bits.size() != 0) begin
      failures++;
      $display("decoded %0d bits, expected %0d", got, NBITS);
    end
    checks++;
    if (ones == 0 || zeros == 0) begin
      failures++;
      $display("decoded stream lacks one of the bit values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: put is registered, look just after each rising edge
  always @(posedge clk) begin
    #2;
    if (!rst && put) begin
      checks++;
      if (exp_bits.size() == 0) begin
        failures++;
        $display("tick %0d: put without a bit in transit", tick);
      end else begin
        logic e;
        int   et;
        e  = exp_bits.pop_front();
        et = edge_tick.pop_front();
        got++;
        if (e) ones++; else zeros++;
        if (out !== e) begin
          failures++;
          $display("tick %0d: decoded %b expected %b", tick, out, e);
        end
        checks++;
        // line changed after tick et-1's edge; seen at tick et (detection),
        // put rises at the edge SAMPLE ticks later
        if (tick - 1 != et + SAMPLE) begin
          failures++;
          $display("tick %0d: put latency %0d ticks, expected %0d", tick, tick - 1 - et, SAMPLE);
        end
      end
    end
  end

endmodule
