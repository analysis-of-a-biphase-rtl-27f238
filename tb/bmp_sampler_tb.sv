// bmp_sampler_tb: self-checking test of the line sampler.
//
// Drives a random line that may change at any instant inside the 10 ns
// decoder clock period (never on the edge itself) and checks that after every
// rising edge the sampler holds the value the line had at that edge, that it
// holds it for the whole cycle, and that reset loads the reset value.
`timescale 1ns / 1ps
module bmp_sampler_tb;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic w = 1'b1;
  logic new_o;
  logic at_edge;
  int   checks = 0;
  int   failures = 0;
  int   changes = 0;

  always #5 clk = ~clk;

  bmp_sampler u_dut (.clk(clk), .rst(rst), .w(w), .new_o(new_o));

  initial begin : watchdog
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line: a new random value at a random offset 1..9 ns after each edge
  always @(posedge clk) begin
    logic nv;
    #(1 + $urandom % 9);
    nv = 1'($urandom);
    if (nv != w) changes++;
    w = nv;
  end

  initial begin
    @(posedge clk);
    #1;
    checks++;
    if (new_o !== 1'b0) begin
      failures++;
      $display("reset value %b, expected 0", new_o);
    end
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      at_edge = w;
      #0.5;
      checks++;
      if (new_o !== at_edge) begin
        failures++;
        $display("cycle %0d: sampled %b, line was %b", i, new_o, at_edge);
      end
      @(negedge clk);
      checks++;
      if (new_o !== at_edge) begin
        failures++;
        $display("cycle %0d: sample changed within the cycle", i);
      end
    end
    checks++;
    if (changes < 100) begin
      failures++;
      $display("line changed only %0d times", changes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
