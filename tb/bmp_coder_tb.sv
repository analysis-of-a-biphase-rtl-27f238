// bmp_coder_tb: self-checking test of the biphase mark encoder.
//
// Drives the coder from an ideal 10 ns clock with random bits and rebuilds the
// expected line level tick by tick from the definition of the code: a toggle
// on the first tick of every CELL-tick cell and, for a 1, a second toggle MARK
// ticks into the cell. Checks, on every tick, the get strobe (a new bit is
// taken exactly once per cell), the line level and therefore the edge timing.
// Two instances run side by side: the default 16/8 cell and the 14/7 cell.
`timescale 1ns / 1ps
module bmp_coder_tb;

  localparam int unsigned NBITS = 400;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic in_bit = 1'b0;
  logic get_a, v_a, get_b, v_b;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  bmp_coder u_a (.clk(clk), .rst(rst), .in_bit(in_bit), .get(get_a), .v(v_a));
  bmp_coder #(.CELL(14), .MARK(7)) u_b (.clk(clk), .rst(rst), .in_bit(in_bit), .get(get_b), .v(v_b));

  // Reference for one coder instance: returns the expected level after tick t.
  logic exp_v_a = 1'b0, exp_v_b = 1'b0;
  logic bit_a = 1'b0, bit_b = 1'b0;
  int   tick = 0;
  int   ones = 0, zeros = 0;

  initial begin : watchdog
    repeat (NBITS * 16 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // new random bit after every rising edge
  always @(negedge clk) in_bit <= 1'($urandom);

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (tick = 0; tick < NBITS * 16; tick++) begin
      @(posedge clk);
      // get must be high exactly at cell starts, before the edge updates
      checks++;
      if (get_a !== (tick % 16 == 0)) begin
        failures++;
        $display("t=%0d coder 16/8: get=%b expected %b", tick, get_a, tick % 16 == 0);
      end
      checks++;
      if (get_b !== (tick % 14 == 0)) begin
        failures++;
        $display("t=%0d coder 14/7: get=%b expected %b", tick, get_b, tick % 14 == 0);
      end
      if (tick % 16 == 0) begin
        bit_a = in_bit; exp_v_a = ~exp_v_a;
        if (in_bit) ones++; else zeros++;
      end else if (bit_a && tick % 16 == 8) exp_v_a = ~exp_v_a;
      if (tick % 14 == 0) begin
        bit_b = in_bit; exp_v_b = ~exp_v_b;
      end else if (bit_b && tick % 14 == 7) exp_v_b = ~exp_v_b;
      #1;
      checks++;
      if (v_a !== exp_v_a) begin
        failures++;
        $display("t=%0d coder 16/8: v=%b expected %b", tick, v_a, exp_v_a);
      end
      checks++;
      if (v_b !== exp_v_b) begin
        failures++;
        $display("t=%0d coder 14/7: v=%b expected %b", tick, v_b, exp_v_b);
      end
    end
    checks++;
    if (ones == 0 || zeros == 0) begin
      failures++;
      $display("stimulus did not contain both bit values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
