// bmp_tester: testbench environment for one biphase mark link.
//
// Supplies a random bit whenever the coder asks for one (get, sampled on the
// rising edge of tx_clk; in_bit changes on the falling edge), remembers the
// bits in transit, and compares every bit the decoder delivers with the
// oldest one. A delivery is taken when put rises (just after the decoder's
// deciding clock edge), so that a request arriving later in time sees the
// bit as delivered. Counts: bits sent and received, wrong bits
// (including a put with nothing in transit), overflows (a new request while
// two bits are still undelivered, after which the oldest is dropped) and
// requests made while one bit was still undelivered. Starts only when rst is
// low.
`timescale 1ns / 1ps
module bmp_tester (
  input  logic rst,
  input  logic tx_clk,
  input  logic get,
  input  logic put,
  input  logic out,
  output logic in_bit,
  output int   sent,
  output int   received,
  output int   wrong,
  output int   overflows,
  output int   pending_at_get
);

  logic fifo[$];

  initial begin
    in_bit         = 1'b0;
    sent           = 0;
    received       = 0;
    wrong          = 0;
    overflows      = 0;
    pending_at_get = 0;
  end

  always @(negedge tx_clk) in_bit <= 1'($urandom);

  always @(posedge tx_clk) begin
    if (!rst && get) begin
      if (fifo.size() != 0) pending_at_get++;
      if (fifo.size() >= 2) begin
        overflows++;
        void'(fifo.pop_front());
      end
      fifo.push_back(in_bit);
      sent++;
    end
  end

  // take each bit the moment put rises, not at the next decoder tick
  always @(posedge put) begin
    #0.01;
    if (!rst) begin
      received++;
      if (fifo.size() == 0) wrong++;
      else if (fifo.pop_front() != out) wrong++;
    end
  end

endmodule
