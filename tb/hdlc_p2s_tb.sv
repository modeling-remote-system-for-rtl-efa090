// hdlc_p2s_tb: random bytes, some tagged last, with a stalling consumer.
// The serial output must be each byte LSB first with `last` only on bit 7
// of a tagged byte; with bytes always offered and the consumer always
// ready, 16 bytes must leave in 128 cycles (one bit per cycle, no gaps).
module hdlc_p2s_tb;
  import sensor_link_pkg::*;
  logic clk = 0, rst_n = 0, byte_valid = 0, byte_ready, byte_last = 0;
  logic [7:0] byte_data = 0;
  logic out_valid, out_ready = 1;
  hdlc_bit_t out_bit;
  hdlc_bit_t expq[$];
  int unsigned checks = 0, failures = 0, nbits = 0;
  bit stall = 0;

  always #5 clk = ~clk;
  hdlc_p2s dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    nbits++;
    if (expq.size() == 0) check(0, "unexpected bit");
    else begin
      hdlc_bit_t e;
      e = expq.pop_front();
      check(out_bit == e, $sformatf("bit %0d: got %b/%b expected %b/%b", nbits, out_bit.bit_val, out_bit.last, e.bit_val, e.last));
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] b, input logic l);
    for (int k = 0; k < 8; k++) expq.push_back('{bit_val: b[k], last: l && k == 7});
    byte_valid = 1; byte_data = b; byte_last = l;
    do @(posedge clk); while (!byte_ready);
    #1 byte_valid = 0;
  endtask

  initial begin
    int t0, n0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // throughput
    n0 = nbits;
    t0 = 0;
    fork
      for (int i = 0; i < 16; i++) send(8'($urandom), i == 15);
      while (nbits - n0 < 128 && t0 < 1000) begin @(posedge clk); #2; t0++; end
    join
    byte_valid = 0;
    while (nbits - n0 < 128 && t0 < 1000) begin @(posedge clk); #2; t0++; end
    check(t0 <= 129, $sformatf("128 bits took %0d cycles", t0));
    // random
    fork
      for (int i = 0; i < 400; i++) begin
        send(8'($urandom), $urandom_range(0, 4) == 0);
        if ($urandom_range(0, 3) == 0) begin byte_valid = 0; repeat ($urandom_range(1, 12)) @(negedge clk); end
      end
      for (int t = 0; t < 6000; t++) begin @(negedge clk); out_ready = ($urandom_range(0, 3) != 0); end
    join
    byte_valid = 0;
    out_ready = 1;
    repeat (30) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d bits never came", expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
