// hdlc_bit_stuffer_tb: frames of random bits, mostly ones, some ending in
// five ones so the inserted zero must carry the `last` tag. The output must
// equal the input with a 0 after every five consecutive ones (count
// restarting at each frame), and `stuffed` must pulse once per inserted 0.
module hdlc_bit_stuffer_tb;
  import sensor_link_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 1, stuffed;
  hdlc_bit_t in_bit = '0, out_bit;
  hdlc_bit_t expq[$];
  bit src_done = 0;
  int unsigned checks = 0, failures = 0, exp_stuffed = 0, n_stuffed = 0, tail_cases = 0;

  always #5 clk = ~clk;
  hdlc_bit_stuffer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (stuffed) n_stuffed++;
    if (out_valid && out_ready) begin
      if (expq.size() == 0) check(0, "unexpected bit");
      else begin
        hdlc_bit_t e;
        e = expq.pop_front();
        check(out_bit == e, $sformatf("got %b/%b expected %b/%b", out_bit.bit_val, out_bit.last, e.bit_val, e.last));
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      begin
      for (int f = 0; f < 200; f++) begin
        bit b[$];
        int ones, len;
        b = {};
        len = $urandom_range(1, 40);
        for (int i = 0; i < len; i++) b.push_back($urandom_range(0, 3) != 0);
        if (f % 5 == 0) for (int i = 0; i < 5; i++) b.push_back(1'b1);
        ones = 0;
        foreach (b[i]) begin
          bit lastb;
          lastb = (i == b.size() - 1);
          ones = b[i] ? ones + 1 : 0;
          if (ones == 5) begin
            expq.push_back('{bit_val: b[i], last: 1'b0});
            expq.push_back('{bit_val: 1'b0, last: lastb});
            exp_stuffed++;
            if (lastb) tail_cases++;
            ones = 0;
          end else expq.push_back('{bit_val: b[i], last: lastb});
        end
        foreach (b[i]) begin
          @(negedge clk);
          in_valid = 1; in_bit = '{bit_val: b[i], last: i == b.size() - 1};
          do @(posedge clk); while (!in_ready);
          #1 in_valid = 0;
        end
      end
      src_done = 1;
      end
      while (!src_done) begin @(negedge clk); out_ready = ($urandom_range(0, 3) != 0); end
    join
    out_ready = 1;
    repeat (50) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d bits never came", expq.size()));
    check(n_stuffed == exp_stuffed && exp_stuffed > 50, $sformatf("stuffed %0d expected %0d", n_stuffed, exp_stuffed));
    check(tail_cases > 0, "a frame ended on five ones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
