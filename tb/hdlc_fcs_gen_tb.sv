// hdlc_fcs_gen_tb: frames of random bytes (and the X.25 check string
// "123456789", FCS 906E) go in as LSB-first bits with the last one tagged.
// The output must repeat the content and then the complemented CRC-16,
// low byte first, LSB first, with `last` on the final FCS bit only; the
// consumer stalls at random and the CRC is computed here byte-wise.
module hdlc_fcs_gen_tb;
  import sensor_link_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 1;
  hdlc_bit_t in_bit = '0, out_bit;
  hdlc_bit_t expq[$];
  bit src_done = 0;
  int unsigned checks = 0, failures = 0, frames = 0;

  always #5 clk = ~clk;
  hdlc_fcs_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] x25(input logic [7:0] d[$]);
    logic [15:0] r;
    r = 16'hFFFF;
    foreach (d[i]) begin
      r ^= {8'h00, d[i]};
      for (int k = 0; k < 8; k++) r = r[0] ? ((r >> 1) ^ 16'h8408) : (r >> 1);
    end
    return ~r;
  endfunction

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (expq.size() == 0) check(0, "unexpected bit");
    else begin
      hdlc_bit_t e;
      e = expq.pop_front();
      check(out_bit == e, "output bit");
      if (e.last) frames++;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frame(input logic [7:0] d[$]);
    logic [15:0] f;
    f = x25(d);
    foreach (d[i]) for (int k = 0; k < 8; k++) expq.push_back('{bit_val: d[i][k], last: 1'b0});
    for (int k = 0; k < 16; k++) expq.push_back('{bit_val: f[k], last: k == 15});
    foreach (d[i]) for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      in_valid = 1; in_bit = '{bit_val: d[i][k], last: (i == d.size() - 1) && k == 7};
      do @(posedge clk); while (!in_ready);
      #1 in_valid = 0;
      if ($urandom_range(0, 5) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
  endtask

  initial begin
    logic [7:0] tv[$] = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    logic [7:0] d[$];
    check(x25(tv) == 16'h906E, "reference CRC");
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      begin
        send_frame(tv);
        for (int f = 0; f < 60; f++) begin
          d = {};
          for (int i = 0; i < $urandom_range(1, 14); i++) d.push_back(8'($urandom));
          send_frame(d);
        end
        src_done = 1;
      end
      while (!src_done) begin @(negedge clk); out_ready = ($urandom_range(0, 3) != 0); end
    join
    out_ready = 1;
    repeat (100) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d bits never came", expq.size()));
    check(frames == 61, $sformatf("%0d frames closed", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
