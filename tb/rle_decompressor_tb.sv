// rle_decompressor_tb: random {count, symbol} byte pairs, count 0 included,
// with random gaps on the input and a stalling consumer; the output must be
// each symbol repeated count times, in order. Also checks that an
// uninterrupted pair expanding to n bytes takes 2 + n cycles.
module rle_decompressor_tb;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [7:0] in_data = 0, out_data;
  logic [15:0] run_cnt;
  logic [7:0] expq[$];
  int unsigned checks = 0, failures = 0, outs = 0;

  always #5 clk = ~clk;
  rle_decompressor #(.SYM_W(8), .CNT_W(8)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b);
    @(negedge clk);
    in_valid = 1; in_data = b;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 0;
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    outs++;
    if (expq.size() == 0) check(0, "unexpected output byte");
    else begin
      logic [7:0] e;
      e = expq.pop_front();
      check(out_data == e, $sformatf("byte %02h expected %02h", out_data, e));
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // timing of one pair {5, 0x3c}
    for (int k = 0; k < 5; k++) expq.push_back(8'h3c);
    @(negedge clk);
    t0 = outs;
    send(8'd5);
    send(8'h3c);
    t1 = 0;
    while (expq.size() != 0 && t1 < 100) begin @(posedge clk); #1; t1++; end
    check(t1 == 5, $sformatf("5 bytes took %0d cycles after the pair", t1));
    // random pairs
    fork
      begin
        for (int r = 0; r < 500; r++) begin
          logic [7:0] c, s;
          c = (r % 50 == 7) ? 8'd0 : (r % 97 == 3) ? 8'd255 : 8'($urandom_range(1, 9));
          s = 8'($urandom);
          for (int k = 0; k < c; k++) expq.push_back(s);
          send(c);
          repeat ($urandom_range(0, 2)) @(negedge clk);
          send(s);
        end
      end
      begin
        for (int t = 0; t < 6000; t++) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 3) != 0);
        end
        out_ready = 1;
      end
    join
    repeat (600) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d bytes never came", expq.size()));
    check(run_cnt == 501, $sformatf("run count %0d", run_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
