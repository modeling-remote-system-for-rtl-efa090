// rle_compressor_tb: first the byte sequence of the reference waveform
// (00, 0a, 0c x3, 05, 0d x3, 00, then a flush), which must give the words
// 0100 010a 030c 0105 030d 0100; then random runs, a run longer than the
// largest count, flushes and a stalling consumer, all against a reference
// encoder written here. Also checks that each word appears one cycle after
// the byte that ends its run.
module rle_compressor_tb;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, flush = 0, out_valid, out_ready = 1, run_open;
  logic [7:0] in_data = 0;
  logic [15:0] out_word;
  logic [15:0] expq[$];
  int unsigned checks = 0, failures = 0, words = 0;
  // reference encoder state
  bit   ref_open = 0;
  logic [7:0] ref_sym;
  int   ref_cnt;

  always #5 clk = ~clk;
  rle_compressor #(.SYM_W(8), .CNT_W(8)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void ref_byte(input logic [7:0] b);
    if (!ref_open) begin ref_open = 1; ref_sym = b; ref_cnt = 1; end
    else if (b == ref_sym && ref_cnt < 255) ref_cnt++;
    else begin expq.push_back({8'(ref_cnt), ref_sym}); ref_sym = b; ref_cnt = 1; end
  endfunction
  function automatic void ref_flush();
    if (ref_open) expq.push_back({8'(ref_cnt), ref_sym});
    ref_open = 0;
  endfunction

  task automatic send(input logic [7:0] b);
    @(negedge clk);
    in_valid = 1; in_data = b;
    do @(posedge clk); while (!in_ready);
    ref_byte(b);
    #1 in_valid = 0;
  endtask
  task automatic do_flush();
    @(negedge clk);
    flush = 1;
    do @(posedge clk); while (!in_ready);
    ref_flush();
    #1 flush = 0;
  endtask

  // scoreboard
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    words++;
    if (expq.size() == 0) check(0, $sformatf("unexpected word %04h", out_word));
    else begin
      logic [15:0] e;
      e = expq.pop_front();
      check(out_word == e, $sformatf("word %04h expected %04h", out_word, e));
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] fig[] = '{8'h00, 8'h0a, 8'h0c, 8'h0c, 8'h0c, 8'h05, 8'h0d, 8'h0d, 8'h0d, 8'h00};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // timing: a word is valid the cycle after the byte that ends its run
    send(8'h11);
    send(8'h22);
    check(out_valid && out_word == 16'h0111, "word appears one cycle after the ending byte");
    do_flush();
    @(negedge clk);
    check(!run_open, "flush empties the encoder");
    // reference sequence; the words are checked by the scoreboard
    foreach (fig[i]) send(fig[i]);
    do_flush();
    repeat (3) @(posedge clk);
    // long run: saturates at 255
    for (int i = 0; i < 300; i++) send(8'h7f);
    send(8'h80);
    // random runs with a stalling consumer
    fork
      begin
        for (int r = 0; r < 400; r++) begin
          logic [7:0] b; int len;
          b = 8'($urandom_range(0, 7));
          len = $urandom_range(1, 6);
          for (int k = 0; k < len; k++) send(b);
          if ($urandom_range(0, 9) == 0) do_flush();
        end
        do_flush();
      end
      begin
        for (int t = 0; t < 4000; t++) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 3) != 0);
        end
        out_ready = 1;
      end
    join
    repeat (10) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d words never came", expq.size()));
    check(words > 300, "enough words compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
