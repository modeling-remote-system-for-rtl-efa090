// symbol_detector_tb: random bits drive the quadrature model (a quadrant
// step every 2 cycles, 8 cycles per bit); the detector output sampled at
// the end of every bit must equal the bit. Also checks each AND group on
// its own: a forward quadrant step must set, a backward one reset, and `q`
// must follow 3 cycles after a step (2 synchroniser stages and the
// flip-flop).
module symbol_detector_tb;
  logic clk = 0, rst_n = 0, a = 0, c = 0, q, set_pulse, reset_pulse;
  logic m_a, m_c, bit_in = 0, flip = 0, use_model = 0;
  int unsigned checks = 0, failures = 0, sets = 0, resets = 0;

  always #5 clk = ~clk;
  symbol_detector #(.SYNC_STAGES(2)) dut (.clk, .rst_n, .a(use_model ? m_a : a), .c(use_model ? m_c : c), .q, .set_pulse, .reset_pulse);
  fsk_iq_model #(.STEP_CYCLES(2)) iq (.clk, .rst_n, .bit_in, .flip, .a(m_a), .c(m_c));

  always @(posedge clk) begin
    if (set_pulse) sets++;
    if (reset_pulse) resets++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // quadrant order for a 1: (1,1) (0,1) (0,0) (1,0)
    logic [1:0] quad [4] = '{2'b11, 2'b01, 2'b00, 2'b10};
    int k;
    repeat (2) @(posedge clk);
    rst_n = 1;
    {a, c} = quad[0];
    repeat (5) @(negedge clk);
    k = 0;
    // every forward step sets, every backward step resets, 3 cycles later
    for (int i = 0; i < 64; i++) begin
      bit fwd;
      logic q_prev;
      fwd = (i % 8) < 4 ? ((i / 8) % 2 == 0) : ((i / 8) % 2 == 1);
      k = fwd ? (k + 1) % 4 : (k + 3) % 4;
      @(negedge clk);
      q_prev = q;
      {a, c} = quad[k];
      repeat (2) @(negedge clk);
      if (i > 0 && q_prev != fwd) check(q == q_prev, "q must not move q_prev 3 cycles");
      @(negedge clk);
      check(q == fwd, $sformatf("step %0d (%s): q=%0d", i, fwd ? "forward" : "backward", q));
      repeat (2) @(negedge clk);
    end
    // random bit stream through the model
    use_model = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      bit_in = 1'($urandom);
      repeat (7) @(negedge clk);
      check(q == bit_in, $sformatf("bit %0d: sent %0d got %0d", i, bit_in, q));
    end
    check(sets > 100 && resets > 100, $sformatf("sets %0d resets %0d", sets, resets));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
