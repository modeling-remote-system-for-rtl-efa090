// sensor_link_top_tb: end-to-end run of the whole link at its default
// parameters. An ADC model supplies a slowly changing sensor signal (values
// held for 2 to 12 samples, as a slow biosignal would be after 8-bit
// conversion); the serial line drives a quadrature model of the FSK radio
// (one bit every 6 cycles, a quadrant step every cycle) whose limited I/Q
// outputs return to the symbol detector; the receiver is sampled once per
// bit. Phase 1: every recovered byte must equal the sample the ADC gave, in
// order, and at least 1000 must arrive. Phase 2: single bits are reversed
// on the radio inside frames until the receiver reports an FCS failure.
// Phase 3: a signal that changes every sample defeats the compression and
// must overflow the buffer. Each mechanism (compressed runs, block flushes,
// frames, zero insertion and removal, idle fill, detector set and reset (demodulated bit rises and falls),
// FCS rejection, buffer overflow) is counted and must occur.
module sensor_link_top_tb;
  localparam int unsigned BITP = 6;
  logic clk = 0, rst_n = 0, enable = 0;
  logic adc_sclk, adc_cs_n, adc_miso;
  logic tx_bit_tick = 0, tx_bit, tx_strobe, tx_in_frame;
  logic rx_a, rx_c, demod_bit, flip = 0;
  logic out_valid, out_ready = 1;
  logic [7:0] out_data, sample = 8'h80;
  logic [15:0] overflow_cnt, block_cnt, frame_cnt, stuff_cnt, underrun_cnt;
  logic [15:0] rx_ok_cnt, rx_crc_err_cnt, rx_drop_cnt, rx_destuff_cnt, rx_run_cnt;
  int unsigned conversions;
  logic rx_frame_ok, rx_frame_err;
  int unsigned n_ok_pulses = 0, n_err_pulses = 0;
  logic [7:0] sent[$];
  int unsigned checks = 0, failures = 0, received = 0, compare = 1, phase = 1;
  int unsigned n_runs = 0, n_sets = 0, n_resets = 0, n_idle = 0;

  always #5 clk = ~clk;

  sensor_link_top dut (
    .clk, .rst_n, .enable,
    .adc_sclk, .adc_cs_n, .adc_miso,
    .tx_bit_tick, .tx_bit, .tx_strobe, .tx_in_frame,
    .rx_a, .rx_c, .rx_bit_tick(tx_bit_tick), .demod_bit,
    .out_valid, .out_ready, .out_data,
    .overflow_cnt, .block_cnt, .frame_cnt, .stuff_cnt, .underrun_cnt,
    .rx_ok_cnt, .rx_crc_err_cnt, .rx_drop_cnt, .rx_destuff_cnt, .rx_run_cnt,
    .rx_frame_ok, .rx_frame_err
  );
  adc_spi_model #(.DATA_W(8)) adc (.sclk(adc_sclk), .cs_n(adc_cs_n), .miso(adc_miso), .sample, .conversions);
  fsk_iq_model #(.STEP_CYCLES(1)) radio (.clk, .rst_n, .bit_in(tx_bit), .flip, .a(rx_a), .c(rx_c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sensor signal: record what each conversion returned, then move on
  int unsigned hold = 0;
  always @(negedge adc_cs_n) sent.push_back(sample);
  always @(posedge adc_cs_n) if (rst_n) begin
    if (phase == 3) sample = 8'($urandom);
    else if (hold == 0) begin
      hold   = $urandom_range(1, 11);
      sample = sample + 8'($signed(4'($urandom_range(0, 6)) - 4'sd3)) + 8'd1;
    end else hold--;
  end

  // line bit clock
  initial begin
    int cnt = 0;
    forever begin
      @(negedge clk);
      cnt = (cnt + 1) % BITP;
      tx_bit_tick = (cnt == 0);
    end
  end

  // mechanism counters and scoreboard
  int unsigned ones_run = 0;
  logic demod_q = 0;
  always @(posedge clk) if (rst_n) begin
    demod_q <= demod_bit;
    if (rx_frame_ok) n_ok_pulses++;
    if (rx_frame_err) n_err_pulses++;
    if (demod_bit && !demod_q) n_sets++;
    if (!demod_bit && demod_q) n_resets++;
    if (tx_strobe) begin
      ones_run = tx_bit ? ones_run + 1 : 0;
      if (ones_run == 8 && !tx_in_frame) n_idle++;
    end
    if (out_valid && out_ready) begin
      if (compare) begin
        if (received >= sent.size()) check(0, "byte that was never sampled");
        else check(out_data == sent[received],
                   $sformatf("sample %0d: got %02h expected %02h", received, out_data, sent[received]));
      end
      received++;
    end
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned errs0, tries;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    enable = 1;
    // phase 1: clean channel
    wait (received >= 1200);
    compare = 0;
    check(overflow_cnt == 0, "no overflow with a slow signal");
    check(underrun_cnt == 0, "no underrun");
    check(rx_crc_err_cnt == 0 && rx_drop_cnt == 0, "no frame lost on a clean channel");
    // phase 2: channel errors
    phase = 2;
    errs0 = rx_crc_err_cnt;
    tries = 0;
    while (rx_crc_err_cnt == errs0 && tries < 40) begin
      wait (tx_in_frame);
      repeat ($urandom_range(20, 60) * BITP) @(posedge clk);
      @(negedge clk) flip = 1;
      repeat (BITP) @(negedge clk);
      flip = 0;
      wait (!tx_in_frame);
      repeat (50 * BITP) @(posedge clk);
      tries++;
    end
    check(rx_crc_err_cnt > errs0, $sformatf("FCS rejection seen after %0d bit errors", tries));
    // phase 3: incompressible signal
    phase = 3;
    repeat (64 * 32 * 12) @(posedge clk);
    enable = 0;
    repeat (20000) @(posedge clk);
    n_runs = received - rx_run_cnt;   // bytes beyond one per decoded run
    $display("samples %0d received %0d runs %0d blocks %0d frames %0d stuffed %0d destuffed %0d idle %0d sets %0d resets %0d crc_err %0d drop %0d overflow %0d",
             sent.size(), received, n_runs, block_cnt, frame_cnt, stuff_cnt, rx_destuff_cnt, n_idle,
             n_sets, n_resets, rx_crc_err_cnt, rx_drop_cnt, overflow_cnt);
    check(received > rx_run_cnt, "compressed runs (more bytes than runs)");
    check(block_cnt > 0, "block flushes");
    check(rx_ok_cnt > 0 && frame_cnt > 0, "frames");
    check(n_ok_pulses == rx_ok_cnt, "one frame_ok pulse per accepted frame");
    check(n_err_pulses == rx_crc_err_cnt + rx_drop_cnt, "one frame_err pulse per rejected frame");
    check(stuff_cnt > 0, "zero insertion");
    check(rx_destuff_cnt > 0, "zero removal");
    check(n_idle > 0, "idle fill");
    check(n_sets > 0 && n_resets > 0, "detector set and reset (demodulated bit rises and falls)");
    check(overflow_cnt > 0, "buffer overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
