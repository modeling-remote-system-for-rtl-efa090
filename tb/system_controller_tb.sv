// system_controller_tb: the SPI unit, the buffer and the compressor are
// modelled here. Checks that conversions start every SAMPLE_PERIOD cycles
// while enabled and never while disabled, that bytes move only when the
// buffer has one and the compressor is ready, that a flush follows every
// BLOCK_SAMPLES moved bytes before the next move and is held until taken,
// and that samples arriving at a full buffer are counted as overflow.
module system_controller_tb;
  localparam int unsigned SP = 64, BS = 32;
  logic clk = 0, rst_n = 0, enable = 0;
  logic spi_start, spi_busy = 0, spi_done = 0;
  logic buf_full = 0, buf_empty = 1, buf_rd_en;
  logic rle_in_valid, rle_in_ready = 1, rle_flush;
  logic [15:0] overflow_cnt, block_cnt;
  int unsigned checks = 0, failures = 0;
  int unsigned fill = 0, moved = 0, flushes = 0, starts = 0, last_start = 0, cyc = 0;
  int unsigned exp_ovf = 0, busy_left = 0;
  bit force_full = 0, flush_due = 0, en_prev = 0;

  always #5 clk = ~clk;
  system_controller #(.SAMPLE_PERIOD(SP), .BLOCK_SAMPLES(BS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // models, updated after each edge
  always @(posedge clk) if (rst_n) begin
    cyc++;
    // checks on what the controller drives in this cycle
    check(rle_in_valid == buf_rd_en, "valid follows read");
    if (buf_rd_en) begin
      check(!buf_empty && rle_in_ready, "move only with data and ready");
      check(!flush_due, "no move while a flush is due");
    end
    if (rle_flush && rle_in_ready) begin
      check(flush_due, "flush only after a full block");
      flush_due = 0;
      flushes++;
    end
    if (buf_rd_en) begin
      fill--;
      moved++;
      if (moved % BS == 0) flush_due = 1;
    end
    if (spi_start) begin
      check(en_prev, "no conversion while disabled");
      check(!spi_busy, "no start while busy");
      if (starts > 0) check(cyc - last_start == SP, $sformatf("start interval %0d", cyc - last_start));
      starts++;
      last_start = cyc;
      busy_left = 34;
    end
    spi_done <= 0;
    if (busy_left > 0) begin
      busy_left--;
      if (busy_left == 0) begin
        spi_done <= 1;
        if (fill == 16 || force_full) exp_ovf++;
        else fill++;
      end
    end
    en_prev = enable;
    #1;
    spi_busy     = (busy_left > 0);
    buf_empty    = (fill == 0);
    buf_full     = (fill == 16) || force_full;
    rle_in_ready = ($urandom_range(0, 3) != 0);
  end

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);
    check(starts == 0, "idle while disabled");
    enable = 1;
    repeat (SP * BS * 5) @(posedge clk);
    force_full = 1;
    repeat (SP * 4) @(posedge clk);
    force_full = 0;
    repeat (SP * BS * 2) @(posedge clk);
    enable = 0;
    repeat (SP * 4) @(posedge clk);
    #2;
    check(flushes >= 6, $sformatf("%0d flushes", flushes));
    check(flushes == block_cnt, "block count");
    check(overflow_cnt == exp_ovf && exp_ovf >= 3, $sformatf("overflow %0d expected %0d", overflow_cnt, exp_ovf));
    check(moved + exp_ovf == starts, $sformatf("moved %0d + dropped %0d vs %0d conversions", moved, exp_ovf, starts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
