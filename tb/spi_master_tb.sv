// spi_master_tb: reads random samples through the ADC model and checks the
// value, the chip-select framing, the number of sclk pulses and the
// transfer time of 17 half periods of sclk (8 low, 8 high, 1 closing low).
module spi_master_tb;
  localparam int unsigned DIV = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, sclk, cs_n, miso;
  logic [7:0] data, sample;
  int unsigned conversions, checks = 0, failures = 0, rises;

  always #5 clk = ~clk;

  spi_master #(.DATA_W(8), .CLK_DIV(DIV)) dut (.*);
  adc_spi_model #(.DATA_W(8)) adc (.sclk, .cs_n, .miso, .sample, .conversions);

  always @(posedge sclk) rises++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    sample = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(cs_n && !busy && !sclk, "idle state after reset");
    for (int i = 0; i < 40; i++) begin
      sample = (i == 0) ? 8'hA5 : (i == 1) ? 8'hFF : (i == 2) ? 8'h00 : 8'($urandom);
      rises  = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
        if (cyc > 1000) break;
      end
      check(data == sample, $sformatf("sample %0d: read %02h expected %02h", i, data, sample));
      check(cyc - 1 == 17 * DIV, $sformatf("transfer took %0d cycles, expected %0d", cyc - 1, 17 * DIV));
      check(rises == 8, $sformatf("%0d sclk pulses", rises));
      @(negedge clk);
      check(cs_n && !busy, "cs_n released after transfer");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    check(conversions == 40, "one chip-select per transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
