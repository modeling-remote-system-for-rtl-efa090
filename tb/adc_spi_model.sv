// adc_spi_model: behavioural model of the 8-bit serial ADC, for testbenches
// only. When `cs_n` falls it takes `sample` as the converted value and puts
// its most significant bit on `miso`; each falling edge of `sclk` while
// `cs_n` is low moves the next bit onto `miso` (SPI mode 0). `conversions`
// counts the chip-select cycles.
module adc_spi_model #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              sclk,
  input  logic              cs_n,
  output logic              miso,
  input  logic [DATA_W-1:0] sample,
  output int unsigned       conversions
);
  logic [DATA_W-1:0] sh;
  initial begin
    miso        = 1'b0;
    sh          = '0;
    conversions = 0;
  end
  always @(negedge cs_n) begin
    sh          = sample;
    miso        = sh[DATA_W-1];
    conversions = conversions + 1;
  end
  always @(negedge sclk) begin
    if (!cs_n) begin
      sh   = {sh[DATA_W-2:0], 1'b0};
      miso = sh[DATA_W-1];
    end
  end
endmodule
