// spi_master: the SPI unit that reads one sample from the serial ADC.
//
// A one-cycle `start` pulse lowers `cs_n` and runs DATA_W clock periods on
// `sclk` (SPI mode 0: idle low, the ADC's `miso` is sampled on each rising
// edge, most significant bit first). Each half period of `sclk` lasts
// CLK_DIV cycles of `clk`. After the last rising edge and one more half
// period `cs_n` rises, `data` holds the sample and `done` pulses for one
// cycle, (2*DATA_W + 1)*CLK_DIV cycles after the clock edge that takes
// `start` (68 cycles at the defaults). `busy` is high from the
// cycle after `start` until `done`; a `start` while busy is ignored.
//
// The document names an SPI unit between the 8-bit ADC and the buffer; the
// SPI mode, bit order and clock divider are this design's choices.
module spi_master #(
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned CLK_DIV = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [DATA_W-1:0] data,
  output logic              sclk,
  output logic              cs_n,
  input  logic              miso
);

  localparam int unsigned DIV_W = $clog2(CLK_DIV + 1);
  localparam int unsigned BIT_W = $clog2(DATA_W + 1);

  logic [DIV_W-1:0]  div_cnt;
  logic [BIT_W-1:0]  bit_cnt;
  logic [DATA_W-1:0] shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      data    <= '0;
      sclk    <= 1'b0;
      cs_n    <= 1'b1;
      div_cnt <= '0;
      bit_cnt <= '0;
      shreg   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          cs_n    <= 1'b0;
          sclk    <= 1'b0;
          div_cnt <= '0;
          bit_cnt <= '0;
        end
      end else if (div_cnt == DIV_W'(CLK_DIV - 1)) begin
        div_cnt <= '0;
        if (!sclk) begin
          if (bit_cnt == BIT_W'(DATA_W)) begin
            // last half period done: end the transfer
            busy <= 1'b0;
            cs_n <= 1'b1;
            done <= 1'b1;
            data <= shreg;
          end else begin
            sclk    <= 1'b1;                         // rising edge: sample
            shreg   <= {shreg[DATA_W-2:0], miso};
            bit_cnt <= bit_cnt + 1'b1;
          end
        end else begin
          sclk <= 1'b0;                              // falling edge: ADC shifts
        end
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

  // the ADC is selected exactly while a transfer runs
  a_cs_busy: assert property (@(posedge clk) disable iff (!rst_n) cs_n == !busy);

endmodule
