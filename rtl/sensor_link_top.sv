// sensor_link_top: digital part of the wireless sensor-monitoring link.
//
// Transmitter side (first FPGA): the system controller starts an ADC
// conversion every SAMPLE_PERIOD cycles; the SPI unit reads the 8-bit sample
// into the buffer storage; the controller moves samples into the RLE
// compressor and flushes it every BLOCK_SAMPLES samples; the HDLC
// transmitter frames the {count, symbol} words and sends them on `tx_bit`,
// one bit per `tx_bit_tick`, to the FSK modulator outside this module.
//
// Receiver side: the FSK receiver's limited I and Q signals come back on
// `rx_a` and `rx_c`; the symbol detector recovers the bit stream
// (`demod_bit`), which is sampled once per `rx_bit_tick`; the HDLC receiver
// checks and de-frames it (second FPGA) and the RLE decompressor returns the
// sample bytes on `out_*`.
//
// The ADC, the FSK transmitter, the radio channel and the analog receiver
// are not logic and are not in here: their signals are ports. Bit timing
// recovery for the received stream is not part of the design either, so the
// sampling strobe `rx_bit_tick` is a port. Both sides run on one clock here.
// Status counters and the receiver's per-frame pulses (`rx_frame_ok`,
// `rx_frame_err`) are outputs for monitoring.
module sensor_link_top
  import sensor_link_pkg::*;
#(
  parameter int unsigned SAMPLE_PERIOD = 64,
  parameter int unsigned BLOCK_SAMPLES = 32,
  parameter int unsigned SPI_CLK_DIV   = 4,
  parameter int unsigned BUF_DEPTH     = 16,
  parameter int unsigned INFO_BYTES    = 8,
  parameter int unsigned TX_FIFO_DEPTH = 32,
  parameter int unsigned RX_OUT_DEPTH  = 64,
  parameter logic [7:0]  ADDRESS       = 8'h01,
  parameter logic [7:0]  CONTROL       = 8'h03
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  // serial ADC
  output logic        adc_sclk,
  output logic        adc_cs_n,
  input  logic        adc_miso,
  // to the FSK transmitter
  input  logic        tx_bit_tick,
  output logic        tx_bit,
  output logic        tx_strobe,
  output logic        tx_in_frame,
  // from the FSK receiver
  input  logic        rx_a,
  input  logic        rx_c,
  input  logic        rx_bit_tick,
  output logic        demod_bit,
  // recovered samples
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  // status
  output logic [15:0] overflow_cnt,
  output logic [15:0] block_cnt,
  output logic [15:0] frame_cnt,
  output logic [15:0] stuff_cnt,
  output logic [15:0] underrun_cnt,
  output logic [15:0] rx_ok_cnt,
  output logic [15:0] rx_crc_err_cnt,
  output logic [15:0] rx_drop_cnt,
  output logic [15:0] rx_destuff_cnt,
  output logic [15:0] rx_run_cnt,
  output logic        rx_frame_ok,
  output logic        rx_frame_err
);

  // ---------------- transmitter FPGA ----------------
  logic                           spi_start, spi_busy, spi_done;
  logic [SAMPLE_W-1:0]            spi_data;
  logic                           buf_full, buf_empty, buf_rd_en;
  logic [SAMPLE_W-1:0]            buf_rd_data;
  logic                           rle_in_valid, rle_in_ready, rle_flush;
  logic                           rle_out_valid, rle_out_ready;
  rle_word_t                      rle_out_word;

  spi_master #(.DATA_W(SAMPLE_W), .CLK_DIV(SPI_CLK_DIV)) u_spi (
    .clk, .rst_n, .start(spi_start), .busy(spi_busy), .done(spi_done),
    .data(spi_data), .sclk(adc_sclk), .cs_n(adc_cs_n), .miso(adc_miso)
  );

  buffer_fifo #(.WIDTH(SAMPLE_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_en(spi_done), .wr_data(spi_data), .full(buf_full),
    .rd_en(buf_rd_en), .rd_data(buf_rd_data), .empty(buf_empty), .count()
  );

  system_controller #(.SAMPLE_PERIOD(SAMPLE_PERIOD), .BLOCK_SAMPLES(BLOCK_SAMPLES)) u_ctrl (
    .clk, .rst_n, .enable,
    .spi_start, .spi_busy, .spi_done,
    .buf_full, .buf_empty, .buf_rd_en,
    .rle_in_valid, .rle_in_ready, .rle_flush,
    .overflow_cnt, .block_cnt
  );

  rle_compressor #(.SYM_W(SAMPLE_W), .CNT_W(8)) u_rle (
    .clk, .rst_n,
    .in_valid(rle_in_valid), .in_ready(rle_in_ready), .in_data(buf_rd_data),
    .flush(rle_flush),
    .out_valid(rle_out_valid), .out_ready(rle_out_ready), .out_word(rle_out_word),
    .run_open()
  );

  hdlc_tx #(
    .INFO_BYTES(INFO_BYTES), .FIFO_DEPTH(TX_FIFO_DEPTH),
    .ADDRESS(ADDRESS), .CONTROL(CONTROL)
  ) u_hdlc_tx (
    .clk, .rst_n, .bit_tick(tx_bit_tick),
    .word_valid(rle_out_valid), .word_ready(rle_out_ready), .word(rle_out_word),
    .tx_bit, .tx_strobe, .in_frame(tx_in_frame),
    .frame_cnt, .stuff_cnt, .underrun_cnt
  );

  // ---------------- receiver ----------------
  logic       rx_byte_valid, rx_byte_ready;
  logic [7:0] rx_byte;

  symbol_detector #(.SYNC_STAGES(2)) u_det (
    .clk, .rst_n, .a(rx_a), .c(rx_c), .q(demod_bit),
    .set_pulse(), .reset_pulse()
  );

  hdlc_rx #(.ADDRESS(ADDRESS), .OUT_DEPTH(RX_OUT_DEPTH)) u_hdlc_rx (
    .clk, .rst_n, .rx_bit(demod_bit), .rx_valid(rx_bit_tick),
    .out_valid(rx_byte_valid), .out_ready(rx_byte_ready), .out_data(rx_byte),
    .frame_ok(rx_frame_ok), .frame_err(rx_frame_err),
    .ok_cnt(rx_ok_cnt), .crc_err_cnt(rx_crc_err_cnt), .drop_cnt(rx_drop_cnt),
    .destuff_cnt(rx_destuff_cnt)
  );

  rle_decompressor #(.SYM_W(SAMPLE_W), .CNT_W(8)) u_unrle (
    .clk, .rst_n,
    .in_valid(rx_byte_valid), .in_ready(rx_byte_ready), .in_data(rx_byte),
    .out_valid, .out_ready, .out_data, .run_cnt(rx_run_cnt)
  );

endmodule
