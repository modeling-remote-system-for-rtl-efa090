// hdlc_tx: HDLC transmitter (framer) of the transmitter FPGA.
//
// Packs compressor words into frames
//   flag | ADDRESS | CONTROL | INFO_BYTES information bytes | FCS (16) | flag
// and sends them on one serial line at one bit per `bit_tick`. The chain is
// byte FIFO -> parallel-to-serial -> FCS generator -> bit stuffer -> flag
// generator, all steered by the transmitter control. Between frames the line
// carries groups of eight ones. Inside the chain bits move with valid/ready
// at up to one per cycle, so the line rate only has to be slower than the
// clock. `tx_bit` changes the cycle after `bit_tick` (`tx_strobe`).
//
// The stage order, zero insertion, flags and idle fill follow the document;
// the frame length, header values, FCS polynomial and LSB-first bit order are
// this design's choices (see the parameters and sensor_link_pkg).
module hdlc_tx
  import sensor_link_pkg::*;
#(
  parameter int unsigned INFO_BYTES = 8,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter logic [7:0]  ADDRESS    = 8'h01,
  parameter logic [7:0]  CONTROL    = 8'h03
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_tick,
  input  logic        word_valid,
  output logic        word_ready,
  input  rle_word_t   word,
  output logic        tx_bit,
  output logic        tx_strobe,
  output logic        in_frame,
  output logic [15:0] frame_cnt,
  output logic [15:0] stuff_cnt,
  output logic [15:0] underrun_cnt
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic          fifo_wr_en, fifo_rd_en;
  logic [7:0]    fifo_wr_data, fifo_rd_data;
  logic [CW-1:0] fifo_count;
  logic          byte_valid, byte_ready, byte_last;
  logic [7:0]    byte_data;
  logic          frame_done, stuffed;
  logic          p2s_v, p2s_r, fcs_v, fcs_r, stf_v, stf_r;
  hdlc_bit_t     p2s_b, fcs_b, stf_b;

  buffer_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(fifo_wr_en), .wr_data(fifo_wr_data), .full(),
    .rd_en(fifo_rd_en), .rd_data(fifo_rd_data), .empty(),
    .count(fifo_count)
  );

  hdlc_tx_ctrl #(
    .INFO_BYTES(INFO_BYTES), .FIFO_DEPTH(FIFO_DEPTH),
    .ADDRESS(ADDRESS), .CONTROL(CONTROL)
  ) u_ctrl (
    .clk, .rst_n,
    .word_valid, .word_ready, .word,
    .fifo_wr_en, .fifo_wr_data, .fifo_rd_en, .fifo_rd_data, .fifo_count,
    .byte_valid, .byte_ready, .byte_data, .byte_last,
    .frame_done, .frame_cnt
  );

  hdlc_p2s u_p2s (
    .clk, .rst_n,
    .byte_valid, .byte_ready, .byte_data, .byte_last,
    .out_valid(p2s_v), .out_ready(p2s_r), .out_bit(p2s_b)
  );

  hdlc_fcs_gen u_fcs (
    .clk, .rst_n,
    .in_valid(p2s_v), .in_ready(p2s_r), .in_bit(p2s_b),
    .out_valid(fcs_v), .out_ready(fcs_r), .out_bit(fcs_b)
  );

  hdlc_bit_stuffer u_stuff (
    .clk, .rst_n,
    .in_valid(fcs_v), .in_ready(fcs_r), .in_bit(fcs_b),
    .out_valid(stf_v), .out_ready(stf_r), .out_bit(stf_b),
    .stuffed
  );

  hdlc_flag_gen u_flag (
    .clk, .rst_n, .bit_tick,
    .in_valid(stf_v), .in_ready(stf_r), .in_bit(stf_b),
    .tx_bit, .tx_strobe, .in_frame, .frame_done, .underrun_cnt
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stuff_cnt <= '0;
    else if (stuffed) stuff_cnt <= stuff_cnt + 1'b1;
  end

endmodule
