// hdlc_tx_ctrl: transmitter control of the HDLC processor.
//
// Write side: each valid compressor word {count, symbol} is stored in the
// byte FIFO as two bytes, count first, over two cycles; a word is accepted
// only while the FIFO has room for both bytes.
// Frame side: once the FIFO holds INFO_BYTES bytes the controller feeds the
// parallel-to-serial converter with the ADDRESS byte, the CONTROL byte and
// then INFO_BYTES bytes popped from the FIFO, the last one tagged as the end
// of the frame content. It then waits for `frame_done` from the flag
// generator before it looks at the FIFO again, so frames never overlap.
//
// Loading compressor output into a FIFO and reading the frame from it
// serially follow the document; the fixed information length, the header
// values and the byte order of a word are this design's choices.
module hdlc_tx_ctrl
  import sensor_link_pkg::*;
#(
  parameter int unsigned INFO_BYTES = 8,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter logic [7:0]  ADDRESS    = 8'h01,
  parameter logic [7:0]  CONTROL    = 8'h03
) (
  input  logic        clk,
  input  logic        rst_n,
  // compressor words
  input  logic        word_valid,
  output logic        word_ready,
  input  rle_word_t   word,
  // byte FIFO
  output logic        fifo_wr_en,
  output logic [7:0]  fifo_wr_data,
  output logic        fifo_rd_en,
  input  logic [7:0]  fifo_rd_data,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  // parallel-to-serial converter
  output logic        byte_valid,
  input  logic        byte_ready,
  output logic [7:0]  byte_data,
  output logic        byte_last,
  // flag generator
  input  logic        frame_done,
  output logic [15:0] frame_cnt
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned NW = $clog2(INFO_BYTES + 1);

  typedef enum logic [2:0] {F_IDLE, F_ADDR, F_CTRL, F_INFO, F_WAIT} fstate_t;

  fstate_t       fstate;
  logic [NW-1:0] n;
  logic          lo_pend;
  logic [7:0]    lo_q;

  // write side
  assign word_ready   = !lo_pend && (fifo_count <= CW'(FIFO_DEPTH - 2));
  assign fifo_wr_en   = (word_valid && word_ready) || lo_pend;
  assign fifo_wr_data = lo_pend ? lo_q : word.count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_pend <= 1'b0;
      lo_q    <= '0;
    end else if (lo_pend) begin
      lo_pend <= 1'b0;
    end else if (word_valid && word_ready) begin
      lo_pend <= 1'b1;
      lo_q    <= word.symbol;
    end
  end

  // frame side
  always_comb begin
    byte_valid = 1'b0;
    byte_data  = fifo_rd_data;
    byte_last  = 1'b0;
    fifo_rd_en = 1'b0;
    unique case (fstate)
      F_ADDR: begin byte_valid = 1'b1; byte_data = ADDRESS; end
      F_CTRL: begin byte_valid = 1'b1; byte_data = CONTROL; end
      F_INFO: begin
        byte_valid = 1'b1;
        byte_last  = (n == NW'(INFO_BYTES - 1));
        fifo_rd_en = byte_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fstate    <= F_IDLE;
      n         <= '0;
      frame_cnt <= '0;
    end else begin
      unique case (fstate)
        F_IDLE: if (fifo_count >= CW'(INFO_BYTES)) fstate <= F_ADDR;
        F_ADDR: if (byte_ready) fstate <= F_CTRL;
        F_CTRL: if (byte_ready) begin fstate <= F_INFO; n <= '0; end
        F_INFO: if (byte_ready) begin
          if (n == NW'(INFO_BYTES - 1)) fstate <= F_WAIT;
          n <= n + 1'b1;
        end
        F_WAIT: if (frame_done) begin
          fstate    <= F_IDLE;
          frame_cnt <= frame_cnt + 1'b1;
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end

endmodule
