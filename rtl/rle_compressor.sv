// rle_compressor: run-length encoder for the sample byte stream.
//
// Runs of equal bytes are replaced by one word {count, symbol}
// (sensor_link_pkg::rle_word_t, count in the upper byte). The encoder is a
// two-state machine. EMPTY: the first byte is stored and the count set to 1.
// RUN: a byte equal to the stored one increments the count; a different byte
// (or a run that has reached the largest count) sends out the finished word
// {count, stored byte}, stores the new byte and sets the count back to 1.
// `flush` sends out the run in progress and returns to EMPTY, so that the
// tail of a block of samples is not held back.
//
// Interface: valid/ready on both sides. `in_ready` is low while a finished
// word waits in the output register; `flush` is taken in a cycle where
// `in_ready` is high, and a byte offered in that cycle is not taken. A word appears on
// `out_word` with `out_valid` the cycle after the byte that ends its run.
//
// The two-state structure, the compare-and-count loop and the two-byte
// output word follow the document (a run of three 0x0c bytes becomes 16'h030c);
// the flush input, the count saturation and the handshake are this design's.
module rle_compressor
  import sensor_link_pkg::*;
#(
  parameter int unsigned SYM_W = 8,
  parameter int unsigned CNT_W = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [SYM_W-1:0]       in_data,
  input  logic                   flush,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [CNT_W+SYM_W-1:0] out_word,
  output logic                   run_open
);

  typedef enum logic {S_EMPTY, S_RUN} state_t;

  state_t           state;
  logic [SYM_W-1:0] mem;
  logic [CNT_W-1:0] count;
  logic             take, do_flush;

  assign in_ready = !out_valid;
  assign take     = in_valid && in_ready && !flush;
  assign do_flush = flush && !out_valid;
  assign run_open = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_EMPTY;
      mem       <= '0;
      count     <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (do_flush) begin
        if (state == S_RUN) begin
          out_word  <= {count, mem};
          out_valid <= 1'b1;
        end
        state <= S_EMPTY;
      end else if (take) begin
        unique case (state)
          S_EMPTY: begin
            mem   <= in_data;
            count <= CNT_W'(1);
            state <= S_RUN;
          end
          S_RUN: begin
            if (in_data == mem && count != '1) begin
              count <= count + 1'b1;
            end else begin
              out_word  <= {count, mem};
              out_valid <= 1'b1;
              mem       <= in_data;
              count     <= CNT_W'(1);
            end
          end
        endcase
      end
    end
  end

  // a finished word is held, unchanged, until the consumer takes it
  a_hold_word: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_word));

endmodule
