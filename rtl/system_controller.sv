// system_controller: main state machine of the transmitter FPGA.
//
// It paces the data flow through the transmitter: every SAMPLE_PERIOD cycles
// it starts one ADC conversion on the SPI unit; the finished sample goes
// straight into the buffer storage (a sample that finds the buffer full is
// dropped and counted in `overflow_cnt`). While running it moves bytes from
// the buffer into the RLE compressor whenever the buffer holds one and the
// compressor accepts it. After BLOCK_SAMPLES bytes it enters FLUSH and
// raises `rle_flush` until the compressor has taken it, so every block ends
// with its last run sent to the framer.
//
// States: IDLE (`enable` low, nothing sampled), RUN and FLUSH. `enable`
// low stops new conversions; a block under way still drains.
//
// The document says only that a main state machine controls the units and
// the flow of data; the sampling timer, the block length and the flush are
// this design's choices.
module system_controller #(
  parameter int unsigned SAMPLE_PERIOD = 64,
  parameter int unsigned BLOCK_SAMPLES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  // SPI unit
  output logic        spi_start,
  input  logic        spi_busy,
  input  logic        spi_done,
  // buffer storage
  input  logic        buf_full,
  input  logic        buf_empty,
  output logic        buf_rd_en,
  // RLE compressor
  output logic        rle_in_valid,
  input  logic        rle_in_ready,
  output logic        rle_flush,
  // status
  output logic [15:0] overflow_cnt,
  output logic [15:0] block_cnt
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH} state_t;

  localparam int unsigned TW = $clog2(SAMPLE_PERIOD + 1);
  localparam int unsigned BW = $clog2(BLOCK_SAMPLES + 1);

  state_t        state;
  logic [TW-1:0] timer;
  logic [BW-1:0] moved;
  logic          move;

  assign move         = (state == S_RUN) && !buf_empty && rle_in_ready;
  assign buf_rd_en    = move;
  assign rle_in_valid = move;
  assign rle_flush    = (state == S_FLUSH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      timer        <= '0;
      moved        <= '0;
      spi_start    <= 1'b0;
      overflow_cnt <= '0;
      block_cnt    <= '0;
    end else begin
      spi_start <= 1'b0;
      if (spi_done && buf_full) overflow_cnt <= overflow_cnt + 1'b1;

      // conversion pacing
      if (enable) begin
        if (timer == TW'(SAMPLE_PERIOD - 1)) begin
          timer <= '0;
          if (!spi_busy) spi_start <= 1'b1;
        end else begin
          timer <= timer + 1'b1;
        end
      end else begin
        timer <= '0;
      end

      unique case (state)
        S_IDLE:  if (enable) state <= S_RUN;
        S_RUN: begin
          if (move) begin
            if (moved == BW'(BLOCK_SAMPLES - 1)) begin
              moved <= '0;
              state <= S_FLUSH;
            end else begin
              moved <= moved + 1'b1;
            end
          end else if (!enable && buf_empty && !spi_busy && !spi_start) begin
            state <= S_IDLE;
          end
        end
        S_FLUSH: begin
          // the compressor takes the flush once its output register is free
          if (rle_in_ready) begin
            block_cnt <= block_cnt + 1'b1;
            state     <= S_RUN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // no byte enters the compressor in a cycle that flushes it
  a_no_move_in_flush: assert property (@(posedge clk) disable iff (!rst_n) !(buf_rd_en && rle_flush));

endmodule
