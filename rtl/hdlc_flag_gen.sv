// hdlc_flag_gen: flag generation, the last stage of the HDLC transmitter.
//
// Drives the serial line `tx_bit`, one bit per `bit_tick` (the line bit
// rate). Between frames it sends groups of eight ones. When a group is
// complete and the bit stuffer offers frame bits, it sends the opening flag
// 01111110, then pulls one stuffed bit per tick until the bit tagged `last`,
// then the closing flag, then at least one group of eight ones. `tx_bit`
// changes in the cycle after `bit_tick`; `tx_strobe` marks that cycle.
// If the stuffer has no bit when one is due inside a frame, a 1 is sent
// and `underrun_cnt` counts it (the receiver then rejects the frame); the
// transmitter control prevents this by starting a frame only once all of
// its bytes are stored.
//
// The flags and the idle fill of eight ones are the document's; the underrun
// handling is this design's.
module hdlc_flag_gen
  import sensor_link_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_tick,
  input  logic        in_valid,
  output logic        in_ready,
  input  hdlc_bit_t   in_bit,
  output logic        tx_bit,
  output logic        tx_strobe,
  output logic        in_frame,
  output logic        frame_done,
  output logic [15:0] underrun_cnt
);

  typedef enum logic [1:0] {S_IDLE, S_OPEN, S_DATA, S_CLOSE} state_t;

  state_t     state;
  logic [2:0] k;

  assign in_ready = bit_tick && (state == S_DATA);
  assign in_frame = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      k            <= '0;
      tx_bit       <= 1'b1;
      tx_strobe    <= 1'b0;
      frame_done   <= 1'b0;
      underrun_cnt <= '0;
    end else begin
      tx_strobe  <= bit_tick;
      frame_done <= 1'b0;
      if (bit_tick) begin
        unique case (state)
          S_IDLE: begin
            tx_bit <= HDLC_IDLE[k];
            k      <= k + 1'b1;
            if (k == 3'd7 && in_valid) state <= S_OPEN;
          end
          S_OPEN: begin
            tx_bit <= HDLC_FLAG[k];
            k      <= k + 1'b1;
            if (k == 3'd7) state <= S_DATA;
          end
          S_DATA: begin
            if (in_valid) begin
              tx_bit <= in_bit.bit_val;
              if (in_bit.last) state <= S_CLOSE;
            end else begin
              tx_bit       <= 1'b1;
              underrun_cnt <= underrun_cnt + 1'b1;
            end
          end
          S_CLOSE: begin
            tx_bit <= HDLC_FLAG[k];
            k      <= k + 1'b1;
            if (k == 3'd7) begin
              state      <= S_IDLE;
              frame_done <= 1'b1;
            end
          end
        endcase
      end
    end
  end

endmodule
