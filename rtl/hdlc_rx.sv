// hdlc_rx: HDLC receiver (de-framer) of the receiver FPGA.
//
// Undoes what hdlc_tx does. Serial bits arrive one per `rx_valid` pulse.
// They pass through an 8-bit window; the pattern 01111110 in the window is a
// flag, seven ones in a row abort the frame and send the receiver back to
// hunting for a flag. Bits that leave the window while inside a frame go to
// the zero remover (a 0 after five ones is dropped), the CRC check and a
// byte assembler (LSB first).
//
// Bytes 0 and 1 of a frame are the address and control fields. Later bytes
// pass a two-byte delay line, so that when the closing flag comes the two
// bytes still in the line are the FCS; every byte pushed out of the line is
// written, provisionally, into the output FIFO. At the closing flag (handled
// the cycle after the flag's last bit) the frame is accepted if it holds
// whole bytes, at least four of them, the CRC residue is 16'hF0B8, the
// address equals ADDRESS and the FIFO did not overflow: the provisional bytes
// are then released to `out_*` (`frame_ok`). Otherwise they are discarded
// (`frame_err`; `crc_err_cnt` counts frames of valid length whose FCS is
// wrong, `drop_cnt` all other rejected or aborted frames). Only
// information bytes of good frames ever leave the receiver.
//
// The document says only that received frames are processed inversely by a
// structure like the transmitter's; the window flag detector, the
// provisional FIFO and the acceptance rules are this design's.
module hdlc_rx
  import sensor_link_pkg::*;
#(
  parameter logic [7:0]  ADDRESS   = 8'h01,
  parameter int unsigned OUT_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_bit,
  input  logic        rx_valid,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic        frame_ok,
  output logic        frame_err,
  output logic [15:0] ok_cnt,
  output logic [15:0] crc_err_cnt,
  output logic [15:0] drop_cnt,
  output logic [15:0] destuff_cnt
);

  localparam int unsigned AW = $clog2(OUT_DEPTH);

  typedef enum logic {S_HUNT, S_FRAME} state_t;

  state_t      state;
  logic [7:0]  win;
  logic [3:0]  wcnt;
  logic [2:0]  raw_ones;
  logic        flag_pend;
  // inside-frame state
  logic [2:0]  ones;
  logic [7:0]  sr;
  logic [2:0]  bitcnt;
  logic [7:0]  nbytes;
  logic [15:0] crc;
  logic [7:0]  addr_q, d0, d1;
  logic        ovf;
  // output FIFO: written at wptr, released up to cptr, read at rptr
  logic [7:0]  mem [OUT_DEPTH];
  logic [AW:0] wptr, cptr, rptr;

  logic        exit_now;
  logic [7:0]  nwin;
  logic [7:0]  new_byte;
  logic        good;

  assign exit_now  = rx_valid && (wcnt == 4'd8);
  assign nwin      = {rx_bit, win[7:1]};
  assign new_byte  = {win[0], sr[7:1]};
  assign out_valid = (rptr != cptr);
  assign out_data  = mem[rptr[AW-1:0]];
  assign good      = (bitcnt == 3'd0) && (nbytes >= 8'd4) && (crc == CRC_GOOD) &&
                     (addr_q == ADDRESS) && !ovf;

  always_ff @(posedge clk) begin
    if (exit_now && state == S_FRAME && ones != 3'(STUFF_RUN) && bitcnt == 3'd7 &&
        nbytes >= 8'd4 && (wptr - rptr) != (AW+1)'(OUT_DEPTH))
      mem[wptr[AW-1:0]] <= d1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_HUNT;
      win         <= '0;
      wcnt        <= '0;
      raw_ones    <= '0;
      flag_pend   <= 1'b0;
      ones        <= '0;
      sr          <= '0;
      bitcnt      <= '0;
      nbytes      <= '0;
      crc         <= CRC_INIT;
      addr_q      <= '0;
      d0          <= '0;
      d1          <= '0;
      ovf         <= 1'b0;
      wptr        <= '0;
      cptr        <= '0;
      rptr        <= '0;
      frame_ok    <= 1'b0;
      frame_err   <= 1'b0;
      ok_cnt      <= '0;
      crc_err_cnt <= '0;
      drop_cnt    <= '0;
      destuff_cnt <= '0;
    end else begin
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;
      if (out_valid && out_ready) rptr <= rptr + 1'b1;

      if (flag_pend) begin
        // closing (or opening) flag: judge the frame that just ended
        flag_pend <= 1'b0;
        if (state == S_FRAME && (nbytes != 8'd0 || bitcnt != 3'd0)) begin
          if (good) begin
            cptr     <= wptr;
            frame_ok <= 1'b1;
            ok_cnt   <= ok_cnt + 1'b1;
          end else begin
            wptr      <= cptr;
            frame_err <= 1'b1;
            if (bitcnt == 3'd0 && nbytes >= 8'd4 && crc != CRC_GOOD)
              crc_err_cnt <= crc_err_cnt + 1'b1;
            else
              drop_cnt    <= drop_cnt + 1'b1;
          end
        end
        state  <= S_FRAME;
        ones   <= '0;
        bitcnt <= '0;
        nbytes <= '0;
        crc    <= CRC_INIT;
        ovf    <= 1'b0;
      end

      if (rx_valid) begin
        raw_ones <= rx_bit ? ((raw_ones == 3'd7) ? raw_ones : raw_ones + 1'b1) : '0;

        // the oldest window bit leaves: it is frame content
        if (exit_now && state == S_FRAME) begin
          if (ones == 3'(STUFF_RUN)) begin
            ones <= '0;
            if (!win[0]) destuff_cnt <= destuff_cnt + 1'b1;  // inserted zero
            else begin                                        // six ones: invalid
              state    <= S_HUNT;
              wptr     <= cptr;
              drop_cnt <= drop_cnt + 1'b1;
            end
          end else begin
            ones   <= win[0] ? ones + 1'b1 : '0;
            crc    <= crc16_step(crc, win[0]);
            sr     <= new_byte;
            bitcnt <= bitcnt + 1'b1;
            if (bitcnt == 3'd7) begin
              if (nbytes != 8'hFF) nbytes <= nbytes + 1'b1;
              if (nbytes == 8'd0) addr_q <= new_byte;
              if (nbytes >= 8'd2) begin
                d0 <= new_byte;
                d1 <= d0;
              end
              if (nbytes >= 8'd4) begin
                if ((wptr - rptr) == (AW+1)'(OUT_DEPTH)) ovf <= 1'b1;
                else wptr <= wptr + 1'b1;
              end
            end
          end
        end

        win <= nwin;
        if ((wcnt >= 4'd7) && nwin == HDLC_FLAG) begin
          flag_pend <= 1'b1;
          wcnt      <= '0;
        end else begin
          if (wcnt != 4'd8) wcnt <= wcnt + 1'b1;
          if (rx_bit && raw_ones >= 3'd6) begin
            // seven ones: abort or idle line
            if (state == S_FRAME && (nbytes != 8'd0 || bitcnt != 3'd0)) begin
              drop_cnt <= drop_cnt + 1'b1;
              wptr     <= cptr;
            end
            state <= S_HUNT;
          end
        end
      end
    end
  end

  // the provisional write pointer never runs more than OUT_DEPTH ahead of the reader
  a_fifo_bound: assert property (@(posedge clk) disable iff (!rst_n)
    (wptr - rptr) <= (AW+1)'(OUT_DEPTH) && (cptr - rptr) <= (wptr - rptr));

endmodule
