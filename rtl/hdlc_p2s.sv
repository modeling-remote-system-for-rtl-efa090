// hdlc_p2s: parallel-to-serial converter of the HDLC transmitter.
//
// Takes one byte at a time (valid/ready, with a `byte_last` tag marking the
// last byte of the frame content) and sends its bits least significant bit
// first as a serial stream of sensor_link_pkg::hdlc_bit_t with valid/ready.
// The `last` tag of the serial stream is set on bit 7 of the tagged byte.
// A new byte is accepted in the cycle the previous byte's last bit leaves,
// so the stream has no gaps while bytes keep coming: one bit per cycle at
// most.
//
// Bit order (LSB first) follows common HDLC practice and is this design's
// choice; the document names the unit "FIFO 8-bit parallel to serial".
module hdlc_p2s
  import sensor_link_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       byte_valid,
  output logic       byte_ready,
  input  logic [7:0] byte_data,
  input  logic       byte_last,
  output logic       out_valid,
  input  logic       out_ready,
  output hdlc_bit_t  out_bit
);

  logic [7:0] shreg;
  logic [2:0] idx;
  logic       full, last_q;

  assign out_valid       = full;
  assign out_bit.bit_val = shreg[0];
  assign out_bit.last    = last_q && (idx == 3'd7);
  assign byte_ready      = !full || (out_ready && idx == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg  <= '0;
      idx    <= '0;
      full   <= 1'b0;
      last_q <= 1'b0;
    end else if (byte_valid && byte_ready) begin
      shreg  <= byte_data;
      idx    <= '0;
      full   <= 1'b1;
      last_q <= byte_last;
    end else if (full && out_ready) begin
      shreg <= shreg >> 1;
      idx   <= idx + 1'b1;
      if (idx == 3'd7) full <= 1'b0;
    end
  end

  // an offered bit stays offered, unchanged, until it is taken
  a_hold_bit: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_bit));

endmodule
