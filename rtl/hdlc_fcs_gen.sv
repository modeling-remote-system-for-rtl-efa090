// hdlc_fcs_gen: frame check sequence generator of the HDLC transmitter.
//
// Passes the serial frame content (address, control, information) through
// unchanged while running it through the 16-bit CRC of sensor_link_pkg
// (x^16 + x^12 + x^5 + 1, preset to ones). When the bit tagged `last` has
// passed, the input is held off and the complemented CRC is sent, least
// significant bit first, 16 bits, the final one tagged `last`. The CRC is
// preset again for the next frame. One bit per cycle, valid/ready on both
// sides, no added latency on the data bits.
//
// The document says the FCS is produced by CRC generation over the frame
// read from the FIFO; the polynomial and bit order are this design's choice.
module hdlc_fcs_gen
  import sensor_link_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  hdlc_bit_t in_bit,
  output logic      out_valid,
  input  logic      out_ready,
  output hdlc_bit_t out_bit
);

  logic [15:0] crc;
  logic [15:0] fcs;
  logic [3:0]  fcs_idx;
  logic        sending_fcs;

  assign in_ready  = !sending_fcs && out_ready;
  assign out_valid = sending_fcs || in_valid;
  always_comb begin
    if (sending_fcs) begin
      out_bit.bit_val = fcs[0];
      out_bit.last    = (fcs_idx == 4'd15);
    end else begin
      out_bit.bit_val = in_bit.bit_val;
      out_bit.last    = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc         <= CRC_INIT;
      fcs         <= '0;
      fcs_idx     <= '0;
      sending_fcs <= 1'b0;
    end else if (sending_fcs) begin
      if (out_ready) begin
        fcs     <= fcs >> 1;
        fcs_idx <= fcs_idx + 1'b1;
        if (fcs_idx == 4'd15) sending_fcs <= 1'b0;
      end
    end else if (in_valid && out_ready) begin
      if (in_bit.last) begin
        fcs         <= ~crc16_step(crc, in_bit.bit_val);
        fcs_idx     <= '0;
        sending_fcs <= 1'b1;
        crc         <= CRC_INIT;
      end else begin
        crc <= crc16_step(crc, in_bit.bit_val);
      end
    end
  end

endmodule
