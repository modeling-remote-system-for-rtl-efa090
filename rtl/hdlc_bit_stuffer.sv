// hdlc_bit_stuffer: zero insertion of the HDLC transmitter.
//
// Watches the serial frame content including the FCS and, after every five
// consecutive ones, inserts a 0 so that the flag pattern 01111110 cannot
// appear inside a frame. While the extra 0 is sent the input is held off
// (`in_ready` low). If the frame's last bit completes a run of five ones,
// the inserted 0 becomes the last bit. The run counter restarts at every
// frame. One bit per cycle, valid/ready on both sides.
//
// The rule of five ones followed by an inserted zero is the document's.
module hdlc_bit_stuffer
  import sensor_link_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  hdlc_bit_t in_bit,
  output logic      out_valid,
  input  logic      out_ready,
  output hdlc_bit_t out_bit,
  output logic      stuffed        // pulses when a zero is inserted
);

  logic [2:0] ones;
  logic       stuff_pend;   // the next output is an inserted zero
  logic       last_pend;    // ... and it ends the frame

  assign in_ready  = !stuff_pend && out_ready;
  assign out_valid = stuff_pend || in_valid;
  assign stuffed   = stuff_pend && out_ready;
  always_comb begin
    if (stuff_pend) begin
      out_bit.bit_val = 1'b0;
      out_bit.last    = last_pend;
    end else begin
      out_bit.bit_val = in_bit.bit_val;
      // a last bit that completes five ones hands its tag to the zero
      out_bit.last    = in_bit.last &&
                        !(in_bit.bit_val && ones == 3'(STUFF_RUN - 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ones       <= '0;
      stuff_pend <= 1'b0;
      last_pend  <= 1'b0;
    end else if (stuff_pend) begin
      if (out_ready) begin
        stuff_pend <= 1'b0;
        ones       <= '0;
      end
    end else if (in_valid && out_ready) begin
      if (in_bit.bit_val) begin
        if (ones == 3'(STUFF_RUN - 1)) begin
          stuff_pend <= 1'b1;
          last_pend  <= in_bit.last;
          ones       <= '0;
        end else begin
          ones <= in_bit.last ? '0 : ones + 1'b1;
        end
      end else begin
        ones <= '0;
      end
    end
  end

endmodule
