// fsk_iq_model: behavioural stand-in, for testbenches only, for the FSK
// modulator, the channel and the analog direct-conversion receiver up to its
// limiters. A 1 on `bit_in` is a tone above the receiver's oscillator, a 0
// a tone below it, so the limited baseband pair (a, c) = (sign I, sign Q)
// steps round the quadrants (1,1) -> (0,1) -> (0,0) -> (1,0) for a 1 and the
// other way round for a 0, one step every STEP_CYCLES clock cycles.
// `flip` reverses the direction while it is high (a channel error).
module fsk_iq_model #(
  parameter int unsigned STEP_CYCLES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_in,
  input  logic flip,
  output logic a,
  output logic c
);
  logic [1:0] quad;
  int unsigned t;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quad <= 2'd0;
      t    <= 0;
    end else if (t == STEP_CYCLES - 1) begin
      t    <= 0;
      quad <= (bit_in ^ flip) ? quad + 2'd1 : quad - 2'd1;
    end else begin
      t <= t + 1;
    end
  end
  always_comb begin
    unique case (quad)
      2'd0: {a, c} = 2'b11;
      2'd1: {a, c} = 2'b01;
      2'd2: {a, c} = 2'b00;
      2'd3: {a, c} = 2'b10;
    endcase
  end
endmodule
