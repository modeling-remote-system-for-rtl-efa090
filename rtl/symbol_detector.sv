// symbol_detector: logic detector that turns the FSK receiver's two limited
// baseband signals into the received bit.
//
// Inputs: `a`, the sign of the in-phase channel, and `c`, the sign of the
// quadrature channel, after the mixers, low-pass filters and limiters of a
// direct-conversion receiver. The tone of a 1 and the tone of a 0 lie on
// opposite sides of the local oscillator, so (a, c) step round the four
// quadrants in opposite directions. Each input and its complement
// (AX, CX) drives an edge detector (MONO..MONO3) giving one-cycle pulses
// B, BX, D, DX on the rising edges of A, AX, C, CX. Eight AND terms pair
// an edge of one channel with the level of the other:
//   AND  = A & D    AND1 = CX & B   AND2 = AX & DX  AND3 = C & BX
//   AND4 = A & DX   AND5 = B & C    AND6 = AX & D   AND7 = CX & BX
// AND..AND3 fire only for rotation I-ahead-of-Q (tone above the oscillator,
// bit 1) and are ORed into the set input of an S-R flip-flop; AND4..AND7
// fire only for the opposite rotation (bit 0) and are ORed into its reset.
// The flip-flop output `q` is the demodulated bit stream. Both inputs pass
// SYNC_STAGES flip-flops first, so `q` follows a quadrant step of the inputs
// after SYNC_STAGES + 1 cycles.
//
// The blocks and the inputs of every AND gate are the document's. Which four
// terms feed set and which reset is worked out here from the rotation
// directions; the synchroniser, the edge detectors as one-cycle pulses and
// the choice that the flip-flop holds when set and reset coincide are this
// design's.
module symbol_detector #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic c,
  output logic q,
  output logic set_pulse,
  output logic reset_pulse
);

  logic [SYNC_STAGES-1:0] a_sync, c_sync;
  logic A, C, AX, CX, a_prev, c_prev;
  logic B, BX, D, DX;
  logic and0, and1, and2, and3, and4, and5, and6, and7;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sync <= '0;
      c_sync <= '0;
      a_prev <= 1'b0;
      c_prev <= 1'b0;
    end else begin
      a_sync <= {a_sync[SYNC_STAGES-2:0], a};
      c_sync <= {c_sync[SYNC_STAGES-2:0], c};
      a_prev <= A;
      c_prev <= C;
    end
  end

  assign A  = a_sync[SYNC_STAGES-1];
  assign C  = c_sync[SYNC_STAGES-1];
  assign AX = ~A;
  assign CX = ~C;

  // edge detectors (MONO, MONO1, MONO2, MONO3)
  assign B  = A  & ~a_prev;
  assign BX = AX & a_prev;
  assign D  = C  & ~c_prev;
  assign DX = CX & c_prev;

  assign and0 = A  & D;
  assign and1 = CX & B;
  assign and2 = AX & DX;
  assign and3 = C  & BX;
  assign and4 = A  & DX;
  assign and5 = B  & C;
  assign and6 = AX & D;
  assign and7 = CX & BX;

  assign set_pulse   = and0 | and1 | and2 | and3;
  assign reset_pulse = and4 | and5 | and6 | and7;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          q <= 1'b0;
    else if (set_pulse && !reset_pulse)  q <= 1'b1;
    else if (reset_pulse && !set_pulse)  q <= 1'b0;
  end

endmodule
