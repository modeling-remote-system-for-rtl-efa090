// rle_decompressor: run-length decoder of the receiver FPGA.
//
// Reads the recovered information bytes in pairs, count first then symbol
// (the layout rle_compressor sends), and writes the symbol `count` times to
// the output, one byte per cycle while `out_ready` is high. A pair with
// count 0 produces nothing. States: GET_CNT, GET_SYM, EMIT; `in_ready` is
// low in EMIT. A pair of input bytes that expands to n output bytes takes
// 2 + n cycles when nothing stalls.
//
// The document names de-compression as a task of the receiver FPGA; this
// decoder is the plain inverse of the encoder described for the transmitter.
module rle_decompressor #(
  parameter int unsigned SYM_W = 8,
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [7:0]       in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [SYM_W-1:0] out_data,
  output logic [15:0]      run_cnt
);

  typedef enum logic [1:0] {S_GET_CNT, S_GET_SYM, S_EMIT} state_t;

  state_t           state;
  logic [CNT_W-1:0] remain;
  logic [SYM_W-1:0] sym;

  assign in_ready  = (state != S_EMIT);
  assign out_valid = (state == S_EMIT);
  assign out_data  = sym;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_GET_CNT;
      remain  <= '0;
      sym     <= '0;
      run_cnt <= '0;
    end else begin
      unique case (state)
        S_GET_CNT: if (in_valid) begin
          remain <= CNT_W'(in_data);
          state  <= S_GET_SYM;
        end
        S_GET_SYM: if (in_valid) begin
          sym     <= SYM_W'(in_data);
          run_cnt <= run_cnt + 1'b1;
          state   <= (remain == '0) ? S_GET_CNT : S_EMIT;
        end
        S_EMIT: if (out_ready) begin
          remain <= remain - 1'b1;
          if (remain == CNT_W'(1)) state <= S_GET_CNT;
        end
        default: state <= S_GET_CNT;
      endcase
    end
  end

endmodule
