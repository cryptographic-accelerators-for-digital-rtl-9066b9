// Design II core multiplier: 64 x 64-bit unsigned schoolbook multiplier
// built from sixteen 16 x 16-bit partial products (one DSP each on an
// FPGA), pipelined in two stages.
//
// Stage 1 registers the 16 partial products a_i * b_j (16-bit digits);
// stage 2 adds them at their weights 2^(16(i+j)) and registers the 128-bit
// product. A new operand pair may enter every clock; p and out_valid follow
// in_valid by two clocks, together with in_tag. The 64 x 64 schoolbook core
// of 16 DSPs is the document's; the digit size and the two-stage split are
// this design's choice.
module eff_mul64 #(
  parameter int TAGW = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [63:0]     a,
  input  logic [63:0]     b,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output logic [TAGW-1:0] out_tag,
  output logic [127:0]    p
);

  logic [31:0]     pp_q [4][4];
  logic [TAGW-1:0] tag_q;
  logic [1:0]      vld_q;

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        pp_q[i][j] <= a[16*i +: 16] * b[16*j +: 16];
    tag_q <= in_tag;
  end

  logic [127:0] sum;
  always_comb begin
    sum = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        sum = sum + (128'(pp_q[i][j]) << (16 * (i + j)));
  end

  always_ff @(posedge clk) begin
    p       <= sum;
    out_tag <= tag_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[0], in_valid};
  end
  assign out_valid = vld_q[1];

endmodule
