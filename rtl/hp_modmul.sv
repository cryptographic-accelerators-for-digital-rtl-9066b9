// Design I modular multiplier for GF(2^255 - 19): four-level Karatsuba with
// interleaved reduction, fully pipelined.
//
// Operation: out_mod = a * b mod p, out_raw = a * b (512-bit, for the
// nonmodular products of the mod L reduction). Operands are 256-bit values;
// out_mod is fully reduced (< p) for any operands below 2^256.
//
// How it works. The first Karatsuba level splits the operands at 2^128 into
// C0 = a0*b0, C2 = a1*b1 and C1 = (a1+a0)*(b1+b0); each of these is a
// three-level Karatsuba tree (kara_mul), so the whole product uses 3^4 = 81
// leaf multipliers that all work in the same cycle. The first-level merge is
// combined with the reduction, since 2^256 = 38 mod p:
//   C  = 38*C2 + C0 + (C1 - C2 - C0)*2^128            (< 2^387)
//   C' = 19*Ch + Cl      with C = Ch*2^255 + Cl        (< 2p)
//   out = C' - p if that does not borrow, else C'.
//
// Pipeline (one new operation may enter every cycle, in_valid):
//   1 operand registers, 2 leaf products, 3 level-1 products C0/C1/C2,
//   4 first-level merge / fold by 38, 5 fold by 19 and final subtraction.
// A result appears with out_valid exactly five clocks after in_valid, with
// the in_tag that entered with it. The stage split follows the document
// (three multiplication stages, two reduction stages); the 18-bit leaf
// width, the tag and the raw-product output are this design's choices.
module hp_modmul #(
  parameter int TAGW = 5,
  parameter int LEAF = 18
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [255:0]    a,
  input  logic [255:0]    b,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output logic [TAGW-1:0] out_tag,
  output logic [255:0]    out_mod,
  output logic [511:0]    out_raw
);
  import ed25519_pkg::*;

  localparam int LAT = 5;

  logic [LAT-1:0]      vld_q;
  logic [TAGW-1:0]     tag_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    tag_q[0] <= in_tag;
    for (int i = 1; i < LAT; i++) tag_q[i] <= tag_q[i-1];
  end

  // ---- stage 1: operand registers -----------------------------------------
  logic [255:0] a_q, b_q;
  always_ff @(posedge clk) begin
    a_q <= a;
    b_q <= b;
  end

  // ---- stage 2: breaking and leaf products (inside kara_mul) --------------
  logic [128:0] sa, sb;
  logic [255:0] c0_w, c2_w;
  logic [257:0] c1_w;
  assign sa = {1'b0, a_q[255:128]} + {1'b0, a_q[127:0]};
  assign sb = {1'b0, b_q[255:128]} + {1'b0, b_q[127:0]};

  kara_mul #(.W(128), .LEAF(LEAF)) u_c0 (.clk, .en(1'b1), .a(a_q[127:0]),   .b(b_q[127:0]),   .p(c0_w));
  kara_mul #(.W(128), .LEAF(LEAF)) u_c2 (.clk, .en(1'b1), .a(a_q[255:128]), .b(b_q[255:128]), .p(c2_w));
  kara_mul #(.W(129), .LEAF(LEAF)) u_c1 (.clk, .en(1'b1), .a(sa),           .b(sb),           .p(c1_w));

  // ---- stage 3: level-1 products -------------------------------------------
  logic [255:0] c0_q, c2_q;
  logic [257:0] c1_q;
  always_ff @(posedge clk) begin
    c0_q <= c0_w;
    c1_q <= c1_w;
    c2_q <= c2_w;
  end

  // ---- stage 4: first-level merge folded with the reduction by 38 ---------
  logic [257:0] mid;          // a1*b0 + a0*b1
  logic [386:0] c_w;
  logic [386:0] c_q;
  logic [511:0] raw_q;
  assign mid = c1_q - {2'b00, c2_q} - {2'b00, c0_q};
  // 38*C2 by shift and add: 32*C2 + 4*C2 + 2*C2
  assign c_w = (387'(c2_q) << 5) + (387'(c2_q) << 2) + (387'(c2_q) << 1)
             + 387'(c0_q) + (387'(mid) << 128);

  always_ff @(posedge clk) begin
    c_q   <= c_w;
    raw_q <= (512'(c2_q) << 256) + (512'(mid) << 128) + 512'(c0_q);
  end

  // ---- stage 5: fold by 19 and final conditional subtraction --------------
  logic [131:0] ch;
  logic [255:0] cp;           // C' = 19*Ch + Cl
  logic [256:0] cpp;          // C' - p with borrow in bit 256
  assign ch  = c_q[386:255];
  assign cp  = (256'(ch) << 4) + (256'(ch) << 1) + 256'(ch) + {1'b0, c_q[254:0]};
  assign cpp = {1'b0, cp} - {1'b0, P};

  always_ff @(posedge clk) begin
    out_mod <= cpp[256] ? cp : cpp[255:0];
    out_raw <= raw_q;
  end

  assign out_valid = vld_q[LAT-1];
  assign out_tag   = tag_q[LAT-1];

endmodule
