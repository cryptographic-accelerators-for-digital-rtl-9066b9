// Recursive Karatsuba multiplier with one register stage at the leaves.
//
// An W x W product is split at h = W/2 into a = a1*2^h + a0 and computed as
//   a1*b1*2^(2h) + ((a1+a0)*(b1+b0) - a1*b1 - a0*b0)*2^h + a0*b0,
// three sub-products that are again split the same way until the operand
// width is at most LEAF bits. The leaves are plain multipliers (one DSP each
// on an FPGA) whose products are registered when en is high; the breaking
// adders sit before that register and the merging adder tree after it, so
// the product p appears one clock after a and b (combinationally merged from
// the leaf registers). The middle term carries one extra operand bit per
// level, which is why a leaf is LEAF bits rather than a power of two.
// Lint note: when this module is linted on its own as the top, Verilator
// does not expand the recursive instances of the top module and reports
// p0, p1, p2 undriven (and clk, en, sa, sb unused); instantiated inside
// hp_modmul the recursion is fully expanded and those warnings do not occur.
module kara_mul #(
  parameter int W    = 128,
  parameter int LEAF = 18
) (
  input  logic           clk,
  input  logic           en,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  if (W <= LEAF) begin : g_leaf
    logic [2*W-1:0] prod_q;
    always_ff @(posedge clk)
      if (en) prod_q <= a * b;
    assign p = prod_q;
  end else begin : g_split
    localparam int H  = W / 2;      // low half width
    localparam int HI = W - H;      // high half width
    localparam int HS = HI + 1;     // width of the half sums

    logic [HS-1:0]     sa, sb;
    logic [2*H-1:0]    p0;
    logic [2*HI-1:0]   p2;
    logic [2*HS-1:0]   p1;
    logic [2*W-1:0]    mid;

    assign sa = HS'(a[W-1:H]) + HS'(a[H-1:0]);
    assign sb = HS'(b[W-1:H]) + HS'(b[H-1:0]);

    kara_mul #(.W(H),  .LEAF(LEAF)) u_lo  (.clk, .en, .a(a[H-1:0]), .b(b[H-1:0]), .p(p0));
    kara_mul #(.W(HI), .LEAF(LEAF)) u_hi  (.clk, .en, .a(a[W-1:H]), .b(b[W-1:H]), .p(p2));
    kara_mul #(.W(HS), .LEAF(LEAF)) u_mid (.clk, .en, .a(sa),       .b(sb),       .p(p1));

    // (a1+a0)(b1+b0) - a1b1 - a0b0 = a1b0 + a0b1, always non-negative
    assign mid = (2*W)'(p1) - (2*W)'(p2) - (2*W)'(p0);
    assign p   = ((2*W)'(p2) << (2*H)) + (mid << H) + (2*W)'(p0);
  end

endmodule
