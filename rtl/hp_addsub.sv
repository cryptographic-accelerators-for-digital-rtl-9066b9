// Design I modular adder/subtractor for GF(2^255 - 19), full 255-bit width.
//
// Computes out = a + b mod p (sub = 0) or out = a - b mod p (sub = 1) for
// operands already reduced below p. Cycle 1 forms the 257-bit sum or
// difference and registers it together with the candidate corrected by p
// (s - p for a sum, s + p for a difference); cycle 2 selects by the
// carry/borrow and registers the result. A new operation may enter every
// cycle; out_valid and out_tag follow in_valid and in_tag by two clocks.
// The two-cycle latency is the document's figure; the split into a sum stage
// and a correction stage is this design's choice.
module hp_addsub #(
  parameter int TAGW = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            sub,
  input  logic [255:0]    a,
  input  logic [255:0]    b,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output logic [TAGW-1:0] out_tag,
  output logic [255:0]    out
);
  import ed25519_pkg::*;

  logic [256:0] s_w, c_w;
  logic [256:0] s_q, c_q;
  logic         sub_q;
  logic [1:0]   vld_q;
  logic [TAGW-1:0] tag_q [2];

  assign s_w = sub ? ({1'b0, a} - {1'b0, b}) : ({1'b0, a} + {1'b0, b});
  assign c_w = sub ? (s_w + {1'b0, P}) : (s_w - {1'b0, P});

  always_ff @(posedge clk) begin
    s_q      <= s_w;
    c_q      <= c_w;
    sub_q    <= sub;
    tag_q[0] <= in_tag;
    tag_q[1] <= tag_q[0];
    // difference: negative (bit 256 set) -> take s + p
    // sum: s - p did not borrow -> take s - p
    if (sub_q) out <= s_q[256] ? c_q[255:0] : s_q[255:0];
    else       out <= c_q[256] ? s_q[255:0] : c_q[255:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[0], in_valid};
  end

  assign out_valid = vld_q[1];
  assign out_tag   = tag_q[1];

endmodule
