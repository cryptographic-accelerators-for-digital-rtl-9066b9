// Design II modular multiplier for GF(2^255 - 19): one 64 x 64 core used
// sixteen times per 255 x 255-bit product, with the reduction interleaved.
//
// The operands are split into 128-bit halves a = a1*2^128 + a0 and the four
// 128 x 128 partial products are formed in the order C3 = a1*b1, C0 = a0*b0,
// C1 = a0*b1, C2 = a1*b0; each of them in turn takes four 64 x 64 products
// (low x low, low x high, high x low, high x high) from eff_mul64, one per
// clock. Every 64 x 64 product is added into the accumulator at its weight
// as it arrives, and since 2^256 = 38 (mod p) the products of C3 are first
// multiplied by 38 with shifts and adds:
//   C = 38*C3 + C0 + (C1 + C2)*2^128.
// After the 16th product the sum moves to the T register, freeing the
// accumulator for the next multiplication, and is folded once more
// (C = Ch*2^255 + Cl -> 19*Ch + Cl, again by shift and add) and finally
// reduced by a conditional subtraction of p.
//
// With raw = 1 the C3 products are added at weight 2^256 instead and
// out_raw is the plain 512-bit product a*b (for the mod L reduction).
// Handshake: an operation is taken when in_valid and in_ready are both
// high; in_ready is low while the sixteen products are being issued, so one
// multiplication can start every 16 clocks. out_valid pulses 21 clocks
// after the operation was taken, with its in_tag.
// Follows the document: the 64 x 64 core, the product order, the
// interleaved reduction with 38 and 19 by shift and add, the T register and
// the 16-clock throughput. This design's own: a plain 512-bit accumulator
// instead of the document's redundant 136-bit digit registers, and the
// resulting 21-clock latency.
module eff_modmul #(
  parameter int TAGW = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic            raw,
  input  logic [255:0]    a,
  input  logic [255:0]    b,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output logic [TAGW-1:0] out_tag,
  output logic [255:0]    out_mod,
  output logic [511:0]    out_raw
);
  import ed25519_pkg::*;

  // ---- sequencer ------------------------------------------------------------
  logic [255:0]    a_q, b_q;
  logic            raw_q;
  logic [TAGW-1:0] tag_q;
  logic            seq_act_q;
  logic [3:0]      seq_q;      // {partial product, sub-product}

  // digit indices of the current 64 x 64 product
  logic [1:0] ia, ib;
  always_comb begin
    logic ha, hb;
    case (seq_q[3:2])
      2'd0:    begin ha = 1'b1; hb = 1'b1; end   // C3 = a1*b1
      2'd1:    begin ha = 1'b0; hb = 1'b0; end   // C0 = a0*b0
      2'd2:    begin ha = 1'b0; hb = 1'b1; end   // C1 = a0*b1
      default: begin ha = 1'b1; hb = 1'b0; end   // C2 = a1*b0
    endcase
    ia = {ha, seq_q[1]};
    ib = {hb, seq_q[0]};
  end

  assign in_ready = !seq_act_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_act_q <= 1'b0;
      seq_q     <= '0;
      a_q       <= '0;
      b_q       <= '0;
      raw_q     <= 1'b0;
      tag_q     <= '0;
    end else if (!seq_act_q) begin
      if (in_valid) begin
        seq_act_q <= 1'b1;
        seq_q     <= '0;
        a_q       <= a;
        b_q       <= b;
        raw_q     <= raw;
        tag_q     <= in_tag;
      end
    end else begin
      seq_q <= seq_q + 4'd1;
      if (seq_q == 4'd15) seq_act_q <= 1'b0;
    end
  end

  // ---- 64 x 64 core -----------------------------------------------------------
  // the tag carries the digit weight index (ia + ib), whether this is a C3
  // product, whether it is the last one, the mode and the operation tag
  localparam int CT = 3 + 1 + 1 + 1 + TAGW;
  logic [CT-1:0]  m_tag_out;
  logic           m_valid;
  logic [127:0]   m_p;
  eff_mul64 #(.TAGW(CT)) u_core (
    .clk, .rst_n, .in_valid(seq_act_q), .a(a_q[64*ia +: 64]), .b(b_q[64*ib +: 64]),
    .in_tag({3'(ia) + 3'(ib), seq_q[3:2] == 2'd0, seq_q == 4'd15, raw_q, tag_q}),
    .out_valid(m_valid), .out_tag(m_tag_out), .p(m_p));

  logic [2:0]      w_idx;
  logic            is_c3, is_last, is_raw;
  logic [TAGW-1:0] op_tag;
  assign {w_idx, is_c3, is_last, is_raw, op_tag} = m_tag_out;

  // ---- accumulator --------------------------------------------------------------
  logic [511:0] acc_q, addend, acc_n;
  always_comb begin
    logic [511:0] pw;
    pw = 512'(m_p) << {w_idx[1:0], 6'b0};      // 2^(64*(w-4)) for w >= 4
    if (is_c3 && !is_raw) begin
      // weight 2^(64*w) with w >= 4: fold 2^256 -> 38
      addend = (pw << 5) + (pw << 2) + (pw << 1);
    end else begin
      addend = 512'(m_p) << {w_idx, 6'b0};
    end
    acc_n = acc_q + addend;
  end

  logic [511:0]    t_q;
  logic            t_vld_q, t_raw_q;
  logic [TAGW-1:0] t_tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      t_q     <= '0;
      t_vld_q <= 1'b0;
      t_raw_q <= 1'b0;
      t_tag_q <= '0;
    end else begin
      t_vld_q <= 1'b0;
      if (m_valid) begin
        if (is_last) begin
          acc_q   <= '0;
          t_q     <= acc_n;
          t_vld_q <= 1'b1;
          t_raw_q <= is_raw;
          t_tag_q <= op_tag;
        end else begin
          acc_q <= acc_n;
        end
      end
    end
  end

  // ---- fold by 19 and final subtraction ------------------------------------------
  logic [255:0]    f_q;
  logic [511:0]    r_q;
  logic            f_vld_q;
  logic [TAGW-1:0] f_tag_q;
  logic [136:0]    th;
  assign th = t_q[391:255];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q <= '0; r_q <= '0; f_vld_q <= 1'b0; f_tag_q <= '0;
      out_mod <= '0; out_raw <= '0; out_valid <= 1'b0; out_tag <= '0;
    end else begin
      f_vld_q <= t_vld_q;
      f_tag_q <= t_tag_q;
      r_q     <= t_q;
      f_q     <= t_raw_q ? 256'd0
               : (256'(th) << 4) + (256'(th) << 1) + 256'(th) + {1'b0, t_q[254:0]};
      out_valid <= f_vld_q;
      out_tag   <= f_tag_q;
      out_raw   <= r_q;
      out_mod   <= (f_q >= P) ? f_q - P : f_q;
    end
  end

endmodule
