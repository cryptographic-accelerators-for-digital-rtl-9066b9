// Design II modular adder/subtractor for GF(2^255 - 19) on a 128-bit
// datapath.
//
// Computes out = a + b mod p (sub = 0) or out = a - b mod p (sub = 1) for
// operands already reduced below p. The 256-bit operands are handled as two
// 128-bit digits with the carry (or borrow) kept in a register between them:
//   clock 1: C[127:0]   = a0 +/- b0            (carry -> register)
//   clock 2: C[255:128] = a1 +/- b1 + carry    (carry/borrow out -> flag)
//   clock 3: C'[127:0]  = C0 -/+ p0
//   clock 4: C'[255:128]= C1 -/+ p1 + carry;   out = C or C' chosen by the
//            flags (sum: C' unless C - p borrowed; difference: C + p if
//            a - b borrowed, else C).
// The sum stage (clocks 1-2) and the correction stage (clocks 3-4) have
// their own 128-bit adders and work as a two-stage pipeline; clock 1 adds
// the low digits straight from the inputs, as operands are read from the
// memory unit in the same clock.
// Handshake: the operation is taken when in_valid and in_ready are high;
// in_ready is low in the clock after a take, so one operation can start
// every two clocks. out_valid and out_tag appear four clocks after the
// operation was taken.
// Follows the document: 128-bit digits, the carry register between digits,
// two clocks for C = A +/- B and two more for C' = C -/+ p, selection by the
// carry/borrow flag. This design's own: C and C' are kept in the unit's own
// registers rather than both being written to the memory unit.
module eff_addsub #(
  parameter int TAGW = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic            sub,
  input  logic [255:0]    a,
  input  logic [255:0]    b,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output logic [TAGW-1:0] out_tag,
  output logic [255:0]    out
);
  import ed25519_pkg::*;

  // subtraction is x + ~y + 1, so a carry out means "no borrow"
  function automatic logic [128:0] addc(logic [127:0] x, logic [127:0] y,
                                        logic s, logic cin);
    return {1'b0, x} + {1'b0, s ? ~y : y} + 129'(cin);
  endfunction

  // ---- sum stage: C = A +/- B ----------------------------------------------
  logic            sa_hi_q;            // high digit pending
  logic [127:0]    ahi_q, bhi_q, clo_q;
  logic            cya_q, suba_q;
  logic [TAGW-1:0] taga_q;
  logic [128:0]    sa_lo, sa_hi;

  assign in_ready = !sa_hi_q;
  assign sa_lo = addc(a[127:0], b[127:0], sub, sub);
  assign sa_hi = addc(ahi_q, bhi_q, suba_q, cya_q);

  // ---- correction stage: C' = C -/+ p ----------------------------------------
  logic            sb_lo_q, sb_hi_q;   // digit steps pending
  logic [255:0]    c_q;
  logic [127:0]    cplo_q;
  logic            cyb_q, subb_q, flag_q;
  logic [TAGW-1:0] tagb_q;
  logic [128:0]    sb_lo, sb_hi;

  assign sb_lo = addc(c_q[127:0],   P[127:0],   !subb_q, !subb_q);
  assign sb_hi = addc(c_q[255:128], P[255:128], !subb_q, cyb_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sa_hi_q   <= 1'b0;
      sb_lo_q   <= 1'b0;
      sb_hi_q   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      // clock 1: low digits straight from the inputs
      sa_hi_q <= in_valid && in_ready;
      if (in_valid && in_ready) begin
        clo_q  <= sa_lo[127:0];
        cya_q  <= sa_lo[128];
        ahi_q  <= a[255:128];
        bhi_q  <= b[255:128];
        suba_q <= sub;
        taga_q <= in_tag;
      end
      // clock 2: high digits; C and its carry/borrow flag move on
      sb_lo_q <= sa_hi_q;
      if (sa_hi_q) begin
        c_q    <= {sa_hi[127:0], clo_q};
        flag_q <= sa_hi[128];
        subb_q <= suba_q;
        tagb_q <= taga_q;
      end
      // clock 3: low digit of C -/+ p
      sb_hi_q <= sb_lo_q;
      if (sb_lo_q) begin
        cplo_q <= sb_lo[127:0];
        cyb_q  <= sb_lo[128];
      end
      // clock 4: high digit and selection
      //   sum: C' when C - p did not borrow or C overflowed 2^256
      //   difference: C + p when A - B borrowed
      out_valid <= sb_hi_q;
      if (sb_hi_q) begin
        if (subb_q) out <= flag_q ? c_q : {sb_hi[127:0], cplo_q};
        else        out <= (sb_hi[128] || flag_q) ? {sb_hi[127:0], cplo_q} : c_q;
        out_tag <= tagb_q;
      end
    end
  end
endmodule
