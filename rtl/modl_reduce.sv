// Constant-time reduction of a 512-bit value modulo the Ed25519 group order
// L = 2^252 + l0 (l0 is 125 bits), using an external multiplier.
//
// Round 1 writes x = x1*2^256 + x0 and uses 2^256 = 16*2^252 = -16*l0
// (mod L):  x' = x0 - 16*(x1*l0), a signed value of about 386 bits.
// Rounds 2 and 3 write x = x1*2^252 + x0 (x1 signed, x0 the low 252 bits)
// and use 2^252 = -l0:  x' = x0 - x1*l0. After round 2 the value has about
// 260 bits and after round 3 it lies in (-2^133, 2^252 + 2^133), so one
// final addition or subtraction of L gives the canonical result in [0, L).
// Every round takes the same number of clocks whatever the data, so the
// reduction is constant-time.
//
// The unsigned products |x1| * l0 are requested from the shared field
// multiplier in its nonmodular mode: mul_req is a one-clock pulse with
// mul_a / mul_b, and the 512-bit product is expected with mul_valid some
// clocks later (any latency). The unit issues one request at a time.
// Interface: start with x while busy is low; done pulses with r valid.
// The three-round structure, the reuse of the field multiplier and the
// shift by four bits follow the document; the signed handling of the
// intermediate values and the final correction are this design's choices.
// Unused bits: the products are at most 256 x 125 bits, so mul_p[511:384]
// is always zero and is not read; of the final candidates x +/- L only the
// low 253 bits (the result) and the sign bit are used.
module modl_reduce (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [511:0] x,
  output logic         busy,
  output logic         done,
  output logic [252:0] r,
  // multiplier port
  output logic         mul_req,
  output logic [255:0] mul_a,
  output logic [255:0] mul_b,
  input  logic         mul_valid,
  input  logic [511:0] mul_p
);
  import ed25519_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_WAIT, S_FINAL} state_e;

  state_e              st_q;
  logic [1:0]          round_q;          // 0, 1, 2
  logic signed [391:0] xs_q;             // running value
  logic [255:0]        x0_q;             // low part for round 1
  logic                neg_q;            // sign of x1 of rounds 2 and 3
  logic [251:0]        lo_q;

  // split of the running value for rounds 2 and 3
  logic signed [391:0] x1s;
  logic        [255:0] x1mag;
  assign x1s   = xs_q >>> 252;
  assign x1mag = x1s[391] ? 256'(-x1s) : 256'(x1s);

  logic signed [391:0] prod_s, upd, fin_add, fin_sub;
  assign prod_s  = $signed({8'b0, mul_p[383:0]});
  always_comb begin
    if (round_q == 2'd0) upd = $signed({136'b0, x0_q}) - (prod_s <<< 4);
    else if (neg_q)      upd = $signed({140'b0, lo_q}) + prod_s;
    else                 upd = $signed({140'b0, lo_q}) - prod_s;
  end
  assign fin_add = xs_q + $signed({136'b0, L});
  assign fin_sub = xs_q - $signed({136'b0, L});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      round_q <= '0;
      done    <= 1'b0;
      mul_req <= 1'b0;
      mul_a   <= '0;
      mul_b   <= '0;
      xs_q    <= '0;
      x0_q    <= '0;
      lo_q    <= '0;
      neg_q   <= 1'b0;
      r       <= '0;
    end else begin
      done    <= 1'b0;
      mul_req <= 1'b0;
      case (st_q)
        S_IDLE: if (start) begin
          x0_q    <= x[255:0];
          xs_q    <= $signed({136'b0, x[511:256]});
          round_q <= 2'd0;
          st_q    <= S_ISSUE;
        end
        S_ISSUE: begin
          mul_req <= 1'b1;
          mul_b   <= 256'(L0);
          if (round_q == 2'd0) begin
            mul_a <= xs_q[255:0];
          end else begin
            mul_a <= x1mag;
            neg_q <= x1s[391];
            lo_q  <= xs_q[251:0];
          end
          st_q <= S_WAIT;
        end
        S_WAIT: if (mul_valid) begin
          xs_q <= upd;
          if (round_q == 2'd2) st_q <= S_FINAL;
          else begin
            round_q <= round_q + 2'd1;
            st_q    <= S_ISSUE;
          end
        end
        S_FINAL: begin
          if (xs_q[391])            r <= fin_add[252:0];
          else if (!fin_sub[391])   r <= fin_sub[252:0];
          else                      r <= xs_q[252:0];
          done <= 1'b1;
          st_q <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (st_q != S_IDLE);

endmodule
