// Ed25519 accelerator: key generation and signing in hardware, in either of
// the two organisations of the field ALU.
//
// Blocks: the SHA-512 hash unit, the mod L reduction unit, the memory unit,
// the field ALU, the key buffer feeding the ladder, and the
// point-multiplication controller with its routine ROM. The field ALU is
// chosen by DESIGN:
//   1 (default) high-performance: Karatsuba multiplier hp_modmul (one
//     product per clock, 5-clock latency) and the 255-bit adder hp_addsub;
//   2 efficient: 64 x 64-based multiplier eff_modmul (one product per 16
//     clocks) and the 128-bit-digit adder eff_addsub (one operation per 2
//     clocks, 4-clock latency).
// Everything else is shared by both organisations. This module is the top-level FSM: it builds the
// padded hash blocks, moves values between the units and keeps the secret
// key material (s, prefix) and the public key.
//
// Commands (cmd_valid while ready is high):
//   CMD_KEYGEN  sk (32 bytes, byte i in sk[8i+7:8i]) -> h = SHA-512(sk),
//               s = clamped low half of h, prefix = high half,
//               A = [s]B, pk = enc(A). s, prefix and pk are kept.
//   CMD_SIGN    msg[0 .. msg_len-1] -> r = SHA-512(prefix || M) mod L,
//               R = [r]B, k = SHA-512(enc(R) || pk || M) mod L,
//               S = (r + k*s) mod L; sig_r = enc(R), sig_s = S.
// done pulses when a command has finished; the outputs hold until the next
// command. All 256-bit byte strings are little-endian integers, as in the
// Ed25519 encoding (enc(P) = y with bit 255 = lsb of x).
//
// Side-channel protection: with protect = 1 every point multiplication runs
// on a base point randomized by rnd_lambda (nonzero, supplied from outside,
// fresh per command) and re-randomizes the ladder state each step; the
// point multiplication and the mod L reduction are constant-time in both
// modes. The multiplier is shared: the controller uses it for field
// multiplications, the mod L unit and this FSM for nonmodular products.
//
// Follows the document: the split into hash unit, mod L unit, memory unit,
// field ALU, key buffer and controller/ROM; the algorithms. This design's
// own: the command interface, the message buffer of MSG_BYTES bytes
// (messages of up to MSG_BYTES bytes), and the block builder. Verification
// is not included.
module ed25519_top #(
  parameter int DESIGN    = 1,
  parameter int MSG_BYTES = 128,
  parameter int NBITS     = 255
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmd_valid,
  input  logic         cmd_sign,       // 0: key generation, 1: signing
  output logic         ready,
  output logic         done,
  input  logic         protect,
  input  logic [255:0] rnd_lambda,
  input  logic [255:0] sk,
  input  logic [7:0]   msg [MSG_BYTES],
  input  logic [$clog2(MSG_BYTES+1)-1:0] msg_len,
  output logic [255:0] pk,
  output logic [255:0] sig_r,
  output logic [255:0] sig_s,
  // activity of the last command
  output logic [31:0]  cycles,
  output logic [31:0]  hash_blocks,
  output logic [31:0]  ecpm_stalls,
  output logic [31:0]  ecpm_swaps,
  output logic [31:0]  ecpm_cycles,    // of the last point multiplication
  output logic [31:0]  ecpm_mults      // field multiplications issued by it
);
  import ed25519_pkg::*;

  typedef enum logic [4:0] {
    T_IDLE, T_HASH_GO, T_HASH_WAIT, T_HASH_NEXT,
    T_KG_SCALAR, T_BASE_WR, T_ECPM_GO, T_ECPM_WAIT, T_RD_X, T_RD_Y,
    T_MODL_GO, T_MODL_WAIT, T_KS_GO, T_KS_WAIT, T_DONE
  } tstate_e;

  typedef enum logic [1:0] {J_KEY, J_R, J_K, J_S} job_e;   // which value is being produced

  tstate_e st_q;
  job_e    job_q;
  logic    prot_q;

  // secret key buffer and results
  logic [255:0] s_q, prefix_q, kbar_q, renc_q, lam_q;
  logic [511:0] ks_q;      // k*s + r, input of the last reduction
  logic         xe_lsb_q;   // lsb of the affine x, the sign bit of the encoding

  // ---------------------------------------------------------------------
  // hash block builder: stream = hdr[0 .. hlen-1] || msg (if used) || pad
  // ---------------------------------------------------------------------
  logic [7:0]  hdr [64];
  logic [6:0]  hlen;
  logic        use_msg;
  logic [1:0]  blk_q;
  logic [8:0]  n_bytes;
  logic [1:0]  n_blocks;
  logic [1023:0] block;

  always_comb begin
    for (int i = 0; i < 64; i++) hdr[i] = 8'h00;
    case (job_q)
      J_KEY: begin hlen = 7'd32; use_msg = 1'b0;
        for (int i = 0; i < 32; i++) hdr[i] = sk[8*i +: 8]; end
      J_R: begin hlen = 7'd32; use_msg = 1'b1;
        for (int i = 0; i < 32; i++) hdr[i] = prefix_q[8*i +: 8]; end
      default: begin hlen = 7'd64; use_msg = 1'b1;
        for (int i = 0; i < 32; i++) begin
          hdr[i]      = renc_q[8*i +: 8];
          hdr[32 + i] = pk[8*i +: 8];
        end
      end
    endcase
    n_bytes  = 9'(hlen) + (use_msg ? 9'(msg_len) : 9'd0);
    // blocks needed for the bytes, the 0x80 marker and the 16-byte length
    n_blocks = 2'((10'(n_bytes) + 10'd17 + 10'd127) >> 7);
  end

  always_comb begin
    logic [9:0]   j;
    logic [9:0]   mi;
    logic [127:0] bitlen;
    logic [9:0]   lenpos;
    bitlen = 128'(n_bytes) << 3;
    lenpos = (10'(n_blocks) << 7) - 10'd16;
    for (int i = 0; i < 128; i++) begin
      j  = (10'(blk_q) << 7) + 10'(i);
      mi = j - 10'(hlen);
      if (j < 10'(hlen))                  block[1023 - 8*i -: 8] = hdr[j[5:0]];
      else if (j < 10'(n_bytes))          block[1023 - 8*i -: 8] = (mi < 10'(MSG_BYTES)) ? msg[mi[$clog2(MSG_BYTES)-1:0]] : 8'h00;
      else if (j == 10'(n_bytes))         block[1023 - 8*i -: 8] = 8'h80;
      else if (j >= lenpos)               block[1023 - 8*i -: 8] = bitlen[8*(15 - (j - lenpos)) +: 8];
      else                                block[1023 - 8*i -: 8] = 8'h00;
    end
  end

  // ---------------------------------------------------------------------
  // units
  // ---------------------------------------------------------------------
  logic         h_start, h_busy, h_done;
  logic [511:0] h_digest, h_le;
  sha512_core u_hash (.clk, .rst_n, .start(h_start), .init(blk_q == 2'd0), .block,
                      .busy(h_busy), .done(h_done), .digest(h_digest));
  always_comb
    for (int i = 0; i < 64; i++) h_le[8*i +: 8] = h_digest[511 - 8*i -: 8];

  // mod L
  logic         l_start, l_busy, l_done, l_mreq;
  logic [511:0] l_x;
  logic [252:0] l_r;
  logic [255:0] l_ma, l_mb;

  // multiplier (shared)
  logic         m_valid, m_out_valid;
  logic [255:0] m_a, m_b, m_out;
  logic [511:0] m_raw;
  logic [4:0]   m_tag, m_out_tag;
  logic         m_ready;

  modl_reduce u_modl (.clk, .rst_n, .start(l_start), .x(l_x), .busy(l_busy), .done(l_done), .r(l_r),
                      .mul_req(l_mreq), .mul_a(l_ma), .mul_b(l_mb),
                      .mul_valid(m_out_valid), .mul_p(m_raw));

  // adder
  logic         as_valid, as_sub, as_out_valid;
  logic [255:0] as_a, as_b, as_out;
  logic [4:0]   as_tag, as_out_tag;
  logic         as_ready;

  // field ALU of the selected organisation
  logic         c_busy;
  if (DESIGN == 1) begin : g_alu
    assign m_ready  = 1'b1;
    assign as_ready = 1'b1;
    hp_modmul u_mul (.clk, .rst_n, .in_valid(m_valid), .a(m_a), .b(m_b), .in_tag(m_tag),
                     .out_valid(m_out_valid), .out_tag(m_out_tag), .out_mod(m_out), .out_raw(m_raw));
    hp_addsub u_as (.clk, .rst_n, .in_valid(as_valid), .sub(as_sub), .a(as_a), .b(as_b),
                    .in_tag(as_tag), .out_valid(as_out_valid), .out_tag(as_out_tag), .out(as_out));
  end else begin : g_alu
    // the nonmodular mode serves the mod L unit and the k*s product
    eff_modmul u_mul (.clk, .rst_n, .in_valid(m_valid), .in_ready(m_ready), .raw(!c_busy),
                      .a(m_a), .b(m_b), .in_tag(m_tag), .out_valid(m_out_valid),
                      .out_tag(m_out_tag), .out_mod(m_out), .out_raw(m_raw));
    eff_addsub u_as (.clk, .rst_n, .in_valid(as_valid), .in_ready(as_ready), .sub(as_sub),
                     .a(as_a), .b(as_b), .in_tag(as_tag), .out_valid(as_out_valid),
                     .out_tag(as_out_tag), .out(as_out));
  end

  // key buffer
  logic         k_load, k_bit, k_shift;
  logic [255:0] k_val, k_scalar;
  key_buffer #(.NBITS(NBITS)) u_key (.clk, .rst_n, .load(k_load), .clamp(job_q == J_KEY), .k(k_val),
                                     .shift(k_shift), .bit_out(k_bit), .scalar(k_scalar));

  // controller
  logic         c_start, c_done, c_mvalid;
  logic [4:0]   c_ra0, c_ra1, c_mtag;
  logic [255:0] c_ma, c_mb, rd0, rd1;
  ecpm_ctrl #(.NBITS(NBITS)) u_ctrl (
    .clk, .rst_n, .start(c_start), .protect(prot_q), .busy(c_busy), .done(c_done),
    .key_bit(k_bit), .key_shift(k_shift),
    .ra0(c_ra0), .ra1(c_ra1), .rd0, .rd1,
    .mul_valid(c_mvalid), .mul_a(c_ma), .mul_b(c_mb), .mul_tag(c_mtag),
    .mul_ready(m_ready), .mul_wb(m_out_valid && c_busy), .mul_wb_tag(m_out_tag),
    .as_valid, .as_sub, .as_a, .as_b, .as_tag,
    .as_ready, .as_wb(as_out_valid), .as_wb_tag(as_out_tag),
    .n_cycles(ecpm_cycles), .n_stalls(ecpm_stalls), .n_mul(ecpm_mults), .n_swaps(ecpm_swaps));

  // memory: controller while it runs, this FSM otherwise
  logic         t_we;
  logic [4:0]   t_wa, t_ra;
  logic [255:0] t_wd;
  mem_unit #(.DEPTH(32), .W(256)) u_mem (
    .clk, .ra0(c_busy ? c_ra0 : t_ra), .rd0, .ra1(c_ra1), .rd1,
    .we0(m_out_valid && c_busy), .wa0(m_out_tag), .wd0(m_out),
    .we1(c_busy ? as_out_valid : t_we), .wa1(c_busy ? as_out_tag : t_wa),
    .wd1(c_busy ? as_out : t_wd));

  // multiplier input: controller, mod L unit, or the k*s product of signing.
  // The mod L unit and this FSM only issue after the previous product has
  // come back, when the multiplier of either organisation is ready.
  logic         t_mreq;
  always_comb begin
    m_valid = c_mvalid | l_mreq | t_mreq;
    m_tag   = c_mtag;
    if (c_busy)       begin m_a = c_ma; m_b = c_mb; end
    else if (l_busy)  begin m_a = l_ma; m_b = l_mb; end
    else              begin m_a = kbar_q; m_b = s_q; end
  end

  // ---------------------------------------------------------------------
  // top-level FSM
  // ---------------------------------------------------------------------
  logic [1:0]  bw_q;      // base-point write index
  logic [255:0] rbar_q;   // r mod L during signing

  always_comb begin
    h_start = (st_q == T_HASH_GO) && !h_busy;
    l_start = (st_q == T_MODL_GO);
    c_start = (st_q == T_ECPM_GO);
    t_mreq  = (st_q == T_KS_GO) && m_ready;
    t_we    = (st_q == T_BASE_WR);
    t_ra    = (st_q == T_RD_X) ? R_XE : R_YE;
    case (bw_q)
      2'd0:    begin t_wa = R_X1;  t_wd = BASE_U; end
      2'd1:    begin t_wa = R_Y1;  t_wd = BASE_V; end
      2'd2:    begin t_wa = R_Z1;  t_wd = 256'd1; end
      default: begin t_wa = R_LAM; t_wd = lam_q;  end
    endcase
    l_x = (job_q == J_S) ? ks_q : h_le;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= T_IDLE; job_q <= J_KEY; prot_q <= 1'b0;
      s_q <= '0; prefix_q <= '0; kbar_q <= '0; ks_q <= '0; renc_q <= '0; lam_q <= '0; xe_lsb_q <= 1'b0;
      rbar_q <= '0; blk_q <= '0; bw_q <= '0; k_load <= 1'b0; k_val <= '0;
      pk <= '0; sig_r <= '0; sig_s <= '0; done <= 1'b0;
      cycles <= '0; hash_blocks <= '0;
    end else begin
      done   <= 1'b0;
      k_load <= 1'b0;
      if (st_q != T_IDLE) cycles <= cycles + 32'd1;
      case (st_q)
        T_IDLE: if (cmd_valid) begin
          prot_q      <= protect;
          lam_q       <= protect ? rnd_lambda : 256'd1;
          job_q       <= cmd_sign ? J_R : J_KEY;
          blk_q       <= '0;
          cycles      <= '0;
          hash_blocks <= '0;
          st_q        <= T_HASH_GO;
        end
        T_HASH_GO:   if (!h_busy) st_q <= T_HASH_WAIT;
        T_HASH_WAIT: if (h_done) begin
          hash_blocks <= hash_blocks + 32'd1;
          st_q <= T_HASH_NEXT;
        end
        T_HASH_NEXT: if (2'(blk_q + 2'd1) != n_blocks) begin
          blk_q <= blk_q + 2'd1;
          st_q  <= T_HASH_GO;
        end else begin
          blk_q <= '0;
          st_q  <= (job_q == J_KEY) ? T_KG_SCALAR : T_MODL_GO;
        end
        T_KG_SCALAR: begin
          // the key buffer clamps the low half of the hash into s
          prefix_q <= h_le[511:256];
          k_val    <= h_le[255:0];
          k_load   <= 1'b1;
          bw_q     <= '0;
          st_q     <= T_BASE_WR;
        end
        T_MODL_GO:   st_q <= T_MODL_WAIT;
        T_MODL_WAIT: if (l_done) begin
          case (job_q)
            J_R: begin
              rbar_q <= 256'(l_r);
              k_val  <= 256'(l_r);
              k_load <= 1'b1;
              bw_q   <= '0;
              st_q   <= T_BASE_WR;
            end
            J_K: begin
              kbar_q <= 256'(l_r);
              st_q   <= T_KS_GO;
            end
            default: begin
              sig_r <= renc_q;
              sig_s <= 256'(l_r);
              st_q  <= T_DONE;
            end
          endcase
        end
        T_KS_GO:   if (m_ready) st_q <= T_KS_WAIT;
        T_KS_WAIT: if (m_out_valid) begin
          ks_q  <= m_raw + 512'(rbar_q);
          job_q <= J_S;
          st_q  <= T_MODL_GO;
        end
        T_BASE_WR: begin
          bw_q <= bw_q + 2'd1;
          if (bw_q == 2'd3) st_q <= T_ECPM_GO;
        end
        T_ECPM_GO: begin
          if (job_q == J_KEY) s_q <= k_scalar;   // clamped secret scalar
          st_q <= T_ECPM_WAIT;
        end
        T_ECPM_WAIT: if (c_done) st_q <= T_RD_X;
        T_RD_X: begin
          xe_lsb_q <= rd0[0];
          st_q <= T_RD_Y;
        end
        T_RD_Y: begin
          if (job_q == J_KEY) begin
            pk   <= {xe_lsb_q, rd0[254:0]};
            st_q <= T_DONE;
          end else begin
            renc_q <= {xe_lsb_q, rd0[254:0]};
            job_q  <= J_K;
            blk_q  <= '0;
            st_q   <= T_HASH_GO;
          end
        end
        T_DONE: begin
          done <= 1'b1;
          st_q <= T_IDLE;
        end
        default: st_q <= T_IDLE;
      endcase
    end
  end

  assign ready = (st_q == T_IDLE);

endmodule
