// SHA-512 hash unit with a 64-bit datapath, one compression round per clock.
//
// The host presents one padded 1024-bit block (word 0 of the message
// schedule in bits 1023:960) with start; init = 1 restarts the chaining
// value from the standard initial hash value (first block of a message),
// init = 0 continues from the digest of the previous block. The core runs
// the 80 rounds of the compression function in 80 clocks: the message
// schedule lives in a 16-word shift register that produces one new 64-bit
// word per round, and the eight working variables are updated once per
// round. In the 80th round the new working variables are added straight
// into the chaining value, so done pulses 81 clocks after start (one load clock, 80 rounds) and digest
// (H0 in bits 511:448) is valid from then on. start is accepted while busy
// is low. The 80-clock block time and the 64-bit datapath are the
// document's; message padding is left to the host, as is the split of a
// message into blocks.
module sha512_core (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          init,
  input  logic [1023:0] block,
  output logic          busy,
  output logic          done,
  output logic [511:0]  digest
);

  function automatic logic [63:0] k_const(input logic [6:0] t);
    case (t)
      7'd0:  k_const = 64'h428a2f98d728ae22;  7'd1:  k_const = 64'h7137449123ef65cd;
      7'd2:  k_const = 64'hb5c0fbcfec4d3b2f;  7'd3:  k_const = 64'he9b5dba58189dbbc;
      7'd4:  k_const = 64'h3956c25bf348b538;  7'd5:  k_const = 64'h59f111f1b605d019;
      7'd6:  k_const = 64'h923f82a4af194f9b;  7'd7:  k_const = 64'hab1c5ed5da6d8118;
      7'd8:  k_const = 64'hd807aa98a3030242;  7'd9:  k_const = 64'h12835b0145706fbe;
      7'd10: k_const = 64'h243185be4ee4b28c;  7'd11: k_const = 64'h550c7dc3d5ffb4e2;
      7'd12: k_const = 64'h72be5d74f27b896f;  7'd13: k_const = 64'h80deb1fe3b1696b1;
      7'd14: k_const = 64'h9bdc06a725c71235;  7'd15: k_const = 64'hc19bf174cf692694;
      7'd16: k_const = 64'he49b69c19ef14ad2;  7'd17: k_const = 64'hefbe4786384f25e3;
      7'd18: k_const = 64'h0fc19dc68b8cd5b5;  7'd19: k_const = 64'h240ca1cc77ac9c65;
      7'd20: k_const = 64'h2de92c6f592b0275;  7'd21: k_const = 64'h4a7484aa6ea6e483;
      7'd22: k_const = 64'h5cb0a9dcbd41fbd4;  7'd23: k_const = 64'h76f988da831153b5;
      7'd24: k_const = 64'h983e5152ee66dfab;  7'd25: k_const = 64'ha831c66d2db43210;
      7'd26: k_const = 64'hb00327c898fb213f;  7'd27: k_const = 64'hbf597fc7beef0ee4;
      7'd28: k_const = 64'hc6e00bf33da88fc2;  7'd29: k_const = 64'hd5a79147930aa725;
      7'd30: k_const = 64'h06ca6351e003826f;  7'd31: k_const = 64'h142929670a0e6e70;
      7'd32: k_const = 64'h27b70a8546d22ffc;  7'd33: k_const = 64'h2e1b21385c26c926;
      7'd34: k_const = 64'h4d2c6dfc5ac42aed;  7'd35: k_const = 64'h53380d139d95b3df;
      7'd36: k_const = 64'h650a73548baf63de;  7'd37: k_const = 64'h766a0abb3c77b2a8;
      7'd38: k_const = 64'h81c2c92e47edaee6;  7'd39: k_const = 64'h92722c851482353b;
      7'd40: k_const = 64'ha2bfe8a14cf10364;  7'd41: k_const = 64'ha81a664bbc423001;
      7'd42: k_const = 64'hc24b8b70d0f89791;  7'd43: k_const = 64'hc76c51a30654be30;
      7'd44: k_const = 64'hd192e819d6ef5218;  7'd45: k_const = 64'hd69906245565a910;
      7'd46: k_const = 64'hf40e35855771202a;  7'd47: k_const = 64'h106aa07032bbd1b8;
      7'd48: k_const = 64'h19a4c116b8d2d0c8;  7'd49: k_const = 64'h1e376c085141ab53;
      7'd50: k_const = 64'h2748774cdf8eeb99;  7'd51: k_const = 64'h34b0bcb5e19b48a8;
      7'd52: k_const = 64'h391c0cb3c5c95a63;  7'd53: k_const = 64'h4ed8aa4ae3418acb;
      7'd54: k_const = 64'h5b9cca4f7763e373;  7'd55: k_const = 64'h682e6ff3d6b2b8a3;
      7'd56: k_const = 64'h748f82ee5defb2fc;  7'd57: k_const = 64'h78a5636f43172f60;
      7'd58: k_const = 64'h84c87814a1f0ab72;  7'd59: k_const = 64'h8cc702081a6439ec;
      7'd60: k_const = 64'h90befffa23631e28;  7'd61: k_const = 64'ha4506cebde82bde9;
      7'd62: k_const = 64'hbef9a3f7b2c67915;  7'd63: k_const = 64'hc67178f2e372532b;
      7'd64: k_const = 64'hca273eceea26619c;  7'd65: k_const = 64'hd186b8c721c0c207;
      7'd66: k_const = 64'heada7dd6cde0eb1e;  7'd67: k_const = 64'hf57d4f7fee6ed178;
      7'd68: k_const = 64'h06f067aa72176fba;  7'd69: k_const = 64'h0a637dc5a2c898a6;
      7'd70: k_const = 64'h113f9804bef90dae;  7'd71: k_const = 64'h1b710b35131c471b;
      7'd72: k_const = 64'h28db77f523047d84;  7'd73: k_const = 64'h32caab7b40c72493;
      7'd74: k_const = 64'h3c9ebe0a15c9bebc;  7'd75: k_const = 64'h431d67c49c100d4c;
      7'd76: k_const = 64'h4cc5d4becb3e42b6;  7'd77: k_const = 64'h597f299cfc657e2a;
      7'd78: k_const = 64'h5fcb6fab3ad6faec;  default: k_const = 64'h6c44198c4a475817;
    endcase
  endfunction

  localparam logic [511:0] IV = {
    64'h6a09e667f3bcc908, 64'hbb67ae8584caa73b, 64'h3c6ef372fe94f82b, 64'ha54ff53a5f1d36f1,
    64'h510e527fade682d1, 64'h9b05688c2b3e6c1f, 64'h1f83d9abfb41bd6b, 64'h5be0cd19137e2179};

  function automatic logic [63:0] rotr(input logic [63:0] x, input int n);
    return (x >> n) | (x << (64 - n));
  endfunction

  logic [63:0] h_q [8];      // chaining value H0..H7
  logic [63:0] v_q [8];      // working variables a..h
  logic [63:0] w_q [16];     // message schedule window, w_q[0] = W[t]
  logic [6:0]  t_q;

  // round logic
  logic [63:0] s0, s1, ch, maj, t1, t2, wnew, ss0, ss1;
  logic [63:0] v_n [8];
  always_comb begin
    s1  = rotr(v_q[4], 14) ^ rotr(v_q[4], 18) ^ rotr(v_q[4], 41);
    ch  = (v_q[4] & v_q[5]) ^ (~v_q[4] & v_q[6]);
    t1  = v_q[7] + s1 + ch + k_const(t_q) + w_q[0];
    s0  = rotr(v_q[0], 28) ^ rotr(v_q[0], 34) ^ rotr(v_q[0], 39);
    maj = (v_q[0] & v_q[1]) ^ (v_q[0] & v_q[2]) ^ (v_q[1] & v_q[2]);
    t2  = s0 + maj;
    v_n[0] = t1 + t2;
    v_n[1] = v_q[0];
    v_n[2] = v_q[1];
    v_n[3] = v_q[2];
    v_n[4] = v_q[3] + t1;
    v_n[5] = v_q[4];
    v_n[6] = v_q[5];
    v_n[7] = v_q[6];
    ss0  = rotr(w_q[1], 1) ^ rotr(w_q[1], 8) ^ (w_q[1] >> 7);
    ss1  = rotr(w_q[14], 19) ^ rotr(w_q[14], 61) ^ (w_q[14] >> 6);
    wnew = ss1 + w_q[9] + ss0 + w_q[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      t_q  <= '0;
      for (int i = 0; i < 8; i++) begin
        h_q[i] <= IV[511 - 64*i -: 64];
        v_q[i] <= '0;
      end
      for (int i = 0; i < 16; i++) w_q[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          t_q  <= '0;
          for (int i = 0; i < 16; i++) w_q[i] <= block[1023 - 64*i -: 64];
          for (int i = 0; i < 8; i++) begin
            h_q[i] <= init ? IV[511 - 64*i -: 64] : h_q[i];
            v_q[i] <= init ? IV[511 - 64*i -: 64] : h_q[i];
          end
        end
      end else begin
        for (int i = 0; i < 15; i++) w_q[i] <= w_q[i+1];
        w_q[15] <= wnew;
        for (int i = 0; i < 8; i++) v_q[i] <= v_n[i];
        t_q <= t_q + 7'd1;
        if (t_q == 7'd79) begin
          for (int i = 0; i < 8; i++) h_q[i] <= h_q[i] + v_n[i];
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb
    for (int i = 0; i < 8; i++) digest[511 - 64*i -: 64] = h_q[i];

endmodule
