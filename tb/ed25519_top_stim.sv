// Stimulus and checking for the end-to-end tests of ed25519_top, shared by
// ed25519_top_tb (Design I, default parameters) and ed25519_top_d2_tb
// (Design II). Runs key generation and signing for RFC 8032 test vectors 1
// and 2 (empty and one-byte messages) and for a 128-byte (1024-bit) message
// whose expected key and signature were produced by an independent Ed25519
// implementation, each once unprotected and once protected with a random
// lambda (the results must not change). Checks that the point
// multiplication takes the same number of clocks for every key, and counts
// the mechanisms the run must exercise: multi-block hashing, controller
// stalls, ladder swaps, protected runs. Prints the clock counts of every
// command and the TB_RESULT line. DESIGN only scales the watchdog.
module ed25519_top_stim #(
  parameter int DESIGN = 1,
  parameter int MB     = 128
) (
  input  logic         clk,
  output logic         rst_n,
  output logic         cmd_valid,
  output logic         cmd_sign,
  input  logic         ready,
  input  logic         done,
  output logic         protect,
  output logic [255:0] rnd_lambda,
  output logic [255:0] sk,
  output logic [7:0]   msg [MB],
  output logic [7:0]   msg_len,
  input  logic [255:0] pk,
  input  logic [255:0] sig_r,
  input  logic [255:0] sig_s,
  input  logic [31:0]  cycles,
  input  logic [31:0]  hash_blocks,
  input  logic [31:0]  ecpm_stalls,
  input  logic [31:0]  ecpm_swaps,
  input  logic [31:0]  ecpm_cycles,
  input  logic [31:0]  ecpm_mults
);


  int checks = 0, failures = 0;
  int ecpm_ref [2] = '{0, 0};
  int n_multiblock = 0, n_stall = 0, n_swap = 0, n_prot = 0;

  function automatic logic [255:0] bswap(input logic [255:0] v);
    logic [255:0] r;
    for (int i = 0; i < 32; i++) r[8*i +: 8] = v[255 - 8*i -: 8];
    return r;
  endfunction

  task automatic command(input logic sign, input logic prot);
    @(negedge clk);
    while (!ready) @(negedge clk);
    cmd_valid = 1; cmd_sign = sign; protect = prot;
    for (int i = 0; i < 8; i++) rnd_lambda[32*i +: 32] = $urandom;
    rnd_lambda[255] = 1'b0;
    if (rnd_lambda == 0) rnd_lambda = 256'd12345;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
    if (hash_blocks > 1) n_multiblock++;
    if (ecpm_stalls > 0) n_stall++;
    if (ecpm_swaps > 0)  n_swap++;
    if (prot) n_prot++;
    // the point multiplication must take the same time for every key
    checks++;
    if (ecpm_ref[prot] == 0) ecpm_ref[prot] = ecpm_cycles;
    else if (ecpm_cycles != ecpm_ref[prot]) begin
      failures++; $display("point multiplication time %0d differs from %0d", ecpm_cycles, ecpm_ref[prot]);
    end
    $display("%s%s: %0d cycles, %0d hash blocks, point multiplication %0d cycles / %0d field multiplications",
             sign ? "sign" : "keygen", prot ? " (protected)" : "", cycles, hash_blocks,
             ecpm_cycles, ecpm_mults);
  endtask

  task automatic vector(input logic [255:0] sk_be, input int mlen, input int kind,
                        input logic [255:0] pk_be, input logic [511:0] sig_be);
    sk = bswap(sk_be);
    msg_len = 8'(mlen);
    for (int i = 0; i < MB; i++) msg[i] = (kind == 1) ? 8'h72 : 8'((7 * i + 3) & 255);
    for (int prot = 0; prot < 2; prot++) begin
      command(1'b0, prot[0]);
      checks++;
      if (pk !== bswap(pk_be)) begin failures++; $display("public key %h", bswap(pk)); end
      command(1'b1, prot[0]);
      checks += 2;
      if (sig_r !== bswap(sig_be[511:256])) begin failures++; $display("R %h", bswap(sig_r)); end
      if (sig_s !== bswap(sig_be[255:0]))   begin failures++; $display("S %h", bswap(sig_s)); end
    end
  endtask

  initial begin
    rst_n = 0;
    cmd_valid = 0; cmd_sign = 0; protect = 0; rnd_lambda = 0; sk = 0; msg_len = 0;
    for (int i = 0; i < MB; i++) msg[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // RFC 8032, 7.1, TEST 1 (empty message)
    vector(256'h9d61b19deffd5a60ba844af492ec2cc44449c5697b326919703bac031cae7f60, 0, 0,
           256'hd75a980182b10ab7d54bfed3c964073a0ee172f3daa62325af021a68f707511a,
           512'he5564300c360ac729086e2cc806e828a84877f1eb8e5d974d873e065224901555fb8821590a33bacc61e39701cf9b46bd25bf5f0595bbe24655141438e7a100b);
    // RFC 8032, 7.1, TEST 2 (message 0x72)
    vector(256'h4ccd089b28ff96da9db6c346ec114e0f5b8a319f35aba624da8cf6ed4fb8a6fb, 1, 1,
           256'h3d4017c3e843895a92b70aa74d1b7ebc9c982ccf2ec4968cc0cd55f12af4660c,
           512'h92a009a9f0d4cab8720e820b5f642540a2b27b5416503f8fb3762223ebdb69da085ac1e43e15996e458f3613d0f11d8c387b2eaeb4302aeeb00d291612bb0c00);
    // 1024-bit message (byte i = 7i + 3), key bytes 0x64 .. 0x83
    vector(256'h6465666768696a6b6c6d6e6f707172737475767778797a7b7c7d7e7f80818283, 128, 2,
           256'h0bbc346a57667c380120bd9c7fd7e51d2c5fdfea37cd2f5bf405b2c6bf6f2d78,
           512'h55346c56f753a12c9c1a1db2771ed46bdf76cc68877845784c9a20278f1c078d3c88528e2ac217369e551141b7ec960c851850a54c769c87b4b87fe1ea153408);
    checks += 4;
    if (n_multiblock == 0) begin failures++; $display("no multi-block hash"); end
    if (n_stall == 0)      begin failures++; $display("no controller stall"); end
    if (n_swap == 0)       begin failures++; $display("no ladder swap"); end
    if (n_prot == 0)       begin failures++; $display("no protected run"); end
    $display("multi-block %0d, stalls in %0d, swaps in %0d, protected %0d commands",
             n_multiblock, n_stall, n_swap, n_prot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((DESIGN == 1) ? 400000 : 2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
