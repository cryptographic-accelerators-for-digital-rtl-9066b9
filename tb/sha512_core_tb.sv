// Self-checking testbench of sha512_core: the FIPS 180 example digests of
// "abc", of the empty message and of the 896-bit two-block message, then
// random single-block and chained messages against the reference model;
// also checks that every block takes one load clock plus 80 round clocks.
module sha512_core_tb;
  import ed25519_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, init, busy, done;
  logic [1023:0] block;
  logic [511:0]  digest;

  sha512_core dut (.*);

  int checks = 0, failures = 0;

  task automatic run_block(input logic [1023:0] blk, input logic first);
    int n;
    @(negedge clk);
    start = 1; init = first; block = blk;
    @(negedge clk);
    start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    checks++;
    // one clock to load the block, then the 80 rounds
    if (n != 81) begin failures++; $display("block took %0d clocks", n); end
  endtask

  task automatic expect_digest(input logic [511:0] e, input string what);
    checks++;
    if (digest !== e) begin failures++; $display("%s: got %h", what, digest); end
  endtask

  initial begin
    logic [1023:0] b0, b1;
    logic [511:0] h;
    start = 0; init = 0; block = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // "abc"
    b0 = '0; b0[1023 -: 32] = 32'h61626380; b0[127:0] = 128'd24;
    run_block(b0, 1);
    expect_digest(512'hddaf35a193617abacc417349ae20413112e6fa4e89a97ea20a9eeee64b55d39a2192992a274fc1a836ba3c23a3feebbd454d4423643ce80e2a9ac94fa54ca49f, "abc");

    // empty message
    b0 = '0; b0[1023] = 1'b1;
    run_block(b0, 1);
    expect_digest(512'hcf83e1357eefb8bdf1542850d66d8007d620e4050b5715dc83f4a921d36ce9ce47d0d13c5d85f2b0ff8318d2877eec2f63b931bd47417a81a538327af927da3e, "empty");

    // 896-bit message, two blocks
    b0 = {"abcdefghbcdefghicdefghijdefghijkefghijklfghijklmghijklmnhijklmnoijklmnopjklmnopqklmnopqrlmnopqrsmnopqrstnopqrstu", 8'h80, 120'h0};
    b1 = '0; b1[127:0] = 128'd896;
    run_block(b0, 1);
    run_block(b1, 0);
    expect_digest(512'h8e959b75dae313da8cf4f72814fc143f8f7779c6eb9f7fa17299aeadb6889018501d289e4900f7e4331b99dec4b5433ac7d329eeb6dd26545e96e55b874be909, "two-block");

    // random chained messages against the reference model
    for (int m = 0; m < 6; m++) begin
      h = SHA_IV;
      for (int k = 0; k < (m % 3) + 1; k++) begin
        for (int i = 0; i < 32; i++) b0[i*32 +: 32] = $urandom;
        run_block(b0, k == 0);
        h = compress(h, b0);
      end
      expect_digest(h, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
