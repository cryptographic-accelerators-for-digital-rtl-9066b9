// Self-checking testbench of eff_modmul: back-to-back modular and raw
// multiplications (corner values and random operands) honouring in_ready;
// checks every result against wide integer arithmetic, the tags, the
// 21-clock latency and the 16-clock issue interval.
module eff_modmul_tb;
  import ed25519_pkg::*;

  localparam int N = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid, in_ready, raw, out_valid;
  logic [255:0] a, b, out_mod;
  logic [511:0] out_raw;
  logic [4:0]   in_tag, out_tag;

  eff_modmul dut (.*);

  int checks = 0, failures = 0, cyc = 0, nout = 0;
  logic [255:0] qa [N];
  logic [255:0] qb [N];
  logic         qr [N];
  int issue_cyc [N];

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [511:0] e;
      e = 512'(qa[nout]) * 512'(qb[nout]);
      checks += 3;
      if (qr[nout]) begin
        if (out_raw !== e) begin failures++; $display("raw mismatch %0d", nout); end
      end else if (out_mod !== 256'(e % 512'(P))) begin
        failures++; $display("mod mismatch %0d got %h exp %h", nout, out_mod, 256'(e % 512'(P)));
      end
      if (out_tag !== 5'(nout)) failures++;
      if (cyc - issue_cyc[nout] != 21) begin failures++; $display("latency %0d", cyc - issue_cyc[nout]); end
      nout++;
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0; raw = 0; in_tag = 0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < 8; j++) begin qa[i][32*j +: 32] = $urandom; qb[i][32*j +: 32] = $urandom; end
      qr[i] = (i % 3 == 2);
      if (i == 0) begin qa[i] = P - 1; qb[i] = P - 1; end
      if (i == 1) begin qa[i] = '1; qb[i] = '1; end
      if (i == 2) begin qa[i] = '1; qb[i] = '1; end
      if (i == 3) begin qa[i] = 0; qb[i] = '1; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      int t0;
      @(negedge clk);
      in_valid = 1; a = qa[i]; b = qb[i]; raw = qr[i]; in_tag = 5'(i);
      t0 = cyc;
      while (!in_ready) begin @(negedge clk); end
      issue_cyc[i] = cyc;
      if (i > 0) begin
        checks++;
        if (cyc - t0 > 16) failures++;
      end
      @(negedge clk);
      in_valid = 0;
    end
    repeat (40) @(posedge clk);
    checks++;
    if (nout != N) begin failures++; $display("only %0d results", nout); end
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
