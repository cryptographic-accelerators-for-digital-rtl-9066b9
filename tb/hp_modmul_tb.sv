// Self-checking testbench of hp_modmul: streams one multiplication per cycle
// (corner values, then random ones), and checks every modular and raw
// product against a*b and a*b mod p computed with wide integer arithmetic,
// the five-cycle latency and the one-per-cycle throughput.
module hp_modmul_tb;
  import ed25519_pkg::*;

  localparam int N = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid;
  logic [255:0] a, b;
  logic [4:0]   in_tag, out_tag;
  logic         out_valid;
  logic [255:0] out_mod;
  logic [511:0] out_raw;

  hp_modmul dut (.*);

  int checks = 0, failures = 0;
  logic [255:0] qa [N];
  logic [255:0] qb [N];
  int issue_cyc [N];
  int cyc = 0;
  int nout = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [255:0] rnd256();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [511:0] exp_raw;
      logic [255:0] exp_mod;
      exp_raw = 512'(qa[nout]) * 512'(qb[nout]);
      exp_mod = 256'(exp_raw % 512'(P));
      checks += 3;
      if (out_raw !== exp_raw) begin failures++; $display("raw mismatch %0d", nout); end
      if (out_mod !== exp_mod) begin failures++; $display("mod mismatch %0d a=%h b=%h got %h exp %h", nout, qa[nout], qb[nout], out_mod, exp_mod); end
      if (cyc - issue_cyc[nout] != 5) begin failures++; $display("latency %0d", cyc - issue_cyc[nout]); end
      checks++;
      if (out_tag !== 5'(nout)) failures++;
      nout++;
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0; in_tag = 0;
    for (int i = 0; i < N; i++) begin
      case (i)
        0: begin qa[i] = P - 1; qb[i] = P - 1; end
        1: begin qa[i] = '1;    qb[i] = '1;    end
        2: begin qa[i] = 0;     qb[i] = P - 1; end
        3: begin qa[i] = 1;     qb[i] = P;     end
        4: begin qa[i] = {1'b0, {255{1'b1}}}; qb[i] = 256'd19; end
        default: begin qa[i] = rnd256(); qb[i] = rnd256(); if (i % 2 == 1) qa[i][255] = 1'b0; end
      endcase
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 1; a = qa[i]; b = qb[i]; in_tag = 5'(i);
      issue_cyc[i] = cyc;  // cycle in which the operands are presented
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
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
