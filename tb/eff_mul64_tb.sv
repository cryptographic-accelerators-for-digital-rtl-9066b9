// Self-checking testbench of eff_mul64: streams corner and random operand
// pairs one per clock and checks every product, its tag and the two-clock
// latency.
module eff_mul64_tb;
  localparam int N = 500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid, out_valid;
  logic [63:0]  a, b;
  logic [5:0]   in_tag, out_tag;
  logic [127:0] p;

  eff_mul64 dut (.*);

  int checks = 0, failures = 0, cyc = 0, nout = 0;
  logic [63:0] qa [N];
  logic [63:0] qb [N];
  int issue_cyc [N];

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks += 3;
      if (p !== 128'(qa[nout]) * 128'(qb[nout])) begin failures++; $display("mismatch %0d", nout); end
      if (out_tag !== 6'(nout)) failures++;
      if (cyc - issue_cyc[nout] != 2) begin failures++; $display("latency %0d", cyc - issue_cyc[nout]); end
      nout++;
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0; in_tag = 0;
    for (int i = 0; i < N; i++) begin
      qa[i] = {$urandom, $urandom}; qb[i] = {$urandom, $urandom};
      if (i == 0) begin qa[i] = '1; qb[i] = '1; end
      if (i == 1) begin qa[i] = 0;  qb[i] = '1; end
      if (i == 2) begin qa[i] = 64'h8000_0000_0000_0000; qb[i] = 64'h1_0000_0001; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 1; a = qa[i]; b = qb[i]; in_tag = 6'(i);
      issue_cyc[i] = cyc;
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != N) failures++;
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
