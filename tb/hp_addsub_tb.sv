// Self-checking testbench of hp_addsub: streams additions and subtractions
// of reduced operands (corner values and random ones) one per cycle and
// checks each result against (a +/- b) mod p from wide integer arithmetic,
// the two-cycle latency and the tag.
module hp_addsub_tb;
  import ed25519_pkg::*;

  localparam int N = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid, sub;
  logic [255:0] a, b, out;
  logic [4:0]   in_tag, out_tag;
  logic         out_valid;

  hp_addsub dut (.*);

  int checks = 0, failures = 0, cyc = 0, nout = 0;
  logic [255:0] qa [N];
  logic [255:0] qb [N];
  logic         qs [N];
  int issue_cyc [N];

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [255:0] rndfe();
    logic [511:0] r;
    for (int i = 0; i < 16; i++) r[i*32 +: 32] = $urandom;
    return 256'(r % 512'(P));
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [257:0] e;
      if (qs[nout]) e = (258'(qa[nout]) + 258'(P) - 258'(qb[nout])) % 258'(P);
      else          e = (258'(qa[nout]) + 258'(qb[nout])) % 258'(P);
      checks += 3;
      if (out !== e[255:0]) begin failures++; $display("mismatch %0d sub=%0d %h %h got %h", nout, qs[nout], qa[nout], qb[nout], out); end
      if (cyc - issue_cyc[nout] != 2) begin failures++; $display("latency %0d", cyc - issue_cyc[nout]); end
      if (out_tag !== 5'(nout)) failures++;
      nout++;
    end
  end

  initial begin
    in_valid = 0; sub = 0; a = 0; b = 0; in_tag = 0;
    for (int i = 0; i < N; i++) begin
      qs[i] = i[0];
      case (i)
        0, 1: begin qa[i] = P - 1; qb[i] = P - 1; end
        2, 3: begin qa[i] = 0;     qb[i] = P - 1; end
        4, 5: begin qa[i] = P - 1; qb[i] = 1;     end
        6, 7: begin qa[i] = 5;     qb[i] = 5;     end
        default: begin qa[i] = rndfe(); qb[i] = rndfe(); end
      endcase
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 1; a = qa[i]; b = qb[i]; sub = qs[i]; in_tag = 5'(i);
      issue_cyc[i] = cyc;
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
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
