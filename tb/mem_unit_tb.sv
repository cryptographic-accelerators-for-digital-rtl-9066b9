// Self-checking testbench of mem_unit: random writes on both ports (with
// same-address collisions) and random reads on both ports, compared with a
// reference array kept by the testbench.
module mem_unit_tb;
  localparam int DEPTH = 32, W = 256, AW = 5;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] ra0, ra1, wa0, wa1;
  logic [W-1:0]  rd0, rd1, wd0, wd1;
  logic          we0, we1;

  mem_unit #(.DEPTH(DEPTH), .W(W)) dut (.*);

  logic [W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  function automatic logic [W-1:0] rndw();
    logic [W-1:0] r;
    for (int i = 0; i < W / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    we0 = 0; we1 = 0; ra0 = 0; ra1 = 0; wa0 = 0; wa1 = 0; wd0 = 0; wd1 = 0;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we0 = 1; wa0 = AW'(i); wd0 = rndw(); ref_mem[i] = wd0;
    end
    @(negedge clk) we0 = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      ra0 = AW'($urandom); ra1 = AW'($urandom);
      #1;
      checks += 2;
      if (rd0 !== ref_mem[ra0]) begin failures++; $display("rd0 mismatch at %0d", ra0); end
      if (rd1 !== ref_mem[ra1]) begin failures++; $display("rd1 mismatch at %0d", ra1); end
      we0 = $urandom_range(0, 1); we1 = $urandom_range(0, 1);
      wa0 = AW'($urandom); wa1 = (t % 7 == 0) ? wa0 : AW'($urandom);
      wd0 = rndw(); wd1 = rndw();
      @(posedge clk);
      // read-before-write: still the old contents at this edge
      if (we1) ref_mem[wa1] = wd1;
      if (we0) ref_mem[wa0] = wd0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
