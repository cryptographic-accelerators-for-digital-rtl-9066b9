// Self-checking testbench of modl_reduce. The unit is connected to the real
// Design I multiplier (hp_modmul, raw product) as in the accelerator; results
// for corner values and random 512-bit inputs are compared with x mod L from
// wide integer arithmetic, and the cycle count must be the same for every
// input (constant time).
module modl_reduce_tb;
  import ed25519_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done, mul_req, mul_valid;
  logic [511:0] x, mul_p;
  logic [252:0] r;
  logic [255:0] mul_a, mul_b, mod_unused;
  logic [4:0]   tag_unused;

  modl_reduce dut (.*);
  hp_modmul u_mul (.clk, .rst_n, .in_valid(mul_req), .a(mul_a), .b(mul_b), .in_tag(5'd0),
                   .out_valid(mul_valid), .out_tag(tag_unused), .out_mod(mod_unused), .out_raw(mul_p));

  int checks = 0, failures = 0, first_cycles = -1;

  task automatic reduce(input logic [511:0] v);
    int n;
    @(negedge clk);
    start = 1; x = v;
    @(negedge clk);
    start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    checks += 2;
    if (256'(r) !== modl(v)) begin failures++; $display("x=%h got %h exp %h", v, r, modl(v)); end
    if (first_cycles < 0) first_cycles = n;
    else if (n != first_cycles) begin failures++; $display("cycle count %0d vs %0d", n, first_cycles); end
  endtask

  initial begin
    logic [511:0] v;
    start = 0; x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    reduce('1);
    reduce('0);
    reduce(512'(RL));
    reduce(512'(RL) - 1);
    reduce(512'(RL) * 512'(RL) - 1);
    reduce({256'b0, {256{1'b1}}});
    for (int i = 0; i < 200; i++) begin
      for (int j = 0; j < 16; j++) v[j*32 +: 32] = $urandom;
      if (i % 4 == 1) v[511:256] = '0;
      if (i % 4 == 2) v[511:253] = '0;
      reduce(v);
    end
    $display("reduction takes %0d clocks", first_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
