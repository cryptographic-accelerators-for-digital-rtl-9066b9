// Self-checking testbench of ecpm_ctrl with its datapath (memory unit,
// Design I multiplier and adder, key buffer). Runs full 255-bit point
// multiplications of the Ed25519 base point and of random points, given in
// projective Montgomery coordinates, unprotected and protected, and compares
// the affine Edwards result with a double-and-add reference on the twisted
// Edwards curve (ed25519_ref_pkg). Also checks that the cycle
// count does not depend on the key, and that stalls, swaps and the extra
// re-randomizing multiplications actually happen.
module ecpm_ctrl_tb;
  import ed25519_pkg::*;
  import ed25519_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, protect, busy, done, key_bit, key_shift;
  logic [4:0]   ra0, ra1, c_ra0;
  logic [255:0] rd0, rd1;
  logic         mul_valid, mul_wb, as_valid, as_sub, as_wb;
  logic [255:0] mul_a, mul_b, as_a, as_b, mul_out, as_out;
  logic [511:0] mul_raw;
  logic [4:0]   mul_tag, mul_wb_tag, as_tag, as_wb_tag;
  logic [31:0]  n_cycles, n_stalls, n_mul, n_swaps;

  // host access to the memory while the controller is idle
  logic         h_we;
  logic [4:0]   h_wa, h_ra;
  logic [255:0] h_wd;
  logic         kload;
  logic [255:0] kval, kscalar;

  ecpm_ctrl dut (.clk, .rst_n, .start, .protect, .busy, .done, .key_bit, .key_shift,
                 .ra0(c_ra0), .ra1, .rd0, .rd1,
                 .mul_valid, .mul_a, .mul_b, .mul_tag, .mul_ready(1'b1), .mul_wb, .mul_wb_tag,
                 .as_valid, .as_sub, .as_a, .as_b, .as_tag, .as_ready(1'b1), .as_wb, .as_wb_tag,
                 .n_cycles, .n_stalls, .n_mul, .n_swaps);
  assign ra0 = busy ? c_ra0 : h_ra;

  mem_unit u_mem (.clk, .ra0, .rd0, .ra1, .rd1,
                  .we0(mul_wb), .wa0(mul_wb_tag), .wd0(mul_out),
                  .we1(busy ? as_wb : h_we), .wa1(busy ? as_wb_tag : h_wa), .wd1(busy ? as_out : h_wd));
  hp_modmul u_mul (.clk, .rst_n, .in_valid(mul_valid), .a(mul_a), .b(mul_b), .in_tag(mul_tag),
                   .out_valid(mul_wb), .out_tag(mul_wb_tag), .out_mod(mul_out), .out_raw(mul_raw));
  hp_addsub u_as (.clk, .rst_n, .in_valid(as_valid), .sub(as_sub), .a(as_a), .b(as_b), .in_tag(as_tag),
                  .out_valid(as_wb), .out_tag(as_wb_tag), .out(as_out));
  key_buffer u_key (.clk, .rst_n, .load(kload), .clamp(1'b0), .k(kval), .shift(key_shift),
                    .bit_out(key_bit), .scalar(kscalar));

  int checks = 0, failures = 0, cyc_unprot = -1, cyc_prot = -1;
  int tot_stalls = 0, tot_swaps = 0, tot_rerand = 0;

  function automatic logic [255:0] rnd();
    logic [511:0] r;
    for (int i = 0; i < 16; i++) r[i*32 +: 32] = $urandom;
    return 256'(r % 512'(RP));
  endfunction

  function automatic logic [255:0] bswap(input logic [255:0] v);
    logic [255:0] r;
    for (int i = 0; i < 32; i++) r[8*i +: 8] = v[255 - 8*i -: 8];
    return r;
  endfunction

  task automatic hwrite(input logic [4:0] a, input logic [255:0] d);
    @(negedge clk);
    h_we = 1; h_wa = a; h_wd = d;
    @(negedge clk);
    h_we = 0;
  endtask

  task automatic hread(input logic [4:0] a, output logic [255:0] d);
    @(negedge clk);
    h_ra = a;
    #1 d = rd0;
  endtask

  task automatic pmul(input logic [255:0] k, input ept_t pt, input logic [255:0] mu,
                      input logic [255:0] lam, input logic prot);
    logic [511:0] pa, ea;
    logic [255:0] u, v, xe, ye;
    // Montgomery coordinates of the Edwards point: u = (1+y)/(1-y), v = SQ*u/x
    pa = eaff(pt);
    u  = fmul(fadd(1, pa[255:0]), finv(fsub(1, pa[255:0])));
    v  = fmul(fmul(RSQ, u), finv(pa[511:256]));
    hwrite(R_X1, fmul(u, mu));
    hwrite(R_Y1, fmul(v, mu));
    hwrite(R_Z1, mu);
    hwrite(R_LAM, lam);
    @(negedge clk);
    kload = 1; kval = k;
    @(negedge clk);
    kload = 0; start = 1; protect = prot;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    hread(R_XE, xe);
    hread(R_YE, ye);
    ea = eaff(emul(k[254:0], pt));
    checks += 2;
    if (xe !== ea[511:256]) begin failures++; $display("x mismatch k=%h got %h exp %h", k, xe, ea[511:256]); end
    if (ye !== ea[255:0])   begin failures++; $display("y mismatch k=%h got %h exp %h", k, ye, ea[255:0]); end
    checks += 2;
    if (prot) begin
      if (cyc_prot < 0) cyc_prot = n_cycles;
      else if (n_cycles != cyc_prot) begin failures++; $display("protected cycles %0d vs %0d", n_cycles, cyc_prot); end
      if (n_mul == 32'(255 * 13 + 3 + 15 + 265 + 5)) tot_rerand++;
      else begin failures++; $display("multiplications %0d", n_mul); end
    end else begin
      if (cyc_unprot < 0) cyc_unprot = n_cycles;
      else if (n_cycles != cyc_unprot) begin failures++; $display("cycles %0d vs %0d", n_cycles, cyc_unprot); end
      if (n_mul != 32'(255 * 11 + 15 + 265 + 5)) begin failures++; $display("multiplications %0d", n_mul); end
    end
    tot_stalls += n_stalls;
    tot_swaps  += n_swaps;
    $display("point multiplication: %0d cycles, %0d stalls, %0d multiplications", n_cycles, n_stalls, n_mul);
  endtask

  initial begin
    logic [255:0] k;
    ept_t pt;
    start = 0; protect = 0; h_we = 0; h_wa = 0; h_wd = 0; h_ra = 0; kload = 0; kval = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // base point, small and clamped scalars
    pmul(256'd1, ebase(), 256'd1, 256'd1, 1'b0);
    pmul(256'd2, ebase(), 256'd1, 256'd1, 1'b0);
    k = rnd(); k[2:0] = 0; k[254] = 1;
    pmul(k, ebase(), 256'd1, rnd(), 1'b1);
    // random points, projective base (mu), unprotected and protected
    for (int t = 0; t < 4; t++) begin
      pt = emul(rnd(), ebase());
      pmul(rnd(), pt, rnd(), rnd(), t[0]);
    end
    checks += 3;
    if (tot_stalls == 0) begin failures++; $display("no stall seen"); end
    if (tot_swaps == 0)  begin failures++; $display("no swap seen"); end
    if (tot_rerand == 0) begin failures++; $display("no re-randomized run seen"); end
    $display("unprotected %0d cycles, protected %0d cycles", cyc_unprot, cyc_prot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
