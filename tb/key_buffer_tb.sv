// Self-checking testbench of key_buffer: loads random scalars with and
// without clamping and checks the stored scalar and the bit sequence
// (bit 254 down to bit 0) against the expected values.
module key_buffer_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         load, clamp, shift, bit_out;
  logic [255:0] k, scalar;

  key_buffer dut (.*);

  int checks = 0, failures = 0;

  initial begin
    logic [255:0] v, e;
    load = 0; clamp = 0; shift = 0; k = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int j = 0; j < 8; j++) v[j*32 +: 32] = $urandom;
      if (t == 0) v = '1;
      if (t == 1) v = '0;
      e = v;
      if (t % 2 == 0) begin e[2:0] = 0; e[255] = 0; e[254] = 1; end
      @(negedge clk);
      load = 1; clamp = (t % 2 == 0); k = v;
      @(negedge clk);
      load = 0;
      checks++;
      if (scalar !== e) begin failures++; $display("scalar %h exp %h", scalar, e); end
      for (int i = 254; i >= 0; i--) begin
        checks++;
        if (bit_out !== e[i]) begin failures++; $display("bit %0d wrong", i); end
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
    end
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
