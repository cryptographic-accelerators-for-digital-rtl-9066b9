// End-to-end testbench of ed25519_top built with the Design II field ALU
// (DESIGN = 2: eff_modmul and eff_addsub). The stimulus and the checks are
// those of ed25519_top_stim, as for the Design I test.
// An outer watchdog here stops the run if the stimulus never finishes.
module ed25519_top_d2_tb;
  localparam int MB = 128;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, cmd_valid, cmd_sign, ready, done, protect;
  logic [255:0] rnd_lambda, sk, pk, sig_r, sig_s;
  logic [7:0]   msg [MB];
  logic [7:0]   msg_len;
  logic [31:0]  cycles, hash_blocks, ecpm_stalls, ecpm_swaps, ecpm_cycles, ecpm_mults;

  ed25519_top #(.DESIGN(2)) dut (.*);
  ed25519_top_stim #(.DESIGN(2), .MB(MB)) stim (.*);

  initial begin
    repeat (20000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", stim.checks, stim.failures + 1);
    $finish;
  end
endmodule
