// Secret key buffer: holds the scalar of a point multiplication and hands
// the ladder one bit per step, most significant first.
//
// load captures k; with clamp = 1 the scalar is first formed as EdDSA key
// generation does (bits 0..2 and 255 cleared, bit 254 set, i.e.
// s = 2^254 + sum of 2^i h_i for 3 <= i < 254). The buffer is a shift
// register: bit_out is bit NBITS-1 of what remains and each shift pulse
// moves the next lower bit up, so the access pattern never depends on the
// key. scalar shows the stored value as loaded. The clamping follows the
// key-generation algorithm the accelerator implements; the shift-register
// organisation is this design's choice.
module key_buffer #(
  parameter int NBITS = 255
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         clamp,
  input  logic [255:0] k,
  input  logic         shift,
  output logic         bit_out,
  output logic [255:0] scalar
);

  logic [255:0] sh_q;
  logic [255:0] kc;

  always_comb begin
    kc = k;
    if (clamp) begin
      kc[2:0] = 3'b000;
      kc[255] = 1'b0;
      kc[254] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q   <= '0;
      scalar <= '0;
    end else if (load) begin
      sh_q   <= kc;
      scalar <= kc;
    end else if (shift) begin
      sh_q   <= sh_q << 1;
    end
  end

  assign bit_out = sh_q[NBITS-1];

endmodule
