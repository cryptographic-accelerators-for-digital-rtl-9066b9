// Memory unit: the field-element store shared by the controller, the field
// ALU and the host interface.
//
// DEPTH words of W bits with two asynchronous read ports (the two operands
// of an ALU instruction are read in the cycle it issues) and two synchronous
// write ports (one per ALU result path: the multiplier and the adder). Reads
// return the contents before any write of the same clock edge. If both write
// ports address the same word in one cycle, port 0 wins. The document builds
// this store from distributed (LUT) RAM rather than block RAM; the port count
// is this design's choice, made so that both ALU units can retire a result in
// the same cycle.
module mem_unit #(
  parameter int DEPTH = 32,
  parameter int W     = 256,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra0,
  output logic [W-1:0]  rd0,
  input  logic [AW-1:0] ra1,
  output logic [W-1:0]  rd1,
  input  logic          we0,
  input  logic [AW-1:0] wa0,
  input  logic [W-1:0]  wd0,
  input  logic          we1,
  input  logic [AW-1:0] wa1,
  input  logic [W-1:0]  wd1
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we1) mem[wa1] <= wd1;
    if (we0) mem[wa0] <= wd0;
  end

  assign rd0 = mem[ra0];
  assign rd1 = mem[ra1];

endmodule
