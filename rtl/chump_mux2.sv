// chump_mux2: 2-to-1 operand multiplexer of the CHUMP processor (a 74157
// in the TTL build).
//
// It picks the second operand of an instruction: input d0 (the constant
// from the instruction) when sel is 0, input d1 (the data RAM read word)
// when sel is 1. sel is opcode bit Op4, wired straight from the program
// ROM. Its output feeds ALU operand B, the PC load input and the Addr
// register. Combinational, no clock. The input order and the direct use of
// Op4 as select follow the CHUMP datapath.
module chump_mux2
  import chump_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
