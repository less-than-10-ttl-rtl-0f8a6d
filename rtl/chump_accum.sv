// chump_accum: accumulator register of the CHUMP processor.
//
// A 4-bit register with a write enable (a 74377 or 74173 in the TTL
// build). It always feeds ALU operand A and the data RAM write data, and
// takes the ALU result on the rising clock edge when the control ROM sets
// we (LOAD, ADD and SUB). Otherwise it holds.
//
// rst_n clears it to 0 asynchronously. That reset is this design's choice;
// the enable and the data path follow the CHUMP description.
module chump_accum
  import chump_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (we)  q <= d;
  end

endmodule
