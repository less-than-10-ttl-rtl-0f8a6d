// chump_pc: program counter of the CHUMP processor with its jump gate.
//
// A 4-bit synchronous counter with a parallel load (a 74161 in the TTL
// build). Its active-low load input comes from a NAND gate of the control
// ROM's JMP bit and the ALU's Z flag. When both are 1, load_n is 0 and the
// next rising clock edge loads d, the multiplexer output. Otherwise the
// counter increments, wrapping from 15 to 0.
//
// Timing: q changes only on the rising edge of clk. rst_n clears it to 0
// at once (asynchronous), like the counter chip's clear pin. The NAND and
// the load/increment behaviour follow the CHUMP description. The reset
// is this design's choice.
module chump_pc
  import chump_pkg::*;
#(
  parameter int unsigned WIDTH = ADDR_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             jmp,     // control ROM jump bit
  input  logic             z,       // ALU zero flag
  input  logic [WIDTH-1:0] d,       // jump target
  output logic             load_n,  // NAND(jmp, z), 0 = load
  output logic [WIDTH-1:0] q
);

  assign load_n = ~(jmp & z);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (!load_n) q <= d;
    else              q <= q + 1'b1;
  end

endmodule
