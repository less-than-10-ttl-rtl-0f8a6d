// chump_alu: simplified 4-bit ALU of the CHUMP processor.
//
// Every operation has its own combinational circuit, and all of them work
// on operands A and B at the same time. A multiplexer then passes on the
// result named by the 3-bit function code F:
//   0: A    1: B    2: A+B    3: A-B    4: 0    5..7: 0 (unused)
// Sums and differences wrap modulo 2^WIDTH; no carry is brought out.
// Z is 1 when the selected result is zero. The control unit uses Z for
// the jumps: GOTO selects 0 so Z is always 1, and IFZERO selects A so Z
// reports whether the accumulator is zero.
//
// Purely combinational, no clock. Codes 0..4 and the Z flag follow the
// CHUMP description. Giving codes 5..7 the result 0 is this design's
// choice. The description leaves those codes free.
module chump_alu
  import chump_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       fn,
  output logic [WIDTH-1:0] y,
  output logic             z
);

  logic [WIDTH-1:0] sum, diff;

  assign sum  = a + b;
  assign diff = a - b;

  always_comb begin
    case (fn)
      ALU_A:    y = a;
      ALU_B:    y = b;
      ALU_ADD:  y = sum;
      ALU_SUB:  y = diff;
      default:  y = '0;
    endcase
  end

  assign z = (y == '0);

endmodule
