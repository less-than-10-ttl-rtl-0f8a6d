// chump_program_rom: program memory of the CHUMP processor.
//
// A 16-word by 8-bit ROM addressed by the program counter, read without a
// clock. Each word is one instruction: opcode in bits 7:4, constant in bits
// 3:0. The contents are the parameter PROGRAM. Its default is the short
// program from the CHUMP description, which keeps incrementing data RAM
// word 2. In the TTL build this ROM is an EEPROM programmed off the board,
// so there is no write port here. Size, word format and the default
// program follow the CHUMP description; holding the contents in a
// parameter is this design's choice.
module chump_program_rom
  import chump_pkg::*;
#(
  parameter logic [DEPTH-1:0][INSTR_W-1:0] PROGRAM = example_program()
) (
  input  logic [ADDR_W-1:0]  addr,
  output logic [INSTR_W-1:0] data
);

  assign data = PROGRAM[addr];

endmodule
