// chump_control_rom: control unit of the CHUMP processor.
//
// A 16-word by 8-bit ROM addressed by the 4-bit opcode. Each word holds the
// control signals of one instruction: ALU function (5 bits), accumulator
// write, RAM write and jump (see chump_pkg::ctrl_t). The contents are
// computed by chump_pkg::control_word from this table:
//   LOAD   : ALU B,   accumulator write
//   ADD    : ALU A+B, accumulator write
//   SUB    : ALU A-B, accumulator write
//   STORETO: RAM write
//   READ   : nothing (the Addr register loads on every clock anyway)
//   GOTO   : ALU 0 (Z=1), jump
//   IFZERO : ALU A (Z = accumulator is zero), jump
// Both Op4 variants of an operation get the same word. Where the ALU
// result is unused, the ROM selects A. The unused opcodes 1110 and 1111
// do nothing and fall through to the next instruction. Those two fillers
// are this design's choice; the rest follows the CHUMP control table.
//
// Combinational (an asynchronous ROM), no clock.
module chump_control_rom
  import chump_pkg::*;
(
  input  logic [3:0] opcode,
  output ctrl_t      ctrl
);

  function automatic ctrl_t [15:0] build_rom();
    ctrl_t [15:0] r;
    for (int i = 0; i < 16; i++) r[i] = control_word(op_e'(i >> 1));
    return r;
  endfunction

  localparam ctrl_t [15:0] ROM = build_rom();

  assign ctrl = ROM[opcode];

endmodule
