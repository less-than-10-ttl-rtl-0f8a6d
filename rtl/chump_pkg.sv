// chump_pkg: types and constants shared by the CHUMP 4-bit processor.
//
// An instruction is one byte: a 4-bit opcode in bits 7:4 and a 4-bit
// constant in bits 3:0. The upper three opcode bits (Op7..Op5) name one of
// seven operations; the lowest opcode bit (Op4) picks the operand: 0 takes
// the constant, 1 takes the data RAM word at the Addr register. Op4 drives
// the operand multiplexer directly; the other opcode bits only reach the
// datapath through the control ROM.
//
// The opcode numbering, the instruction format and the 8-bit control word
// split (5 ALU bits, accumulator write, RAM write, jump) follow the CHUMP
// description. The order of the fields inside the control word, the
// 3-bit ALU function numbering and the control word of the unused opcode
// 111x are this design's own choices.
package chump_pkg;

  localparam int unsigned DATA_W  = 4;  // data word, accumulator, ALU width
  localparam int unsigned ADDR_W  = 4;  // PC, ROM and RAM address width
  localparam int unsigned INSTR_W = 8;  // program ROM word
  localparam int unsigned DEPTH   = 1 << ADDR_W;

  // Operation in opcode bits Op7..Op5.
  typedef enum logic [2:0] {
    OP_LOAD    = 3'b000,
    OP_ADD     = 3'b001,
    OP_SUB     = 3'b010,
    OP_STORETO = 3'b011,
    OP_READ    = 3'b100,
    OP_GOTO    = 3'b101,
    OP_IFZERO  = 3'b110,
    OP_UNUSED  = 3'b111
  } op_e;

  // Function code of the simplified ALU (F2..F0). Codes 5..7 are free.
  typedef enum logic [2:0] {
    ALU_A    = 3'd0,
    ALU_B    = 3'd1,
    ALU_ADD  = 3'd2,
    ALU_SUB  = 3'd3,
    ALU_ZERO = 3'd4
  } alu_fn_e;

  typedef struct packed {
    op_e  op;      // Op7..Op5
    logic mem;     // Op4: 1 = operand from RAM, 0 = constant
  } opcode_t;

  typedef struct packed {
    opcode_t           opcode;
    logic [DATA_W-1:0] konst;  // C3..C0
  } instr_t;

  // One control ROM word (8 bits, most significant field first).
  typedef struct packed {
    logic [4:0] alu;     // ALU function; bits 4:3 are 0 for the simplified ALU
    logic       acc_we;  // 1 = accumulator takes the ALU result
    logic       ram_we;  // 1 = write RAM (travels through the Addr register)
    logic       jmp;     // 1 = jump if the ALU Z flag is set
  } ctrl_t;

  // Contents of the control ROM for one opcode (both Op4 variants of an
  // operation share one word).
  function automatic ctrl_t control_word(op_e op);
    ctrl_t c;
    c = '0;
    unique case (op)
      OP_LOAD:    begin c.alu = 5'(ALU_B);    c.acc_we = 1'b1; end
      OP_ADD:     begin c.alu = 5'(ALU_ADD);  c.acc_we = 1'b1; end
      OP_SUB:     begin c.alu = 5'(ALU_SUB);  c.acc_we = 1'b1; end
      OP_STORETO: begin c.alu = 5'(ALU_A);    c.ram_we = 1'b1; end
      OP_READ:    begin c.alu = 5'(ALU_A);                     end
      OP_GOTO:    begin c.alu = 5'(ALU_ZERO); c.jmp    = 1'b1; end
      OP_IFZERO:  begin c.alu = 5'(ALU_A);    c.jmp    = 1'b1; end
      OP_UNUSED:  begin c.alu = 5'(ALU_A);                     end
    endcase
    return c;
  endfunction

  // Builds one instruction byte.
  function automatic logic [INSTR_W-1:0] make_instr(op_e op, logic mem, logic [DATA_W-1:0] k);
    return {op, mem, k};
  endfunction

  // Default program: keeps incrementing the data RAM word at address 2.
  //   0: READ 2   1: LOAD (memory)   2: ADD 1   3: STORETO 2   4: GOTO 0
  // Words 5..15 are 0 (LOAD 0) and are never reached.
  function automatic logic [DEPTH-1:0][INSTR_W-1:0] example_program();
    logic [DEPTH-1:0][INSTR_W-1:0] p;
    p    = '0;
    p[0] = make_instr(OP_READ,    1'b0, 4'd2);
    p[1] = make_instr(OP_LOAD,    1'b1, 4'd0);
    p[2] = make_instr(OP_ADD,     1'b0, 4'd1);
    p[3] = make_instr(OP_STORETO, 1'b0, 4'd2);
    p[4] = make_instr(OP_GOTO,    1'b0, 4'd0);
    return p;
  endfunction

endpackage
