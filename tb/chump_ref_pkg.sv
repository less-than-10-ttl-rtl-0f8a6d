// chump_ref_pkg: instruction-level reference model of the CHUMP machine,
// used by the testbenches to predict the processor state after every clock.
//
// It is written from the instruction table, not from the RTL: each call of
// step() runs the instruction at pc. A memory operand is the RAM word at the
// address left in addr by the previous instruction. The mux result always
// becomes the next addr. A STORETO sets a pending write, and the next step
// stores the accumulator (its value before that step) at addr, after the
// operand has been read. The model also counts the events each testbench
// has to see at least once.
package chump_ref_pkg;

  class chump_model;
    logic [7:0] prog [16];
    logic [3:0] mem  [16];
    logic [3:0] pc, acc, addr;
    logic       wpend;

    // coverage
    int unsigned op_count [16];   // executions per 4-bit opcode
    int unsigned jumps_taken;     // GOTO or IFZERO loaded the PC
    int unsigned ifzero_not_taken;
    int unsigned delayed_writes;  // RAM writes done one instruction after STORETO
    int unsigned wraps;           // ADD/SUB results that wrapped modulo 16

    function new();
      pc = 0; acc = 0; addr = 0; wpend = 0;
      foreach (op_count[i]) op_count[i] = 0;
      jumps_taken = 0; ifzero_not_taken = 0; delayed_writes = 0; wraps = 0;
    endfunction

    function void reset();
      pc = 0; acc = 0; addr = 0; wpend = 0;
    endfunction

    function void step();
      logic [7:0] ins;
      logic [2:0] op;
      logic [3:0] opnd;
      logic [4:0] wide;
      ins  = prog[pc];
      op   = ins[7:5];
      opnd = ins[4] ? mem[addr] : ins[3:0];
      op_count[ins[7:4]]++;
      if (wpend) begin
        mem[addr] = acc;
        delayed_writes++;
      end
      wpend = 1'b0;
      case (op)
        3'b000: begin acc = opnd; pc = pc + 1; end
        3'b001: begin wide = {1'b0, acc} + {1'b0, opnd}; if (wide[4]) wraps++; acc = wide[3:0]; pc = pc + 1; end
        3'b010: begin if (opnd > acc) wraps++; acc = acc - opnd; pc = pc + 1; end
        3'b011: begin wpend = 1'b1; pc = pc + 1; end
        3'b101: begin pc = opnd; jumps_taken++; end
        3'b110: begin
          if (acc == 0) begin pc = opnd; jumps_taken++; end
          else begin pc = pc + 1; ifzero_not_taken++; end
        end
        default: pc = pc + 1;   // READ, and the unused opcode
      endcase
      addr = opnd;
    endfunction
  endclass

endpackage
