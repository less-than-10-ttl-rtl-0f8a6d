// chump_control_rom_tb: reads all 16 control ROM words and compares them
// with the control table written out here field by field: ALU function
// (0=A 1=B 2=A+B 3=A-B 4=zero), accumulator write, RAM write, jump.
// Where the table says the ALU result is unused, only the other fields
// are checked.
module chump_control_rom_tb;
  import chump_pkg::*;
  logic [3:0] opcode;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  chump_control_rom dut (.opcode(opcode), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  //                       LOAD ADD SUB STO READ GOTO IFZ unused
  int alu_tab   [8] = '{   1,   2,  3,  -1, -1,   4,   0,  -1 };
  bit acc_tab   [8] = '{   1,   1,  1,   0,  0,   0,   0,   0 };
  bit ram_tab   [8] = '{   0,   0,  0,   1,  0,   0,   0,   0 };
  bit jmp_tab   [8] = '{   0,   0,  0,   0,  0,   1,   1,   0 };

  initial begin
    for (int i = 0; i < 16; i++) begin
      int k;
      opcode = 4'(i);
      k = i / 2;
      #1;
      checks++;
      if (ctrl.acc_we !== acc_tab[k] || ctrl.ram_we !== ram_tab[k] || ctrl.jmp !== jmp_tab[k] ||
          (alu_tab[k] >= 0 && ctrl.alu !== 5'(alu_tab[k]))) begin
        failures++;
        $display("opcode %b: ctrl=%b", opcode, ctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
