// chump_alu_tb: exhaustive check of the simplified ALU. Every pair of 4-bit
// operands is applied with every function code, and the result and the Z
// flag are compared with values computed here.
module chump_alu_tb;
  logic [3:0] a, b, y, exp_y;
  logic [2:0] fn;
  logic       z;
  int checks = 0, failures = 0;

  chump_alu dut (.a(a), .b(b), .fn(fn), .y(y), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 8; f++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          a = 4'(i); b = 4'(j); fn = 3'(f);
          #1;
          case (f)
            0: exp_y = 4'(i);
            1: exp_y = 4'(j);
            2: exp_y = 4'((i + j) % 16);
            3: exp_y = 4'((i - j + 16) % 16);
            default: exp_y = 4'd0;
          endcase
          checks++;
          if (y !== exp_y || z !== (exp_y == 4'd0)) begin
            failures++;
            if (failures < 10)
              $display("ALU fn=%0d a=%0d b=%0d: y=%0d z=%b, expected y=%0d", f, i, j, y, z, exp_y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
