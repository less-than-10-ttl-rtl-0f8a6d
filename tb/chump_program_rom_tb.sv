// chump_program_rom_tb: reads the default program (the RAM word 2 counter)
// and a second instance loaded with a random program, and compares every
// word.
module chump_program_rom_tb;
  import chump_pkg::*;

  function automatic logic [15:0][7:0] rand_prog();
    logic [15:0][7:0] p;
    for (int i = 0; i < 16; i++) p[i] = 8'((i * 37 + 11) ^ (i << 4));
    return p;
  endfunction
  localparam logic [15:0][7:0] P2 = rand_prog();

  logic [3:0] addr;
  logic [7:0] d1, d2;
  logic [7:0] expected [16] = '{8'h82, 8'h10, 8'h21, 8'h62, 8'hA0, 8'h00, 8'h00, 8'h00,
                                8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
  int checks = 0, failures = 0;

  chump_program_rom dut (.addr(addr), .data(d1));
  chump_program_rom #(.PROGRAM(P2)) dut2 (.addr(addr), .data(d2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      #1;
      checks += 2;
      if (d1 !== expected[i]) begin failures++; $display("rom[%0d]=%h expected %h", i, d1, expected[i]); end
      if (d2 !== 8'((i * 37 + 11) ^ (i << 4))) begin failures++; $display("rom2[%0d]=%h", i, d2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
