// chump_cpu_tb: runs the processor on random programs and random RAM
// contents and compares it, clock by clock, with the instruction-level
// reference model (chump_ref_pkg). The program ROM and data RAM are
// plain arrays here. After every clock the PC, accumulator, RAM address,
// pending write and all 16 RAM words must match. One instruction
// completes per clock. Every 40 clocks the test reloads the program,
// reloads the RAM and resets the processor. The test also requires that
// every opcode ran, that jumps were both taken and not taken, and that
// STORETO writes happened.
module chump_cpu_tb;
  import chump_ref_pkg::*;

  logic       clk = 0, rst_n;
  logic [3:0] pc, ram_addr, ram_wdata, ram_rdata, acc;
  logic [7:0] instr;
  logic       ram_we, z, jump;
  logic [7:0] prog [16];
  logic [3:0] ram  [16];
  int checks = 0, failures = 0;
  chump_model m;

  chump_cpu dut (
    .clk(clk), .rst_n(rst_n), .pc(pc), .instr(instr),
    .ram_addr(ram_addr), .ram_we(ram_we), .ram_wdata(ram_wdata), .ram_rdata(ram_rdata),
    .acc(acc), .z(z), .jump(jump)
  );

  assign instr     = prog[pc];
  assign ram_rdata = ram[ram_addr];
  always @(posedge clk) if (ram_we) ram[ram_addr] <= ram_wdata;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int cyc);
    bit bad;
    bad = (pc !== m.pc) || (acc !== m.acc) || (ram_addr !== m.addr) || (ram_we !== m.wpend);
    for (int i = 0; i < 16; i++) if (ram[i] !== m.mem[i]) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10)
        $display("cycle %0d: pc=%0d acc=%0d addr=%0d we=%b, model pc=%0d acc=%0d addr=%0d we=%b",
                 cyc, pc, acc, ram_addr, ram_we, m.pc, m.acc, m.addr, m.wpend);
    end
  endtask

  initial begin
    m = new();
    rst_n = 0;
    for (int run = 0; run < 150; run++) begin
      @(negedge clk);
      rst_n = 0;
      for (int i = 0; i < 16; i++) begin
        prog[i] = 8'($urandom);
        ram[i]  = 4'($urandom);
        m.prog[i] = prog[i];
        m.mem[i]  = ram[i];
      end
      m.reset();
      #1;
      compare(0);
      @(negedge clk);
      rst_n = 1;
      for (int c = 1; c <= 40; c++) begin
        @(posedge clk);
        m.step();
        #1;
        compare(c);
      end
    end
    for (int i = 0; i < 14; i++) begin
      checks++;
      if (m.op_count[i] == 0) begin failures++; $display("opcode %b never ran", 4'(i)); end
    end
    checks++;
    if (m.jumps_taken == 0 || m.ifzero_not_taken == 0 || m.delayed_writes == 0) begin
      failures++; $display("missing jump/no-jump/store coverage");
    end
    $display("jumps taken %0d, IFZERO not taken %0d, delayed writes %0d",
             m.jumps_taken, m.ifzero_not_taken, m.delayed_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
