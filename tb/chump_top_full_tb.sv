// chump_top_full_tb: the machine as built, with its default program
//   0: READ 2   1: LOAD [m]   2: ADD 1   3: STORETO 2   4: GOTO 0
// which keeps incrementing data RAM word 2. The clock is stepped through
// the switch latch. The test reads the power-up value of word 2, then
// checks that each 5-instruction loop adds exactly 1 (mod 16). The new
// value must appear at the clock that ends the GOTO, the instruction after
// the STORETO, and never earlier. The loop runs 40 times, so the word
// wraps from 15 to 0 at least twice. No other RAM word may change.
module chump_top_full_tb;
  logic       sw_s_n, sw_r_n, rst_n;
  logic       clk, clk_n, we, z, jump;
  logic [3:0] pc, acc, addr;
  logic [7:0] instr;
  logic [3:0] init [16];
  logic [3:0] expect2;
  int checks = 0, failures = 0, wraps = 0;

  chump_top dut (
    .sw_s_n(sw_s_n), .sw_r_n(sw_r_n), .rst_n(rst_n), .clk(clk), .clk_n(clk_n),
    .pc(pc), .instr(instr), .acc(acc), .ram_addr(addr), .ram_we(we), .z(z), .jump(jump)
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_clock();
    sw_r_n = 1; #10;
    sw_s_n = 0; #3; sw_s_n = 1; #3; sw_s_n = 0;   // one bounce on the set contact
    #30;
    sw_s_n = 1; #10;
    sw_r_n = 0; #30;
  endtask

  initial begin
    sw_s_n = 1; sw_r_n = 0; rst_n = 0;
    #20;
    for (int i = 0; i < 16; i++) init[i] = dut.u_ram.mem[i];
    expect2 = init[2];
    rst_n = 1; #10;
    for (int loop = 0; loop < 40; loop++) begin
      for (int s = 0; s < 5; s++) begin
        checks++;
        if (pc !== 4'(s)) begin failures++; $display("loop %0d: pc=%0d expected %0d", loop, pc, s); end
        // the STORETO write is pending only while the GOTO runs
        checks++;
        if (we !== (s == 4)) begin failures++; $display("loop %0d step %0d: we=%b", loop, s, we); end
        step_clock();
        if (s == 4) begin
          if (expect2 == 4'd15) wraps++;
          expect2 = expect2 + 1;
        end
        checks++;
        if (dut.u_ram.mem[2] !== expect2) begin
          failures++; $display("loop %0d step %0d: mem[2]=%0d expected %0d", loop, s, dut.u_ram.mem[2], expect2);
        end
      end
      checks++;
      if (acc !== expect2) begin failures++; $display("loop %0d: acc=%0d expected %0d", loop, acc, expect2); end
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (i != 2 && dut.u_ram.mem[i] !== init[i]) begin failures++; $display("mem[%0d] changed", i); end
    end
    checks++;
    if (wraps < 2) begin failures++; $display("counter did not wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
