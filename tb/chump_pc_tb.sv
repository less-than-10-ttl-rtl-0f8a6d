// chump_pc_tb: checks the program counter: asynchronous clear, increment
// with wrap from 15 to 0, load only when both JMP and Z are 1 (the NAND),
// and the load_n output itself. Each clock advances the PC by exactly one
// step.
module chump_pc_tb;
  logic       clk = 0, rst_n, jmp, z;
  logic [3:0] d, q, exp_q;
  logic       load_n;
  int checks = 0, failures = 0, loads = 0, wraps = 0;

  chump_pc dut (.clk(clk), .rst_n(rst_n), .jmp(jmp), .z(z), .d(d), .load_n(load_n), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    jmp = 0; z = 0; d = 0; rst_n = 0;
    #12;
    checks++;
    if (q !== 4'd0) begin failures++; $display("reset: q=%0d", q); end
    rst_n = 1;
    exp_q = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      // bias towards increments so the counter wraps
      jmp = ($urandom % 4) == 0; z = 1'($urandom); d = 4'($urandom);
      #1;
      checks++;
      if (load_n !== ~(jmp & z)) begin failures++; $display("load_n wrong jmp=%b z=%b", jmp, z); end
      if (jmp && z) begin exp_q = d; loads++; end
      else begin if (exp_q == 4'd15) wraps++; exp_q = exp_q + 1; end
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("pc q=%0d expected %0d", q, exp_q); end
    end
    checks++;
    if (loads == 0 || wraps == 0) begin failures++; $display("no load or no wrap seen"); end
    // asynchronous clear in the middle of a cycle
    @(negedge clk); rst_n = 0; #1;
    checks++;
    if (q !== 4'd0) begin failures++; $display("async clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
