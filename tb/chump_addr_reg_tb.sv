// chump_addr_reg_tb: checks that the Addr register loads address and write
// bit on every clock, with no enable, and that reset clears both.
module chump_addr_reg_tb;
  logic       clk = 0, rst_n, d_we, q_we;
  logic [3:0] d_addr, q_addr;
  int checks = 0, failures = 0;

  chump_addr_reg dut (.clk(clk), .rst_n(rst_n), .d_addr(d_addr), .d_we(d_we), .q_addr(q_addr), .q_we(q_we));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] ea;
    logic       ew;
    d_addr = 4'hf; d_we = 1; rst_n = 0;
    #12;
    checks++;
    if (q_addr !== 4'd0 || q_we !== 1'b0) begin failures++; $display("reset failed"); end
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      d_addr = 4'($urandom); d_we = 1'($urandom);
      ea = d_addr; ew = d_we;
      @(posedge clk); #1;
      checks++;
      if (q_addr !== ea || q_we !== ew) begin
        failures++; $display("addr reg %h/%b expected %h/%b", q_addr, q_we, ea, ew);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
