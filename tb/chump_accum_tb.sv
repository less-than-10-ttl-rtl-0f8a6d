// chump_accum_tb: checks the accumulator loads only when enabled and holds
// otherwise, and that reset clears it.
module chump_accum_tb;
  logic       clk = 0, rst_n, we;
  logic [3:0] d, q, exp_q;
  int checks = 0, failures = 0;

  chump_accum dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; d = 0; rst_n = 0;
    #12;
    checks++;
    if (q !== 4'd0) begin failures++; $display("reset: q=%0d", q); end
    rst_n = 1;
    exp_q = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1'($urandom); d = 4'($urandom);
      if (we) exp_q = d;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("accum q=%0d expected %0d", q, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
