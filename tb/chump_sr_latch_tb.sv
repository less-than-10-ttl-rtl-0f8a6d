// chump_sr_latch_tb: drives the switch latch through clean throws, throws
// with contact bounce, and the both-low input, and counts rising edges on q:
// each throw to the set side must give exactly one.
module chump_sr_latch_tb;
  logic s_n, r_n, q, q_n;
  int checks = 0, failures = 0, edges = 0, bounces = 0;

  chump_sr_latch dut (.s_n(s_n), .r_n(r_n), .q(q), .q_n(q_n));

  always @(posedge q) edges++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic eq, logic eqn, string what);
    #1;
    checks++;
    if (q !== eq || q_n !== eqn) begin
      failures++;
      $display("%s: q=%b q_n=%b expected %b %b", what, q, q_n, eq, eqn);
    end
  endtask

  // Move the switch to one side; the landing contact bounces n times.
  task automatic throw_to(bit set_side, int n);
    s_n = 1; r_n = 1; #10;              // in flight: both contacts open
    check(set_side ? 1'b0 : 1'b1, set_side ? 1'b1 : 1'b0, "in flight holds");
    for (int i = 0; i < n; i++) begin
      if (set_side) s_n = 0; else r_n = 0;
      #2;
      if (set_side) s_n = 1; else r_n = 1;
      #2;
      bounces++;
      check(set_side, !set_side, "bouncing");
    end
    if (set_side) s_n = 0; else r_n = 0;
    check(set_side, !set_side, "landed");
    #10;
  endtask

  initial begin
    int want;
    s_n = 1; r_n = 0; #5;
    check(0, 1, "reset side");
    edges = 0;
    want = 0;
    for (int t = 0; t < 40; t++) begin
      throw_to(1, t % 5);
      want++;
      throw_to(0, (t + 2) % 4);
    end
    checks++;
    if (edges != want) begin failures++; $display("edges %0d expected %0d", edges, want); end
    checks++;
    if (bounces == 0) begin failures++; $display("no bounce applied"); end
    s_n = 0; r_n = 0;
    check(1, 1, "both low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
