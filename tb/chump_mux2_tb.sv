// chump_mux2_tb: random check of the 2-to-1 operand multiplexer.
module chump_mux2_tb;
  logic       sel;
  logic [3:0] d0, d1, y;
  int checks = 0, failures = 0;

  chump_mux2 dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      sel = 1'($urandom); d0 = 4'($urandom); d1 = 4'($urandom);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("mux sel=%b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
