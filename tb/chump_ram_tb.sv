// chump_ram_tb: writes and reads the 16x4 data RAM at random, checking that
// reads are asynchronous, that a write lands on the rising edge, and that
// during a write cycle the read port still shows the old word.
module chump_ram_tb;
  logic       clk = 0, we;
  logic [3:0] addr, wdata, rdata;
  logic [3:0] model [16];
  int checks = 0, failures = 0;

  chump_ram dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    // fill every word first
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      addr = 4'(i); wdata = 4'($urandom); we = 1; model[i] = wdata;
    end
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 4'($urandom); wdata = 4'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("read [%0d]=%h expected %h", addr, rdata, model[addr]); end
      if (we) model[addr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("after edge [%0d]=%h expected %h", addr, rdata, model[addr]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
