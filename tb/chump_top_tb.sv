// chump_top_tb: end-to-end test of the whole machine, clocked by hand
// through the switch latch.
//
// Four machines share one switch and one reset. One has the default
// program (the RAM word 2 counter). The other three have programs that
// together use all 14 instructions, a taken and an untaken IFZERO, GOTO to
// a RAM word, and STORETO followed by reads of the stored word. Each throw
// of the switch bounces on its contacts before it settles. After every
// throw to the set side, each machine's PC, accumulator, RAM address,
// pending write and RAM contents are compared with its own copy of the
// reference model, started from that machine's power-up RAM contents.
// The test counts how often each mechanism happened and fails if one
// never did: every opcode, jump taken, IFZERO not taken, delayed RAM
// write, bounce absorbed with one clock edge per throw, and reset.
module chump_top_tb;
  import chump_ref_pkg::*;

  localparam int N = 4;

  function automatic logic [15:0][7:0] pack(logic [7:0] w [16]);
    logic [15:0][7:0] p;
    for (int i = 0; i < 16; i++) p[i] = w[i];
    return p;
  endfunction

  // Programs as listings (address: instruction):
  // P1: 0 LOAD 2, 1 STORETO 2, 2 ADD 3, 3 READ 2, 4 ADD [m], 5 SUB [m], 6 SUB 5,
  //     7 IFZERO 9, 8 LOAD 1, 9 READ 2, 10 LOAD [m], 11 ADD 12, 12 READ 2,
  //     13 STORETO [m], 14 IFZERO [m], 15 GOTO 0
  localparam logic [7:0] P1 [16] = '{8'h02, 8'h62, 8'h23, 8'h82, 8'h30, 8'h50, 8'h45, 8'hC9,
                                     8'h01, 8'h82, 8'h10, 8'h2C, 8'h82, 8'h70, 8'hD0, 8'hA0};
  // P2: 0 LOAD 6, 1 STORETO 4, 2 STORETO 6, 3 READ 4, 4 READ [m], 5 IFZERO 0,
  //     6 READ 6, 7 LOAD [m], 8 SUB 6, 9 IFZERO [m] (back to 6)
  localparam logic [7:0] P2 [16] = '{8'h06, 8'h64, 8'h66, 8'h84, 8'h90, 8'hC0, 8'h86, 8'h10,
                                     8'h46, 8'hD0, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
  // P3: 0 LOAD 5, 1 STORETO 5, 2 READ 5, 3 GOTO [m] (to 5), 4 LOAD 15,
  //     5 ADD 1, 6 GOTO 0
  localparam logic [7:0] P3 [16] = '{8'h05, 8'h65, 8'h85, 8'hB0, 8'h0F, 8'h21, 8'hA0, 8'h00,
                                     8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
  localparam logic [7:0] P0 [16] = '{8'h82, 8'h10, 8'h21, 8'h62, 8'hA0, 8'h00, 8'h00, 8'h00,
                                     8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};

  logic sw_s_n, sw_r_n, rst_n;
  logic [N-1:0] clk_q;
  int checks = 0, failures = 0;
  int throws = 0, bounces = 0, resets = 0;
  event sample, load_model, reset_model;
  chump_model m [N];

  for (genvar g = 0; g < N; g++) begin : g_m
    localparam logic [7:0] PW [16] = (g == 0) ? P0 : (g == 1) ? P1 : (g == 2) ? P2 : P3;
    logic       clk_n, we, z, jump;
    logic [3:0] pc, acc, addr;
    logic [7:0] instr;

    if (g == 0) begin : g_dut
      chump_top dut (
        .sw_s_n(sw_s_n), .sw_r_n(sw_r_n), .rst_n(rst_n), .clk(clk_q[g]), .clk_n(clk_n),
        .pc(pc), .instr(instr), .acc(acc), .ram_addr(addr), .ram_we(we), .z(z), .jump(jump)
      );
    end else begin : g_dut
      chump_top #(.PROGRAM(pack(PW))) dut (
        .sw_s_n(sw_s_n), .sw_r_n(sw_r_n), .rst_n(rst_n), .clk(clk_q[g]), .clk_n(clk_n),
        .pc(pc), .instr(instr), .acc(acc), .ram_addr(addr), .ram_we(we), .z(z), .jump(jump)
      );
    end

    always @(load_model) begin
      for (int i = 0; i < 16; i++) begin
        m[g].prog[i] = PW[i];
        m[g].mem[i]  = g_dut.dut.u_ram.mem[i];
      end
    end

    always @(reset_model) m[g].reset();

    always @(sample) begin
      bit bad;
      bad = (pc !== m[g].pc) || (acc !== m[g].acc) || (addr !== m[g].addr) ||
            (we !== m[g].wpend) || (instr !== PW[pc]) || (clk_n !== ~clk_q[g]);
      for (int i = 0; i < 16; i++) if (g_dut.dut.u_ram.mem[i] !== m[g].mem[i]) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10)
          $display("machine %0d throw %0d: pc=%0d acc=%0d addr=%0d we=%b, model pc=%0d acc=%0d addr=%0d we=%b",
                   g, throws, pc, acc, addr, we, m[g].pc, m[g].acc, m[g].addr, m[g].wpend);
      end
    end
  end

  int edges = 0;
  always @(posedge clk_q[0]) edges++;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Flip the switch to one side; the landing contact bounces nb times.
  task automatic throw_to(bit set_side, int nb);
    sw_s_n = 1; sw_r_n = 1; #20;
    for (int i = 0; i < nb; i++) begin
      if (set_side) sw_s_n = 0; else sw_r_n = 0;
      #3;
      if (set_side) sw_s_n = 1; else sw_r_n = 1;
      #3;
      bounces++;
    end
    if (set_side) sw_s_n = 0; else sw_r_n = 0;
    #50;
  endtask

  task automatic do_reset();
    rst_n = 0; #10;
    ->reset_model; #1;
    ->sample; #1;
    rst_n = 1; #10;
    resets++;
  endtask

  initial begin
    for (int g = 0; g < N; g++) m[g] = new();
    sw_s_n = 1; sw_r_n = 0; rst_n = 0;
    #20;
    ->load_model; #1;
    do_reset();
    for (int k = 0; k < 300; k++) begin
      throw_to(1, k % 4);
      throws++;
      for (int g = 0; g < N; g++) m[g].step();
      ->sample; #1;
      throw_to(0, (k + 1) % 3);
      if (k == 150) do_reset();
    end

    // mechanisms
    checks++;
    if (edges != throws) begin failures++; $display("clock edges %0d, throws %0d", edges, throws); end
    for (int i = 0; i < 14; i++) begin
      int n;
      n = 0;
      for (int g = 0; g < N; g++) n += m[g].op_count[i];
      checks++;
      if (n == 0) begin failures++; $display("opcode %b never ran", 4'(i)); end
    end
    begin
      int jt, nt, dw;
      jt = 0; nt = 0; dw = 0;
      for (int g = 0; g < N; g++) begin
        jt += m[g].jumps_taken; nt += m[g].ifzero_not_taken; dw += m[g].delayed_writes;
      end
      $display("throws %0d, bounces %0d, resets %0d, jumps taken %0d, IFZERO not taken %0d, delayed writes %0d",
               throws, bounces, resets, jt, nt, dw);
      checks++;
      if (jt == 0 || nt == 0 || dw == 0 || bounces == 0 || resets < 2) begin
        failures++; $display("a mechanism never happened");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
