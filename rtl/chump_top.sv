// chump_top: the complete CHUMP machine, a Harvard design on a few TTL
// chips: a manual clock, the processor, a 16x8 program ROM and a 16x4 data
// RAM.
//
// The machine clock is the q output of a NAND RS latch driven by a two-way
// toggle switch, so it is stepped by hand. sw_s_n and sw_r_n are the two
// switch contacts, active low, each pulled up off the board. Each throw of
// the switch to the set side gives one rising edge and runs one
// instruction. Bounce on a contact gives no extra edge.
//
// Interface: rst_n is an asynchronous active-low reset of PC, accumulator
// and Addr register (this design's addition). The RAM keeps its contents
// through reset. The outputs show both latch outputs, the PC, the
// instruction, the accumulator, the RAM address and write strobe, the ALU
// zero flag and the PC load (jump) signal, for LEDs or a
// testbench. PROGRAM sets the program ROM contents. Its default is the
// increment-RAM-word-2 example.
module chump_top
  import chump_pkg::*;
#(
  parameter logic [DEPTH-1:0][INSTR_W-1:0] PROGRAM = example_program()
) (
  input  logic               sw_s_n,
  input  logic               sw_r_n,
  input  logic               rst_n,
  output logic               clk,
  output logic               clk_n,
  output logic [ADDR_W-1:0]  pc,
  output logic [INSTR_W-1:0] instr,
  output logic [DATA_W-1:0]  acc,
  output logic [ADDR_W-1:0]  ram_addr,
  output logic               ram_we,
  output logic               z,
  output logic               jump
);

  logic [DATA_W-1:0] ram_wdata, ram_rdata;

  chump_sr_latch u_clk (
    .s_n (sw_s_n),
    .r_n (sw_r_n),
    .q   (clk),
    .q_n (clk_n)
  );

  chump_program_rom #(.PROGRAM(PROGRAM)) u_rom (
    .addr (pc),
    .data (instr)
  );

  chump_cpu u_cpu (
    .clk       (clk),
    .rst_n     (rst_n),
    .pc        (pc),
    .instr     (instr),
    .ram_addr  (ram_addr),
    .ram_we    (ram_we),
    .ram_wdata (ram_wdata),
    .ram_rdata (ram_rdata),
    .acc       (acc),
    .z         (z),
    .jump      (jump)
  );

  chump_ram u_ram (
    .clk   (clk),
    .addr  (ram_addr),
    .we    (ram_we),
    .wdata (ram_wdata),
    .rdata (ram_rdata)
  );

endmodule
