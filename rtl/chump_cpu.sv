// chump_cpu: the CHUMP 4-bit processor (everything between the program ROM
// and the data RAM).
//
// One instruction per clock, with no pipeline and no multi-cycle steps.
// The program ROM word at the PC is split into a 4-bit opcode and a 4-bit
// constant. The opcode addresses the control ROM. Its lowest bit (Op4)
// also drives the operand multiplexer: the constant (0) or the RAM read
// word (1). The multiplexer output goes to three places: ALU operand B,
// the PC load input and the Addr register. The accumulator is always ALU
// operand A and always the RAM write data.
//
// On each rising edge of clk:
//   - the accumulator takes the ALU result if the control word says so;
//   - the PC loads the multiplexer output if NAND(JMP, Z) is 0, otherwise
//     it increments;
//   - the Addr register always loads the multiplexer output together with
//     the control word's RAM write bit.
// Because the RAM is addressed from the Addr register, a memory operand is
// the word at the address set by the previous instruction (so a READ comes
// first). A STORETO sets the address and the write bit, and the RAM writes
// the accumulator at the next rising edge.
//
// Interface: instr/pc go to the program ROM. ram_addr, ram_we and
// ram_wdata go to the data RAM, and ram_rdata comes back from it. rst_n
// is an asynchronous active-low reset of PC, accumulator and Addr
// register, added by this design. acc, z and jump are brought
// out for observation. Structure and control follow the CHUMP datapath.
module chump_cpu
  import chump_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // program ROM
  output logic [ADDR_W-1:0]  pc,
  input  logic [INSTR_W-1:0] instr,
  // data RAM
  output logic [ADDR_W-1:0]  ram_addr,
  output logic               ram_we,
  output logic [DATA_W-1:0]  ram_wdata,
  input  logic [DATA_W-1:0]  ram_rdata,
  // observation
  output logic [DATA_W-1:0]  acc,
  output logic               z,
  output logic               jump     // 1 = PC loads instead of incrementing
);

  instr_t            ir;
  ctrl_t             ctrl;
  logic [DATA_W-1:0] operand;
  logic [DATA_W-1:0] alu_y;
  logic              pc_load_n;

  assign ir = instr_t'(instr);

  chump_control_rom u_ctrl (
    .opcode (ir.opcode),
    .ctrl   (ctrl)
  );

  chump_mux2 u_mux (
    .sel (ir.opcode.mem),
    .d0  (ir.konst),
    .d1  (ram_rdata),
    .y   (operand)
  );

  chump_alu u_alu (
    .a  (acc),
    .b  (operand),
    .fn (ctrl.alu[2:0]),
    .y  (alu_y),
    .z  (z)
  );

  chump_accum u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (ctrl.acc_we),
    .d     (alu_y),
    .q     (acc)
  );

  chump_pc u_pc (
    .clk    (clk),
    .rst_n  (rst_n),
    .jmp    (ctrl.jmp),
    .z      (z),
    .d      (operand),
    .load_n (pc_load_n),
    .q      (pc)
  );

  chump_addr_reg u_addr (
    .clk    (clk),
    .rst_n  (rst_n),
    .d_addr (operand),
    .d_we   (ctrl.ram_we),
    .q_addr (ram_addr),
    .q_we   (ram_we)
  );

  assign ram_wdata = acc;
  assign jump      = ~pc_load_n;

  // The simplified ALU uses only the low three function bits.
  always_comb a_alu_fn_fits : assert (ctrl.alu[4:3] == 2'b00);

endmodule
