// chump_ram: data RAM of the CHUMP processor.
//
// 16 words of 4 bits. The read port is asynchronous: rdata always shows the
// word at addr. When we is 1, the rising clock edge stores wdata at addr.
// In the processor, addr and we come from the Addr register and wdata
// from the accumulator. A STORETO therefore writes at the end of the
// instruction that follows it. During that write cycle rdata still shows
// the old word.
//
// The RAM has no reset, like the static RAM chip it stands for. Size and
// connections follow the CHUMP description. The edge-triggered write and
// the read-old-data behaviour during a write are this design's choices.
module chump_ram
  import chump_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = DATA_W
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
