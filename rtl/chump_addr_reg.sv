// chump_addr_reg: Addr register of the CHUMP processor (a 74273 in the TTL
// build).
//
// It has no enable: every rising clock edge loads the multiplexer output
// (the RAM address) and the control ROM's RAM write bit, five bits in all.
// The data RAM is addressed from this register, so a read uses the address
// set by the previous instruction. Registering the write bit too makes a
// STORETO write during the instruction that follows it, at the address
// the STORETO itself named.
//
// rst_n clears both fields asynchronously, so no write is pending after
// reset. That reset is this design's choice; the width and the always-load
// behaviour follow the CHUMP description.
module chump_addr_reg
  import chump_pkg::*;
#(
  parameter int unsigned WIDTH = ADDR_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d_addr,
  input  logic             d_we,
  output logic [WIDTH-1:0] q_addr,
  output logic             q_we
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_addr <= '0;
      q_we   <= 1'b0;
    end else begin
      q_addr <= d_addr;
      q_we   <= d_we;
    end
  end

endmodule
