// maple_cluster: a cluster of MAPLE processing elements (four by default)
// joined by the receive-register transfer fabric.
//
// Each PE runs its own statically scheduled program from its own
// instruction RAM and main memory; PEs exchange words only through SENDRR,
// which writes straight into a receive register of another PE one cycle
// after the sender's MEM stage. PE number i is the index of the PE in the
// arrays below. Each PE keeps its own loader port and halted flag; the
// events of every PE are brought out for performance counting.
// The cluster of four PEs is the configuration the document evaluates; the
// shared reset and clock, the loader ports and the absence of the board's
// network interface, DMA controller and other board parts are this design's.
module maple_cluster
  import maple_pkg::*;
#(
  parameter int unsigned NPE        = 4,
  parameter int unsigned IRAM_BYTES = 32 * 1024,
  parameter int unsigned MEM_BYTES  = 512 * 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld_we    [NPE],
  input  logic        ld_iram  [NPE],
  input  logic [31:0] ld_addr  [NPE],
  input  logic [31:0] ld_wdata [NPE],
  output logic [31:0] ld_rdata [NPE],
  output logic        halted   [NPE],
  output pe_events_t  events   [NPE],
  output logic        collision
);
  rr_msg_t tx [NPE];
  rr_msg_t rx [NPE];

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    maple_pe #(.IRAM_BYTES(IRAM_BYTES), .MEM_BYTES(MEM_BYTES)) u_pe (
      .clk, .rst_n,
      .ld_we(ld_we[i]), .ld_iram(ld_iram[i]), .ld_addr(ld_addr[i]),
      .ld_wdata(ld_wdata[i]), .ld_rdata(ld_rdata[i]),
      .tx(tx[i]), .rx(rx[i]), .halted(halted[i]), .events(events[i])
    );
  end

  maple_rr_net #(.NPE(NPE)) u_net (.clk, .tx, .rx, .collision);
endmodule
