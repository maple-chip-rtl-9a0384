// maple_pe: one processing element, the MAPLE chip with its instruction RAM
// and main memory, as on the prototype PE board.
//
// The chip fetches from a 32 kbyte instruction RAM and loads and stores to a
// 512 kbyte main memory (the element's local memory). A loader port lets a
// host place a program and data while the chip is held in reset (the board
// does this with a monitor program and a serial link, which are not part of
// this RTL): ld_we with ld_iram=1 writes a word of the instruction RAM, with
// ld_iram=0 a word of main memory; ld_rdata returns the main-memory word at
// ld_addr (combinational), so a host can read results back. The loader port
// should be used only while the chip does not access the same main-memory
// word; if both write one word in the same cycle, the chip wins.
// The memory sizes are the document's; the loader port is this design's.
module maple_pe
  import maple_pkg::*;
#(
  parameter int unsigned IRAM_BYTES = 32 * 1024,
  parameter int unsigned MEM_BYTES  = 512 * 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // loader / host access
  input  logic        ld_we,
  input  logic        ld_iram,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_wdata,
  output logic [31:0] ld_rdata,
  // receive-register transfer network
  output rr_msg_t     tx,
  input  rr_msg_t     rx,
  // status
  output logic        halted,
  output pe_events_t  events
);
  logic [31:0] imem_addr, imem_rdata;
  logic [31:0] dmem_addr;
  logic [63:0] dmem_wdata, dmem_rdata;
  logic [7:0]  dmem_be;

  maple_chip u_chip (
    .clk, .rst_n,
    .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_be, .dmem_wdata, .dmem_rdata,
    .tx, .rx, .halted, .events
  );

  maple_iram #(.BYTES(IRAM_BYTES)) u_iram (
    .clk, .raddr(imem_addr), .rdata(imem_rdata),
    .we(ld_we && ld_iram), .waddr(ld_addr), .wdata(ld_wdata)
  );

  maple_lmem #(.BYTES(MEM_BYTES)) u_mem (
    .clk,
    .a_addr(dmem_addr), .a_be(dmem_be), .a_wdata(dmem_wdata), .a_rdata(dmem_rdata),
    .b_addr(ld_addr), .b_we(ld_we && !ld_iram), .b_wdata(ld_wdata), .b_rdata(ld_rdata)
  );
endmodule
