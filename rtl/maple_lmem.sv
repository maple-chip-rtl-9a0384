// maple_lmem: the main (local) memory of a MAPLE PE (512 kbyte by default).
//
// A doubleword-wide (64-bit), byte-writable RAM, so that the double-
// precision load and store (LD/SD) finish in the single MEM cycle like every
// other access. Port A serves the MEM stage: asynchronous read of the
// aligned doubleword at a_addr, and a write of the bytes selected by a_be at
// the rising edge. Port B is a 32-bit word port for a loader or a host
// (write at the edge, asynchronous read of the word at b_addr). If both
// ports write the same doubleword in one cycle, port A wins and the port B
// write is dropped. DLX is big-endian: byte lane 7 (a_be[7], data[63:56])
// is the lowest byte address, and the word at an address with bit 2 clear
// is data[63:32]. The size is the document's; the width, the two ports and
// their timing are this design's choices.
module maple_lmem #(
  parameter int unsigned BYTES = 512 * 1024
) (
  input  logic        clk,
  input  logic [31:0] a_addr,
  input  logic [7:0]  a_be,
  input  logic [63:0] a_wdata,
  output logic [63:0] a_rdata,
  input  logic [31:0] b_addr,
  input  logic        b_we,
  input  logic [31:0] b_wdata,
  output logic [31:0] b_rdata
);
  localparam int unsigned DWORDS = BYTES / 8;
  localparam int unsigned AW     = $clog2(DWORDS);
  logic [63:0] mem [DWORDS];
  logic [AW-1:0] aw, bw;
  logic          bh;

  assign aw = a_addr[AW+2:3];
  assign bw = b_addr[AW+2:3];
  assign bh = b_addr[2];

  always_ff @(posedge clk) begin
    if (b_we && !(a_be != '0 && aw == bw)) begin
      if (bh) mem[bw][31:0]  <= b_wdata;
      else    mem[bw][63:32] <= b_wdata;
    end
    for (int i = 0; i < 8; i++)
      if (a_be[i]) mem[aw][8*i +: 8] <= a_wdata[8*i +: 8];
  end

  assign a_rdata = mem[aw];
  assign b_rdata = bh ? mem[bw][31:0] : mem[bw][63:32];
endmodule
