// maple_iram: the instruction RAM of a MAPLE PE (32 kbyte by default).
//
// A word-wide RAM with an asynchronous read port for the IF stage and a
// synchronous write port through which a loader places the program. The
// read address is a byte address; its two low bits are ignored. Addresses
// wrap modulo the RAM size. The size is the document's; the port structure
// (combinational read so that fetch takes one cycle) is this design's.
module maple_iram #(
  parameter int unsigned BYTES = 32 * 1024
) (
  input  logic        clk,
  input  logic [31:0] raddr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[raddr[AW+1:2]];
endmodule
