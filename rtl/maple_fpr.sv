// maple_fpr: the 32 x 32-bit floating-point register file of MAPLE.
//
// Single-precision values occupy one register; a double-precision value
// occupies an even/odd pair, the even register holding the upper word (sign,
// exponent and high fraction). The file therefore reads two 64-bit pairs
// (operand 1 and operand 2): {F[a], F[a+1]} with a forced even for doubles,
// or F[a] in the low word for singles. One write port writes either a single
// register (wdbl=0, data in wd[31:0]) or an even/odd pair (wdbl=1).
// A read of a register being written in the same cycle returns the new value.
// The register count is the document's; the pairing follows DLX; the
// write-through and reset to zero are this design's choices.
module maple_fpr #(
  parameter int unsigned NREG = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] ra1,
  input  logic                    rdbl1,
  output logic [63:0]             rd1,
  input  logic [$clog2(NREG)-1:0] ra2,
  input  logic                    rdbl2,
  output logic [63:0]             rd2,
  input  logic                    we,
  input  logic                    wdbl,
  input  logic [$clog2(NREG)-1:0] wa,
  input  logic [63:0]             wd
);
  localparam int unsigned AW = $clog2(NREG);
  logic [31:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (we) begin
      if (wdbl) begin
        regs[{wa[AW-1:1], 1'b0}] <= wd[63:32];
        regs[{wa[AW-1:1], 1'b1}] <= wd[31:0];
      end else begin
        regs[wa] <= wd[31:0];
      end
    end
  end

  // One 32-bit register with the write-through bypass.
  function automatic logic [31:0] rd32(input logic [AW-1:0] a);
    if (we && wdbl && a[AW-1:1] == wa[AW-1:1]) return a[0] ? wd[31:0] : wd[63:32];
    if (we && !wdbl && a == wa)                return wd[31:0];
    return regs[a];
  endfunction

  always_comb begin
    rd1 = rdbl1 ? {rd32({ra1[AW-1:1], 1'b0}), rd32({ra1[AW-1:1], 1'b1})} : {32'h0, rd32(ra1)};
    rd2 = rdbl2 ? {rd32({ra2[AW-1:1], 1'b0}), rd32({ra2[AW-1:1], 1'b1})} : {32'h0, rd32(ra2)};
  end
endmodule
