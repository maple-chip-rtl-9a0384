// maple_gpr: the 32 x 32-bit integer register file of MAPLE.
//
// Two read ports serve the ID stage and one write port serves WB. Register 0
// always reads as zero, as in DLX. A read of the register being written in
// the same cycle returns the new value (write-through), so an instruction in
// ID sees a result that is in WB without a separate forwarding path.
// Reads are combinational; the write takes effect at the rising clock edge.
// The register count is the document's; the write-through and the reset to
// zero are this design's choices.
module maple_gpr #(
  parameter int unsigned NREG = 32,
  parameter int unsigned XLEN = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] ra1,
  output logic [XLEN-1:0]         rd1,
  input  logic [$clog2(NREG)-1:0] ra2,
  output logic [XLEN-1:0]         rd2,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] wa,
  input  logic [XLEN-1:0]         wd
);
  logic [XLEN-1:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == '0) ? '0 : (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (ra2 == '0) ? '0 : (we && wa == ra2) ? wd : regs[ra2];
  end
endmodule
