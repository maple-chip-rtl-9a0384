// maple_rr: the receive registers of MAPLE.
//
// Sixteen 32-bit registers that other PEs write directly over the transfer
// network, and that the local pipeline reads in its ID stage. The network
// write port is independent of the pipeline: a word that arrives at a rising
// edge is readable from the next cycle on, and a read in the same cycle as a
// write to the same register returns the new word. Nothing waits on a
// receive register: under static scheduling the compiler places the reading
// instruction after the sending one, so the registers need no full/empty
// flags. The count (16) and width (32) are the document's; the absence of
// flags and the read-through are this design's choices.
module maple_rr #(
  parameter int unsigned NRR  = 16,
  parameter int unsigned XLEN = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // from the network
  input  logic                   wr_valid,
  input  logic [$clog2(NRR)-1:0] wr_idx,
  input  logic [XLEN-1:0]        wr_data,
  // to the ID stage
  input  logic [$clog2(NRR)-1:0] rd_idx,
  output logic [XLEN-1:0]        rd_data
);
  logic [XLEN-1:0] regs [NRR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NRR; i++) regs[i] <= '0;
    end else if (wr_valid) begin
      regs[wr_idx] <= wr_data;
    end
  end

  assign rd_data = (wr_valid && wr_idx == rd_idx) ? wr_data : regs[rd_idx];
endmodule
