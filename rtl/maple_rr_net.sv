// maple_rr_net: the register-transfer fabric between the PEs of a cluster.
//
// Each PE may put one word per cycle on its tx port (from its MEM stage);
// the fabric delivers it, in the same cycle, to the rx port of the PE named
// in tx.dst, which writes it into the named receive register at the next
// clock edge. The path is combinational, so a word sent by an instruction in
// MEM in cycle t is readable by MOVRR2I in the destination's ID stage in
// cycle t+1: a fixed transfer latency that a static scheduler can rely on.
// A word addressed to a PE number outside the cluster is dropped.
// Static scheduling must keep two PEs from sending to the same PE in the
// same cycle; if they do, the lowest-numbered sender is delivered, collision
// is raised, and an assertion reports it in simulation.
// The document gives the direct source-MEM-to-destination-RR transfer; the
// fabric's timing, its conflict rule and the PE numbering are this design's.
module maple_rr_net
  import maple_pkg::*;
#(
  parameter int unsigned NPE = 4
) (
  input  logic    clk,
  input  rr_msg_t tx [NPE],
  output rr_msg_t rx [NPE],
  output logic    collision
);
  always_comb begin
    collision = 1'b0;
    for (int d = 0; d < NPE; d++) begin
      rx[d] = '0;
      for (int s = NPE - 1; s >= 0; s--) begin
        if (tx[s].valid && int'(tx[s].dst) == d) begin
          if (rx[d].valid) collision = 1'b1;
          rx[d] = tx[s];
        end
      end
    end
  end

  // Statically scheduled transfers never collide.
  always_ff @(posedge clk) begin
    assert (!collision) else $error("maple_rr_net: two PEs sent to the same PE in one cycle");
  end
endmodule
