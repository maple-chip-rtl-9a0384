// tb_maple_rr_net: self-checking test of the PE-to-PE transfer fabric.
// Random sends from four PEs, some to the same destination and some to
// nonexistent PEs; checks that each destination receives exactly the word
// addressed to it (the lowest-numbered sender on a conflict) and that
// collision is raised exactly on conflicts.
module tb_maple_rr_net;
  import maple_pkg::*;
  localparam int NPE = 4;
  logic clk = 0;
  rr_msg_t tx [NPE];
  rr_msg_t rx [NPE];
  logic collision;
  int checks = 0, failures = 0, conflicts = 0;

  maple_rr_net #(.NPE(NPE)) dut (.clk, .tx, .rx, .collision);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int s = 0; s < NPE; s++) tx[s] = '0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // every 10th cycle may conflict; otherwise a permutation-free random set
      for (int s = 0; s < NPE; s++) begin
        tx[s].valid = 1'($urandom);
        tx[s].dst   = (n % 10 == 0) ? 4'($urandom % 6) : 4'((s + n) % NPE);
        tx[s].rr    = 4'($urandom);
        tx[s].data  = $urandom;
      end
      #1;
      begin
        int cnt;
        bit any_conf;
        any_conf = 0;
        for (int d = 0; d < NPE; d++) begin
          int first;
          first = -1;
          cnt = 0;
          for (int s = 0; s < NPE; s++)
            if (tx[s].valid && tx[s].dst == d) begin cnt++; if (first < 0) first = s; end
          if (cnt > 1) any_conf = 1;
          checks++;
          if (first < 0) begin
            if (rx[d].valid) begin failures++; $display("FAIL spurious rx%0d", d); end
          end else if (!rx[d].valid || rx[d].rr != tx[first].rr || rx[d].data != tx[first].data) begin
            failures++; if (failures < 5) $display("FAIL rx%0d first %0d: %p / %p", d, first, rx[d], tx[first]);
          end
        end
        checks++;
        if (collision != any_conf) begin failures++; $display("FAIL collision flag"); end
        if (any_conf) conflicts++;
      end
      // keep the assertion quiet: remove the conflict before the clock edge
      if (collision) for (int s = 0; s < NPE; s++) tx[s].valid = 1'b0;
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no conflict exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
