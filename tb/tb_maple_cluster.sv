// tb_maple_cluster: end-to-end test of a four-PE MAPLE cluster running the
// pi-series calculation, pi = 4 * sum_{k>=0} (-1)^k / (2k+1), over 30,000
// terms, at the cluster's default parameters.
//
// Each PE sums a contiguous quarter of the terms in double precision
// (CVTI2D, DIVD, ADDD/SUBD in a counted loop). PEs 1-3 then move their
// partial sums, as two 32-bit halves, straight into receive registers of
// PE 0 with SENDRR. PE 0 is statically scheduled: all PEs run in lockstep,
// so PEs 1-3 stagger their sends by two cycles each, and PE 0 simply waits a fixed number of instructions and then reads the
// receive registers with MOVRR2I, adds the partial sums, multiplies by 4
// and stores the result. The test compares that result bit for bit with
// the same sequence of operations done in the simulator's double
// arithmetic, checks the halt cycle of PE 0 against the count of
// instructions, interlocks and taken branches, and counts every mechanism
// of the design (load-use interlock, forwarding, taken branch, floating-
// point operation, send, receive, receive-register read); each must occur.
module tb_maple_cluster;
  import maple_pkg::*;
  import maple_asm_pkg::*;

  localparam int NPE   = 4;
  localparam int TERMS = 30000;
  localparam int M     = TERMS / NPE;      // terms per PE
  localparam int L     = M / 2;            // loop iterations per PE (two terms each)

  logic clk = 0, rst_n = 0;
  logic        ld_we    [NPE];
  logic        ld_iram  [NPE];
  logic [31:0] ld_addr  [NPE];
  logic [31:0] ld_wdata [NPE];
  logic [31:0] ld_rdata [NPE];
  logic        halted   [NPE];
  pe_events_t  events   [NPE];
  logic        collision;
  int checks = 0, failures = 0, cyc = 0;

  maple_cluster dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // mechanism counters
  int n_stall, n_fwd, n_branch, n_fp, n_send, n_recv, n_rr, n_coll;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPE; p++) begin
      n_stall  += int'(events[p].load_stall);
      n_fwd    += int'(events[p].forward);
      n_branch += int'(events[p].branch);
      n_fp     += int'(events[p].fp_op);
      n_send   += int'(events[p].send);
      n_recv   += int'(events[p].receive);
      n_rr     += int'(events[p].rr_read);
    end
    n_coll += int'(collision);
  end

  function automatic void build(input int p, ref logic [31:0] prog [$]);
    prog = '{ADDI(1, 0, p*M), ADDI(2, 0, (p+1)*M), ADDI(3, 0, 1),
             MOVI2FP(8, 3), CVTI2D(2, 8),                 // f2:f3 = 1.0
             SW(2, 0, 16'h200), LW(9, 0, 16'h200), ADD(9, 9, 9),
             SUBD(0, 0, 0),                               // f0:f1 = 0.0
             // loop, 14 instructions: two terms
             SLLI(4, 1, 1), ADDI(4, 4, 1), MOVI2FP(8, 4), CVTI2D(4, 8),
             DIVD(6, 2, 4), ADDD(0, 0, 6),
             ADDI(4, 4, 2), MOVI2FP(8, 4), CVTI2D(4, 8),
             DIVD(6, 2, 4), SUBD(0, 0, 6),
             ADDI(1, 1, 2), SLT(5, 1, 2), BNEZ(5, -56)};
    if (p != 0) begin
      // stagger the senders by two cycles each: one word per cycle into PE 0
      repeat (2*(p-1)) prog.push_back(NOP());
      prog.push_back(MOVFP2I(6, 0));
      prog.push_back(MOVFP2I(7, 1));
      prog.push_back(SENDRR(6, 2*p, 0));
      prog.push_back(SENDRR(7, 2*p + 1, 0));
      prog.push_back(TRAP());
    end else begin
      // wait until the last word from PEs 1-3 has reached RR7
      repeat (6) prog.push_back(NOP());
      for (int q = 1; q < NPE; q++) begin
        prog.push_back(MOVRR2I(6, 2*q));
        prog.push_back(MOVRR2I(7, 2*q + 1));
        prog.push_back(MOVI2FP(10, 6));
        prog.push_back(MOVI2FP(11, 7));
        prog.push_back(ADDD(0, 0, 10));
      end
      prog.push_back(ADDI(3, 0, 4));
      prog.push_back(MOVI2FP(8, 3));
      prog.push_back(CVTI2D(12, 8));
      prog.push_back(MULTD(0, 0, 12));
      prog.push_back(SF(0, 0, 16'h100));
      prog.push_back(SF(1, 0, 16'h104));
      prog.push_back(TRAP());
    end
  endfunction

  logic [31:0] prog [$];
  real part [NPE];
  real pi_ref;
  logic [63:0] pi_bits;
  int halt_cycle, prog0_len;

  initial begin
    for (int p = 0; p < NPE; p++) begin
      ld_we[p] = 0; ld_iram[p] = 0; ld_addr[p] = 0; ld_wdata[p] = 0;
    end
    n_stall = 0; n_fwd = 0; n_branch = 0; n_fp = 0; n_send = 0; n_recv = 0; n_rr = 0; n_coll = 0;
    // load every PE's program while the cluster is in reset
    for (int p = 0; p < NPE; p++) begin
      build(p, prog);
      if (p == 0) prog0_len = prog.size();
      foreach (prog[i]) begin
        @(negedge clk);
        ld_we[p] = 1; ld_iram[p] = 1; ld_addr[p] = 32'(4*i); ld_wdata[p] = prog[i];
      end
      @(negedge clk) ld_we[p] = 0;
    end
    // reference: the same operations in the simulator's double arithmetic
    for (int p = 0; p < NPE; p++) begin
      part[p] = 0.0;
      for (int k = p*M; k < (p+1)*M; k += 2) begin
        part[p] = part[p] + 1.0 / real'(2*k + 1);
        part[p] = part[p] - 1.0 / real'(2*k + 3);
      end
    end
    pi_ref = part[0];
    for (int p = 1; p < NPE; p++) pi_ref = pi_ref + part[p];
    pi_ref = pi_ref * 4.0;

    @(negedge clk) rst_n = 1;
    wait (halted[0]);
    halt_cycle = cyc;
    repeat (2) @(negedge clk);
    ld_addr[0] = 32'h100; #1; pi_bits[63:32] = ld_rdata[0];
    ld_addr[0] = 32'h104; #1; pi_bits[31:0]  = ld_rdata[0];
    $display("pi from the cluster %.15f, reference %.15f, %0d cycles", $bitstoreal(pi_bits), pi_ref, halt_cycle);
    chk(pi_bits[63:32], $realtobits(pi_ref) >> 32, "pi upper word");
    chk(pi_bits[31:0],  32'($realtobits(pi_ref)), "pi lower word");
    for (int p = 1; p < NPE; p++) begin
      checks++; if (!halted[p]) begin failures++; $display("FAIL PE%0d not halted", p); end
    end
    // PE 0: 9 + 14*L + (prog0_len - 23) instructions, 1 interlock, L-1 taken branches
    chk(32'(halt_cycle), 32'((9 + 14*L + prog0_len - 23) - 1 + 5 + 1 + 2*(L-1)), "PE0 halt cycle");
    $display("counts: interlock %0d forward %0d branch %0d fp %0d send %0d receive %0d rr_read %0d collision %0d",
             n_stall, n_fwd, n_branch, n_fp, n_send, n_recv, n_rr, n_coll);
    chk(32'(n_stall),  NPE,             "interlock count");
    chk(32'(n_branch), NPE * (L-1),     "taken branch count");
    chk(32'(n_send),   2 * (NPE-1),     "send count");
    chk(32'(n_recv),   2 * (NPE-1),     "receive count");
    chk(32'(n_rr),     2 * (NPE-1),     "RR read count");
    chk(32'(n_coll),   0,               "collisions");
    checks++; if (n_fwd == 0) begin failures++; $display("FAIL forwarding never happened"); end
    checks++; if (n_fp  == 0) begin failures++; $display("FAIL no FP operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
