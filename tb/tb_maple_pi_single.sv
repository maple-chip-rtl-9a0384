// tb_maple_pi_single: one MAPLE processing element, at its default sizes,
// running the pi-series calculation pi = 4 * sum_{k>=0} (-1)^k / (2k+1)
// over 30,000 terms on its own.
//
// The program is loaded into the instruction RAM through the loader port.
// It keeps the running sum in a double register and handles two terms per
// loop iteration (CVTI2D, DIVD, ADDD, then the same with SUBD), multiplies
// the sum by 4, stores it, stores the FP status register, and stops. The
// test reads both back through the loader port and checks:
//   * the result bit for bit against the same sequence of operations in the
//     simulator's double arithmetic;
//   * the FP status register: nearest-even mode, inexact raised (the
//     quotients are inexact), no other flag;
//   * the halt cycle, from one cycle per instruction, one per load-use
//     interlock and two per taken branch.
// The cycle count printed here can be set against the four-PE cluster run
// of the same 30,000 terms in tb_maple_cluster.
module tb_maple_pi_single;
  import maple_pkg::*;
  import maple_asm_pkg::*;

  localparam int TERMS = 30000;
  localparam int L     = TERMS / 2;        // loop iterations (two terms each)

  logic clk = 0, rst_n = 0;
  logic ld_we = 0, ld_iram = 0;
  logic [31:0] ld_addr = 0, ld_wdata = 0, ld_rdata;
  rr_msg_t tx, rx;
  logic halted;
  pe_events_t events;
  int checks = 0, failures = 0, cyc = 0;

  maple_pe dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  assign rx = '0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  int n_stall = 0, n_branch = 0;
  always @(posedge clk) if (rst_n) begin
    n_stall  += int'(events.load_stall);
    n_branch += int'(events.branch);
  end

  logic [31:0] prog [$];
  real pi_ref;
  logic [63:0] pi_bits;
  logic [31:0] fpsr;
  int halt_cycle;

  initial begin
    prog = '{ADDI(1, 0, 0), ADDI(2, 0, TERMS), ADDI(3, 0, 1),
             MOVI2FP(8, 3), CVTI2D(2, 8),                 // f2:f3 = 1.0
             SW(2, 0, 16'h200), LW(9, 0, 16'h200), ADD(9, 9, 9),
             SUBD(0, 0, 0),                               // f0:f1 = 0.0
             // loop, 14 instructions: two terms
             SLLI(4, 1, 1), ADDI(4, 4, 1), MOVI2FP(8, 4), CVTI2D(4, 8),
             DIVD(6, 2, 4), ADDD(0, 0, 6),
             ADDI(4, 4, 2), MOVI2FP(8, 4), CVTI2D(4, 8),
             DIVD(6, 2, 4), SUBD(0, 0, 6),
             ADDI(1, 1, 2), SLT(5, 1, 2), BNEZ(5, -56),
             // pi = 4 * sum
             ADDI(3, 0, 4), MOVI2FP(8, 3), CVTI2D(12, 8), MULTD(0, 0, 12),
             SF(0, 0, 16'h100), SF(1, 0, 16'h104),
             MOVS2I(10, 0), SW(10, 0, 16'h108),
             TRAP()};
    foreach (prog[i]) begin
      @(negedge clk); ld_we = 1; ld_iram = 1; ld_addr = 32'(4*i); ld_wdata = prog[i];
    end
    @(negedge clk) ld_we = 0;

    pi_ref = 0.0;
    for (int k = 0; k < TERMS; k += 2) begin
      pi_ref = pi_ref + 1.0 / real'(2*k + 1);
      pi_ref = pi_ref - 1.0 / real'(2*k + 3);
    end
    pi_ref = pi_ref * 4.0;

    @(negedge clk) rst_n = 1;
    wait (halted);
    halt_cycle = cyc;
    repeat (2) @(negedge clk);
    ld_iram = 0;
    ld_addr = 32'h100; #1; pi_bits[63:32] = ld_rdata;
    ld_addr = 32'h104; #1; pi_bits[31:0]  = ld_rdata;
    ld_addr = 32'h108; #1; fpsr = ld_rdata;
    $display("pi from one PE %.15f, reference %.15f, %0d cycles", $bitstoreal(pi_bits), pi_ref, halt_cycle);
    chk(pi_bits[63:32], $realtobits(pi_ref) >> 32, "pi upper word");
    chk(pi_bits[31:0],  32'($realtobits(pi_ref)), "pi lower word");
    chk(fpsr, 32'h0000_0008, "FP status: inexact only");
    // 9 + 14*L + 9 instructions, 1 interlock, L-1 taken branches
    chk(32'(halt_cycle), 32'((9 + 14*L + 9) - 1 + 5 + 1 + 2*(L-1)), "halt cycle");
    chk(32'(n_stall),  1,     "interlock count");
    chk(32'(n_branch), L - 1, "taken branch count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
