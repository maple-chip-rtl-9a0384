// tb_maple_chip: self-checking program test of the MAPLE processor.
//
// The processor runs a directed program from a behavioural instruction
// memory and data memory held in this testbench. The program exercises the
// integer, logic, shift, byte/halfword/word load and store, branch, jump
// and link, double load and store, single- and double-precision
// floating-point, FP compare and
// branch, integer multiply, the FP status register (MOVI2S/MOVS2I, rounding
// mode and sticky inexact flag), and the two receive-register instructions. It
// stores its results to data memory, which is then compared with values
// worked out by hand. The test also checks the fixed timing: the cycle in
// which SENDRR drives the network port and the cycle in which halted rises
// follow from one cycle per instruction, plus one per load-use interlock
// and two per taken branch or jump.
module tb_maple_chip;
  import maple_pkg::*;
  import maple_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] imem_addr, imem_rdata, dmem_addr;
  logic [63:0] dmem_wdata, dmem_rdata;
  logic [7:0]  dmem_be;
  rr_msg_t     tx, rx;
  logic        halted;
  pe_events_t  events;
  int checks = 0, failures = 0, cyc = 0;

  maple_chip dut (.*);
  always #5 clk = ~clk;

  logic [31:0] imem [128];
  logic [31:0] dmem [2048];
  assign imem_rdata = imem[imem_addr[8:2]];
  // 64-bit data port over 32-bit words: the even word is the upper half
  assign dmem_rdata = {dmem[{dmem_addr[12:3], 1'b0}], dmem[{dmem_addr[12:3], 1'b1}]};
  always @(posedge clk) begin
    for (int i = 0; i < 8; i++)
      if (dmem_be[i]) dmem[{dmem_addr[12:3], i < 4}][8*(i % 4) +: 8] <= dmem_wdata[8*i +: 8];
    if (rst_n) cyc <= cyc + 1;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  int tx_cycle = -1, n_stall = 0, n_branch = 0, n_fwd = 0, n_rr = 0;
  rr_msg_t tx_seen;
  always @(posedge clk) if (rst_n) begin
    if (tx.valid) begin tx_cycle = cyc; tx_seen = tx; end
    n_stall  += int'(events.load_stall);
    n_branch += int'(events.branch);
    n_fwd    += int'(events.forward);
    n_rr     += int'(events.rr_read);
  end

  // network input: one word into RR5 during cycle 3
  always_comb begin
    rx = '0;
    if (rst_n && cyc == 3) begin rx.valid = 1; rx.rr = 4'd5; rx.data = 32'hCAFE_BABE; end
  end

  int halt_cycle;
  initial begin
    for (int i = 0; i < 128; i++) imem[i] = NOP();
    for (int i = 0; i < 2048; i++) dmem[i] = 0;
    imem[0]  = ADDI(1, 0, 100);
    imem[1]  = ADDI(2, 0, -7);
    imem[2]  = ADD(3, 1, 2);
    imem[3]  = SUB(4, 3, 1);
    imem[4]  = SLLI(5, 1, 4);
    imem[5]  = SRAI(6, 2, 1);
    imem[6]  = LHI(7, 16'h1234);
    imem[7]  = ORI(7, 7, 16'h5678);
    imem[8]  = SW(3, 0, 16'h1000);
    imem[9]  = SW(7, 0, 16'h1004);
    imem[10] = LW(8, 0, 16'h1004);
    imem[11] = ADDI(9, 8, 1);
    imem[12] = LB(10, 0, 16'h1004);
    imem[13] = LBU(11, 0, 16'h1007);
    imem[14] = SB(2, 0, 16'h1008);
    imem[15] = SH(1, 0, 16'h100A);
    imem[16] = LH(12, 0, 16'h1008);
    imem[17] = SW(9, 0, 16'h100C);
    imem[18] = SW(10, 0, 16'h1010);
    imem[19] = SW(11, 0, 16'h1014);
    imem[20] = SW(12, 0, 16'h1018);
    imem[21] = SW(4, 0, 16'h101C);
    imem[22] = SW(5, 0, 16'h1020);
    imem[23] = SW(6, 0, 16'h1024);
    imem[24] = ADDI(13, 0, 0);
    imem[25] = ADDI(14, 0, 10);
    imem[26] = ADD(13, 13, 14);
    imem[27] = SUBI(14, 14, 1);
    imem[28] = BNEZ(14, -12);
    imem[29] = SW(13, 0, 16'h1028);
    imem[30] = JAL(4);
    imem[31] = ADDI(15, 0, 1);
    imem[32] = SW(31, 0, 16'h102C);
    imem[33] = ADDI(16, 0, 148);
    imem[34] = JR(16);
    imem[35] = ADDI(15, 0, 2);
    imem[36] = ADDI(15, 0, 3);
    imem[37] = SW(15, 0, 16'h1030);
    imem[38] = ADDI(17, 0, 3);
    imem[39] = MOVI2FP(1, 17);
    imem[40] = CVTI2D(2, 1);
    imem[41] = ADDI(17, 0, 4);
    imem[42] = MOVI2FP(1, 17);
    imem[43] = CVTI2D(4, 1);
    imem[44] = DIVD(6, 2, 4);
    imem[45] = MULTD(8, 6, 4);
    imem[46] = ADDD(10, 8, 6);
    imem[47] = SF(10, 0, 16'h1034);
    imem[48] = SF(11, 0, 16'h1038);
    imem[49] = CVTI2F(12, 1);
    imem[50] = ADDF(13, 12, 12);
    imem[51] = SF(13, 0, 16'h103C);
    imem[52] = LTD(6, 4);
    imem[53] = BFPT(4);
    imem[54] = ADDI(18, 0, 9);
    imem[55] = LF(14, 0, 16'h1004);
    imem[56] = MOVFP2I(19, 14);
    imem[57] = SW(19, 0, 16'h1040);
    imem[58] = SW(18, 0, 16'h1044);
    imem[59] = MOVRR2I(20, 5);
    imem[60] = SW(20, 0, 16'h1048);
    imem[61] = SENDRR(3, 9, 2);
    imem[62] = MULT(15, 1, 1);
    imem[63] = MOVFP2I(21, 15);
    imem[64] = SW(21, 0, 16'h104C);
    // FP status register: round toward zero, then nearest even; flags
    imem[65] = ADDI(22, 0, 2);            // FPSR = rounding mode 1 (toward zero)
    imem[66] = MOVI2S(0, 22);
    imem[67] = ADDI(23, 0, 1);
    imem[68] = MOVI2FP(16, 23);
    imem[69] = CVTI2F(17, 16);            // 1.0f
    imem[70] = ADDI(23, 0, 3);
    imem[71] = MOVI2FP(16, 23);
    imem[72] = CVTI2F(18, 16);            // 3.0f
    imem[73] = DIVF(19, 17, 18);          // 1/3 rounded toward zero
    imem[74] = SF(19, 0, 16'h1050);
    imem[75] = MOVS2I(24, 0);
    imem[76] = SW(24, 0, 16'h1054);
    imem[77] = MOVI2S(0, 0);              // nearest even, flags cleared
    imem[78] = DIVF(20, 17, 18);
    imem[79] = SF(20, 0, 16'h1058);
    imem[80] = MOVS2I(25, 0);
    imem[81] = SW(25, 0, 16'h105C);
    // double load and store, with load-use interlocks on register pairs
    imem[82] = SD(10, 0, 16'h1060);       // 3.75
    imem[83] = LD(22, 0, 16'h1060);
    imem[84] = ADDD(24, 22, 22);          // waits one cycle for the LD
    imem[85] = SD(24, 0, 16'h1068);       // 7.5
    imem[86] = LD(26, 0, 16'h1068);
    imem[87] = SD(26, 0, 16'h1070);       // waits one cycle for the LD
    imem[88] = TRAP();

    rx = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (halted);
    halt_cycle = cyc;
    repeat (3) @(posedge clk);

    chk(dmem[12'h400], 32'd93,          "ADD");
    chk(dmem[12'h401], 32'h1234_5678,   "LHI/ORI/SW");
    chk(dmem[12'h402], 32'hF900_0064,   "SB/SH big-endian");
    chk(dmem[12'h403], 32'h1234_5679,   "LW + load-use");
    chk(dmem[12'h404], 32'h0000_0012,   "LB");
    chk(dmem[12'h405], 32'h0000_0078,   "LBU");
    chk(dmem[12'h406], 32'hFFFF_F900,   "LH");
    chk(dmem[12'h407], 32'hFFFF_FFF9,   "SUB");
    chk(dmem[12'h408], 32'd1600,        "SLLI");
    chk(dmem[12'h409], 32'hFFFF_FFFC,   "SRAI");
    chk(dmem[12'h40A], 32'd55,          "loop sum");
    chk(dmem[12'h40B], 32'd124,         "JAL link");
    chk(dmem[12'h40C], 32'd0,           "squashed after jumps");
    chk(dmem[12'h40D], 32'h400E_0000,   "3/4*4+3/4 double hi");
    chk(dmem[12'h40E], 32'h0000_0000,   "double lo");
    chk(dmem[12'h40F], 32'h4100_0000,   "ADDF 4+4");
    chk(dmem[12'h410], 32'h1234_5678,   "LF/MOVFP2I");
    chk(dmem[12'h411], 32'd0,           "BFPT taken");
    chk(dmem[12'h412], 32'hCAFE_BABE,   "MOVRR2I");
    chk(dmem[12'h413], 32'd16,          "MULT");
    chk(dmem[12'h414], 32'h3EAA_AAAA,   "DIVF toward zero");
    chk(dmem[12'h415], 32'h0000_000A,   "FPSR: mode 1, inexact");
    chk(dmem[12'h416], 32'h3EAA_AAAB,   "DIVF nearest");
    chk(dmem[12'h417], 32'h0000_0008,   "FPSR: mode 0, inexact");
    chk(dmem[12'h418], 32'h400E_0000,   "SD upper word");
    chk(dmem[12'h419], 32'h0000_0000,   "SD lower word");
    chk(dmem[12'h41A], 32'h401E_0000,   "LD, ADDD, SD upper");
    chk(dmem[12'h41B], 32'h0000_0000,   "LD, ADDD, SD lower");
    chk(dmem[12'h41C], 32'h401E_0000,   "LD then SD upper");
    chk(dmem[12'h41D], 32'h0000_0000,   "LD then SD lower");
    // timing: 112 instructions, 4 interlocks, 12 taken branches/jumps
    chk(32'(tx_cycle),   32'd113, "SENDRR cycle");
    chk(tx_seen.data,    32'd93,  "SENDRR data");
    chk(32'(tx_seen.dst), 32'd2,  "SENDRR PE");
    chk(32'(tx_seen.rr),  32'd9,  "SENDRR RR");
    chk(32'(halt_cycle), 32'd144, "halt cycle");
    chk(32'(n_stall),    32'd4,   "interlocks");
    chk(32'(n_branch),   32'd12,  "taken branches");
    chk(32'(n_rr),       32'd1,   "RR reads");
    checks++; if (n_fwd == 0) begin failures++; $display("FAIL no forwarding seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
