// tb_maple_pe: self-checking test of one processing element.
//
// A host loads a program into the instruction RAM and an array of sixteen
// words into main memory through the loader port while the chip is held in
// reset. The program sums the array, stores the sum, sends it to receive
// register 7 of PE 3, and stops. The test reads the sum back through the
// loader port, checks the network word, a word received into a receive
// register during the run, and the halt cycle predicted from one cycle per
// instruction, one per load-use interlock and two per taken branch.
module tb_maple_pe;
  import maple_pkg::*;
  import maple_asm_pkg::*;

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

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic load(input logic iram, input logic [31:0] addr, input logic [31:0] data);
    @(negedge clk); ld_we = 1; ld_iram = iram; ld_addr = addr; ld_wdata = data;
    @(negedge clk); ld_we = 0;
  endtask

  int tx_cycle = -1, nstall = 0;
  rr_msg_t tx_seen;
  always @(posedge clk) if (rst_n) begin
    if (tx.valid) begin tx_cycle = cyc; tx_seen = tx; end
    nstall += int'(events.load_stall);
  end
  always_comb begin
    rx = '0;
    if (rst_n && cyc == 10) begin rx.valid = 1; rx.rr = 4'd1; rx.data = 32'd1000; end
  end

  logic [31:0] prog [$];
  logic [31:0] sum;
  int halt_cycle;
  initial begin
    // r1 = pointer, r2 = count, r3 = sum
    prog = '{ADDI(1, 0, 16'h400), ADDI(2, 0, 16), ADDI(3, 0, 0),
             LW(4, 1, 0),            // 3: loop
             ADD(3, 3, 4),           //    load-use interlock every iteration
             ADDI(1, 1, 4),
             SUBI(2, 2, 1),
             BNEZ(2, -20),           // 7: back to 3
             MOVRR2I(5, 1),          // add the word received in RR1
             ADD(3, 3, 5),
             SW(3, 0, 16'h800),
             SENDRR(3, 7, 3),
             TRAP()};
    sum = 1000;
    for (int i = 0; i < 16; i++) begin
      logic [31:0] w;
      w = $urandom;
      sum += w;
      load(1'b0, 32'h400 + 32'(4*i), w);
    end
    foreach (prog[i]) load(1'b1, 32'(4*i), prog[i]);
    @(negedge clk) rst_n = 1;
    wait (halted);
    halt_cycle = cyc;
    @(negedge clk); ld_addr = 32'h800; #1;
    chk(ld_rdata, sum, "sum in main memory");
    chk(tx_seen.data, sum, "sent word");
    chk(32'(tx_seen.dst), 3, "sent PE");
    chk(32'(tx_seen.rr), 7, "sent RR");
    // 3 + 16*5 + 6 instructions, 16 interlocks, 15 taken branches
    chk(32'(nstall), 16, "interlocks");
    chk(32'(tx_cycle), 32'(3 + 80 + 3 + 16 + 30 + 3), "send cycle");
    chk(32'(halt_cycle), 32'(3 + 80 + 5 - 1 + 5 + 16 + 30), "halt cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
