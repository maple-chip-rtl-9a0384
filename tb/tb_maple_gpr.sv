// tb_maple_gpr: self-checking test of the integer register file.
// Random writes and reads against a reference array; checks that r0 stays
// zero, that reads are combinational and that a read of the register being
// written returns the new value (write-through).
module tb_maple_gpr;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  int checks = 0, failures = 0;
  logic [31:0] model [32];

  maple_gpr dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = (n % 4 == 0) ? wa : 5'($urandom); ra2 = 5'($urandom);
      #1;
      chk(rd1, (ra1 == 0) ? 32'h0 : (we && wa == ra1) ? wd : model[ra1], "rd1");
      chk(rd2, (ra2 == 0) ? 32'h0 : (we && wa == ra2) ? wd : model[ra2], "rd2");
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
