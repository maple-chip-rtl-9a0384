// tb_maple_fpr: self-checking test of the floating-point register file.
// Random single (one register) and double (even/odd pair, even = upper word)
// writes and reads against a reference array, including write-through.
module tb_maple_fpr;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra1, ra2, wa;
  logic rdbl1, rdbl2, wdbl, we;
  logic [63:0] rd1, rd2, wd;
  int checks = 0, failures = 0;
  logic [31:0] model [32];

  maple_fpr dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] cur(input logic [4:0] r);
    if (we && wdbl && r[4:1] == wa[4:1]) return r[0] ? wd[31:0] : wd[63:32];
    if (we && !wdbl && r == wa) return wd[31:0];
    return model[r];
  endfunction
  function automatic logic [63:0] expect_rd(input logic [4:0] r, input logic d);
    return d ? {cur({r[4:1], 1'b0}), cur({r[4:1], 1'b1})} : {32'h0, cur(r)};
  endfunction

  initial begin
    we = 0; wdbl = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; rdbl1 = 0; rdbl2 = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wdbl = 1'($urandom); wa = 5'($urandom); wd = {$urandom, $urandom};
      ra1 = (n % 3 == 0) ? wa ^ 5'(n % 2) : 5'($urandom); ra2 = 5'($urandom);
      rdbl1 = 1'($urandom); rdbl2 = 1'($urandom);
      #1;
      checks++; if (rd1 !== expect_rd(ra1, rdbl1)) begin failures++; $display("FAIL rd1 %h", rd1); end
      checks++; if (rd2 !== expect_rd(ra2, rdbl2)) begin failures++; $display("FAIL rd2 %h", rd2); end
      @(posedge clk);
      if (we && wdbl) begin model[{wa[4:1], 1'b0}] = wd[63:32]; model[{wa[4:1], 1'b1}] = wd[31:0]; end
      else if (we) model[wa] = wd[31:0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
