// tb_maple_lmem: self-checking test of the main memory (reduced size).
// Random byte-enabled doubleword writes on port A and word writes on port B
// against a reference byte array; checks both read ports (big-endian: the
// lowest address is the most significant byte) and that port A wins a
// same-doubleword write conflict.
module tb_maple_lmem;
  localparam int BYTES = 1024;
  logic clk = 0;
  logic [31:0] a_addr, b_addr, b_wdata, b_rdata;
  logic [63:0] a_wdata, a_rdata;
  logic [7:0]  a_be;
  logic b_we;
  int checks = 0, failures = 0;
  logic [7:0] model [BYTES];

  maple_lmem #(.BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [63:0] dword(input int addr);
    int base = addr & ~7;
    logic [63:0] d;
    for (int k = 0; k < 8; k++) d[8*(7-k) +: 8] = model[base + k];
    return d;
  endfunction
  function automatic logic [31:0] word(input int addr);
    int base = addr & ~3;
    logic [31:0] w;
    for (int k = 0; k < 4; k++) w[8*(3-k) +: 8] = model[base + k];
    return w;
  endfunction

  int ab, bb;
  initial begin
    a_be = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    for (int i = 0; i < BYTES/4; i++) begin
      @(negedge clk); b_we = 1; b_addr = 32'(4*i); b_wdata = $urandom;
      for (int k = 0; k < 4; k++) model[4*i + k] = b_wdata[8*(3-k) +: 8];
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a_addr = $urandom % BYTES; a_be = 8'($urandom); a_wdata = {$urandom, $urandom};
      b_we = 1'($urandom); b_wdata = $urandom;
      b_addr = (n % 8 == 0) ? a_addr : $urandom % BYTES;
      #1;
      checks++; if (a_rdata !== dword(int'(a_addr))) begin failures++; $display("FAIL a %h", a_addr); end
      checks++; if (b_rdata !== word(int'(b_addr)))  begin failures++; $display("FAIL b %h", b_addr); end
      @(posedge clk);
      ab = int'(a_addr) & ~7;
      bb = int'(b_addr) & ~3;
      if (b_we && !(a_be != 0 && (a_addr >> 3) == (b_addr >> 3)))
        for (int k = 0; k < 4; k++) model[bb + k] = b_wdata[8*(3-k) +: 8];
      for (int k = 0; k < 8; k++) if (a_be[7-k]) model[ab + k] = a_wdata[8*(7-k) +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
