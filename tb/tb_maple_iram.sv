// tb_maple_iram: self-checking test of the instruction RAM (reduced size).
// Writes random words through the load port and reads them back through the
// fetch port, including the top word and address wrap-around.
module tb_maple_iram;
  localparam int BYTES = 1024;
  logic clk = 0;
  logic [31:0] raddr, rdata, waddr, wdata;
  logic we;
  int checks = 0, failures = 0;
  logic [31:0] model [BYTES/4];

  maple_iram #(.BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < BYTES/4; i++) begin
      @(negedge clk); we = 1; waddr = 32'(4*i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1000; n++) begin
      raddr = $urandom; #1; checks++;
      if (rdata !== model[(raddr / 4) % (BYTES/4)]) begin failures++; $display("FAIL %h", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
