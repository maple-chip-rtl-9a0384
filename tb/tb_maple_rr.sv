// tb_maple_rr: self-checking test of the receive registers.
// Random network writes and ID-stage reads against a reference array; checks
// the reset value, that a word written at an edge is readable afterwards
// and the same-cycle read-through.
module tb_maple_rr;
  logic clk = 0, rst_n = 0;
  logic wr_valid;
  logic [3:0] wr_idx, rd_idx;
  logic [31:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  logic [31:0] model [16];

  maple_rr dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_valid = 0; wr_idx = 0; wr_data = 0; rd_idx = 0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i); #1; checks++;
      if (rd_data !== 32'h0) begin failures++; $display("FAIL reset rr%0d", i); end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_valid = 1'($urandom); wr_idx = 4'($urandom); wr_data = $urandom;
      rd_idx = (n % 4 == 0) ? wr_idx : 4'($urandom);
      #1; checks++;
      if (rd_data !== ((wr_valid && wr_idx == rd_idx) ? wr_data : model[rd_idx])) begin
        failures++; $display("FAIL rr%0d got %h", rd_idx, rd_data);
      end
      @(posedge clk);
      if (wr_valid) model[wr_idx] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
