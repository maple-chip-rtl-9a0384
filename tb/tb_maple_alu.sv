// tb_maple_alu: self-checking test of the integer unit.
// Random and corner-case operands for every operation, compared with results
// computed here with SystemVerilog operators on signed/unsigned ints.
module tb_maple_alu;
  import maple_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  maple_alu dut (.op, .a, .b, .y);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] ref_y(input int o, input logic [31:0] x, input logic [31:0] z);
    int sx, sz;
    sx = x; sz = z;
    case (o)
      0:  return x + z;
      1:  return x - z;
      2:  return x & z;
      3:  return x | z;
      4:  return x ^ z;
      5:  return x << z[4:0];
      6:  return x >> z[4:0];
      7:  return sx >>> z[4:0];
      8:  return (x == z) ? 1 : 0;
      9:  return (x != z) ? 1 : 0;
      10: return (sx <  sz) ? 1 : 0;
      11: return (sx >  sz) ? 1 : 0;
      12: return (sx <= sz) ? 1 : 0;
      13: return (sx >= sz) ? 1 : 0;
      default: return z;
    endcase
  endfunction

  logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F};
  initial begin
    for (int n = 0; n < 20000; n++) begin
      op = alu_op_e'(n % 15);
      a = (n % 7 == 0) ? corner[$urandom % 6] : $urandom;
      b = (n % 5 == 0) ? corner[$urandom % 6] : (n % 11 == 0) ? a : $urandom;
      #1; checks++;
      if (y !== ref_y(n % 15, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL op %0d a %h b %h y %h", n % 15, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
