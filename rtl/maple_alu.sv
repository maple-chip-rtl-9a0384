// maple_alu: the integer execution unit of MAPLE (EX stage).
//
// A purely combinational unit that computes every integer operation of the
// DLX instruction set in one cycle: add, subtract, the three logic
// operations, the three shifts (amount = b[4:0]) and the six signed set-on-
// compare operations, which return 1 or 0. ALU_PASSB forwards operand b and
// is used by LHI, MOVRR2I and MOVFP2I. No operation traps on overflow. The
// document names the integer unit; its operations follow DLX and the
// single-cycle timing follows the document's fixed-latency pipeline.
module maple_alu
  import maple_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  alu_op_e          op,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  output logic [XLEN-1:0]  y
);
  logic signed [XLEN-1:0] sa, sb;
  logic [$clog2(XLEN)-1:0] sh;

  always_comb begin
    sa = signed'(a);
    sb = signed'(b);
    sh = b[$clog2(XLEN)-1:0];
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SLL:   y = a << sh;
      ALU_SRL:   y = a >> sh;
      ALU_SRA:   y = unsigned'(sa >>> sh);
      ALU_SEQ:   y = XLEN'(a == b);
      ALU_SNE:   y = XLEN'(a != b);
      ALU_SLT:   y = XLEN'(sa <  sb);
      ALU_SGT:   y = XLEN'(sa >  sb);
      ALU_SLE:   y = XLEN'(sa <= sb);
      ALU_SGE:   y = XLEN'(sa >= sb);
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
