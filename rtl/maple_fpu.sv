// maple_fpu: the floating unit of MAPLE (EX stage).
//
// Executes the DLX floating-point and integer multiply/divide operations on
// values read from the floating-point registers: IEEE 754 single (32-bit)
// and double (64-bit) add, subtract, multiply and divide, the six compares,
// the conversions between single, double and 32-bit integer, MULT/MULTU/
// DIV/DIVU on 32-bit integers, and register moves. Every operation is
// combinational so that it completes in the single EX cycle, matching the
// document's rule that every operation takes a fixed number of clocks.
//
// Interface: op selects the operation; dbl selects double precision for
// add/sub/mul/div/compare. a and b hold a double in all 64 bits or a single
// or integer in bits [31:0]. y returns a double in all 64 bits and any
// other result in bits [31:0] (upper bits zero). cond is the compare
// result, which the pipeline stores in the FP status bit. rm is the IEEE
// rounding mode (0 nearest even, 1 toward zero, 2 toward +inf, 3 toward
// -inf) and flags = {invalid, divide-by-zero, overflow, underflow, inexact}
// are the IEEE exception conditions raised by this operation; the pipeline
// keeps them sticky in its FP status register. All combinational.
//
// Denormal operands and results are handled as IEEE 754 requires (gradual
// underflow; underflow is signalled when a result is tiny before rounding
// and inexact). Ordered compares (LT/GT/LE/GE) with a NaN operand raise
// invalid; EQ/NE do not. Float-to-integer conversions always truncate
// toward zero, as C does, and saturate; NaN gives 32'h8000_0000 and raises
// invalid, as does an out-of-range value, and a lost fraction raises
// inexact. Integer division by zero returns all ones and raises no flag,
// and the signed quotient -2^31 / -1 returns -2^31. These are this design's
// choices: the document says only that the unit implements IEEE 754-1985
// 32/64-bit arithmetic. No trap is taken on any exception.
module maple_fpu
  import maple_pkg::*;
(
  input  fpu_op_e      op,
  input  logic         dbl,
  input  logic [63:0]  a,
  input  logic [63:0]  b,
  input  logic [1:0]   rm,
  output logic [63:0]  y,
  output logic         cond,
  output logic [4:0]   flags
);
  // ------------------------------------------------ arithmetic and compare
  logic [1:0]  aop;
  logic [31:0] ys;
  logic [63:0] yd;
  logic        lt_s, eq_s, un_s, lt_d, eq_d, un_d;
  logic [4:0]  fl_s, fl_d;

  always_comb begin
    unique case (op)
      FPU_SUB: aop = 2'd1;
      FPU_MUL: aop = 2'd2;
      FPU_DIV: aop = 2'd3;
      default: aop = 2'd0;
    endcase
  end

  maple_fp_arith #(.EW(8),  .MW(23)) u_sgl (
    .op(aop), .a(a[31:0]), .b(b[31:0]), .rm(rm), .y(ys), .flags(fl_s),
    .lt(lt_s), .eq(eq_s), .unordered(un_s));
  maple_fp_arith #(.EW(11), .MW(52)) u_dbl (
    .op(aop), .a(a), .b(b), .rm(rm), .y(yd), .flags(fl_d),
    .lt(lt_d), .eq(eq_d), .unordered(un_d));

  // ------------------------------------------------------------ conversions
  // double -> single
  logic [31:0] d2f;
  logic        d_nan, d_inf, d2f_nx, d2f_of, d2f_uf;
  assign d_nan = (a[62:52] == '1) && (a[51:0] != '0);
  assign d_inf = (a[62:52] == '1) && (a[51:0] == '0);
  maple_fp_round #(.EW(8), .MW(23), .VW(53)) u_d2f (
    .sign(a[63]), .exp(14'(a[62:52]) - 14'sd1023 + 14'sd127),
    .v((a[62:52] == '0) ? 53'h0 : {1'b1, a[51:0]}),
    .is_nan(d_nan), .is_inf(d_inf), .rm(rm),
    .y(d2f), .inexact(d2f_nx), .overflow(d2f_of), .underflow(d2f_uf));

  // integer -> single / double
  logic [31:0] imag;
  logic [31:0] i2f;
  logic [63:0] i2d;
  logic        i2f_nx;
  assign imag = a[31] ? 32'(-a[31:0]) : a[31:0];
  maple_fp_round #(.EW(8), .MW(23), .VW(32)) u_i2f (
    .sign(a[31]), .exp(14'sd127 + 14'sd31), .v(imag), .is_nan(1'b0), .is_inf(1'b0), .rm(rm),
    .y(i2f), .inexact(i2f_nx), .overflow(), .underflow());
  maple_fp_round #(.EW(11), .MW(52), .VW(64)) u_i2d (
    .sign(a[31]), .exp(17'sd1023 + 17'sd31), .v({imag, 32'h0}), .is_nan(1'b0), .is_inf(1'b0), .rm(rm),
    .y(i2d), .inexact(), .overflow(), .underflow());

  // single -> double (exact; a denormal single becomes a normal double)
  logic [63:0] f2d;
  maple_fp_round #(.EW(11), .MW(52), .VW(55)) u_f2d (
    .sign(a[31]),
    .exp(((a[30:23] == '0) ? 17'sd1 : 17'(a[30:23])) - 17'sd127 + 17'sd1023),
    .v({a[30:23] != '0, a[22:0], 31'h0}),
    .is_nan((a[30:23] == '1) && (a[22:0] != '0)),
    .is_inf((a[30:23] == '1) && (a[22:0] == '0)), .rm(rm),
    .y(f2d), .inexact(), .overflow(), .underflow());

  // float -> integer, truncating toward zero and saturating. Returns
  // {invalid, inexact, value}. -2^31 itself is in range.
  function automatic logic [33:0] to_int(input logic sgn, input int e_unb,
                                         input logic [63:0] m, input int mw,
                                         input logic nan);
    logic [63:0] mag;
    logic        lost;
    if (nan) return {2'b10, 32'h8000_0000};
    if (e_unb < 0) return {1'b0, m != '0, 32'h0};
    if (e_unb > 31 || (e_unb == 31 && !(sgn && (m << (63 - mw)) == 64'h8000_0000_0000_0000)))
      return {2'b10, sgn ? 32'h8000_0000 : 32'h7FFF_FFFF};
    mag  = (e_unb <= mw) ? (m >> (mw - e_unb)) : (m << (e_unb - mw));
    lost = (e_unb < mw) && ((m << (64 - (mw - e_unb))) != '0);
    return {1'b0, lost, sgn ? 32'(-mag) : mag[31:0]};
  endfunction

  logic [33:0] f2i, d2i;
  always_comb begin
    f2i = to_int(a[31], int'(a[30:23]) - 127, {40'h0, (a[30:23] != '0), a[22:0]}, 23,
                 (a[30:23] == '1) && (a[22:0] != '0));
    d2i = to_int(a[63], int'(a[62:52]) - 1023, {11'h0, (a[62:52] != '0), a[51:0]}, 52, d_nan);
  end

  // ------------------------------------------------- integer multiply/divide
  logic [31:0] imul, idiv, idivu;
  always_comb begin
    imul = a[31:0] * b[31:0];
    if (b[31:0] == '0) begin
      idiv  = '1;
      idivu = '1;
    end else begin
      idivu = a[31:0] / b[31:0];
      if (a[31:0] == 32'h8000_0000 && b[31:0] == '1) idiv = 32'h8000_0000;
      else idiv = unsigned'(signed'(a[31:0]) / signed'(b[31:0]));
    end
  end

  // -------------------------------------------------------------- result mux
  logic lt, eq, un;
  always_comb begin
    lt = dbl ? lt_d : lt_s;
    eq = dbl ? eq_d : eq_s;
    un = dbl ? un_d : un_s;
    unique case (op)
      FPU_EQ:  cond = eq;
      FPU_NE:  cond = !eq;
      FPU_LT:  cond = lt;
      FPU_GT:  cond = !un && !lt && !eq;
      FPU_LE:  cond = lt || eq;
      FPU_GE:  cond = !un && !lt;
      default: cond = 1'b0;
    endcase
    unique case (op)
      FPU_ADD, FPU_SUB, FPU_MUL, FPU_DIV: y = dbl ? yd : {32'h0, ys};
      FPU_CVTF2D: y = f2d;
      FPU_CVTD2F: y = {32'h0, d2f};
      FPU_CVTF2I: y = {32'h0, f2i[31:0]};
      FPU_CVTD2I: y = {32'h0, d2i[31:0]};
      FPU_CVTI2F: y = {32'h0, i2f};
      FPU_CVTI2D: y = i2d;
      FPU_IMUL, FPU_IMULU: y = {32'h0, imul};
      FPU_IDIV:   y = {32'h0, idiv};
      FPU_IDIVU:  y = {32'h0, idivu};
      FPU_MOV:    y = a;
      default:    y = '0;
    endcase
    unique case (op)
      FPU_ADD, FPU_SUB, FPU_MUL, FPU_DIV: flags = dbl ? fl_d : fl_s;
      FPU_LT, FPU_GT, FPU_LE, FPU_GE:     flags = {un, 4'b0};
      FPU_CVTD2F: flags = {1'b0, 1'b0, d2f_of, d2f_uf, d2f_nx};
      FPU_CVTF2I: flags = {f2i[33], 3'b0, f2i[32]};
      FPU_CVTD2I: flags = {d2i[33], 3'b0, d2i[32]};
      FPU_CVTI2F: flags = {4'b0, i2f_nx};
      default:    flags = '0;
    endcase
  end
endmodule
