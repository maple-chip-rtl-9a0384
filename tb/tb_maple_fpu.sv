// tb_maple_fpu: self-checking test of the floating unit.
//
// Double-precision results are compared with the simulator's own IEEE 754
// double arithmetic ($bitstoreal/$realtobits). Single-precision operands are
// widened exactly to double, the operation is done in double, and the
// result is rounded to single here (round to nearest even); for +, -, * and
// / one extra rounding through double cannot change a single result, since
// double carries more than twice the single significand plus two bits.
// Operands span the whole exponent range, denormals included, so overflow,
// gradual underflow and denormal operands are covered. Special values
// (zeros, infinities, NaN), conversions, compares and the integer
// multiply/divide are checked as well.
//
// Rounding modes and exception flags: single-precision results in all four
// modes come from the same reference rounder, which also gives inexact,
// overflow and underflow. It is exact for multiply (the product of two
// singles fits in a double), for divide (a double-rounded quotient of two
// singles can land on a single-precision number or midpoint only when the
// quotient is exact) and for add/subtract when the operand exponents differ
// by at most 28, so only those sums are checked in the directed modes.
// Double precision has no independent reference in the directed modes, so
// their results are checked by properties: the nearest result must match
// the simulator, round-down and round-up must be equal when the result is
// exact and one unit apart otherwise, round-toward-zero must equal one of
// them by sign, and products of short significands must be exact.
module tb_maple_fpu;
  import maple_pkg::*;
  fpu_op_e op;
  logic dbl;
  logic [63:0] a, b, y;
  logic cond;
  logic [1:0] rm = 2'd0;
  logic [4:0] flags;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  maple_fpu dut (.op, .dbl, .a, .b, .rm, .y, .cond, .flags);
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam logic [63:0] DNAN = 64'h7FF8_0000_0000_0000;
  localparam logic [31:0] SNAN = 32'h7FC0_0000;

  // single bits -> double bits, exact (denormal singles included), by
  // scaling the single's integer significand in double arithmetic
  function automatic logic [63:0] s2d(input logic [31:0] s);
    real r;
    int  e;
    if (s[30:23] == 8'hFF) return (s[22:0] != 0) ? DNAN : {s[31], 11'h7FF, 52'h0};
    e = (s[30:23] == 0) ? 1 : int'(s[30:23]);
    r = real'({s[30:23] != 0, s[22:0]}) * (2.0 ** (e - 127 - 23));
    return {s[31], 63'($realtobits(r))};
  endfunction

  // double bits -> single bits in rounding mode rmode, gradual underflow;
  // fl returns {invalid, divide-by-zero, overflow, underflow, inexact}
  function automatic logic [31:0] d2sr(input logic [63:0] d, input logic [1:0] rmode,
                                       output logic [4:0] fl);
    int e, sh;
    logic [80:0] m;          // 1.52 significand with room to shift right
    logic [23:0] k;
    logic g, st, up, tiny;
    fl = '0;
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? SNAN : {d[63], 8'hFF, 23'h0};
    if (d[62:0] == 0) return {d[63], 31'h0};
    e = (d[62:52] == 0) ? 1 - 1023 + 127 : int'(d[62:52]) - 1023 + 127;
    m = {d[62:52] != 0, d[51:0], 28'h0};
    // normalise (only a denormal double has no leading one)
    while (!m[80] && e > -200) begin m = m << 1; e = e - 1; end
    tiny = (e < 1);
    sh = (e < 1) ? 1 - e : 0;
    if (sh > 81) sh = 81;
    st = 0;
    for (int i = 0; i < sh; i++) st = st | m[i];
    m = m >> sh;
    if (sh > 0) e = 1;
    k  = m[80:57];
    g  = m[56];
    st = st | (|m[55:0]);
    case (rmode)
      2'd0:    up = g && (st || k[0]);
      2'd1:    up = 0;
      2'd2:    up = !d[63] && (g || st);
      default: up =  d[63] && (g || st);
    endcase
    if (up) begin
      if (k == 24'hFF_FFFF) begin k = 24'h80_0000; e = e + 1; end
      else k = k + 1;           // a denormal may round up into the normal range
    end
    fl[0] = g || st;
    fl[1] = tiny && (g || st);
    if (!k[23]) return {d[63], 8'h00, k[22:0]};
    if (e >= 255) begin
      fl[2] = 1; fl[0] = 1;
      if (rmode == 1 || (rmode == 2 && d[63]) || (rmode == 3 && !d[63]))
        return {d[63], 8'hFE, 23'h7F_FFFF};
      return {d[63], 8'hFF, 23'h0};
    end
    return {d[63], 8'(e), k[22:0]};
  endfunction

  function automatic logic [31:0] d2s(input logic [63:0] d);
    logic [4:0] fl;
    return d2sr(d, 2'd0, fl);
  endfunction

  // an exactly zero sum is +0, or -0 when rounding toward -inf, unless both
  // operands are zeros of the same sign
  function automatic logic [63:0] zfix(input logic [63:0] r, input logic [63:0] x,
                                       input logic [63:0] z, input logic [1:0] rmode);
    if (r[62:0] != 0) return r;
    if (x[62:0] == 0 && z[62:0] == 0 && x[63] == z[63]) return r;
    return {rmode == 2'd3, 63'h0};
  endfunction

  function automatic logic [63:0] rnd_d(input int span);
    int e;
    e = 1023 + int'($urandom % (2*span)) - span;
    if (e < 0) e = 0;
    if (e > 2046) e = 2046;
    return {1'($urandom), 11'(e), $urandom, 20'($urandom)};
  endfunction
  function automatic logic [31:0] rnd_s(input int span);
    int e;
    e = 127 + int'($urandom % (2*span)) - span;
    if (e < 0) e = 0;
    if (e > 254) e = 254;
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  task automatic chkf(input logic [4:0] exp, input string what);
    checks++;
    if (flags !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL flags %s rm=%0d a=%h b=%h got %b exp %b", what, rm, a, b, flags, exp);
    end
  endtask

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h got %h exp %h", what, a, b, got, exp);
    end
  endtask

  function automatic real r64(input logic [63:0] x); return $bitstoreal(x); endfunction

  real ra, rb, rr;
  int  ia, ib, ea, eb;
  logic [4:0]  fe;
  logic [31:0] es;
  logic [63:0] rn_, rz_, ru_, rd_;
  logic [4:0]  fn_, fz_, fu_, fd_;
  initial begin
    // ---------------------------------------------------- double arithmetic
    dbl = 1;
    for (int n = 0; n < 4000; n++) begin
      a = rnd_d(100);
      b = (n % 5 == 0) ? {~a[63] ^ 1'($urandom), a[62:52], a[51:8], 8'($urandom)} : rnd_d(100);
      ra = r64(a); rb = r64(b);
      op = FPU_ADD; #1; chk(y, $realtobits(ra + rb), "ADDD");
      op = FPU_SUB; #1; chk(y, $realtobits(ra - rb), "SUBD");
      op = FPU_MUL; #1; chk(y, $realtobits(ra * rb), "MULTD");
      op = FPU_DIV; #1; chk(y, $realtobits(ra / rb), "DIVD");
      op = FPU_LT;  #1; checks++; if (cond !== (ra <  rb)) failures++;
      op = FPU_EQ;  #1; checks++; if (cond !== (ra == rb)) failures++;
      op = FPU_GE;  #1; checks++; if (cond !== (ra >= rb)) failures++;
    end
    // ---------------------------------------------------- single arithmetic
    dbl = 0;
    for (int n = 0; n < 4000; n++) begin
      a = {32'h0, rnd_s(30)};
      b = (n % 5 == 0) ? {32'h0, ~a[31] ^ 1'($urandom), a[30:23], a[22:6], 6'($urandom)}
                       : {32'h0, rnd_s(30)};
      ra = r64(s2d(a[31:0])); rb = r64(s2d(b[31:0]));
      op = FPU_ADD; #1; chk(y, {32'h0, d2s($realtobits(ra + rb))}, "ADDF");
      op = FPU_SUB; #1; chk(y, {32'h0, d2s($realtobits(ra - rb))}, "SUBF");
      op = FPU_MUL; #1; chk(y, {32'h0, d2s($realtobits(ra * rb))}, "MULTF");
      op = FPU_DIV; #1; chk(y, {32'h0, d2s($realtobits(ra / rb))}, "DIVF");
      op = FPU_LT;  #1; checks++; if (cond !== (ra <  rb)) failures++;
      op = FPU_LE;  #1; checks++; if (cond !== (ra <= rb)) failures++;
      op = FPU_NE;  #1; checks++; if (cond !== (ra != rb)) failures++;
      op = FPU_GT;  #1; checks++; if (cond !== (ra >  rb)) failures++;
    end
    // ---------------------------- full exponent range: overflow, underflow
    for (int n = 0; n < 6000; n++) begin
      dbl = 1;
      a = rnd_d(1100);
      b = (n % 3 == 0) ? {1'($urandom), 11'($urandom % 60), $urandom, 20'($urandom)} : rnd_d(1100);
      ra = r64(a); rb = r64(b);
      op = FPU_ADD; #1; chk(y, $realtobits(ra + rb), "ADDD range");
      op = FPU_SUB; #1; chk(y, $realtobits(ra - rb), "SUBD range");
      op = FPU_MUL; #1; chk(y, $realtobits(ra * rb), "MULTD range");
      if (b[62:0] != 0) begin op = FPU_DIV; #1; chk(y, $realtobits(ra / rb), "DIVD range"); end
      op = FPU_LT;  #1; checks++; if (cond !== (ra < rb)) begin failures++; $display("FAIL LTD range"); end
      op = FPU_CVTD2F; #1; chk(y, {32'h0, d2s(a)}, "CVTD2F range");
      dbl = 0;
      a = {32'h0, rnd_s(140)};
      b = (n % 3 == 0) ? {32'h0, 1'($urandom), 8'($urandom % 8), 23'($urandom)} : {32'h0, rnd_s(140)};
      ra = r64(s2d(a[31:0])); rb = r64(s2d(b[31:0]));
      op = FPU_ADD; #1; chk(y, {32'h0, d2s($realtobits(ra + rb))}, "ADDF range");
      op = FPU_SUB; #1; chk(y, {32'h0, d2s($realtobits(ra - rb))}, "SUBF range");
      op = FPU_MUL; #1; chk(y, {32'h0, d2s($realtobits(ra * rb))}, "MULTF range");
      if (b[30:0] != 0) begin op = FPU_DIV; #1; chk(y, {32'h0, d2s($realtobits(ra / rb))}, "DIVF range"); end
      op = FPU_CVTF2D; #1; chk(y, s2d(a[31:0]), "CVTF2D range");
    end
    // ------------------------------------------------------ special values
    dbl = 1;
    a = 64'h7FF0_0000_0000_0000; b = 64'hFFF0_0000_0000_0000;
    op = FPU_ADD; #1; chk(y, DNAN, "inf-inf");
    op = FPU_SUB; #1; chk(y, 64'h7FF0_0000_0000_0000, "inf--inf");
    a = 64'h0; b = 64'h7FF0_0000_0000_0000;
    op = FPU_MUL; #1; chk(y, DNAN, "0*inf");
    a = 64'h3FF0_0000_0000_0000; b = 64'h0;
    op = FPU_DIV; #1; chk(y, 64'h7FF0_0000_0000_0000, "1/0");
    a = 64'h0; b = 64'h8000_0000_0000_0000;
    op = FPU_ADD; #1; chk(y, 64'h0, "0+-0");
    op = FPU_EQ;  #1; checks++; if (cond !== 1'b1) failures++;
    a = DNAN; b = 64'h3FF0_0000_0000_0000;
    op = FPU_EQ;  #1; checks++; if (cond !== 1'b0) failures++;
    op = FPU_NE;  #1; checks++; if (cond !== 1'b1) failures++;
    op = FPU_MUL; #1; chk(y, DNAN, "nan*1");
    a = 64'h7FE0_0000_0000_0000; b = 64'h4000_0000_0000_0000;
    op = FPU_MUL; #1; chk(y, 64'h7FF0_0000_0000_0000, "overflow");
    a = 64'h3FF0_0000_0000_0000; b = 64'hBFF0_0000_0000_0000;
    op = FPU_ADD; #1; chk(y, 64'h0, "1+-1");
    // --------------------------------------------------------- conversions
    for (int n = 0; n < 3000; n++) begin
      ia = (n % 3 == 0) ? int'($urandom % 2001) - 1000 : int'($urandom);
      a  = {32'h0, 32'(ia)};
      op = FPU_CVTI2D; #1; chk(y, $realtobits(real'(ia)), "CVTI2D");
      op = FPU_CVTI2F; #1; chk(y, {32'h0, d2s($realtobits(real'(ia)))}, "CVTI2F");
      a  = rnd_d(20);
      op = FPU_CVTD2I; #1; chk(y, {32'h0, 32'($rtoi(r64(a)))}, "CVTD2I");
      op = FPU_CVTD2F; #1; chk(y, {32'h0, d2s(a)}, "CVTD2F");
      a  = {32'h0, rnd_s(20)};
      op = FPU_CVTF2D; #1; chk(y, s2d(a[31:0]), "CVTF2D");
      op = FPU_CVTF2I; #1; chk(y, {32'h0, 32'($rtoi(r64(s2d(a[31:0]))))}, "CVTF2I");
      // integer multiply and divide
      ia = int'($urandom); ib = (n % 4 == 0) ? int'($urandom % 100) - 50 : int'($urandom);
      if (ib == 0) ib = 7;
      a = {32'h0, 32'(ia)}; b = {32'h0, 32'(ib)};
      op = FPU_IMUL;  #1; chk(y, {32'h0, 32'(ia * ib)}, "MULT");
      op = FPU_IDIV;  #1; chk(y, {32'h0, 32'(ia / ib)}, "DIV");
      op = FPU_IDIVU; #1; chk(y, {32'h0, 32'(a[31:0] / b[31:0])}, "DIVU");
      op = FPU_MOV;   #1; chk(y, a, "MOV");
    end
    a = 64'h41F0_0000_0000_0000;            // 2^32: saturates
    op = FPU_CVTD2I; #1; chk(y, 64'h7FFF_FFFF, "CVTD2I sat"); chkf(5'b10000, "CVTD2I sat");
    a = 64'hC1E0_0000_0000_0000;            // -2^31: in range, exact
    op = FPU_CVTD2I; #1; chk(y, 64'h8000_0000, "CVTD2I min"); chkf(5'b00000, "CVTD2I min");
    a = DNAN;
    op = FPU_CVTD2I; #1; chk(y, 64'h8000_0000, "CVTD2I nan"); chkf(5'b10000, "CVTD2I nan");

    // ------------------------------------- rounding modes and exception flags
    for (int n = 0; n < 8000; n++) begin
      rm  = 2'(n);
      dbl = 0;
      a = {32'h0, rnd_s((n % 8 < 4) ? 30 : 140)};
      b = {32'h0, rnd_s((n % 8 < 4) ? 30 : 140)};
      if (n % 16 == 5) b[22:0] = a[22:0];
      ra = r64(s2d(a[31:0])); rb = r64(s2d(b[31:0]));
      op = FPU_MUL; #1;
      es = d2sr($realtobits(ra * rb), rm, fe);
      chk(y, {32'h0, es}, "MULTF rm"); chkf(fe, "MULTF rm");
      if (b[30:0] != 0) begin
        op = FPU_DIV; #1;
        es = d2sr($realtobits(ra / rb), rm, fe);
        chk(y, {32'h0, es}, "DIVF rm"); chkf(fe, "DIVF rm");
      end
      ea = (a[30:23] == 0) ? 1 : int'(a[30:23]);
      eb = (b[30:23] == 0) ? 1 : int'(b[30:23]);
      if (ea - eb <= 28 && eb - ea <= 28) begin
        op = FPU_ADD; #1;
        es = d2sr(zfix($realtobits(ra + rb), s2d(a[31:0]), s2d(b[31:0]), rm), rm, fe);
        chk(y, {32'h0, es}, "ADDF rm"); chkf(fe, "ADDF rm");
        op = FPU_SUB; #1;
        es = d2sr(zfix($realtobits(ra - rb), s2d(a[31:0]), s2d({~b[31], b[30:0]}), rm), rm, fe);
        chk(y, {32'h0, es}, "SUBF rm"); chkf(fe, "SUBF rm");
      end
      // conversions to single
      dbl = 1;
      a = rnd_d((n % 2 == 0) ? 40 : 300);
      op = FPU_CVTD2F; #1;
      es = d2sr(a, rm, fe);
      chk(y, {32'h0, es}, "CVTD2F rm"); chkf(fe, "CVTD2F rm");
      ia = int'($urandom);
      a = {32'h0, 32'(ia)};
      op = FPU_CVTI2F; #1;
      es = d2sr($realtobits(real'(ia)), rm, fe);
      chk(y, {32'h0, es}, "CVTI2F rm"); chkf(fe, "CVTI2F rm");
      // conversions to integer always truncate
      a = rnd_d(25);
      op = FPU_CVTD2I; #1; chk(y, {32'h0, 32'($rtoi(r64(a)))}, "CVTD2I rm");
      chkf({4'b0, real'($rtoi(r64(a))) != r64(a)}, "CVTD2I rm");
    end

    // double precision in the directed modes: properties
    dbl = 1;
    for (int n = 0; n < 6000; n++) begin
      a = rnd_d((n % 4 == 0) ? 1100 : 60);
      b = rnd_d((n % 4 == 0) ? 1100 : 60);
      if (n % 5 == 0) begin a[26:0] = '0; b[26:0] = '0; end   // exact products
      for (int k = 0; k < 3; k++) begin
        op = (k == 0) ? FPU_MUL : (k == 1) ? FPU_ADD : FPU_DIV;
        rm = 2'd0; #1; rn_ = y; fn_ = flags;
        rm = 2'd1; #1; rz_ = y; fz_ = flags;
        rm = 2'd2; #1; ru_ = y; fu_ = flags;
        rm = 2'd3; #1; rd_ = y; fd_ = flags;
        ra = r64(a); rb = r64(b);
        rr = (k == 0) ? ra * rb : (k == 1) ? ra + rb : ra / rb;
        checks += 4;
        if (rn_ !== $realtobits(rr)) begin
          failures++; if (failures < 20) $display("FAIL RN op%0d a=%h b=%h got %h", k, a, b, rn_);
        end
        if (fn_[0] !== fz_[0] || fn_[0] !== fu_[0] || fn_[0] !== fd_[0]) begin
          failures++; if (failures < 20) $display("FAIL inexact differs op%0d a=%h b=%h", k, a, b);
        end
        if (!fn_[0]) begin
          if (!(rz_ === rn_ && ru_ === rn_ && (rd_ === rn_ || (k == 1 && rn_[62:0] == 0)))) begin
            failures++; if (failures < 20) $display("FAIL exact op%0d a=%h b=%h", k, a, b);
          end
        end else begin
          if (!((rn_[63] ? (ru_ == rd_ - 1) : (ru_ == rd_ + 1)) &&
                (rn_ === ru_ || rn_ === rd_) && rz_ === (rn_[63] ? ru_ : rd_))) begin
            failures++;
            if (failures < 20) $display("FAIL directed op%0d a=%h b=%h rn=%h rz=%h ru=%h rd=%h",
                                        k, a, b, rn_, rz_, ru_, rd_);
          end
        end
        if (k == 0 && n % 5 == 0 && int'(a[62:52]) + int'(b[62:52]) > 1023 + 100 &&
            int'(a[62:52]) + int'(b[62:52]) < 1023 + 1900 && fn_[0]) begin
          failures++; $display("FAIL product of short significands inexact a=%h b=%h", a, b);
        end
        if (fn_[2] !== (rn_[62:52] == 11'h7FF)) begin
          failures++; if (failures < 20) $display("FAIL overflow flag op%0d a=%h b=%h", k, a, b);
        end
        if (fn_[1] && !fn_[0]) begin
          failures++; if (failures < 20) $display("FAIL underflow without inexact");
        end
        if (fn_[0] && rn_[62:52] == 0 && !fn_[1]) begin
          failures++; if (failures < 20) $display("FAIL tiny inexact without underflow");
        end
      end
    end

    // special values: flags and mode-dependent results
    rm = 2'd0; dbl = 1;
    a = 64'h7FF0_0000_0000_0000; b = 64'hFFF0_0000_0000_0000;
    op = FPU_ADD; #1; chkf(5'b10000, "inf-inf");
    a = 64'h0; b = 64'h7FF0_0000_0000_0000;
    op = FPU_MUL; #1; chkf(5'b10000, "0*inf");
    a = 64'h3FF0_0000_0000_0000; b = 64'h0;
    op = FPU_DIV; #1; chkf(5'b01000, "1/0");
    a = 64'h0;
    op = FPU_DIV; #1; chkf(5'b10000, "0/0");
    a = DNAN; b = 64'h3FF0_0000_0000_0000;
    op = FPU_EQ;  #1; chkf(5'b00000, "EQ nan");
    op = FPU_LT;  #1; chkf(5'b10000, "LT nan");
    op = FPU_ADD; #1; chk(y, DNAN, "nan+1"); chkf(5'b00000, "nan+1");
    a = 64'h7FE0_0000_0000_0000; b = 64'h4000_0000_0000_0000;
    op = FPU_MUL; #1; chk(y, 64'h7FF0_0000_0000_0000, "ovf rn"); chkf(5'b00101, "ovf rn");
    rm = 2'd1; #1; chk(y, 64'h7FEF_FFFF_FFFF_FFFF, "ovf rz");
    rm = 2'd3; #1; chk(y, 64'h7FEF_FFFF_FFFF_FFFF, "ovf rd");
    rm = 2'd2; #1; chk(y, 64'h7FF0_0000_0000_0000, "ovf ru");
    a[63] = 1'b1; #1; chk(y, 64'hFFEF_FFFF_FFFF_FFFF, "-ovf ru");
    a = 64'h3FF0_0000_0000_0000; b = 64'hBFF0_0000_0000_0000;
    op = FPU_ADD; rm = 2'd3; #1; chk(y, 64'h8000_0000_0000_0000, "1+-1 rd");
    rm = 2'd2; #1; chk(y, 64'h0, "1+-1 ru");
    a = 64'h0; b = 64'h8000_0000_0000_0000;
    rm = 2'd3; #1; chk(y, 64'h8000_0000_0000_0000, "0+-0 rd");
    rm = 2'd0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
