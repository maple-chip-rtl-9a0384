// maple_fp_arith: IEEE 754 add, subtract, multiply, divide and compare for
// one format (EW exponent bits, MW fraction bits).
//
// All four arithmetic operations are combinational, so the floating unit
// finishes every operation in the one EX cycle of the fixed-latency
// pipeline. Each operation builds an exact (or exact-plus-sticky) magnitude
// of VW = 2*MW+8 bits and a matching exponent and hands it to
// maple_fp_round, which rounds to nearest even. Addition aligns the smaller
// operand with a sticky bit; multiplication forms the full product of the
// significands; division normalises both significands and forms MW+7
// quotient bits plus a sticky bit from the remainder. Denormal operands
// (exponent field 0) are taken at exponent 1 without the hidden bit, and
// denormal results are produced by maple_fp_round. Infinities, zeros and NaNs
// follow IEEE 754: inf-inf, 0*inf, 0/0 and inf/inf give NaN, x/0 gives inf.
// The compare outputs (lt, eq, unordered) treat +0 and -0 as equal and any
// NaN as unordered.
// op: 0 add, 1 subtract, 2 multiply, 3 divide; rm: rounding mode as in
// maple_fp_round. flags = {invalid, divide-by-zero, overflow, underflow,
// inexact} for the arithmetic result (compare flags are set by maple_fpu).
// An exact zero sum is +0, or -0 when rounding toward -inf (IEEE 754).
module maple_fp_arith #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23
) (
  input  logic [1:0]        op,
  input  logic [EW+MW:0]    a,
  input  logic [EW+MW:0]    b,
  input  logic [1:0]        rm,
  output logic [EW+MW:0]    y,
  output logic [4:0]        flags,
  output logic              lt,
  output logic              eq,
  output logic              unordered
);
  localparam int unsigned VW   = 2*MW + 8;
  localparam int unsigned XW   = 2*MW + 6;   // aligned addend: MW+1 + MW+4 + sticky
  localparam int          BIAS = (1 << (EW-1)) - 1;
  typedef logic signed [EW+5:0] exp_t;

  logic          sa, sb, sbe;
  logic [EW-1:0] ea, eb;          // effective exponents (1 for denormals)
  logic [MW:0]   ma, mb;
  logic          za, zb, ia, ib, na, nb;

  always_comb begin
    sa = a[EW+MW];
    sb = b[EW+MW];
    za = (a[EW+MW-1:0] == '0);
    zb = (b[EW+MW-1:0] == '0);
    ia = (a[EW+MW-1:MW] == '1) && (a[MW-1:0] == '0);
    ib = (b[EW+MW-1:MW] == '1) && (b[MW-1:0] == '0);
    na = (a[EW+MW-1:MW] == '1) && (a[MW-1:0] != '0);
    nb = (b[EW+MW-1:MW] == '1) && (b[MW-1:0] != '0);
    ma = {a[EW+MW-1:MW] != '0, a[MW-1:0]};
    mb = {b[EW+MW-1:MW] != '0, b[MW-1:0]};
    ea = (a[EW+MW-1:MW] == '0) ? EW'(1) : a[EW+MW-1:MW];
    eb = (b[EW+MW-1:MW] == '0) ? EW'(1) : b[EW+MW-1:MW];
  end

  // ------------------------------------------------------------ add / sub
  logic            a_big, s_big, s_small;
  logic [EW-1:0]   e_big, e_small;
  logic [MW:0]     m_big, m_small;
  int unsigned     d;
  logic [XW-1:0]   x_big, x_small, x_full;
  logic [XW:0]     sum;
  logic            sticky;

  always_comb begin
    sbe     = sb ^ (op == 2'd1);
    a_big   = a[EW+MW-1:0] >= b[EW+MW-1:0];
    e_big   = a_big ? ea : eb;   e_small = a_big ? eb : ea;
    m_big   = a_big ? ma : mb;   m_small = a_big ? mb : ma;
    s_big   = a_big ? sa : sbe;  s_small = a_big ? sbe : sa;
    d       = int'(e_big) - int'(e_small);
    x_big   = {m_big, {(XW-MW-1){1'b0}}};
    x_full  = {m_small, {(XW-MW-1){1'b0}}};
    if (d >= XW) begin
      x_small = '0;
      sticky  = (m_small != '0);
    end else begin
      x_small = x_full >> d;
      sticky  = ((x_full & ((XW'(1) << d) - 1)) != '0);
    end
    x_small[0] = x_small[0] | sticky;
    sum = (s_big == s_small) ? {1'b0, x_big} + {1'b0, x_small}
                             : {1'b0, x_big} - {1'b0, x_small};
  end

  // ------------------------------------------------------------- multiply
  logic [2*MW+1:0] prod;
  assign prod = ma * mb;

  // --------------------------------------------------------------- divide
  // Both significands are first shifted to a leading one, so the quotient
  // of the two lies in (1/2, 2) whatever the operands.
  function automatic int unsigned clz_m(input logic [MW:0] x);
    int unsigned n = MW + 1;
    for (int i = 0; i <= MW; i++) if (x[i]) n = MW - i;
    return n;
  endfunction

  int unsigned     lza, lzb;
  logic [MW:0]     na_m, nb_m;
  logic [2*MW+6:0] dividend, quot, remd;
  always_comb begin
    lza      = clz_m(ma);
    lzb      = clz_m(mb);
    na_m     = ma << lza;
    nb_m     = mb << lzb;
    dividend = {na_m, {(MW+6){1'b0}}};
    if (nb_m != '0) begin
      quot = dividend / {{(MW+6){1'b0}}, nb_m};
      remd = dividend % {{(MW+6){1'b0}}, nb_m};
    end else begin
      quot = '0;
      remd = '0;
    end
  end

  // --------------------------------------------------- operand selection
  logic          r_sign, r_nan, r_inf, r_inv, r_dz;
  exp_t          r_exp;
  logic [VW-1:0] r_v;

  always_comb begin
    r_sign = 1'b0; r_nan = 1'b0; r_inf = 1'b0; r_exp = '0; r_v = '0;
    r_inv  = 1'b0; r_dz  = 1'b0;
    unique case (op)
      2'd0, 2'd1: begin
        r_inv = ia && ib && sa != sbe;
        if (na || nb || r_inv) r_nan = 1'b1;
        else if (ia) begin r_inf = 1'b1; r_sign = sa;  end
        else if (ib) begin r_inf = 1'b1; r_sign = sbe; end
        else if (sum == '0) r_sign = (za && zb && sa == sbe) ? sa : (rm == 2'd3);
        else begin
          r_sign = s_big;
          r_exp  = exp_t'(e_big) + 2;
          r_v    = VW'(sum);
        end
      end
      2'd2: begin
        r_sign = sa ^ sb;
        r_inv = (ia && zb) || (ib && za);
        if (na || nb || r_inv) r_nan = 1'b1;
        else if (ia || ib) r_inf = 1'b1;
        else if (!(za || zb)) begin
          r_exp = exp_t'(ea) + exp_t'(eb) - exp_t'(BIAS) + 1;
          r_v   = {prod, 6'b0};
        end
      end
      default: begin
        r_sign = sa ^ sb;
        r_inv = (ia && ib) || (za && zb);
        r_dz  = zb && !za && !ia && !na;
        if (na || nb || r_inv) r_nan = 1'b1;
        else if (ia || zb) r_inf = 1'b1;
        else if (!(ib || za)) begin
          r_exp = exp_t'(ea) - exp_t'(lza) - exp_t'(eb) + exp_t'(lzb) + exp_t'(BIAS);
          r_v   = {quot[MW+6:0], {(VW-MW-8){1'b0}}, remd != '0};
        end
      end
    endcase
  end

  logic f_nx, f_of, f_uf;
  maple_fp_round #(.EW(EW), .MW(MW), .VW(VW)) u_round (
    .sign(r_sign), .exp(r_exp), .v(r_v), .is_nan(r_nan), .is_inf(r_inf), .rm(rm),
    .y(y), .inexact(f_nx), .overflow(f_of), .underflow(f_uf)
  );
  assign flags = {r_inv, r_dz, f_of, f_uf, f_nx};

  // -------------------------------------------------------------- compare
  logic [EW+MW-1:0] mag_a, mag_b;
  logic             both_zero;
  always_comb begin
    mag_a     = a[EW+MW-1:0];
    mag_b     = b[EW+MW-1:0];
    both_zero = za && zb;
    unordered = na || nb;
    eq        = !unordered && (both_zero || (sa == sb && mag_a == mag_b));
    if (unordered || both_zero) lt = 1'b0;
    else if (sa != sb)          lt = sa;
    else if (!sa)               lt = mag_a < mag_b;
    else                        lt = mag_a > mag_b;
  end
endmodule
