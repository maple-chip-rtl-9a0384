// maple_fp_round: normalise, round and pack one IEEE 754 result.
//
// Takes an unnormalised magnitude v, a sign and the biased exponent that
// the value would have if bit VW-1 of v were its leading one; it shifts v
// left to its leading one, rounds to MW fraction bits in the rounding mode
// rm (0 nearest even, 1 toward zero, 2 toward +inf, 3 toward -inf, the four
// IEEE 754 modes), and packs sign, exponent and fraction.
// A result below the smallest normal number is shifted right to the
// denormal position before rounding (gradual underflow), and may round up
// into the smallest normal number. A result that overflows becomes
// infinity, or the largest finite number when the mode rounds toward zero
// from it. is_nan and is_inf override the value: NaN is returned as the
// quiet NaN with only the top fraction bit set. Flags: inexact (bits were
// lost), overflow, and underflow (tiny before rounding and inexact).
// Purely combinational; VW must be at least MW+3.
module maple_fp_round #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23,
  parameter int unsigned VW = 56
) (
  input  logic                    sign,
  input  logic signed [EW+5:0]    exp,
  input  logic [VW-1:0]           v,
  input  logic                    is_nan,
  input  logic                    is_inf,
  input  logic [1:0]              rm,
  output logic [EW+MW:0]          y,
  output logic                    inexact,
  output logic                    overflow,
  output logic                    underflow
);
  localparam logic signed [EW+5:0] EMAX = (EW+6)'((1 << EW) - 1);

  function automatic int unsigned clz(input logic [VW-1:0] x);
    int unsigned n = VW;
    for (int i = 0; i < VW; i++) if (x[i]) n = VW - 1 - i;
    return n;
  endfunction

  logic [VW-1:0]         n, n2, lost;
  logic signed [EW+5:0]  e1, e2;
  logic [MW:0]           keep;
  logic                  g, rest, up, tiny_sticky, tiny, ovf, to_max;
  logic [MW+1:0]         r;
  logic [MW-1:0]         frac;
  int unsigned           lz, sh;

  always_comb begin
    lz   = clz(v);
    n    = v << lz;
    e1   = exp - (EW+6)'(lz);
    // below the normal range: move to the denormal position (exponent 1)
    tiny = (e1 < 1);
    if (e1 < 1) begin
      sh = (int'(1) - int'(e1) >= int'(VW)) ? VW : int'(1) - int'(e1);
      e1 = 1;
    end else begin
      sh = 0;
    end
    if (sh >= VW) begin
      n2          = '0;
      tiny_sticky = (n != '0);
    end else begin
      n2          = n >> sh;
      lost        = n & ((VW'(1) << sh) - 1);
      tiny_sticky = (lost != '0);
    end
    keep = n2[VW-1 -: MW+1];
    g    = n2[VW-MW-2];
    rest = (|n2[VW-MW-3:0]) | tiny_sticky;
    unique case (rm)
      2'd0:    up = g & (rest | keep[0]);
      2'd1:    up = 1'b0;
      2'd2:    up = !sign & (g | rest);
      default: up =  sign & (g | rest);
    endcase
    r    = {1'b0, keep} + (MW+2)'(up);
    if (r[MW+1]) begin
      e2   = e1 + 1;
      frac = r[MW:1];
    end else if (r[MW]) begin
      e2   = e1;
      frac = r[MW-1:0];
    end else begin            // denormal (or zero after underflow)
      e2   = 0;
      frac = r[MW-1:0];
    end
    ovf    = !is_nan && !is_inf && v != '0 && e2 >= EMAX;
    to_max = (rm == 2'd1) || (rm == 2'd2 && sign) || (rm == 2'd3 && !sign);
    if (is_nan)       y = {1'b0, {EW{1'b1}}, 1'b1, {(MW-1){1'b0}}};
    else if (is_inf)  y = {sign, {EW{1'b1}}, {MW{1'b0}}};
    else if (ovf)     y = to_max ? {sign, {(EW-1){1'b1}}, 1'b0, {MW{1'b1}}}
                                 : {sign, {EW{1'b1}}, {MW{1'b0}}};
    else if (v == '0) y = {sign, {(EW+MW){1'b0}}};
    else              y = {sign, e2[EW-1:0], frac};
    overflow  = ovf;
    inexact   = !is_nan && !is_inf && v != '0 && (g || rest || ovf);
    underflow = !is_nan && !is_inf && v != '0 && tiny && (g || rest);
  end
endmodule
