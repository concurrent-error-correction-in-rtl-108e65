// rwpv_alu4: 4-bit arithmetic logic unit with the function of a 74LS181 (active-high
// data convention), the unit cell of the "fast ALU" iterative circuit.
//
// How it works: per bit the select lines S[3:0] form two terms
//   x = a | (b & S0) | (~b & S1)        (propagate-like term)
//   y = (a & b & S3) | (a & ~b & S2)    (generate-like term, y implies x)
// In arithmetic mode (m = 0) the result is x + y + carry-in: the sum bit is x^y^c and
// the carries come from two-level lookahead over (y, x). In logic mode (m = 1) the
// carries are inhibited and f = ~(x ^ y). Together these give the 16 logic and 16
// arithmetic functions of the part (e.g. S=1001, m=0: a plus b; S=0110, m=0: a minus b
// minus 1; S=0110, m=1: a xor b).
// Carry polarity follows the part: cn_n is the active-low carry in and cn4_n the
// active-low carry out, so cells chain by wiring cn4_n of one cell to cn_n of the
// next. p_n and g_n are the active-low group propagate and generate; aeqb is high when
// all four f bits are 1 (the part's open-collector A=B output, here a plain output).
// Interface: a, b, s, m primary inputs; cn_n secondary input; f primary output;
// cn4_n secondary output. Combinational.
module rwpv_alu4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] s,
  input  logic       m,
  input  logic       cn_n,
  output logic [3:0] f,
  output logic       cn4_n,
  output logic       p_n,
  output logic       g_n,
  output logic       aeqb
);
  logic [3:0] x, y;
  logic [4:0] c;
  logic       grp_g, grp_p;

  always_comb begin
    x = a | (b & {4{s[0]}}) | (~b & {4{s[1]}});
    y = (a & b & {4{s[3]}}) | (a & ~b & {4{s[2]}});
    c[0] = ~cn_n;
    c[1] = y[0] | (x[0] & c[0]);
    c[2] = y[1] | (x[1] & y[0]) | (x[1] & x[0] & c[0]);
    c[3] = y[2] | (x[2] & y[1]) | (x[2] & x[1] & y[0]) | (x[2] & x[1] & x[0] & c[0]);
    grp_g = y[3] | (x[3] & y[2]) | (x[3] & x[2] & y[1]) | (x[3] & x[2] & x[1] & y[0]);
    grp_p = &x;
    c[4] = grp_g | (grp_p & c[0]);
    f     = m ? ~(x ^ y) : (x ^ y ^ c[3:0]);
    cn4_n = ~c[4];
    p_n   = ~grp_p;
    g_n   = ~grp_g;
    aeqb  = &f;
  end
endmodule
