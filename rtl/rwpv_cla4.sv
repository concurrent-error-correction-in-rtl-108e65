// rwpv_cla4: 4-bit binary full adder with fast (lookahead) carry, the function of a
// 74LS83, used as the unit cell of the "fast adder" iterative circuit.
//
// Each bit forms generate g = a&b and propagate p = a^b. The carries into bits 1..3 and
// the carry out are formed in two levels from g, p and c0 (carry lookahead), so no
// carry ripples inside the cell; between cells the carry ripples through c4 -> c0.
// Interface: a, b (4-bit primary inputs), c0 (secondary input, active-high carry in),
// s (4-bit primary output), c4 (secondary output, carry out). Combinational.
// The internal gate network of the part is not reproduced: this is the textbook
// lookahead form of the same function.
module rwpv_cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c0,
  output logic [3:0] s,
  output logic       c4
);
  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = c0;
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & c0);
    s  = p ^ c[3:0];
    c4 = c[4];
  end
endmodule
