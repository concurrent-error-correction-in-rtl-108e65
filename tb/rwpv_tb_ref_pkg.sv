// rwpv_tb_ref_pkg: reference functions for the testbenches, written from the published
// function table of the 74181-type ALU (active-high data), independently of the RTL's
// x/y formulation. Values are carried in 128-bit vectors and cut to w bits.
package rwpv_tb_ref_pkg;

  function automatic logic [127:0] mask_w(input int w);
    return (w >= 128) ? '1 : ((128'(1) << w) - 128'(1));
  endfunction

  // F of an w-bit ALU built from 74181-type cells, for select s, mode m and
  // active-high carry in cin (cin = ~Cn).
  function automatic logic [127:0] alu_ref(input logic [127:0] a, input logic [127:0] b,
                                           input logic [3:0] s, input logic m,
                                           input logic cin, input int w);
    logic [127:0] mk, f, ci;
    mk = mask_w(w);
    a  = a & mk;
    b  = b & mk;
    ci = {127'(0), cin};
    if (m) begin
      case (s)
        4'b0000: f = ~a;
        4'b0001: f = ~(a | b);
        4'b0010: f = ~a & b;
        4'b0011: f = '0;
        4'b0100: f = ~(a & b);
        4'b0101: f = ~b;
        4'b0110: f = a ^ b;
        4'b0111: f = a & ~b;
        4'b1000: f = ~a | b;
        4'b1001: f = ~(a ^ b);
        4'b1010: f = b;
        4'b1011: f = a & b;
        4'b1100: f = '1;
        4'b1101: f = a | ~b;
        4'b1110: f = a | b;
        default: f = a;
      endcase
    end else begin
      case (s)
        4'b0000: f = a + ci;
        4'b0001: f = (a | b) + ci;
        4'b0010: f = (a | (~b & mk)) + ci;
        4'b0011: f = ci - 128'(1);
        4'b0100: f = a + (a & ~b) + ci;
        4'b0101: f = (a | b) + (a & ~b) + ci;
        4'b0110: f = a - b - 128'(1) + ci;
        4'b0111: f = (a & ~b) - 128'(1) + ci;
        4'b1000: f = a + (a & b) + ci;
        4'b1001: f = a + b + ci;
        4'b1010: f = (a | (~b & mk)) + (a & b) + ci;
        4'b1011: f = (a & b) - 128'(1) + ci;
        4'b1100: f = a + a + ci;
        4'b1101: f = (a | b) + a + ci;
        4'b1110: f = (a | (~b & mk)) + a + ci;
        default: f = a - 128'(1) + ci;
      endcase
    end
    return f & mk;
  endfunction

  // Active-high carry out of the w-bit arithmetic functions whose carry is the plain
  // unsigned carry of an addition: A plus B, A plus A, A minus B minus 1 (A + ~B),
  // A (A + 0) and A minus 1 (A + all ones). known is 0 for every other function.
  function automatic logic alu_carry(input logic [127:0] a, input logic [127:0] b,
                                     input logic [3:0] s, input logic cin, input int w,
                                     output logic known);
    logic [127:0] mk, x, y, sum;
    mk    = mask_w(w);
    known = 1'b1;
    x     = a & mk;
    case (s)
      4'b1001: y = b & mk;
      4'b1100: y = a & mk;
      4'b0110: y = ~b & mk;
      4'b0000: y = '0;
      4'b1111: y = mk;
      default: begin y = '0; known = 1'b0; end
    endcase
    sum = x + y + {127'(0), cin};
    return (w >= 128) ? 1'b0 : sum[w];
  endfunction

endpackage
