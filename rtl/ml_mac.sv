// ml_mac: multiplierless complex multiply-accumulate of one correlator.
//
// Computes V_out = V_in + U * P, where P = P_4k is a short Q1.F sample and
// U is a normalised known-pilot correlation whose real and imaginary parts
// are each -1, 0 or +1. Each "multiplication" is therefore a select of
// +P, -P or 0, and the complex product reduces to
//   Re{V} += Re{U}Re{P} + Im{U}Im{P}
//   Im{V} += Re{U}Im{P} - Im{U}Re{P}
// i.e. the product with conj-free sign bookkeeping as in the described
// multiplierless MAC. Purely combinational: the accumulator registers live
// in cor_bank. V is Q7.F (VW = F + 7 bits) and wraps on overflow; with
// 50 pilots and U on the axes |V| stays below 50, inside the Q7 range.
module ml_mac
  import ifo_pkg::*;
#(
  parameter int unsigned F  = 2,      // fractional bits of P and V
  parameter int unsigned VW = F + 7   // accumulator width (Q7.F)
) (
  input  logic signed [F:0]    p_re,
  input  logic signed [F:0]    p_im,
  input  coef_t                u,
  input  logic signed [VW-1:0] v_re_in,
  input  logic signed [VW-1:0] v_im_in,
  output logic signed [VW-1:0] v_re_out,
  output logic signed [VW-1:0] v_im_out
);

  // Ternary times a value: c in {-1,0,+1}.
  function automatic logic signed [VW-1:0] tmul(input logic signed [1:0] c,
                                                input logic signed [F:0]  a);
    case (c)
      2'sb01:  return VW'(a);
      2'sb11:  return -VW'(a);
      default: return '0;
    endcase
  endfunction

  always_comb begin
    v_re_out = v_re_in + tmul(u.re, p_re) + tmul(u.im, p_im);
    v_im_out = v_im_in + tmul(u.re, p_im) - tmul(u.im, p_re);
  end

endmodule
