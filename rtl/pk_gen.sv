// pk_gen: differential product of received sub-carriers two apart.
//
// For every valid FFT output sample Y_k it forms P_k = conj(Y_{k-2}) * Y_k,
// the correlation of two consecutive even-indexed pilots. Two sample delays
// hold Y_{k-1} and Y_{k-2}; the complex product uses three real multipliers
// (the estimator spends three multipliers on this product); the result is
// scaled back to Q1.15, saturated to PW bits and registered. The correlators
// only use the F+1 most significant bits P_k[PW-1 : PW-1-F] (format Q1.F),
// which are brought out as p4_re/p4_im.
//
// Interface: in_valid/in_re/in_im carry one sample per valid cycle (Q1.15 by
// default). p_valid/p_re/p_im follow one cycle after the sample that produced
// them; p4_re/p4_im are the truncated copy of the same register.
// The 3-multiplier form, the 16-bit P_k and the MSB truncation follow the
// described architecture; the input format, the x2^-15 rescaling and the
// saturation are this design's choices.
module pk_gen #(
  parameter int unsigned YW = 16,  // input sample width (Q1.YW-1)
  parameter int unsigned PW = 16,  // width of P_k (Q1.PW-1)
  parameter int unsigned F  = 2    // fractional bits kept in P_4k
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [YW-1:0] in_re,
  input  logic signed [YW-1:0] in_im,
  output logic                 p_valid,
  output logic signed [PW-1:0] p_re,
  output logic signed [PW-1:0] p_im,
  output logic signed [F:0]    p4_re,
  output logic signed [F:0]    p4_im
);

  localparam int unsigned MW = 2*YW + 4;   // wide enough for every product/sum

  logic signed [YW-1:0] d1_re, d1_im, d2_re, d2_im;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d1_re <= '0; d1_im <= '0; d2_re <= '0; d2_im <= '0;
    end else if (in_valid) begin
      d1_re <= in_re; d1_im <= in_im;
      d2_re <= d1_re; d2_im <= d1_im;
    end
  end

  // (x + jy)(u + jv) with x + jy = conj(Y_{k-2}), u + jv = Y_k:
  //   k1 = u(x+y), k2 = x(v-u), k3 = y(u+v); re = k1 - k3, im = k1 + k2
  logic signed [MW-1:0] x, y, u, v, k1, k2, k3, prod_re, prod_im;
  always_comb begin
    x  = MW'(d2_re);
    y  = -MW'(d2_im);
    u  = MW'(in_re);
    v  = MW'(in_im);
    k1 = u * (x + y);
    k2 = x * (v - u);
    k3 = y * (u + v);
    prod_re = k1 - k3;
    prod_im = k1 + k2;
  end

  // Q2.30-style product back to Q1.(PW-1), with saturation.
  function automatic logic signed [PW-1:0] scale_sat(input logic signed [MW-1:0] a);
    logic signed [MW-1:0] s;
    s = a >>> (2*(YW-1) - (PW-1));
    if (s > MW'((2**(PW-1)) - 1))       return {1'b0, {(PW-1){1'b1}}};
    else if (s < -MW'(2**(PW-1)))       return {1'b1, {(PW-1){1'b0}}};
    else                                return s[PW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_re    <= '0;
      p_im    <= '0;
    end else begin
      p_valid <= in_valid;
      if (in_valid) begin
        p_re <= scale_sat(prod_re);
        p_im <= scale_sat(prod_im);
      end
    end
  end

  assign p4_re = p_re[PW-1 -: F+1];
  assign p4_im = p_im[PW-1 -: F+1];

endmodule
