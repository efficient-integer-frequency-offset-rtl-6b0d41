// tb_ml_mac: checks the multiplierless complex MAC exhaustively.
//
// Every Q1.F sample P, every coefficient U with parts in {-1,0,+1} and a
// spread of accumulator values V are applied; the output must equal
// V + U*P computed with integer multiplication, wrapped to VW bits.
module tb_ml_mac;
  import ifo_pkg::*;
  localparam int F = 2;
  localparam int VW = F + 7;
  logic signed [F:0] p_re, p_im;
  coef_t u;
  logic signed [VW-1:0] v_re_in, v_im_in, v_re_out, v_im_out;
  int checks = 0, failures = 0;

  ml_mac #(.F(F), .VW(VW)) dut (.*);

  function automatic int wrapv(int v);
    logic signed [VW-1:0] t;
    t = VW'(v);
    return int'(t);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pr = -(2**F); pr < 2**F; pr++)
      for (int pi = -(2**F); pi < 2**F; pi++)
        for (int ur = -1; ur <= 1; ur++)
          for (int ui = -1; ui <= 1; ui++)
            for (int t = 0; t < 4; t++) begin
              int vr, vi;
              vr = int'($urandom % (2**VW)) - 2**(VW-1);
              vi = int'($urandom % (2**VW)) - 2**(VW-1);
              if (t == 0) begin vr = 0; vi = 0; end
              p_re = (F+1)'(pr); p_im = (F+1)'(pi);
              u.re = 2'(ur); u.im = 2'(ui);
              v_re_in = VW'(vr); v_im_in = VW'(vi);
              #1;
              checks++;
              if (int'(v_re_out) != wrapv(vr + ur * pr + ui * pi) ||
                  int'(v_im_out) != wrapv(vi + ur * pi - ui * pr)) begin
                failures++;
                $display("FAIL P=(%0d,%0d) U=(%0d,%0d) V=(%0d,%0d) -> (%0d,%0d)",
                         pr, pi, ur, ui, vr, vi, v_re_out, v_im_out);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
