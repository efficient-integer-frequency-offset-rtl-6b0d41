// tb_pk_gen: checks the differential product P_k = conj(Y_{k-2}) Y_k.
//
// Random Q1.15 samples (including full-scale values that force
// saturation) are streamed with random idle cycles. For every valid input
// the registered output one cycle later must equal the product computed
// here with plain 64-bit arithmetic, shifted to Q1.15 and saturated, and
// p4_re/p4_im must be its top F+1 bits.
module tb_pk_gen;
  localparam int F = 2;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [15:0] in_re = '0, in_im = '0;
  logic p_valid;
  logic signed [15:0] p_re, p_im;
  logic signed [F:0] p4_re, p4_im;
  int checks = 0, failures = 0;

  pk_gen #(.F(F)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    longint hre[$], him[$];
    longint er, ei;
    int n_sat = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    hre.push_back(0); him.push_back(0);
    hre.push_back(0); him.push_back(0);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // output of the previous valid sample is visible now
      if (p_valid) begin
        er = sat((hre[hre.size()-3] * hre[hre.size()-1] + him[him.size()-3] * him[him.size()-1]) >>> 15);
        ei = sat((hre[hre.size()-3] * him[him.size()-1] - him[hre.size()-3] * hre[hre.size()-1]) >>> 15);
        if (er == 32767 || er == -32768 || ei == 32767 || ei == -32768) n_sat++;
        checks++;
        if (longint'(p_re) != er || longint'(p_im) != ei ||
            longint'(p4_re) != (er >>> (15 - F)) || longint'(p4_im) != (ei >>> (15 - F))) begin
          failures++;
          $display("FAIL %0d: P=(%0d,%0d) P4=(%0d,%0d) expected (%0d,%0d)", i, p_re, p_im, p4_re, p4_im, er, ei);
        end
      end
      in_valid = ($urandom % 4) != 0;
      if (i % 10 == 0) begin
        in_re = ($urandom % 2) ? 16'sh7fff : 16'sh8000;
        in_im = ($urandom % 2) ? 16'sh7fff : 16'sh8000;
      end else begin
        in_re = 16'($urandom);
        in_im = 16'($urandom);
      end
      if (in_valid) begin
        hre.push_back(longint'(in_re));
        him.push_back(longint'(in_im));
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
