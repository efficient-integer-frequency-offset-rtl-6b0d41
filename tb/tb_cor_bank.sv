// tb_cor_bank: checks the four-entry correlation accumulator bank.
//
// Random writes, selects and clears are applied; rdata must show the
// selected entry of a model, the writes must land only in the selected
// entry, and clear must zero all four.
module tb_cor_bank;
  localparam int VW = 9;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, we = 1'b0;
  logic [1:0] sel = '0;
  logic signed [VW-1:0] wdata_re = '0, wdata_im = '0, rdata_re, rdata_im;
  logic signed [3:0][VW-1:0] v_re, v_im;
  int checks = 0, failures = 0;
  int mre [4], mim [4];

  cor_bank #(.VW(VW), .NV(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_clr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    mre = '{default: 0};
    mim = '{default: 0};
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      clr = ($urandom % 50) == 0;
      we  = ($urandom % 3) != 0;
      sel = 2'($urandom);
      wdata_re = VW'($urandom);
      wdata_im = VW'($urandom);
      #1;
      checks++;
      if (int'(rdata_re) != mre[sel] || int'(rdata_im) != mim[sel]) begin
        failures++;
        $display("FAIL read %0d", sel);
      end
      if (clr) begin
        mre = '{default: 0};
        mim = '{default: 0};
        n_clr++;
      end else if (we) begin
        mre[sel] = int'(wdata_re);
        mim[sel] = int'(wdata_im);
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'($signed(v_re[i])) != mre[i] || int'($signed(v_im[i])) != mim[i]) begin
          failures++;
          $display("FAIL entry %0d", i);
        end
      end
    end
    checks++;
    if (n_clr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
