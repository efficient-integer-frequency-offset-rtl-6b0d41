// tb_argmax: checks the sequential maximum search, for both magnitude
// measures.
//
// Random sets of eight complex values (some with forced ties and extreme
// values) are scanned; idx must be the first entry with the largest
// |Re|+|Im| (or Re^2+Im^2 for the second instance), best its magnitude,
// and done must come exactly 9 cycles after start.
module tb_argmax;
  localparam int VW = 9;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [7:0][VW-1:0] v_re, v_im;
  logic busy1, done1, busy2, done2;
  logic [2:0] idx1, idx2;
  logic [VW:0] best1;
  logic [2*VW:0] best2;
  int checks = 0, failures = 0;
  longint cyc = 0;

  argmax #(.VW(VW), .NV(8), .SQ_MAG(1'b0)) dut (
    .clk, .rst_n, .start, .v_re, .v_im, .busy(busy1), .done(done1), .idx(idx1), .best(best1));
  argmax #(.VW(VW), .NV(8), .SQ_MAG(1'b1)) dut_sq (
    .clk, .rst_n, .start, .v_re, .v_im, .busy(busy2), .done(done2), .idx(idx2), .best(best2));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int re [8], im [8];
    longint m1, m2, b1, b2;
    int i1, i2;
    longint t0;
    v_re = '0; v_im = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < 8; j++) begin
        re[j] = int'($urandom % (2**VW)) - 2**(VW-1);
        im[j] = int'($urandom % (2**VW)) - 2**(VW-1);
        if (t % 5 == 1) begin re[j] = int'($urandom % 7) - 3; im[j] = int'($urandom % 7) - 3; end
      end
      if (t == 2) begin re = '{default: -256}; im = '{default: -256}; end
      b1 = -1; b2 = -1; i1 = 0; i2 = 0;
      for (int j = 0; j < 8; j++) begin
        v_re[j] = VW'(re[j]);
        v_im[j] = VW'(im[j]);
        m1 = ((re[j] < 0) ? -re[j] : re[j]) + ((im[j] < 0) ? -im[j] : im[j]);
        m2 = longint'(re[j]) * re[j] + longint'(im[j]) * im[j];
        if (m1 > b1) begin b1 = m1; i1 = j; end
        if (m2 > b2) begin b2 = m2; i2 = j; end
      end
      @(negedge clk);
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      while (!done1) @(negedge clk);
      check(cyc - t0 == 9, $sformatf("latency %0d", cyc - t0));
      check(done2, "both instances finish together");
      check(int'(idx1) == i1 && longint'(best1) == b1, $sformatf("L1: idx %0d best %0d, expected %0d %0d", idx1, best1, i1, b1));
      check(int'(idx2) == i2 && longint'(best2) == b2, $sformatf("sq: idx %0d best %0d, expected %0d %0d", idx2, best2, i2, b2));
      @(negedge clk);
      check(!busy1 && !done1, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
