// tb_ifo_comp: checks the sub-carrier reordering compensator.
//
// Random symbols are streamed with a random shift (0..28) per symbol,
// random idle gaps between symbols (including none) and, in some symbols,
// idle cycles inside. A scoreboard expects every symbol rotated back by the
// shift in force: output sub-carrier k is input position (k + shift) mod N,
// with out_sop on k = 0. The shift in force is the requested one unless
// the previous symbol's held samples still leaving (shift - gap) outnumber
// it, in which case the previous shift is kept and deferred must pulse.
// Also checked: sub-carrier 0 leaves one cycle after input position shift
// when the stream has no gaps.
module tb_ifo_comp;
  localparam int N = 256;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_sop = 1'b0;
  logic signed [15:0] in_re = '0, in_im = '0;
  logic [2:0] shift_idx = '0;
  logic out_valid, out_sop, deferred;
  logic signed [15:0] out_re, out_im;
  int checks = 0, failures = 0;

  ifo_comp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int exp_re[$], exp_im[$];
  bit exp_sop[$];
  longint cyc = 0, t_sop_exp = -1;
  int n_defer = 0, exp_defer = 0, n_timed = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (deferred) n_defer++;
    if (rst_n && out_valid) begin
      if (exp_re.size() == 0) check(1'b0, "unexpected output");
      else begin
        int er, ei;
        bit es;
        er = exp_re.pop_front(); ei = exp_im.pop_front(); es = exp_sop.pop_front();
        check(int'(out_re) == er && int'(out_im) == ei && out_sop == es,
              $sformatf("out (%0d,%0d,%0d) expected (%0d,%0d,%0d)", out_re, out_im, out_sop, er, ei, es));
        if (out_sop && t_sop_exp >= 0) begin
          check(cyc == t_sop_exp, $sformatf("sop at %0d expected %0d", cyc, t_sop_exp));
          n_timed++;
          t_sop_exp = -1;
        end
      end
    end
  end

  initial begin
    int prev = 0, g, req, rem, used, gap_pct;
    longint last_end = -1000;
    int y_re [N], y_im [N];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 300; s++) begin
      g = (s % 3 == 0) ? 0 : int'($urandom % 40);
      gap_pct = (s % 7 == 3) ? 20 : 0;
      req = int'($urandom % 8);
      repeat (g) begin
        @(negedge clk);
        in_valid = 1'b0; in_sop = 1'b0;
      end
      for (int k = 0; k < N; k++) begin
        y_re[k] = int'($urandom % 65536) - 32768;
        y_im[k] = int'($urandom % 65536) - 32768;
      end
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        while (k > 0 && gap_pct > 0 && int'($urandom % 100) < gap_pct) begin
          in_valid = 1'b0; in_sop = 1'b0;
          @(negedge clk);
        end
        if (k == 0) begin
          int gg;
          gg = int'(cyc - last_end - 1);
          rem = (prev - gg > 0) ? prev - gg : 0;
          used = (4 * req < rem) ? prev : 4 * req;
          if (4 * req < rem) exp_defer++;
          for (int j = 0; j < N; j++) begin
            exp_re.push_back(y_re[(j + used) % N]);
            exp_im.push_back(y_im[(j + used) % N]);
            exp_sop.push_back(j == 0);
          end
          prev = used;
          if (gap_pct == 0) t_sop_exp = cyc + used + 1;
          shift_idx = 3'(req);
        end
        in_valid = 1'b1;
        in_sop = (k == 0);
        in_re = 16'(y_re[k]);
        in_im = 16'(y_im[k]);
        if (k == N - 1) last_end = cyc;
      end
    end
    @(negedge clk);
    in_valid = 1'b0; in_sop = 1'b0;
    repeat (50) @(negedge clk);
    check(exp_re.size() == 0, $sformatf("%0d outputs missing", exp_re.size()));
    check(n_defer == exp_defer, $sformatf("deferred %0d expected %0d", n_defer, exp_defer));
    check(exp_defer > 0, "deferral exercised");
    check(n_timed > 0, "sop timing exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
