// tb_ifo_estimator: self-checking test of the folded IFO estimator.
//
// Loads the 64 shared pilot entries for a random QPSK preamble, then sends
// received preambles with a random cyclic shift eps' in {0,4,..,28}, a
// random common phase, a residual-timing phase ramp and, in some trials,
// noise and idle gaps in the stream. Each estimate is compared with an
// independent evaluation of the correlation metric (tb_ofdm_pkg); noise-free
// trials must also find the true shift. Several preambles follow each other
// without reloading, which only works if PilReg returns to its loaded
// position after every estimation. Also checked: the MAC works for
// exactly 4 x 50 = 200 cycles per estimate, and the estimate comes 15
// cycles after the last used pilot (sub-carrier 252) entered.
module tb_ifo_estimator;
  import ifo_pkg::*;
  import tb_ofdm_pkg::*;

  localparam int F = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_sop = 1'b0, in_preamble = 1'b0;
  logic signed [15:0] in_re = '0, in_im = '0;
  logic pil_we = 1'b0, pil_side = 1'b0;
  logic [4:0] pil_addr = '0;
  coef_t pil_data = '0;
  logic busy, missed, est_valid;
  logic [2:0] est_idx;
  logic signed [5:0] est_ifo;

  int checks = 0, failures = 0;
  int mac_cycles = 0;
  longint cyc = 0, t252 = 0, t_est = 0;

  ifo_estimator #(.F(F)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_ctrl.mac_en) mac_cycles <= mac_cycles + 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  cplx_t x[NSC], y[NSC];

  task automatic load_pilots();
    for (int s = 0; s < 2; s++)
      for (int e = 0; e < 32; e++) begin
        cplx_t u;
        u = pil_entry(x, s, e);
        @(negedge clk);
        pil_we = 1'b1;
        pil_side = 1'(s);
        pil_addr = 5'(e);
        pil_data.re = 2'(u.re);
        pil_data.im = 2'(u.im);
      end
    @(negedge clk);
    pil_we = 1'b0;
  endtask

  task automatic send_symbol(bit pre, int gap_pct);
    for (int k = 0; k < NSC; k++) begin
      @(negedge clk);
      while (gap_pct > 0 && int'($urandom % 100) < gap_pct) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_sop = (k == 0);
      in_preamble = pre && (k == 0);
      in_re = 16'(y[k].re);
      in_im = 16'(y[k].im);
      if (k == 252) t252 = cyc;
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_sop = 1'b0;
    in_preamble = 1'b0;
  endtask

  initial begin
    longint vre[8], vim[8];
    int eps, ref_idx, noise, gap;
    real ph, tau;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int pset = 0; pset < 3; pset++) begin
      gen_preamble(x, 19660);      // about 0.6 in Q1.15
      load_pilots();
      for (int t = 0; t < 12; t++) begin
        eps   = 4 * int'($urandom % 8);
        ph    = 6.2831853 * ($urandom % 1000) / 1000.0;
        tau   = (t % 3 == 0) ? 0.0 : real'($urandom % 9);
        noise = (t % 2 == 0) ? 0 : 2000 + int'($urandom % 12000);
        gap   = (t % 4 == 3) ? 30 : 0;
        make_rx(y, x, eps, ph, tau, noise);
        ref_corr(y, x, F, vre, vim);
        ref_idx = ref_argmax(vre, vim);
        mac_cycles = 0;
        send_symbol(1'b1, gap);
        while (!est_valid) @(negedge clk);
        t_est = cyc;
        check(est_idx == 3'(ref_idx),
              $sformatf("set %0d trial %0d: est %0d, model %0d", pset, t, est_idx, ref_idx));
        check(est_ifo == 6'(4 * int'(est_idx) - 12), "est_ifo = 4*idx-12");
        for (int j = 0; j < 8; j++) begin
          logic signed [F+6:0] hre, him;
          if (j < 4) begin
            hre = dut.u_cor1.v_re[j]; him = dut.u_cor1.v_im[j];
          end else begin
            hre = dut.u_cor2.v_re[j-4]; him = dut.u_cor2.v_im[j-4];
          end
          check(longint'(hre) == vre[j] && longint'(him) == vim[j],
                $sformatf("V[%0d] = (%0d,%0d), model (%0d,%0d)", j, hre, him, vre[j], vim[j]));
        end
        if (noise == 0)
          check(est_idx == 3'(eps / 4), $sformatf("noise-free: est %0d, true %0d", est_idx, eps / 4));
        if (gap == 0)
          check(t_est - t252 == 15, $sformatf("latency %0d", t_est - t252));
        @(negedge clk);
        check(mac_cycles == 200, $sformatf("MAC cycles %0d", mac_cycles));
        while (busy) @(negedge clk);
      end
    end
    // a data symbol (no preamble flag) must not start an estimation
    send_symbol(1'b0, 0);
    check(!busy && !est_valid, "data symbol ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
