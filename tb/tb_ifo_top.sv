// tb_ifo_top: end-to-end test of the IFO estimation and compensation stage
// at its default parameters (N = 256, Q1.2 correlation, 16-bit samples).
//
// A random QPSK long preamble is loaded into the known-pilot store; then a
// stream of preambles and random data symbols, all cyclically shifted by a
// "true" offset eps', is sent through the stage. Checked:
//  - every estimate equals the true offset (noise-free channel with phase
//    rotation and a residual-timing phase ramp);
//  - every output symbol equals the input symbol rotated back by the shift
//    in force at its start (a scoreboard of all output samples and sops),
//    including the rule that a smaller new shift is deferred while the
//    previous symbol's held samples are still leaving;
//  - a preamble arriving while an estimate is running is flagged missed.
// Mechanisms counted, each of which must occur at least once: estimates,
// PilReg realignment rotations, compensation flushes, zero-shift
// pass-through, maximum shift 28, deferred shift updates, missed
// preambles, idle gaps inside a symbol, back-to-back symbols, pilot reload.
module tb_ifo_top;
  import ifo_pkg::*;
  import tb_ofdm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_sop = 1'b0, in_preamble = 1'b0;
  logic signed [15:0] in_re = '0, in_im = '0;
  logic pil_we = 1'b0, pil_side = 1'b0;
  logic [4:0] pil_addr = '0;
  coef_t pil_data = '0;
  logic busy, missed, est_valid, out_valid, out_sop, deferred;
  logic [2:0] est_idx;
  logic signed [5:0] est_ifo;
  logic signed [15:0] out_re, out_im;

  ifo_top dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
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

  // ---------------- mechanism counters ----------------
  int n_est = 0, n_realign = 0, n_flush = 0, n_zero = 0, n_max = 0;
  int n_defer = 0, n_missed = 0, n_gap = 0, n_b2b = 0, n_reload = 0;

  // ---------------- model of the shift in force ----------------
  logic [2:0] model_shift = 3'd3;       // eps'/4, 12 until the first estimate
  int exp_est[$];
  always @(posedge clk) begin
    if (est_valid) begin
      n_est++;
      if (exp_est.size() == 0) check(1'b0, "unexpected estimate");
      else check(int'(est_idx) == exp_est.pop_front(), $sformatf("estimate %0d", est_idx));
      model_shift <= est_idx;
    end
    if (dut.u_est.u_ctrl.realign[0] != 0 || dut.u_est.u_ctrl.realign[1] != 0) n_realign++;
    if (deferred) n_defer++;
    if (missed) n_missed++;
  end

  // ---------------- output scoreboard ----------------
  int exp_re[$], exp_im[$];
  bit exp_sop[$];
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_re.size() == 0) check(1'b0, "unexpected output sample");
      else begin
        int er, ei;
        bit es;
        er = exp_re.pop_front();
        ei = exp_im.pop_front();
        es = exp_sop.pop_front();
        check(int'(out_re) == er && int'(out_im) == ei && out_sop == es,
              $sformatf("output (%0d,%0d,sop %0d) expected (%0d,%0d,sop %0d)",
                        out_re, out_im, out_sop, er, ei, es));
      end
    end
  end

  cplx_t x[NSC];
  longint last_end = -1000;              // cycle of the previous symbol's last sample
  int prev_used = 0;                     // shift used by the previous symbol
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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
    n_reload++;
  endtask

  // Send one symbol after 'gap' idle cycles; gap_pct adds idle cycles inside.
  task automatic send(cplx_t y[NSC], bit pre, int gap, int gap_pct, bit expect_est, int true_idx);
    int g, newsh, rem, used;
    repeat (gap) begin
      @(negedge clk);
      in_valid = 1'b0;
      in_sop = 1'b0;
      in_preamble = 1'b0;
    end
    for (int k = 0; k < NSC; k++) begin
      @(negedge clk);
      while (k > 0 && gap_pct > 0 && int'($urandom % 100) < gap_pct) begin
        in_valid = 1'b0;
        in_sop = 1'b0;
        n_gap++;
        @(negedge clk);
      end
      if (k == 0) begin
        // shift the compensator will use for this symbol
        g = int'(cyc - last_end - 1);
        newsh = 4 * int'(model_shift);
        rem = (prev_used - g > 0) ? prev_used - g : 0;
        used = (newsh < rem) ? prev_used : newsh;
        if (g == 0) n_b2b++;
        if (used == 0) n_zero++;
        if (used == MAX_SHIFT) n_max++;
        for (int j = 0; j < NSC; j++) begin
          exp_re.push_back(y[(j + used) % NSC].re);
          exp_im.push_back(y[(j + used) % NSC].im);
          exp_sop.push_back(j == 0);
        end
        prev_used = used;
        if (pre && expect_est) exp_est.push_back(true_idx);
      end
      in_valid = 1'b1;
      in_sop = (k == 0);
      in_preamble = pre && (k == 0);
      in_re = 16'(y[k].re);
      in_im = 16'(y[k].im);
      if (k == NSC - 1) last_end = cyc;
    end
  endtask

  task automatic data_sym(output cplx_t d[NSC], input int eps);
    cplx_t raw[NSC];
    for (int k = 0; k < NSC; k++) begin
      raw[k].re = int'($urandom % 40001) - 20000;
      raw[k].im = int'($urandom % 40001) - 20000;
    end
    for (int k = 0; k < NSC; k++) d[k] = raw[wrap(k - eps)];
  endtask

  task automatic preamble(output cplx_t p[NSC], input int eps);
    make_rx(p, x, eps, 6.2831853 * ($urandom % 1000) / 1000.0, real'($urandom % 9), 0);
  endtask

  always @(posedge clk) if (dut.u_comp.flushing) n_flush++;

  int exp_defer = 0, exp_missed = 0;

  initial begin
    cplx_t y[NSC];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    gen_preamble(x, 19660);
    load_pilots();
    // A: offset eps' = 20, cyclic-prefix-like gaps of 64 samples
    preamble(y, 20); send(y, 1, 64, 0, 1, 5);
    data_sym(y, 20); send(y, 0, 64, 0, 0, 0);
    data_sym(y, 20); send(y, 0, 64, 0, 0, 0);
    // B: offset 0
    preamble(y, 0);  send(y, 1, 64, 0, 1, 0);
    data_sym(y, 0);  send(y, 0, 64, 0, 0, 0);
    // C: offset 28, then back-to-back symbols
    preamble(y, 28); send(y, 1, 64, 0, 1, 7);
    data_sym(y, 28); send(y, 0, 64, 0, 0, 0);
    data_sym(y, 28); send(y, 0, 0, 0, 0, 0);
    // D: offset drops to 4 in a gap-free stream: the update is deferred
    preamble(y, 4);  send(y, 1, 0, 0, 1, 1);
    data_sym(y, 28); send(y, 0, 0, 0, 0, 0);   // estimate not yet out: 28
    data_sym(y, 28); send(y, 0, 0, 0, 0, 0);   // 4 < 28 still leaving: deferred
    exp_defer++;
    data_sym(y, 4);  send(y, 0, 40, 0, 0, 0);   // gap lets the new shift in
    // E: a second preamble while the first estimate is running is missed
    preamble(y, 8);  send(y, 1, 64, 0, 1, 2);
    preamble(y, 12); send(y, 1, 0, 0, 0, 0);
    exp_missed++;
    data_sym(y, 8);  send(y, 0, 64, 0, 0, 0);   // estimate from the first one
    // F: idle cycles inside symbols
    preamble(y, 16); send(y, 1, 64, 20, 1, 4);
    data_sym(y, 16); send(y, 0, 64, 20, 0, 0);
    // G: new known preamble loaded
    @(negedge clk);
    in_valid = 1'b0;
    in_sop = 1'b0;
    in_preamble = 1'b0;
    while (busy) @(negedge clk);
    gen_preamble(x, 19660);
    load_pilots();
    preamble(y, 24); send(y, 1, 64, 0, 1, 6);
    data_sym(y, 24); send(y, 0, 64, 0, 0, 0);
    @(negedge clk);
    in_valid = 1'b0;
    in_sop = 1'b0;
    in_preamble = 1'b0;
    repeat (100) @(negedge clk);

    check(exp_re.size() == 0, $sformatf("%0d output samples missing", exp_re.size()));
    check(exp_est.size() == 0, "estimate missing");
    check(n_defer == exp_defer, $sformatf("deferred %0d, expected %0d", n_defer, exp_defer));
    check(n_missed == exp_missed, $sformatf("missed %0d, expected %0d", n_missed, exp_missed));
    $display("mechanisms: estimates=%0d realign=%0d flush=%0d zero_shift=%0d max_shift=%0d deferred=%0d missed=%0d gaps=%0d back_to_back=%0d reloads=%0d",
             n_est, n_realign, n_flush, n_zero, n_max, n_defer, n_missed, n_gap, n_b2b, n_reload);
    check(n_est > 0, "no estimate");
    check(n_realign > 0, "no PilReg realignment");
    check(n_flush > 0, "no flush");
    check(n_zero > 0, "no zero-shift symbol");
    check(n_max > 0, "no maximum-shift symbol");
    check(n_defer > 0, "no deferred update");
    check(n_missed > 0, "no missed preamble");
    check(n_gap > 0, "no idle gap");
    check(n_b2b > 0, "no back-to-back symbol");
    check(n_reload > 1, "no pilot reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
