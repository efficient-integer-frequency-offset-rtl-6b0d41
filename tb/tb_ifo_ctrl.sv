// tb_ifo_ctrl: checks the schedule of the folded correlation.
//
// A preamble symbol (optionally with idle cycles) is fed as index-only
// traffic. For each sample the testbench knows from the sub-carrier index
// alone whether it is a used pilot (multiple of 4 in 4..100 or 156..252)
// and checks that p4_load pulses exactly one cycle after each of them and
// is quiet otherwise, that the four MAC phases 0..3 follow with the right
// half selected, that each half rotates 32 times in all (25 + 7
// realignment), that clr and argmax_start pulse once, that busy holds until
// the (testbench-driven) ArgMax done, and that a second preamble start
// during busy raises missed. MAC cycles per estimate must be 200.
module tb_ifo_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sop = 1'b0, in_preamble = 1'b0, argmax_done = 1'b0;
  logic busy, clr, p4_load, mac_en, side, argmax_start, missed;
  logic [1:0] mac_ph, rot;
  int checks = 0, failures = 0;

  ifo_ctrl dut (.*);
  always #5 clk = ~clk;

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

  function automatic bit used(int k);
    return (k % 4 == 0) && ((k >= 4 && k <= 100) || (k >= 156 && k <= 252));
  endfunction

  // monitor: expected p4_load one cycle after a used pilot sample
  bit exp_load = 1'b0;
  bit exp_side = 1'b0;
  int ph_exp = -1;                 // next expected MAC phase, -1 = none
  bit ph_side = 1'b0;
  int n_load = 0, n_mac = 0, n_rot [2], n_clr = 0, n_start = 0, n_missed = 0;
  bit armed = 1'b0;                // a preamble is being estimated
  int kidx = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      check(p4_load == exp_load, $sformatf("p4_load %0d expected %0d", p4_load, exp_load));
      if (p4_load) begin
        n_load++;
        ph_exp = 0;
        ph_side = exp_side;
      end else if (ph_exp >= 0) begin
        check(mac_en && int'(mac_ph) == ph_exp && side == ph_side,
              $sformatf("phase %0d side %0d expected %0d side %0d", mac_ph, side, ph_exp, ph_side));
        ph_exp = (ph_exp == 3) ? -1 : ph_exp + 1;
      end else check(!mac_en, "MAC idle");
      if (mac_en) n_mac++;
      for (int s = 0; s < 2; s++) if (rot[s]) n_rot[s]++;
      if (clr) n_clr++;
      if (argmax_start) n_start++;
      if (missed) n_missed++;
      exp_load = 1'b0;
      if (in_valid) begin
        int k;
        k = in_sop ? 0 : kidx;
        if (in_sop && in_preamble && !busy) armed = 1'b1;
        if (armed && used(k) && n_load < 50) begin
          exp_load = 1'b1;
          exp_side = (k >= 128);
        end
        kidx = k + 1;
      end
    end
  end

  task automatic symbol(bit pre, int gap_pct);
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      while (gap_pct > 0 && int'($urandom % 100) < gap_pct) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_sop = (k == 0);
      in_preamble = pre && (k == 0);
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_sop = 1'b0;
    in_preamble = 1'b0;
  endtask

  initial begin
    n_rot = '{0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4; t++) begin
      n_load = 0; n_mac = 0; n_rot = '{0, 0}; n_clr = 0; n_start = 0; n_missed = 0;
      armed = 1'b0;
      symbol(1'b0, 0);                        // data symbol: nothing happens
      check(!busy && n_load == 0, "data symbol ignored");
      symbol(1'b1, (t % 2) ? 25 : 0);
      check(busy, "busy after the preamble");
      // a second preamble start while busy is missed
      @(negedge clk);
      in_valid = 1'b1; in_sop = 1'b1; in_preamble = 1'b1;
      @(negedge clk);
      in_valid = 1'b0; in_sop = 1'b0; in_preamble = 1'b0;
      while (n_start == 0) @(negedge clk);
      repeat (9) @(negedge clk);
      check(busy, "busy until ArgMax is done");
      argmax_done = 1'b1;
      @(negedge clk);
      argmax_done = 1'b0;
      repeat (3) @(negedge clk);
      check(!busy, "idle after done");
      check(n_load == 50, $sformatf("pilots %0d", n_load));
      check(n_mac == 200, $sformatf("MAC cycles %0d", n_mac));
      check(n_rot[0] == 32 && n_rot[1] == 32, $sformatf("rotations %0d/%0d", n_rot[0], n_rot[1]));
      check(n_clr == 1 && n_start == 1, "one clear, one ArgMax start");
      check(n_missed == 1, "missed preamble flagged");
      // finish the partial symbol left by the missed start
      for (int k = 1; k < 256; k++) begin
        @(negedge clk);
        in_valid = 1'b1;
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
