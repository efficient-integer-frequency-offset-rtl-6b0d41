// tb_pil_reg: checks the shared known-pilot store.
//
// Writes random coefficients into both halves, then rotates each half by
// random amounts (sometimes both at once, sometimes with a write attempt in
// the same cycle, which the rotation must win) and compares the eight-entry
// window of the selected half with a model: after r rotations tap i shows
// the entry loaded at (i + r) mod 32.
module tb_pil_reg;
  import ifo_pkg::*;
  logic clk = 1'b0, we = 1'b0, wside = 1'b0, side = 1'b0;
  logic [4:0] waddr = '0;
  coef_t wdata = '0;
  logic [1:0] rot = '0;
  coef_t [7:0] win;
  int checks = 0, failures = 0;

  pil_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  coef_t model [2][32];
  int    r [2];

  function automatic coef_t rnd();
    coef_t c;
    int a, b;
    a = int'($urandom % 3) - 1;
    b = int'($urandom % 3) - 1;
    c.re = 2'(a);
    c.im = 2'(b);
    return c;
  endfunction

  task automatic compare(string tag);
    for (int s = 0; s < 2; s++) begin
      side = 1'(s);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (win[i] != model[s][(i + r[s]) % 32]) begin
          failures++;
          $display("FAIL %s side %0d tap %0d after %0d rotations", tag, s, i, r[s]);
        end
      end
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++)
      for (int e = 0; e < 32; e++) begin
        model[s][e] = rnd();
        @(negedge clk);
        we = 1'b1; wside = 1'(s); waddr = 5'(e); wdata = model[s][e];
      end
    @(negedge clk);
    we = 1'b0;
    r = '{0, 0};
    compare("after load");
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      rot = 2'($urandom);
      we = ($urandom % 4) == 0;      // must be ignored by a rotating half
      wside = 1'($urandom);
      waddr = 5'($urandom);
      wdata = rnd();
      if (we && !rot[wside]) begin
        // a write to a half that is not rotating lands at its current position
        model[wside][(int'(waddr) + r[wside]) % 32] = wdata;
      end
      for (int s = 0; s < 2; s++) if (rot[s]) r[s] = (r[s] + 1) % 32;
      @(negedge clk);
      rot = '0;
      we = 1'b0;
      compare($sformatf("step %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
