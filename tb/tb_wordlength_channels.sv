// tb_wordlength_channels: the estimator at the four correlation wordlengths
// Q1.1, Q1.2, Q1.7 and Q1.15 in an AWGN channel with residual timing
// offset, and in two frequency-selective channels.
//
// Four estimators (F = 1, 2, 7, 15) see the same stream of received long
// preambles: random true offset eps' in {0,..,28}, random common phase, a
// residual-timing phase ramp of 0..20 samples, and complex Gaussian noise
// at several signal-to-noise ratios (signal power per pilot sub-carrier
// over noise power per sub-carrier). Each estimate must match the reference
// model bit for bit; the rate of wrong estimates (probability of failed
// estimation) is printed per wordlength and SNR. In AWGN no wordlength may
// fail at the highest SNR.
// The frequency-selective runs use three Rayleigh taps with the delay and
// power profiles of the SUI-1 (0, 0.4, 0.9 us; 0, -15, -20 dB) and SUI-2
// (0, 0.4, 1.1 us; 0, -12, -15 dB) models, at 4 Msample/s (a 3.5 MHz
// 802.16 channel); these profiles are general knowledge, not part of the
// design. The channel acts on the shifted spectrum, Y(k) = H(k-eps')X(k-eps').
module tb_wordlength_channels;
  import ifo_pkg::*;
  import tb_ofdm_pkg::*;

  localparam int NF = 4;
  localparam int FV [NF] = '{1, 2, 7, 15};
  localparam int TRIALS = 150;
  localparam int NSNR = 5;
  localparam real SNR_DB [NSNR] = '{-3.0, 0.0, 3.0, 6.0, 20.0};
  localparam string CH_NAME [3] = '{"AWGN ", "SUI-1", "SUI-2"};
  localparam real DELAYS [3][3] = '{'{0.0, 0.0, 0.0}, '{0.0, 1.6, 3.6}, '{0.0, 1.6, 4.4}};
  localparam real PDB [3][3] = '{'{0.0, -99.0, -99.0}, '{0.0, -15.0, -20.0}, '{0.0, -12.0, -15.0}};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sop = 1'b0, in_preamble = 1'b0;
  logic signed [15:0] in_re = '0, in_im = '0;
  logic pil_we = 1'b0, pil_side = 1'b0;
  logic [4:0] pil_addr = '0;
  coef_t pil_data = '0;
  logic [NF-1:0] busy, missed, est_valid;
  logic [2:0] est_idx [NF];
  logic signed [5:0] est_ifo [NF];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NF; i++) begin : g_est
    ifo_estimator #(.F(FV[i])) u_est (
      .clk, .rst_n, .in_valid, .in_sop, .in_preamble, .in_re, .in_im,
      .pil_we, .pil_side, .pil_addr, .pil_data,
      .busy(busy[i]), .missed(missed[i]), .est_valid(est_valid[i]),
      .est_idx(est_idx[i]), .est_ifo(est_ifo[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  cplx_t x[NSC], y[NSC];

  initial begin
    longint vre[8], vim[8];
    int eps, ridx [NF], wrong [NF];
    real sigma, a;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    a = 19660.0;                                   // 0.6 in Q1.15
    gen_preamble(x, int'(a));
    for (int s = 0; s < 2; s++)
      for (int e = 0; e < 32; e++) begin
        cplx_t u;
        u = pil_entry(x, s, e);
        @(negedge clk);
        pil_we = 1'b1; pil_side = 1'(s); pil_addr = 5'(e);
        pil_data.re = 2'(u.re); pil_data.im = 2'(u.im);
      end
    @(negedge clk);
    pil_we = 1'b0;
    for (int ch = 0; ch < 3; ch++)
    for (int si = 0; si < NSNR; si++) begin
      // per-component noise deviation for signal power 2a^2 per pilot
      sigma = $sqrt(2.0 * a * a / $pow(10.0, SNR_DB[si] / 10.0) / 2.0);
      wrong = '{default: 0};
      for (int t = 0; t < TRIALS; t++) begin
        eps = 4 * int'($urandom % 8);
        if (ch == 0) begin
          make_rx(y, x, eps, 6.2831853 * ($urandom % 1000) / 1000.0, real'($urandom % 21), 0);
        end else begin
          real hre[NSC], him[NSC];
          cplx_t xh[NSC];
          rand_channel(hre, him, DELAYS[ch], PDB[ch]);
          for (int k = 0; k < NSC; k++) begin
            xh[k].re = $rtoi(x[k].re * hre[k] - x[k].im * him[k]);
            xh[k].im = $rtoi(x[k].re * him[k] + x[k].im * hre[k]);
          end
          make_rx(y, xh, eps, 0.0, real'($urandom % 21), 0);
        end
        for (int k = 0; k < NSC; k++) begin
          y[k].re = clip16(longint'(y[k].re) + longint'($rtoi(sigma * gauss())));
          y[k].im = clip16(longint'(y[k].im) + longint'($rtoi(sigma * gauss())));
        end
        for (int i = 0; i < NF; i++) begin
          ref_corr(y, x, FV[i], vre, vim);
          ridx[i] = ref_argmax(vre, vim);
        end
        for (int k = 0; k < NSC; k++) begin
          @(negedge clk);
          in_valid = 1'b1; in_sop = (k == 0); in_preamble = (k == 0);
          in_re = 16'(y[k].re); in_im = 16'(y[k].im);
        end
        @(negedge clk);
        in_valid = 1'b0; in_sop = 1'b0; in_preamble = 1'b0;
        while (est_valid == '0) @(negedge clk);
        for (int i = 0; i < NF; i++) begin
          check(est_valid[i] && int'(est_idx[i]) == ridx[i],
                $sformatf("F=%0d: RTL %0d, model %0d", FV[i], est_idx[i], ridx[i]));
          if (int'(est_idx[i]) != eps / 4) wrong[i]++;
        end
        while (busy != '0) @(negedge clk);
      end
      $display("%s SNR %5.1f dB: failed estimations Q1.1 %0d/%0d  Q1.2 %0d/%0d  Q1.7 %0d/%0d  Q1.15 %0d/%0d",
               CH_NAME[ch], SNR_DB[si], wrong[0], TRIALS, wrong[1], TRIALS, wrong[2], TRIALS, wrong[3], TRIALS);
      if (ch == 0 && si == NSNR - 1)
        for (int i = 0; i < NF; i++)
          check(wrong[i] == 0, $sformatf("F=%0d fails at %0.1f dB", FV[i], SNR_DB[si]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
