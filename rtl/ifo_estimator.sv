// ifo_estimator: folded, multiplierless integer frequency offset estimator.
//
// Finds which of the eight trial offsets eps' = 0,4,..,28 best explains the
// cyclic shift of the received long preamble, by maximising
//   |V_eps'| with V_eps' = sum over the 50 used pilots of P_4k * A_eps'(k),
// where P_4k = conj(Y_{4k-2}) Y_{4k} is the received differential pilot
// product (truncated to Q1.F) and A_eps' the normalised product of the known
// pilots shifted by eps'. Structure:
//   pk_gen    - P_k for every sample, registered; P_4k = its F+1 MSBs
//   p4k       - P_4k latched for the four cycles after a used pilot
//   pil_reg   - 64 shared known-pilot entries giving all eight A_eps'
//   MAC1/COR1 - multiplierless MAC + four accumulators, eps' = 0,4,8,12
//   MAC2/COR2 - the same for eps' = 16,20,24,28
//   ifo_ctrl  - pilot selection and the four-phase schedule
//   argmax    - picks the largest |V|
// Each MAC serves four accumulators in the four cycles between two used
// pilots, so two MACs replace eight correlators.
//
// Interface: one FFT output sample per in_valid cycle, in_sop on sub-carrier
// 0, in_preamble with in_sop to estimate on that symbol. The input must
// already carry the +12 sub-carrier pre-offset, so est_ifo = 4*est_idx - 12
// is the IFO of the raw signal. PilReg is loaded through pil_* while idle.
// est_valid pulses once per estimate, 15 cycles after the last used pilot
// (sub-carrier 252) entered, i.e. 12 cycles after the preamble's last
// sample in a gap-free stream: a gap (cyclic prefix) of 12 samples or more
// lets the estimate apply from the very next symbol. The MACs work for
// 4 x 50 = 200 cycles per preamble, inside the 256-sample symbol.
module ifo_estimator
  import ifo_pkg::*;
#(
  parameter int unsigned YW = 16,      // FFT output sample width (Q1.YW-1)
  parameter int unsigned PW = 16,      // width of P_k
  parameter int unsigned F  = 2,       // fractional bits of P_4k (Q1.F)
  parameter bit          SQ_MAG = 1'b0 // ArgMax magnitude: 0 |Re|+|Im|, 1 Re^2+Im^2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sop,
  input  logic                 in_preamble,
  input  logic signed [YW-1:0] in_re,
  input  logic signed [YW-1:0] in_im,
  input  logic                 pil_we,
  input  logic                 pil_side,
  input  logic [4:0]           pil_addr,
  input  coef_t                pil_data,
  output logic                 busy,
  output logic                 missed,
  output logic                 est_valid,
  output logic [2:0]           est_idx,
  output logic signed [5:0]    est_ifo
);

  localparam int unsigned VW = F + 7;   // Q7.F correlation accumulators

  // ---------------- P_k and P_4k ----------------
  logic                 p_valid;
  logic signed [PW-1:0] p_re, p_im;
  logic signed [F:0]    p4_re, p4_im, p4k_re, p4k_im;

  pk_gen #(.YW(YW), .PW(PW), .F(F)) u_pk (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .p_valid, .p_re, .p_im, .p4_re, .p4_im
  );

  // ---------------- control ----------------
  logic       clr, p4_load, mac_en, side, am_start, am_done, am_busy;
  logic [1:0] mac_ph, rot;

  ifo_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_sop, .in_preamble,
    .argmax_done(am_done), .busy, .clr, .p4_load, .mac_en, .mac_ph,
    .side, .rot, .argmax_start(am_start), .missed
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p4k_re <= '0;
      p4k_im <= '0;
    end else if (p4_load) begin
      p4k_re <= p4_re;
      p4k_im <= p4_im;
    end
  end

  // ---------------- shared known pilots ----------------
  coef_t [PIL_WIN-1:0] win;
  coef_t               u1, u2;

  pil_reg u_pil (
    .clk, .we(pil_we && !busy), .wside(pil_side), .waddr(pil_addr),
    .wdata(pil_data), .rot, .side, .win
  );

  // trial offset 4j uses window tap 7-j: MAC1 j = ph, MAC2 j = 4 + ph
  assign u1 = win[3'd7 - {1'b0, mac_ph}];
  assign u2 = win[3'd3 - {1'b0, mac_ph}];

  // ---------------- MAC1/COR1 and MAC2/COR2 ----------------
  logic signed [VW-1:0] r1_re, r1_im, w1_re, w1_im;
  logic signed [VW-1:0] r2_re, r2_im, w2_re, w2_im;
  logic signed [3:0][VW-1:0] c1_re, c1_im, c2_re, c2_im;

  ml_mac #(.F(F), .VW(VW)) u_mac1 (
    .p_re(p4k_re), .p_im(p4k_im), .u(u1),
    .v_re_in(r1_re), .v_im_in(r1_im), .v_re_out(w1_re), .v_im_out(w1_im)
  );
  cor_bank #(.VW(VW), .NV(4)) u_cor1 (
    .clk, .rst_n, .clr, .we(mac_en), .sel(mac_ph),
    .wdata_re(w1_re), .wdata_im(w1_im), .rdata_re(r1_re), .rdata_im(r1_im),
    .v_re(c1_re), .v_im(c1_im)
  );

  ml_mac #(.F(F), .VW(VW)) u_mac2 (
    .p_re(p4k_re), .p_im(p4k_im), .u(u2),
    .v_re_in(r2_re), .v_im_in(r2_im), .v_re_out(w2_re), .v_im_out(w2_im)
  );
  cor_bank #(.VW(VW), .NV(4)) u_cor2 (
    .clk, .rst_n, .clr, .we(mac_en), .sel(mac_ph),
    .wdata_re(w2_re), .wdata_im(w2_im), .rdata_re(r2_re), .rdata_im(r2_im),
    .v_re(c2_re), .v_im(c2_im)
  );

  // ---------------- ArgMax ----------------
  logic signed [7:0][VW-1:0] v_re, v_im;
  assign v_re = {c2_re, c1_re};   // entry j <-> eps' = 4j
  assign v_im = {c2_im, c1_im};

  logic [2:0] am_idx;
  logic [(SQ_MAG ? 2*VW+1 : VW+1)-1:0] am_best;

  argmax #(.VW(VW), .NV(8), .SQ_MAG(SQ_MAG)) u_am (
    .clk, .rst_n, .start(am_start), .v_re, .v_im,
    .busy(am_busy), .done(am_done), .idx(am_idx), .best(am_best)
  );

  assign est_valid = am_done;
  assign est_idx   = am_idx;
  assign est_ifo   = 6'(signed'({1'b0, am_idx, 2'b00})) - 6'(PRE_OFFSET);

  // p_valid, the full-width P_k, ArgMax busy and best magnitude are
  // observation signals only here.
  logic unused;
  assign unused = ^{p_valid, p_re, p_im, am_busy, am_best};

endmodule
