// ifo_top: IFO estimation and compensation stage of an OFDM receiver.
//
// Sits behind cyclic-prefix removal and the FFT. The estimator measures the
// integer frequency offset (a cyclic shift of the sub-carriers by a
// multiple of four, -12..+16) on the long preamble; the compensator then
// undoes that shift on every following symbol. The estimate in use is held
// in shift_q: eps'/4 = est_idx, reset to 3, i.e. eps' = 12 = no offset,
// until the first estimate arrives. The preamble itself leaves with the
// shift that was in use before it; a new estimate applies from the next
// symbol start.
//
// Interface: FFT stream in (one sample per in_valid, in_sop on sub-carrier
// 0, in_preamble with in_sop for the long preamble; samples carry the +12
// sub-carrier pre-offset applied before the FFT), known-pilot load port
// pil_* (used while busy is low), estimate outputs, corrected stream out.
// Sample width, reset value and the load port are this design's choices.
module ifo_top
  import ifo_pkg::*;
#(
  parameter int unsigned N  = N_FFT,  // FFT size
  parameter int unsigned YW = 16,     // sample width (Q1.YW-1)
  parameter int unsigned F  = 2       // P_4k fractional bits (Q1.F)
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
  output logic signed [5:0]    est_ifo,
  output logic                 out_valid,
  output logic                 out_sop,
  output logic signed [YW-1:0] out_re,
  output logic signed [YW-1:0] out_im,
  output logic                 deferred
);

  logic [2:0] shift_q;

  ifo_estimator #(.YW(YW), .F(F)) u_est (
    .clk, .rst_n, .in_valid, .in_sop, .in_preamble, .in_re, .in_im,
    .pil_we, .pil_side, .pil_addr, .pil_data,
    .busy, .missed, .est_valid, .est_idx, .est_ifo
  );

  always_ff @(posedge clk) begin
    if (!rst_n)         shift_q <= 3'(PRE_OFFSET / PIL_STEP);
    else if (est_valid) shift_q <= est_idx;
  end

  ifo_comp #(.N(N), .YW(YW)) u_comp (
    .clk, .rst_n, .in_valid, .in_sop, .in_re, .in_im,
    .shift_idx(shift_q),
    .out_valid, .out_sop, .out_re, .out_im, .deferred
  );

endmodule
