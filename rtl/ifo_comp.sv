// ifo_comp: integer frequency offset compensation by sub-carrier reordering.
//
// An offset of eps' sub-carriers rotates the FFT output: the received
// sample at position p is the wanted sub-carrier p - eps' (mod N). Because
// the stream is pre-offset so that eps' is never negative (0..28), the fix
// only needs the first eps' samples of a symbol to be held back: samples
// eps'..N-1 leave directly as sub-carriers 0..N-1-eps', and the held samples
// follow as sub-carriers N-eps'..N-1. The buffer is MAX_SHIFT = 28 deep,
// against a whole-symbol buffer for a shift in the other direction.
// The held samples are sent while the first eps' samples of the next symbol
// are themselves being stored, so a gap-free stream keeps flowing: buffer
// entry q is read in the same cycle the next symbol's sample q overwrites
// it (read before write).
//
// Interface: in_* is the FFT stream (in_sop on position 0); shift_idx
// (eps' = 4*shift_idx) is sampled at in_sop and used for the whole symbol.
// out_* is registered: sub-carrier 0 of a symbol leaves one cycle after
// input position eps' arrived, with out_sop. If a smaller shift would make
// the new symbol's direct samples collide with the previous symbol's held
// samples, the previous shift is kept for that symbol and deferred pulses.
// Holding the first samples and muxing them behind the rest follows the
// described compensator; the flush timing and the deferral rule are this
// design's choices.
module ifo_comp
  import ifo_pkg::*;
#(
  parameter int unsigned N  = N_FFT,   // sub-carriers per symbol
  parameter int unsigned YW = 16       // sample width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sop,
  input  logic signed [YW-1:0] in_re,
  input  logic signed [YW-1:0] in_im,
  input  logic [2:0]           shift_idx,
  output logic                 out_valid,
  output logic                 out_sop,
  output logic signed [YW-1:0] out_re,
  output logic signed [YW-1:0] out_im,
  output logic                 deferred
);

  localparam int unsigned PWID = $clog2(N);

  typedef struct packed {
    logic signed [YW-1:0] re;
    logic signed [YW-1:0] im;
  } sample_t;

  sample_t          buf_q [MAX_SHIFT];
  logic [PWID-1:0]  pos, cur;
  logic [4:0]       sh, sh_use, sh_req;
  logic [4:0]       fl_q, fl_len;       // flush read pointer and length
  logic             flushing;
  logic [4:0]       fl_rem;
  logic             direct, to_buf, fl_out;

  assign cur    = in_sop ? '0 : pos;
  assign sh_req = {shift_idx, 2'b00};
  assign fl_rem = flushing ? (fl_len - fl_q) : 5'd0;
  // keep the previous shift if the requested one would collide with the flush
  assign deferred = in_valid && in_sop && (sh_req < fl_rem) && (sh_req < sh);
  assign sh_use = (in_valid && in_sop && !deferred) ? sh_req : sh;
  assign to_buf = in_valid && (cur < PWID'(sh_use));
  assign direct = in_valid && !(cur < PWID'(sh_use));
  assign fl_out = flushing;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos       <= '0;
      sh        <= '0;
      flushing  <= 1'b0;
      fl_q      <= '0;
      fl_len    <= '0;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      if (in_valid) begin
        pos <= cur + 1'b1;
        if (in_sop) sh <= sh_use;
      end

      if (fl_out) begin
        out_valid <= 1'b1;
        out_re    <= buf_q[fl_q].re;
        out_im    <= buf_q[fl_q].im;
        fl_q      <= fl_q + 5'd1;
        if (fl_q == fl_len - 5'd1) flushing <= 1'b0;
      end else if (direct) begin
        out_valid <= 1'b1;
        out_sop   <= (cur == PWID'(sh_use));
        out_re    <= in_re;
        out_im    <= in_im;
      end

      // end of symbol: start sending the held samples
      if (in_valid && cur == PWID'(N - 1) && sh_use != 5'd0) begin
        flushing <= 1'b1;
        fl_q     <= '0;
        fl_len   <= sh_use;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (to_buf) buf_q[cur[4:0]] <= '{re: in_re, im: in_im};
  end

  // A direct sample never has to wait for a held one.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(fl_out && direct));

endmodule
