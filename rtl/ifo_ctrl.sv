// ifo_ctrl: schedule of the folded IFO correlation.
//
// Counts the sub-carrier position of the incoming FFT stream. When a symbol
// flagged as the long preamble starts (in_sop & in_preamble while idle) it
// clears the correlators and, for each of the 50 used pilots (multiples of
// four in 4..100 and 156..252), does the following, one cycle apart:
//   cycle +1 : p4_load   - latch the truncated P_4k of that pilot
//   cycle +2..+5 : mac_en with mac_ph = 0,1,2,3 - MAC1 updates V_{4*ph},
//              MAC2 updates V_{16+4*ph}; in phase 3 PilReg half mac_side
//              rotates by one place.
// Since used pilots are at least four samples apart, the four phases of
// one pilot always end before those of the next begin: two MACs produce
// eight correlations, 200 MAC cycles for 50 pilots. After the 25th pilot
// of a half, seven more rotations bring that half of PilReg back to its
// loaded position. After the 50th pilot, argmax_start pulses; busy drops
// when ArgMax reports done and the realignment is finished. A preamble
// start seen while busy is ignored and flagged on missed.
// The four-cycle sharing and the pilot set follow the described algorithm;
// the handshakes, realignment and missed flag are this design's choices.
module ifo_ctrl
  import ifo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_sop,
  input  logic       in_preamble,
  input  logic       argmax_done,
  output logic       busy,
  output logic       clr,
  output logic       p4_load,
  output logic       mac_en,
  output logic [1:0] mac_ph,
  output logic       side,
  output logic [1:0] rot,
  output logic       argmax_start,
  output logic       missed
);

  typedef enum logic [1:0] {S_IDLE, S_ACCUM, S_FINISH} state_t;
  state_t state;

  logic [7:0] cnt, cur;
  logic       start, pil;
  logic       side_q;
  logic [5:0] pil_seen;                 // used pilots accepted so far
  logic [4:0] done_cnt [2];             // pilots finished per half
  logic [2:0] realign [2];              // pending realigning rotations
  logic       ph_last;
  logic       am_started;

  assign cur   = in_sop ? 8'd0 : cnt;
  assign start = in_valid && in_sop && in_preamble && (state == S_IDLE);
  assign pil   = in_valid && is_used_pilot(cur) &&
                 (start || (state == S_ACCUM && pil_seen < 6'(2 * PIL_PER_SIDE)));
  assign clr   = start;
  assign busy  = (state != S_IDLE);
  assign missed = in_valid && in_sop && in_preamble && (state != S_IDLE);
  assign ph_last = mac_en && (mac_ph == 2'd3);

  always_comb begin
    for (int s = 0; s < 2; s++)
      rot[s] = (ph_last && (side == 1'(s))) || (realign[s] != 3'd0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cnt          <= '0;
      p4_load      <= 1'b0;
      side_q       <= 1'b0;
      side         <= 1'b0;
      mac_en       <= 1'b0;
      mac_ph       <= '0;
      pil_seen     <= '0;
      done_cnt     <= '{default: '0};
      realign      <= '{default: '0};
      argmax_start <= 1'b0;
      am_started   <= 1'b0;
    end else begin
      argmax_start <= 1'b0;
      if (in_valid) cnt <= cur + 8'd1;

      // pilot capture, one cycle behind the sample (P_k is registered)
      p4_load <= pil;
      if (pil) begin
        side_q   <= cur[7];
        pil_seen <= pil_seen + 6'd1;
      end

      // four MAC phases per used pilot
      if (p4_load) begin
        mac_en <= 1'b1;
        mac_ph <= 2'd0;
        side   <= side_q;
      end else if (mac_en) begin
        mac_ph <= mac_ph + 2'd1;
        if (mac_ph == 2'd3) mac_en <= 1'b0;
      end

      for (int s = 0; s < 2; s++) begin
        if (realign[s] != 3'd0) realign[s] <= realign[s] - 3'd1;
        if (ph_last && side == 1'(s)) begin
          done_cnt[s] <= done_cnt[s] + 5'd1;
          if (done_cnt[s] == 5'(PIL_PER_SIDE - 1))
            realign[s] <= 3'(PIL_DEPTH - PIL_PER_SIDE);
        end
      end

      case (state)
        S_IDLE: if (start) begin
          state    <= S_ACCUM;
          pil_seen <= pil ? 6'd1 : 6'd0;
          done_cnt <= '{default: '0};
        end
        S_ACCUM: if (ph_last && side && done_cnt[1] == 5'(PIL_PER_SIDE - 1)) begin
          state        <= S_FINISH;
          argmax_start <= 1'b1;
          am_started   <= 1'b1;
        end
        S_FINISH: begin
          if (argmax_done) am_started <= 1'b0;
          if (!am_started && realign[0] == 3'd0 && realign[1] == 3'd0)
            state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Used pilots are four samples apart, so a new pilot never arrives while
  // the previous one is still in its first three MAC phases.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    p4_load |-> (!mac_en || mac_ph == 2'd3));

endmodule
