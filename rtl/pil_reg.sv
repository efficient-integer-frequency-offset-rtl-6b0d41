// pil_reg: shared known-pilot store ("PilReg").
//
// The eight trial offsets need eight sets A_eps of normalised known-pilot
// correlations, 50 values each. Because the used pilots are four
// sub-carriers apart and the trial offsets are multiples of four, the set
// for offset eps' is the set for eps' = 0 slid by eps'/4 places. So one
// circular register of 32 entries per preamble half (64 in all, instead of
// 8 x 50) holds every set:
//   half 1 entry e : U = norm(conj(X(4e - 26)) X(4e - 24))   (indices mod 256)
//   half 2 entry e : U = norm(conj(X(4e + 126)) X(4e + 128))
// where X are the known (pre-offset-free) preamble sub-carriers. Before the
// n-th used pilot of a half the register has been rotated n times, and the
// value for trial offset eps' = 4j is window entry win[7 - j].
//
// Interface: a write port (we/wside/waddr/wdata) loads entries while the
// estimator is idle; rot[s] rotates half s by one place (entry i takes entry
// i+1, entry 0 wraps to 31); side selects which half drives win. After 25
// rotations the controller adds 7 more so that each half is back in its
// loaded position (32 = one full turn) for the next preamble.
// Two circular registers with an 8-wide tap window follow the described
// PilReg; the write port, the realigning rotations and the exact entry
// numbering are this design's choices.
module pil_reg
  import ifo_pkg::*;
#(
  parameter int unsigned DEPTH = PIL_DEPTH,  // entries per half
  parameter int unsigned WIN   = PIL_WIN     // window taps
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic                      wside,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  coef_t                     wdata,
  input  logic [1:0]                rot,
  input  logic                      side,
  output coef_t [WIN-1:0]           win
);

  coef_t mem0 [DEPTH];
  coef_t mem1 [DEPTH];

  always_ff @(posedge clk) begin
    if (rot[0]) begin
      for (int i = 0; i < DEPTH; i++) mem0[i] <= mem0[(i + 1) % DEPTH];
    end else if (we && !wside) begin
      mem0[waddr] <= wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rot[1]) begin
      for (int i = 0; i < DEPTH; i++) mem1[i] <= mem1[(i + 1) % DEPTH];
    end else if (we && wside) begin
      mem1[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < WIN; i++) win[i] = side ? mem1[i] : mem0[i];
  end

endmodule
