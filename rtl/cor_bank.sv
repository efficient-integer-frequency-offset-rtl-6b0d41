// cor_bank: the four correlation accumulators served by one shared MAC.
//
// Holds V_eps for the four trial offsets handled by one MAC (COR1: eps' =
// 0,4,8,12; COR2: eps' = 16,20,24,28). In each of the four cycles after a
// used pilot, the controller selects one entry: rdata feeds that V back to
// the MAC and the MAC result is written back on the same clock edge
// (read-modify-write in one cycle). clr zeroes all four at the start of an
// estimation. All entries are also brought out for the ArgMax stage.
// The four-register bank with a feedback mux follows the described
// architecture; the clear input and synchronous reset are this design's.
module cor_bank #(
  parameter int unsigned VW = 9,  // accumulator width
  parameter int unsigned NV = 4   // accumulators per bank
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clr,
  input  logic                         we,
  input  logic [$clog2(NV)-1:0]        sel,
  input  logic signed [VW-1:0]         wdata_re,
  input  logic signed [VW-1:0]         wdata_im,
  output logic signed [VW-1:0]         rdata_re,
  output logic signed [VW-1:0]         rdata_im,
  output logic signed [NV-1:0][VW-1:0] v_re,
  output logic signed [NV-1:0][VW-1:0] v_im
);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      v_re <= '0;
      v_im <= '0;
    end else if (we) begin
      v_re[sel] <= wdata_re;
      v_im[sel] <= wdata_im;
    end
  end

  assign rdata_re = v_re[sel];
  assign rdata_im = v_im[sel];

endmodule
