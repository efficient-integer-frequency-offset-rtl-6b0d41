// argmax: picks the trial offset with the strongest correlation.
//
// After the last pilot has been accumulated, start launches a scan over the
// eight correlation values V_0..V_7 (trial offsets eps' = 0,4,..,28), one
// per clock. The magnitude measure is |Re| + |Im| (no multiplier), or, with
// SQ_MAG = 1, Re^2 + Im^2, the exact ranking of |V|. The first maximum wins
// ties. done pulses for one cycle NV+1 cycles after start, with idx the
// winning entry and best its magnitude; idx and best stay valid until the
// next start. The V inputs must be stable during the scan.
// Finding argmax|V| follows the described design; the sequential scan, the
// magnitude measure and the tie rule are this design's choices.
module argmax #(
  parameter int unsigned VW = 9,        // width of each V component
  parameter int unsigned NV = 8,        // number of candidates
  parameter bit          SQ_MAG = 1'b0, // 1: Re^2+Im^2, 0: |Re|+|Im|
  localparam int unsigned MAGW = SQ_MAG ? 2*VW + 1 : VW + 1,
  localparam int unsigned IW = $clog2(NV)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic signed [NV-1:0][VW-1:0] v_re,
  input  logic signed [NV-1:0][VW-1:0] v_im,
  output logic                         busy,
  output logic                         done,
  output logic [IW-1:0]                idx,
  output logic [MAGW-1:0]              best
);

  logic [IW-1:0]   cnt;
  logic [MAGW-1:0] mag;
  logic signed [VW-1:0] cre, cim;

  function automatic logic [MAGW-1:0] absval(input logic signed [VW-1:0] a);
    return (a < 0) ? MAGW'(-(MAGW'(signed'(a)))) : MAGW'(a);
  endfunction

  always_comb begin
    cre = v_re[cnt];
    cim = v_im[cnt];
    if (SQ_MAG) mag = MAGW'(cre * cre) + MAGW'(cim * cim);
    else        mag = absval(cre) + absval(cim);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      idx  <= '0;
      best <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
        best <= '0;
        idx  <= '0;
      end else if (busy) begin
        if (cnt == '0 || mag > best) begin
          best <= mag;
          idx  <= cnt;
        end
        cnt <= cnt + 1'b1;
        if (cnt == IW'(NV - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
