// jet_adder: pre-summing of four trigger towers into one 0.2 x 0.2 jet
// element.
//
// The four 8-bit transverse energies of adjacent towers of the same
// calorimeter layer are added; the result is cut to 9 bits with a least
// count of 1 GeV as described for the Pre-Processor. Sums above 511 GeV
// saturate at 511 (the saturating cut is this design's choice).
// One register stage: jet(t+1) = sat9(sum et(t)).
module jet_adder #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned IN_W  = ppr_pkg::ET_W,
  parameter int unsigned OUT_W = ppr_pkg::JET_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [IN_W-1:0]      et [N_IN],
  output logic [OUT_W-1:0]     jet
);
  localparam int unsigned SUM_W = IN_W + $clog2(N_IN) + 1;
  localparam logic [SUM_W-1:0] MAXV = SUM_W'((1 << OUT_W) - 1);

  logic [SUM_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N_IN; i++) sum += SUM_W'(et[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) jet <= '0;
    else        jet <= (sum > MAXV) ? MAXV[OUT_W-1:0] : sum[OUT_W-1:0];
  end
endmodule
