// bcid: bunch-crossing identification of one trigger-tower channel.
//
// A calorimeter pulse spans several 25 ns bunch crossings. BCID reduces it to
// a single non-zero value in the bunch crossing the pulse belongs to, as the
// Pre-Processor description requires, with one algorithm for pulses inside
// the FADC range and one for saturated pulses. The description names the
// first "FIR + peak finder"; the filter length, coefficient width and both
// algorithms' exact rules are this design's own:
//
//  * Non-saturated: f(t) = sum_{i=0..4} c_i * s(t-i+2), a 5-tap FIR with
//    4-bit unsigned coefficients centred on sample t. Sample t is identified
//    when f(t) > f(t-1) and f(t) >= f(t+1); the output is then f(t) shifted
//    right by 'drop' bits and clipped to 10 bits.
//  * Saturated: if any sample of the filter window is >= sat_level the FIR
//    result is suppressed; the first sample >= sat_level after a sample below
//    it is identified instead and the output is 1023 with sat_flag set.
//
// Every non-zero output is followed by a zero output, which BC-mux relies on.
// Timing: dout/sat_flag after clock edge k belong to the input presented at
// edge k-5 (latency LATENCY = 5).
module bcid
  import ppr_pkg::*;
#(
  parameter int unsigned W      = ADC_W,
  parameter int unsigned TAPS   = FIR_TAPS,
  parameter int unsigned CW     = COEF_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [W-1:0]       din,
  input  logic [TAPS*CW-1:0] coef,
  input  logic [2:0]         drop,
  input  logic [W-1:0]       sat_level,
  output logic [W-1:0]       dout,
  output logic               sat_flag
);
  localparam int unsigned FW = W + CW + $clog2(TAPS);
  localparam int unsigned CENTER = TAPS / 2;

  logic [W-1:0]  sr [TAPS+1];      // sr[0] newest sample
  logic [FW-1:0] fir;
  logic [FW-1:0] f0, f1, f2;       // f0 newest filter output
  logic          satw0, satw1;     // saturated sample in window
  logic          sate0, sate1;     // leading edge of saturation at centre
  logic          any_sat;
  logic [FW-1:0] shifted;
  logic [W-1:0]  clipped;

  always_comb begin
    fir     = '0;
    any_sat = 1'b0;
    for (int i = 0; i < TAPS; i++) begin
      fir     += FW'(sr[i]) * FW'(coef[i*CW +: CW]);
      any_sat |= (sr[i] >= sat_level);
    end
    shifted = f1 >> drop;
    clipped = (shifted > FW'((1 << W) - 1)) ? {W{1'b1}} : shifted[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= TAPS; i++) sr[i] <= '0;
      {f0, f1, f2} <= '0;
      {satw0, satw1, sate0, sate1} <= '0;
      dout     <= '0;
      sat_flag <= 1'b0;
    end else begin
      sr[0] <= din;
      for (int i = 1; i <= TAPS; i++) sr[i] <= sr[i-1];
      f0    <= fir;
      satw0 <= any_sat;
      sate0 <= (sr[CENTER] >= sat_level) && (sr[CENTER+1] < sat_level);
      f1    <= f0;
      f2    <= f1;
      satw1 <= satw0;
      sate1 <= sate0;
      if (sate1) begin
        dout     <= {W{1'b1}};
        sat_flag <= 1'b1;
      end else begin
        sat_flag <= 1'b0;
        dout     <= (!satw1 && (f1 > f2) && (f1 >= f0)) ? clipped : '0;
      end
    end
  end
endmodule
