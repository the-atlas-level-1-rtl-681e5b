// ppr_channel: the real-time processing chain of one trigger tower.
//
// Order as in the Pre-Processor description:
//   FADC sample (or playback word) -> synchronisation FIFO (0..15 BC)
//   -> BCID (FIR + peak finder / saturated algorithm) -> 1024x8 LUT -> ET
// The histogram/playback memory sees the raw and the calibrated data; in
// playback mode its words replace the FADC input. Raw samples are delayed to
// line up with their ET (7 clocks: BCID input stage, BCID, LUT) so that the readout stores a
// raw sample and its ET at the same address.
// Latency from adc to et: 1 + fifo_delay (FIFO) + 5 (BCID) + 1 (LUT) clocks;
// raw is valid in the same clock as et. In playback mode add 1 clock.
module ppr_channel
  import ppr_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ADC_W-1:0] adc,
  input  chan_cfg_t        cfg,
  input  logic [11:0]      bc,
  // slow control: LUT and histogram memory
  input  logic             lut_we,
  input  logic [ADC_W-1:0] lut_addr,
  input  logic [ET_W-1:0]  lut_wdata,
  output logic [ET_W-1:0]  lut_rdata,
  input  logic             hist_we,
  input  logic [7:0]       hist_addr,
  input  logic [HIST_CNT_W-1:0] hist_wdata,
  output logic [HIST_CNT_W-1:0] hist_rdata,
  // results
  output logic [ADC_W-1:0] raw,
  output logic [ET_W-1:0]  et,
  output logic             sat_flag
);
  localparam int unsigned ALIGN = 7;   // BCID input register + BCID + LUT

  logic [ADC_W-1:0] pb_data, src, raw_s, bcid_out;
  logic [ADC_W-1:0] raw_d [ALIGN];

  assign src = (cfg.hist_mode == HM_PLAYBACK) ? pb_data : adc;

  sync_fifo u_fifo (
    .clk, .rst_n, .din(src), .delay(cfg.fifo_delay), .dout(raw_s)
  );

  bcid u_bcid (
    .clk, .rst_n, .din(raw_s), .coef(cfg.fir_coef), .drop(cfg.fir_drop),
    .sat_level(cfg.sat_level), .dout(bcid_out), .sat_flag(sat_flag)
  );

  lut u_lut (
    .clk, .addr(bcid_out), .dout(et),
    .wr_en(lut_we), .wr_addr(lut_addr), .wr_data(lut_wdata),
    .rd_addr(lut_addr), .rd_data(lut_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ALIGN; i++) raw_d[i] <= '0;
    end else begin
      raw_d[0] <= raw_s;
      for (int i = 1; i < ALIGN; i++) raw_d[i] <= raw_d[i-1];
    end
  end
  assign raw = raw_d[ALIGN-1];

  histo_playback u_hist (
    .clk, .rst_n, .mode(cfg.hist_mode), .src_et(cfg.hist_src_et),
    .thresh(cfg.hist_thresh), .win_lo(cfg.win_lo), .win_hi(cfg.win_hi),
    .rate_dur(cfg.rate_dur), .bc, .raw, .et, .pb_data,
    .sc_we(hist_we), .sc_addr(hist_addr), .sc_wdata(hist_wdata), .sc_rdata(hist_rdata)
  );
endmodule
