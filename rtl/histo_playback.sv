// histo_playback: histogram and playback memory of one trigger-tower channel.
//
// One BINS-word memory serves three uses, selected by 'mode':
//  * HM_PLAYBACK: the words are replayed cyclically, one per bunch crossing,
//    as test data in place of the FADC samples (low 10 bits on pb_data).
//  * HM_RATE: rate monitoring. Entries of the selected source above 'thresh'
//    are counted for 'rate_dur' bunch crossings; the count is then stored in
//    the next memory word (word 0, 1, 2, ... wrapping), giving a rate history.
//  * HM_SPECTRUM: energy spectrum. Bin = raw[9:2] or et[7:0], counted only for
//    bunch numbers 'bc' inside [win_lo, win_hi] (a bunch window).
// The two monitoring modes, the threshold and the bunch window follow the
// Pre-Processor description; the rate history layout, the bin mapping and
// the 16-bit saturating counters are this design's own choices.
// Slow control writes any word (to load playback data or clear the
// histogram) and reads any word back one clock later; a write takes priority
// over a histogram update in the same clock, which is then lost.
// pb_data is registered: the word at pb address n appears one clock later.
module histo_playback
  import ppr_pkg::*;
#(
  parameter int unsigned BINS  = HIST_BINS,
  parameter int unsigned CNT_W = HIST_CNT_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  hist_mode_e         mode,
  input  logic               src_et,
  input  logic [ADC_W-1:0]   thresh,
  input  logic [11:0]        win_lo,
  input  logic [11:0]        win_hi,
  input  logic [15:0]        rate_dur,
  input  logic [11:0]        bc,
  input  logic [ADC_W-1:0]   raw,
  input  logic [ET_W-1:0]    et,
  output logic [ADC_W-1:0]   pb_data,
  input  logic               sc_we,
  input  logic [$clog2(BINS)-1:0] sc_addr,
  input  logic [CNT_W-1:0]   sc_wdata,
  output logic [CNT_W-1:0]   sc_rdata
);
  localparam int unsigned AW = $clog2(BINS);
  localparam logic [CNT_W-1:0] CMAX = '1;

  logic [CNT_W-1:0] mem [BINS];
  logic [AW-1:0]    pb_addr, rate_slot;
  logic [15:0]      dur_cnt;
  logic [CNT_W-1:0] rate_cnt;

  logic [ADC_W-1:0] value;
  logic [AW-1:0]    bin;
  logic             in_win, above, rate_end;
  logic [CNT_W-1:0] rate_next;

  logic             wr_en;
  logic [AW-1:0]    wr_addr;
  logic [CNT_W-1:0] wr_data;

  always_comb begin
    value     = src_et ? ADC_W'(et) : raw;
    bin       = src_et ? AW'(et) : AW'(raw >> (ADC_W - AW));
    in_win    = (bc >= win_lo) && (bc <= win_hi);
    above     = value > thresh;
    rate_end  = (dur_cnt + 16'd1 >= rate_dur);
    rate_next = (above && rate_cnt != CMAX) ? rate_cnt + 1'b1 : rate_cnt;

    wr_en   = 1'b0;
    wr_addr = '0;
    wr_data = '0;
    if (sc_we) begin
      wr_en   = 1'b1;
      wr_addr = sc_addr;
      wr_data = sc_wdata;
    end else if (mode == HM_SPECTRUM && in_win) begin
      wr_en   = (mem[bin] != CMAX);
      wr_addr = bin;
      wr_data = mem[bin] + 1'b1;
    end else if (mode == HM_RATE && rate_end) begin
      wr_en   = 1'b1;
      wr_addr = rate_slot;
      wr_data = rate_next;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    sc_rdata <= mem[sc_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pb_addr   <= '0;
      pb_data   <= '0;
      rate_slot <= '0;
      dur_cnt   <= '0;
      rate_cnt  <= '0;
    end else begin
      if (mode == HM_PLAYBACK) begin
        pb_data <= mem[pb_addr][ADC_W-1:0];
        pb_addr <= pb_addr + 1'b1;
      end else begin
        pb_data <= '0;
        pb_addr <= '0;
      end
      if (mode == HM_RATE) begin
        if (rate_end) begin
          dur_cnt   <= '0;
          rate_cnt  <= '0;
          rate_slot <= rate_slot + 1'b1;
        end else begin
          dur_cnt  <= dur_cnt + 1'b1;
          rate_cnt <= rate_next;
        end
      end else begin
        dur_cnt   <= '0;
        rate_cnt  <= '0;
        rate_slot <= '0;
      end
    end
  end
endmodule
