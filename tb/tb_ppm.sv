// tb_ppm: end-to-end test of the Pre-Processor Module at its default size
// (16 MCMs, 64 channels, 32 PPrAsics).
//
// Setup over slow control: per channel a FIFO delay, the BCID filter and
// the LUT (65536 LUT writes in all); read-back of registers.
// Phase A: pulse streams on all 64 channels. On even MCMs the four towers
// see the same pulse train, arriving (15 - delay) BCs early so that the
// FIFOs line them up; odd MCMs get independent trains. Random Level-1
// accepts; the PipelineBus input carries foreign traffic 30% of the time.
// Channel 9 histograms its ET spectrum, channel 10 runs rate monitoring.
// Phase B: channel 5 switches to playback of a pattern loaded into its
// memory. Phase C: 20 slices per accept and a burst of 12 accepts, which
// overflows the accept queues.
//
// Checked against the reference model: every BC-mux slot of all 16 CP link
// words (decoded back into 64 towers), every jet link word, parity of all
// link words, every readout fragment of phases A/B (header and 32 x 3
// words), the foreign bus words (unchanged, in order), the histogram and
// rate contents read back over slow control, and the dropped-accept count.
// Mechanisms counted, each must occur: FIFO delay in use, BCID peak, BCID
// saturated pulse, BC-mux deferred tower, jet saturation, accepted event
// read out, accept dropped on overflow, foreign bus word passed, playback,
// spectrum histogram, rate monitoring.
module tb_ppm;
  import ppr_pkg::*;
  import ppr_model_pkg::*;
  localparam int NM = 16, NCH = 64, NA = 32;
  localparam int S0 = 40;            // phase A stream start (relative edge)
  localparam int NA_LEN = 2000;      // phase A stream length
  localparam int PB_START = 2300;    // phase B playback switch (relative edge)
  localparam int PB_LEN = 700;
  localparam int TOT = 3200;         // relative edges covered by the model
  localparam int NSL = 3;

  logic clk = 0, rst_n = 0;
  logic [9:0] adc [NCH];
  logic l1a = 0, bcr = 0, sc_we = 0;
  logic [20:0] sc_addr = '0;
  logic [31:0] sc_wdata = '0, sc_rdata;
  logic [20:0] cp_link [NM];
  logic [9:0] jep_link [NM];
  logic pbus_in_valid = 0, pbus_out_valid;
  logic [PB_W-1:0] pbus_in_data = '0, pbus_out_data;

  int checks = 0, failures = 0;
  int coef [5] = '{1, 4, 9, 5, 2};
  int dly [NCH];
  arr_t src [NCH], bo [NCH];
  int rx [NCH][TOT];
  int jrx [NM][TOT];
  int pat [256];
  int base = -1;           // absolute edge of relative edge 0
  int kabs = 0;            // absolute edge counter
  // mechanism counters
  int m_delay = 0, m_peak = 0, m_sat = 0, m_defer = 0, m_jetsat = 0, m_event = 0,
      m_drop = 0, m_foreign = 0, m_play = 0, m_spec = 0, m_rate = 0;
  // readout bookkeeping
  int l1a_rel [$];
  logic [PB_W-1:0] frag [$];   // local words received on the bus
  int foreign_sent = 0, foreign_rx = 0;
  bit check_frag_values = 1;
  int frag_checked_words = 0;

  ppm dut (.clk, .rst_n, .adc, .l1a, .bcr, .sc_we, .sc_addr, .sc_wdata, .sc_rdata,
           .cp_link, .jep_link, .pbus_in_valid, .pbus_in_data, .pbus_out_valid, .pbus_out_data);

  always #5 clk = ~clk;

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- slow control helpers (addresses as documented in ppm)
  function automatic logic [20:0] ch_addr(int g, int sp, int off);
    return {1'b0, 5'(g / 2), 1'(g % 2), 2'(sp), 12'(off)};
  endfunction

  task automatic step();
    int i;
    bcmux_slot_t s;
    @(posedge clk); #1;
    kabs++;
    if (base < 0) return;
    i = kabs - 1 - base;        // relative index of the edge just taken
    if (i < 2 || i >= TOT) return;
    for (int m = 0; m < NM; m++) begin
      checks += 2;
      if (^cp_link[m] !== 1'b0) failures++;
      if (^jep_link[m] !== 1'b0) failures++;
      // link word after edge i: slots after edge i-1, ETs after edge i-2
      for (int a = 0; a < 2; a++) begin
        s = cp_link[m][10*a +: 10];
        if (s.data != 0) begin
          case (s.code)
            BCMUX_A_NOW:  rx[4*m + 2*a][i-2] = s.data;
            BCMUX_B_NOW:  rx[4*m + 2*a + 1][i-2] = s.data;
            BCMUX_B_PREV: begin rx[4*m + 2*a + 1][i-3] = s.data; m_defer++; end
            default: failures++;
          endcase
        end
      end
      jrx[m][i-2] = jep_link[m][8:0];
      if (jep_link[m][8:0] == 9'd511) m_jetsat++;
    end
  endtask

  task automatic sc_wr(logic [20:0] a, int d);
    sc_we = 1; sc_addr = a; sc_wdata = 32'(d);
    step();
    sc_we = 0;
  endtask

  task automatic sc_rd(logic [20:0] a, output int d);
    sc_addr = a;
    step();
    d = int'(sc_rdata);
  endtask

  // ---- PipelineBus sink
  always @(posedge clk) if (rst_n && pbus_out_valid) begin
    if (pbus_out_data[PB_W-3 -: 6] == 6'h3F) begin
      checks++;
      if (pbus_out_data[35:0] !== 36'(foreign_rx)) begin failures++; $display("foreign word out of order"); end
      foreign_rx++;
      m_foreign++;
    end else begin
      frag.push_back(pbus_out_data);
    end
  end

  function automatic int et_m(int g, int i);
    return lut_val(at(bo[g], i - CHAN_LAT - dly[g]));
  endfunction
  function automatic int raw_m(int g, int i);
    return at(src[g], i - CHAN_LAT - dly[g]);
  endfunction

  initial begin
    int d, cw, common_len;
    arr_t common [NM];
    int hist_model [256];
    int rate_model;
    for (int g = 0; g < NCH; g++) adc[g] = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    // ---- configuration
    cw = (coef[4] << 16) | (coef[3] << 12) | (coef[2] << 8) | (coef[1] << 4) | coef[0];
    for (int g = 0; g < NCH; g++) begin
      dly[g] = (g * 5 + g / 4) % 16;
      if (dly[g] != 0) m_delay++;
      sc_wr(ch_addr(g, SP_REGS, R_FIFO_DELAY), dly[g]);
      sc_wr(ch_addr(g, SP_REGS, R_FIR_COEF), cw);
      sc_wr(ch_addr(g, SP_REGS, R_FIR_DROP), 3);
      sc_wr(ch_addr(g, SP_REGS, R_SAT_LEVEL), 1023);
      for (int a = 0; a < 1024; a++) sc_wr(ch_addr(g, SP_LUT, a), lut_val(a));
    end
    sc_rd(ch_addr(37, SP_REGS, R_FIFO_DELAY), d);
    checks++; if (d != dly[37]) begin failures++; $display("read-back delay %0d", d); end
    sc_rd(ch_addr(62, SP_LUT, 700), d);
    checks++; if (d != lut_val(700)) begin failures++; $display("read-back LUT %0d", d); end
    sc_rd({1'b1, 16'd0, 4'd0}, d);
    checks++; if (d != 80) begin failures++; $display("read-back latency %0d", d); end
    // histogram (ch 9, ET spectrum) and rate (ch 10, raw > 100 per 100 BCs)
    for (int w = 0; w < 256; w++) begin
      sc_wr(ch_addr(9, SP_HIST, w), 0);
      sc_wr(ch_addr(10, SP_HIST, w), 0);
    end
    sc_wr(ch_addr(9, SP_REGS, R_HIST_WIN), 32'h0FFF_0000);
    sc_wr(ch_addr(9, SP_REGS, R_HIST_MODE), 4 | int'(HM_SPECTRUM));
    sc_wr(ch_addr(10, SP_REGS, R_HIST_THR), 100);
    sc_wr(ch_addr(10, SP_REGS, R_RATE_DUR), 100);
    sc_wr(ch_addr(10, SP_REGS, R_HIST_MODE), int'(HM_RATE));
    // playback pattern for ch 5
    for (int w = 0; w < 256; w++) pat[w] = 30;
    for (int p = 0; p < 256; p += 32) begin
      pat[p + 1] += 40; pat[p + 2] += 200; pat[p + 3] += 400; pat[p + 4] += 280; pat[p + 5] += 140;
    end
    for (int w = 0; w < 256; w++) sc_wr(ch_addr(5, SP_HIST, w), pat[w]);
    // ---- streams (relative edge index)
    for (int m = 0; m < NM; m++) common[m] = pulses(NA_LEN + 20, 8, 1);
    for (int g = 0; g < NCH; g++) begin
      arr_t p;
      src[g] = new[TOT];
      p = pulses(NA_LEN, 8, 1);
      for (int i = 0; i < TOT; i++) begin
        int j;
        j = i - S0;
        if ((g / 4) % 2 == 0) begin
          // same train on all four towers, early by (15 - delay)
          j = i - S0 + (15 - dly[g]);
          src[g][i] = (j >= 0 && j < NA_LEN) ? common[g / 4][j] : 0;
        end else src[g][i] = (j >= 0 && j < NA_LEN) ? p[j] : 0;
      end
      for (int i = 0; i < TOT; i++) begin rx[g][i] = 0; end
    end
    // playback stream of ch 5 as the channel will see it (switch at PB_START)
    for (int i = PB_START + 1; i < TOT; i++) src[5][i] = (i == PB_START + 1) ? 0 : pat[(i - PB_START - 2) % 256];
    for (int g = 0; g < NCH; g++) bo[g] = bcid(src[g], coef, 3, 1023);
    foreach (jrx[m, i]) jrx[m][i] = 0;
    // ---- phase A
    base = kabs;
    for (int i = 0; i < PB_START - 2; i++) begin
      for (int g = 0; g < NCH; g++) adc[g] = 10'(at(src[g], i));
      l1a = (i > 150 && i < NA_LEN + S0 && $urandom % 200 == 0);
      if (l1a) l1a_rel.push_back(i);
      pbus_in_valid = ($urandom % 10 < 3);
      pbus_in_data  = {PB_DATA, 6'h3F, 36'(foreign_sent)};
      if (pbus_in_valid) foreign_sent++;
      step();
    end
    l1a = 0; pbus_in_valid = 0;
    for (int g = 0; g < NCH; g++) adc[g] = 0;
    // stop the monitors (all rate periods holding stream data have closed)
    sc_wr(ch_addr(9, SP_REGS, R_HIST_MODE), int'(HM_OFF));        // edge PB_START-2
    sc_wr(ch_addr(10, SP_REGS, R_HIST_MODE), int'(HM_OFF));       // edge PB_START-1
    // ---- phase B: playback on ch 5
    sc_wr(ch_addr(5, SP_REGS, R_HIST_MODE), int'(HM_PLAYBACK));   // edge PB_START
    while (kabs - base < TOT - 2) step();
    // ---- compare the real-time outputs with the model
    for (int g = 0; g < NCH; g++)
      for (int i = 0; i < TOT - 4; i++) begin
        int e;
        e = et_m(g, i);
        checks++;
        if (rx[g][i] != e) begin
          failures++;
          if (failures < 15) $display("ch %0d rel %0d: ET %0d exp %0d", g, i, rx[g][i], e);
        end
        if (at(bo[g], i) == 1023) m_sat++;
        else if (at(bo[g], i) != 0) m_peak++;
        if (g == 5 && i > PB_START && e != 0) m_play++;
      end
    for (int m = 0; m < NM; m++)
      for (int i = 0; i < TOT - 4; i++) begin
        int s;
        s = 0;
        for (int c = 0; c < 4; c++) s += et_m(4 * m + c, i);
        if (s > 511) s = 511;
        checks++;
        if (jrx[m][i] != s) begin
          failures++;
          if (failures < 15) $display("mcm %0d rel %0d: jet %0d exp %0d", m, i, jrx[m][i], s);
        end
      end
    // ---- readout fragments of phases A/B
    begin
      int fi, nev;
      fi = 0; nev = 0;
      foreach (l1a_rel[n]) begin
        logic [PB_W-1:0] w;
        checks++;
        if (fi >= frag.size()) begin failures++; $display("fragment %0d missing", n); break; end
        w = frag[fi++];
        if (w[PB_W-1 -: 2] != PB_HEADER || w[35:0] != 36'(n)) begin failures++; $display("bad header %h", w); end
        for (int a = 0; a < NA; a++)
          for (int j = 0; j < NSL; j++) begin
            int e, g0;
            logic [PB_W-1:0] x;
            e = l1a_rel[n] - 80 - 1 + j - 1;
            g0 = 2 * a;
            x = {PB_DATA, 6'(a), 8'(et_m(g0 + 1, e)), 10'(raw_m(g0 + 1, e)), 8'(et_m(g0, e)), 10'(raw_m(g0, e))};
            checks++;
            if (fi >= frag.size() || frag[fi] !== x) begin
              failures++;
              if (failures < 15) $display("event %0d asic %0d slice %0d: %h exp %h", n, a, j, (fi < frag.size()) ? frag[fi] : '0, x);
            end
            fi++;
          end
        nev++;
      end
      m_event = nev;
      checks++;
      if (fi != frag.size()) begin failures++; $display("%0d extra bus words", frag.size() - fi); end
      checks++;
      if (foreign_rx != foreign_sent) begin failures++; $display("foreign %0d of %0d", foreign_rx, foreign_sent); end
    end
    // ---- histogram of ch 9 (bins 1..255: ET values seen during the run)
    for (int b = 0; b < 256; b++) hist_model[b] = 0;
    for (int i = 0; i < PB_START; i++) hist_model[et_m(9, i - 1)]++;
    for (int b = 1; b < 256; b++) begin
      sc_rd(ch_addr(9, SP_HIST, b), d);
      sc_rd(ch_addr(9, SP_HIST, b), d);
      checks++;
      if (d != hist_model[b]) begin failures++; if (failures < 15) $display("hist bin %0d: %0d exp %0d", b, d, hist_model[b]); end
      if (d != 0) m_spec++;
    end
    // ---- rate of ch 10: sum over the stored periods = samples above 100
    rate_model = 0;
    for (int i = 0; i < TOT; i++) if (raw_m(10, i) > 100) rate_model++;
    begin
      int sum;
      sum = 0;
      for (int w = 0; w < 256; w++) begin
        sc_rd(ch_addr(10, SP_HIST, w), d);
        sc_rd(ch_addr(10, SP_HIST, w), d);
        sum += d;
      end
      checks++;
      if (sum != rate_model) begin failures++; $display("rate sum %0d exp %0d", sum, rate_model); end
      if (sum != 0) m_rate++;
    end
    // ---- phase C: accept-queue overflow
    check_frag_values = 0;
    frag.delete();
    sc_wr({1'b1, 16'd0, 4'd1}, 20);
    repeat (12) begin l1a = 1; step(); end
    l1a = 0;
    repeat (9 * (1 + NA * 20) + 2000) step();
    sc_rd({1'b1, 16'd0, 4'd2}, d);
    sc_rd({1'b1, 16'd0, 4'd2}, d);
    m_drop = d;
    checks += 2;
    if (d != 3) begin failures++; $display("dropped %0d", d); end
    if (frag.size() != 9 * (1 + NA * 20)) begin failures++; $display("overflow phase words %0d", frag.size()); end
    // ---- mechanisms
    $display("mechanisms: delay=%0d peak=%0d sat=%0d defer=%0d jetsat=%0d events=%0d drop=%0d foreign=%0d play=%0d spec=%0d rate=%0d",
             m_delay, m_peak, m_sat, m_defer, m_jetsat, m_event, m_drop, m_foreign, m_play, m_spec, m_rate);
    if (m_delay == 0) failures++;
    if (m_peak == 0) failures++;
    if (m_sat == 0) failures++;
    if (m_defer == 0) failures++;
    if (m_jetsat == 0) failures++;
    if (m_event == 0) failures++;
    if (m_drop == 0) failures++;
    if (m_foreign == 0) failures++;
    if (m_play == 0) failures++;
    if (m_spec == 0) failures++;
    if (m_rate == 0) failures++;
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
