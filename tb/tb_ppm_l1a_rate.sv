// tb_ppm_l1a_rate: readout of the full 64-channel module at the Level-1
// accept rate.
//
// Accepts arrive at random with a mean spacing of 533 BCs (40 MHz / 75 kHz),
// with no lower bound on the spacing, while all 64 channels carry pulse
// trains and the PipelineBus input carries foreign traffic half of the time.
// Three slices per accept (the event and one slice on either side). Checked:
// no accept is dropped, every fragment (header + 32 x 3 words) matches the
// reference model, the foreign words pass unchanged and in order. Reported:
// the share of ring slots used by this module's readout and the longest
// time from accept to the end of its fragment.
module tb_ppm_l1a_rate;
  import ppr_pkg::*;
  import ppr_model_pkg::*;
  localparam int NCH = 64, NA = 32, NSL = 3;
  localparam int LEN = 60000;        // BCs of pulse data
  localparam int MEAN = 533;         // mean accept spacing in BCs

  logic clk = 0, rst_n = 0;
  logic [9:0] adc [NCH];
  logic l1a = 0, bcr = 0, sc_we = 0;
  logic [20:0] sc_addr = '0;
  logic [31:0] sc_wdata = '0, sc_rdata;
  logic [20:0] cp_link [16];
  logic [9:0] jep_link [16];
  logic pbus_in_valid = 0, pbus_out_valid;
  logic [PB_W-1:0] pbus_in_data = '0, pbus_out_data;

  int checks = 0, failures = 0;
  int coef [5] = '{1, 4, 9, 5, 2};
  int dly [NCH];
  arr_t src [NCH], bo [NCH];
  int base = -1, kabs = 0;
  int l1a_rel [$];
  logic [PB_W-1:0] frag [$];
  int frag_end [$];              // relative edge at which each fragment ended
  int foreign_sent = 0, foreign_rx = 0, local_words = 0;

  ppm dut (.clk, .rst_n, .adc, .l1a, .bcr, .sc_we, .sc_addr, .sc_wdata, .sc_rdata,
           .cp_link, .jep_link, .pbus_in_valid, .pbus_in_data, .pbus_out_valid, .pbus_out_data);

  always #5 clk = ~clk;

  initial begin
    #80000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [20:0] ch_addr(int g, int sp, int off);
    return {1'b0, 5'(g / 2), 1'(g % 2), 2'(sp), 12'(off)};
  endfunction

  task automatic step();
    @(posedge clk); #1;
    kabs++;
  endtask

  task automatic sc_wr(logic [20:0] a, int d);
    sc_we = 1; sc_addr = a; sc_wdata = 32'(d);
    step();
    sc_we = 0;
  endtask

  always @(posedge clk) if (rst_n && pbus_out_valid) begin
    if (pbus_out_data[PB_W-3 -: 6] == 6'h3F) begin
      checks++;
      if (pbus_out_data[35:0] !== 36'(foreign_rx)) failures++;
      foreign_rx++;
    end else begin
      frag.push_back(pbus_out_data);
      local_words++;
      if (frag.size() % (1 + NA * NSL) == 0) frag_end.push_back(kabs - base);
    end
  end

  function automatic int et_m(int g, int i);
    return lut_val(at(bo[g], i - CHAN_LAT - dly[g]));
  endfunction
  function automatic int raw_m(int g, int i);
    return at(src[g], i - CHAN_LAT - dly[g]);
  endfunction

  initial begin
    int d, cw, fi, worst;
    for (int g = 0; g < NCH; g++) adc[g] = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    cw = (coef[4] << 16) | (coef[3] << 12) | (coef[2] << 8) | (coef[1] << 4) | coef[0];
    for (int g = 0; g < NCH; g++) begin
      dly[g] = (g * 3) % 16;
      sc_wr(ch_addr(g, SP_REGS, R_FIFO_DELAY), dly[g]);
      sc_wr(ch_addr(g, SP_REGS, R_FIR_COEF), cw);
      sc_wr(ch_addr(g, SP_REGS, R_FIR_DROP), 3);
      sc_wr(ch_addr(g, SP_REGS, R_SAT_LEVEL), 1023);
      for (int a = 0; a < 1024; a++) sc_wr(ch_addr(g, SP_LUT, a), lut_val(a));
    end
    for (int g = 0; g < NCH; g++) begin
      src[g] = pulses(LEN, 8, 1);
      bo[g] = bcid(src[g], coef, 3, 1023);
    end
    base = kabs;
    for (int i = 0; i < LEN + 400; i++) begin
      for (int g = 0; g < NCH; g++) adc[g] = 10'(at(src[g], i));
      // exponential spacing: accept with probability 1/MEAN per BC
      l1a = (i > 200 && i < LEN && $urandom % MEAN == 0);
      if (l1a) l1a_rel.push_back(i);
      pbus_in_valid = ($urandom % 2 == 0);
      pbus_in_data  = {PB_DATA, 6'h3F, 36'(foreign_sent)};
      if (pbus_in_valid) foreign_sent++;
      step();
    end
    l1a = 0; pbus_in_valid = 0;
    repeat (2000) step();
    sc_addr = {1'b1, 16'd0, 4'd2};
    step();
    checks++;
    if (sc_rdata != 0) begin failures++; $display("accepts dropped: %0d", sc_rdata); end
    // fragments
    fi = 0; worst = 0;
    foreach (l1a_rel[n]) begin
      checks++;
      if (fi >= frag.size() || frag[fi][PB_W-1 -: 2] != PB_HEADER || frag[fi][35:0] != 36'(n)) begin
        failures++; $display("bad or missing header for accept %0d", n); break;
      end
      fi++;
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
            if (failures < 10) $display("accept %0d asic %0d slice %0d mismatch", n, a, j);
          end
          fi++;
        end
      if (n < frag_end.size() && frag_end[n] - l1a_rel[n] > worst) worst = frag_end[n] - l1a_rel[n];
    end
    checks += 2;
    if (fi != frag.size()) begin failures++; $display("%0d extra words", frag.size() - fi); end
    if (foreign_rx != foreign_sent) begin failures++; $display("foreign %0d of %0d", foreign_rx, foreign_sent); end
    checks++;
    if (l1a_rel.size() < 50) begin failures++; $display("too few accepts"); end
    $display("accepts %0d over %0d BCs; ring slots used by this module %0d%%; longest accept-to-fragment-end %0d BCs",
             l1a_rel.size(), LEN, 100 * local_words / (LEN + 400), worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
