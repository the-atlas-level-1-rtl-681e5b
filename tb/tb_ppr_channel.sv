// tb_ppr_channel: self-checking test of one complete channel.
// Run 1: calorimeter-like pulses (some saturated) through a 5-BC FIFO delay,
// BCID and the LUT; ET and the aligned raw sample are compared every clock
// with the reference model, which also fixes the latency (7 + delay).
// Run 2: playback: a pulse pattern loaded into the histogram/playback memory
// replaces the FADC input; with a 2-BC delay the ET must follow the model of
// the replayed stream (playback adds one clock).
module tb_ppr_channel;
  import ppr_pkg::*;
  import ppr_model_pkg::*;
  localparam int N = 2500;
  logic clk = 0, rst_n = 0;
  logic [9:0] adc, raw, lut_addr;
  chan_cfg_t cfg;
  logic [11:0] bc;
  logic lut_we, hist_we, sat_flag;
  logic [7:0] lut_wdata, lut_rdata, et, hist_addr;
  logic [15:0] hist_wdata, hist_rdata;
  int checks = 0, failures = 0, nonzero = 0, sat_seen = 0;
  int coef [5] = '{1, 4, 9, 5, 2};
  arr_t src, bc_out;

  ppr_channel dut (.clk, .rst_n, .adc, .cfg, .bc, .lut_we, .lut_addr, .lut_wdata, .lut_rdata,
                   .hist_we, .hist_addr, .hist_wdata, .hist_rdata, .raw, .et, .sat_flag);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, int delay);
    int c;
    bc_out = bcid(src, coef, 3, 1023);
    for (int k = 0; k < n; k++) begin
      adc = 10'(at(src, k));
      bc = 12'(k % 2961);
      @(posedge clk); #1;
      c = k - CHAN_LAT - delay;
      checks += 2;
      if (et !== 8'(lut_val(at(bc_out, c)))) begin
        failures++;
        if (failures < 10) $display("k=%0d et=%0d exp=%0d", k, et, lut_val(at(bc_out, c)));
      end
      if (raw !== 10'(at(src, c))) begin
        failures++;
        if (failures < 10) $display("k=%0d raw=%0d exp=%0d", k, raw, at(src, c));
      end
      if (et != 0) nonzero++;
      if (sat_flag) sat_seen++;
    end
  endtask

  initial begin
    arr_t pat;
    adc = 0; bc = 0; lut_we = 0; hist_we = 0; lut_addr = 0; lut_wdata = 0;
    hist_addr = 0; hist_wdata = 0;
    cfg = '0;
    cfg.fir_coef  = {4'(coef[4]), 4'(coef[3]), 4'(coef[2]), 4'(coef[1]), 4'(coef[0])};
    cfg.fir_drop  = 3;
    cfg.sat_level = 10'd1023;
    cfg.win_hi    = 12'hFFF;
    cfg.rate_dur  = 16'd100;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    // load the LUT and read a few entries back
    for (int a = 0; a < 1024; a++) begin
      lut_we = 1; lut_addr = 10'(a); lut_wdata = 8'(lut_val(a));
      @(posedge clk); #1;
    end
    lut_we = 0;
    for (int a = 0; a < 1024; a += 37) begin
      lut_addr = 10'(a);
      @(posedge clk); #1;
      checks++;
      if (lut_rdata !== 8'(lut_val(a))) failures++;
    end
    // run 1
    cfg.fifo_delay = 5;
    rst_n = 0; @(posedge clk); #1; rst_n = 1;
    src = pulses(N, 8, 2);
    run(N, 5);
    checks++;
    if (nonzero == 0 || sat_seen == 0) begin failures++; $display("nonzero %0d sat %0d", nonzero, sat_seen); end
    // run 2: playback
    pat = pulses(256, 10, 0);
    for (int i = 0; i < 256; i++) begin
      hist_we = 1; hist_addr = 8'(i); hist_wdata = 16'(pat[i]);
      @(posedge clk); #1;
    end
    hist_we = 0;
    cfg.fifo_delay = 2;
    cfg.hist_mode  = HM_PLAYBACK;
    rst_n = 0; @(posedge clk); #1; rst_n = 1;
    src = new[600];
    for (int m = 0; m < 600; m++) src[m] = (m >= 1) ? pat[(m - 1) % 256] : 0;
    nonzero = 0;
    run(600, 2);
    checks++;
    if (nonzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
