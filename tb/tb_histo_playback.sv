// tb_histo_playback: self-checking test of the histogram/playback memory.
//  1. Playback: loads 256 words over slow control and checks that they come
//     out cyclically, one per clock, one clock after the mode is entered.
//  2. Spectrum of raw data in a bunch window, 3. spectrum of ET: random data,
//     a model histogram kept here, every bin read back and compared.
//  4. Rate mode: counts above a threshold over 50-BC periods, stored in
//     successive words, compared with the model.
module tb_histo_playback;
  import ppr_pkg::*;
  logic clk = 0, rst_n = 0;
  hist_mode_e mode;
  logic src_et;
  logic [9:0] thresh, raw, pb_data;
  logic [11:0] win_lo, win_hi, bc;
  logic [15:0] rate_dur, sc_wdata, sc_rdata;
  logic [7:0] et, sc_addr;
  logic sc_we;
  int checks = 0, failures = 0;
  int model [256];
  logic [15:0] pbw [256];

  histo_playback dut (.clk, .rst_n, .mode, .src_et, .thresh, .win_lo, .win_hi, .rate_dur,
                      .bc, .raw, .et, .pb_data, .sc_we, .sc_addr, .sc_wdata, .sc_rdata);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sc_write(int a, int d);
    sc_we = 1; sc_addr = 8'(a); sc_wdata = 16'(d);
    @(posedge clk); #1;
    sc_we = 0;
  endtask

  task automatic clear_and_model();
    for (int i = 0; i < 256; i++) begin sc_write(i, 0); model[i] = 0; end
  endtask

  task automatic read_compare(string what);
    for (int i = 0; i < 256; i++) begin
      sc_addr = 8'(i);
      @(posedge clk); #1;
      checks++;
      if (sc_rdata !== 16'(model[i])) begin
        failures++;
        if (failures < 10) $display("%s bin %0d: %0d exp %0d", what, i, sc_rdata, model[i]);
      end
    end
  endtask

  initial begin
    int hits;
    mode = HM_OFF; src_et = 0; thresh = 0; win_lo = 0; win_hi = 0; rate_dur = 50;
    bc = 0; raw = 0; et = 0; sc_we = 0; sc_addr = 0; sc_wdata = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    // 1. playback
    for (int i = 0; i < 256; i++) begin pbw[i] = 16'($urandom); sc_write(i, pbw[i]); end
    mode = HM_PLAYBACK;
    for (int n = 1; n <= 600; n++) begin
      @(posedge clk); #1;
      checks++;
      if (pb_data !== pbw[(n - 1) % 256][9:0]) begin
        failures++;
        if (failures < 10) $display("playback %0d: %0d exp %0d", n, pb_data, pbw[(n-1)%256][9:0]);
      end
    end
    mode = HM_OFF;
    // 2. raw spectrum in a bunch window
    clear_and_model();
    win_lo = 100; win_hi = 199; src_et = 0;
    mode = HM_SPECTRUM;
    hits = 0;
    for (int n = 0; n < 6000; n++) begin
      bc = 12'(n % 2961);
      raw = ($urandom % 2) ? 10'($urandom % 64) : 10'($urandom);
      et = 8'($urandom);
      if (bc >= win_lo && bc <= win_hi) begin model[raw >> 2]++; hits++; end
      @(posedge clk); #1;
    end
    mode = HM_OFF;
    read_compare("raw");
    // 3. ET spectrum, wide window
    clear_and_model();
    win_lo = 0; win_hi = 2960; src_et = 1;
    mode = HM_SPECTRUM;
    for (int n = 0; n < 3000; n++) begin
      bc = 12'(n % 2961);
      et = 8'($urandom % 40);
      raw = 10'($urandom);
      model[et]++;
      @(posedge clk); #1;
    end
    mode = HM_OFF;
    read_compare("et");
    // 4. rate monitoring
    clear_and_model();
    src_et = 0; thresh = 500; rate_dur = 50;
    mode = HM_RATE;
    for (int n = 0; n < 50 * 20; n++) begin
      raw = 10'($urandom);
      if (raw > thresh) model[n / 50]++;
      @(posedge clk); #1;
    end
    mode = HM_OFF;
    read_compare("rate");
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
