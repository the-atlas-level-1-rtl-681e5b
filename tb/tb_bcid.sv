// tb_bcid: self-checking test of bunch-crossing identification.
// Feeds a stream of calorimeter-like pulses (rise over two samples, slow
// fall, on a pedestal) with random amplitudes, some far beyond the FADC
// range so that they saturate. An independent model computes the FIR,
// the peak-finder and the saturated-pulse rule over the whole stream; the
// output must match it with a latency of exactly 5 clocks. Also checked:
// each non-zero output is followed by a zero, and both algorithms fired.
module tb_bcid;
  localparam int N = 3000;
  localparam int LAT = 5;
  logic clk = 0, rst_n = 0;
  logic [9:0] din, dout, sat_level;
  logic [19:0] coef;
  logic [2:0] drop;
  logic sat_flag;
  int checks = 0, failures = 0, peaks = 0, sats = 0;
  int s [N];
  int expv [N];
  bit exps [N];
  int c_i [5] = '{1, 4, 9, 5, 2};
  int shape [6] = '{10, 50, 100, 70, 35, 10};

  bcid dut (.clk, .rst_n, .din, .coef, .drop, .sat_level, .dout, .sat_flag);

  always #5 clk = ~clk;

  function automatic int smp(int k);
    return (k < 0 || k >= N) ? 0 : s[k];
  endfunction

  function automatic int fir(int c);
    int f = 0;
    for (int i = 0; i < 5; i++) f += c_i[i] * smp(c + 2 - i);
    return f;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, amp, v, f;
    bit satw;
    // build the input stream
    for (int k = 0; k < N; k++) s[k] = 32 + int'($urandom % 3);
    t = 10;
    while (t < N - 10) begin
      amp = ($urandom % 5 == 0) ? 1100 + int'($urandom % 3000) : 20 + int'($urandom % 900);
      for (int j = 0; j < 6; j++) begin
        v = s[t + j] + amp * shape[j] / 100;
        s[t + j] = (v > 1023) ? 1023 : v;
      end
      t += 8 + int'($urandom % 12);
    end
    // reference model
    for (int c = 0; c < N; c++) begin
      satw = 0;
      for (int i = -2; i <= 2; i++) if (smp(c + i) >= 1023) satw = 1;
      exps[c] = (smp(c) >= 1023) && (smp(c - 1) < 1023);
      f = fir(c);
      if (exps[c]) expv[c] = 1023;
      else if (!satw && f > fir(c - 1) && f >= fir(c + 1)) begin
        v = f >> 3;
        expv[c] = (v > 1023) ? 1023 : v;
      end else expv[c] = 0;
    end
    coef = {4'(c_i[4]), 4'(c_i[3]), 4'(c_i[2]), 4'(c_i[1]), 4'(c_i[0])};
    drop = 3; sat_level = 10'd1023; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N + LAT; k++) begin
      din = 10'(smp(k));
      @(posedge clk);
      #1;
      if (k >= LAT) begin
        int c;
        c = k - LAT;
        checks++;
        if (dout !== 10'(expv[c]) || sat_flag !== exps[c]) begin
          failures++;
          if (failures < 10) $display("c=%0d dout=%0d exp=%0d sat=%0d/%0d", c, dout, expv[c], sat_flag, exps[c]);
        end
        if (c > 0 && expv[c-1] != 0) begin
          checks++;
          if (dout != 0) failures++;
        end
        if (dout != 0 && !sat_flag) peaks++;
        if (sat_flag) sats++;
      end
    end
    checks++;
    if (peaks == 0 || sats == 0) failures++;
    $display("non-saturated peaks %0d, saturated pulses %0d", peaks, sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
