// ppr_model_pkg: reference model of one trigger-tower channel for the
// testbenches, written independently of the RTL as whole-array functions.
//
// A stream is indexed by the clock edge at which a sample is presented to
// the channel. The model gives, per sample index c, the value the channel
// attributes to that sample: BCID output (FIR + peak finder, or 1023 at the
// leading edge of a saturated pulse) and the ET after the LUT. The channel
// shows sample c's results CHAN_LAT + fifo delay edges later.
package ppr_model_pkg;
  localparam int CHAN_LAT = 7;   // FIFO stage 1 + BCID 5 + LUT 1

  typedef int arr_t [];

  function automatic int at(const ref arr_t s, input int k);
    return (k < 0 || k >= s.size()) ? 0 : s[k];
  endfunction

  function automatic int fir(const ref arr_t s, input int c, input int coef [5]);
    int f = 0;
    for (int i = 0; i < 5; i++) f += coef[i] * at(s, c + 2 - i);
    return f;
  endfunction

  // BCID result for every sample of s
  function automatic arr_t bcid(const ref arr_t s, input int coef [5], input int drop, input int sat);
    arr_t o;
    int f, v;
    bit satw;
    o = new[s.size()];
    for (int c = 0; c < s.size(); c++) begin
      satw = 0;
      for (int i = -2; i <= 2; i++) if (at(s, c + i) >= sat) satw = 1;
      f = fir(s, c, coef);
      if (at(s, c) >= sat && at(s, c - 1) < sat) o[c] = 1023;
      else if (!satw && f > fir(s, c - 1, coef) && f >= fir(s, c + 1, coef)) begin
        v = f >> drop;
        o[c] = (v > 1023) ? 1023 : v;
      end else o[c] = 0;
    end
    return o;
  endfunction

  // calibration used by the testbenches: pedestal 8, gain 1/2, threshold 3
  function automatic int lut_val(int a);
    int v;
    v = (a - 8) / 2;
    if (v < 3) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  // stream of calorimeter-like pulses on a pedestal; 'satfrac' of 10
  // pulses exceed the FADC range; pulses start at least 'gap' apart
  function automatic arr_t pulses(int n, int gap, int satfrac);
    arr_t s;
    int shape [6] = '{10, 50, 100, 70, 35, 10};
    int t, amp, v;
    s = new[n];
    for (int k = 0; k < n; k++) s[k] = 30 + int'($urandom % 3);
    t = 10 + int'($urandom % 8);
    while (t < n - 10) begin
      amp = (int'($urandom % 10) < satfrac) ? 1100 + int'($urandom % 3000) : 20 + int'($urandom % 900);
      for (int j = 0; j < 6; j++) begin
        v = s[t + j] + amp * shape[j] / 100;
        s[t + j] = (v > 1023) ? 1023 : v;
      end
      t += gap + int'($urandom % 12);
    end
    return s;
  endfunction
endpackage
