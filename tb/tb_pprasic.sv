// tb_pprasic: self-checking test of one PPrAsic through its slow-control bus.
// Configures both channels (FIFO delays 3 and 6, filter, LUT) over slow
// control and reads registers and LUT entries back. Then feeds pulse
// streams and checks every clock: ET of both channels against the model,
// the BC-mux slots decoded back into both towers, the jet element against
// the four towers of the previous clock (two own, two from the neighbour),
// and the readout words of each Level-1 accept against the model's raw and
// ET values at the accepted bunch crossings.
module tb_pprasic;
  import ppr_pkg::*;
  import ppr_model_pkg::*;
  localparam int N = 3000, K0 = 20, LAT = 40;
  logic clk = 0, rst_n = 0;
  logic [9:0] adc [2];
  logic [11:0] bc;
  logic l1a, sc_we, bcmux_collision, ro_valid, ro_ready;
  logic [7:0] l1a_latency, n_slices;
  logic [14:0] sc_addr;
  logic [31:0] sc_wdata, sc_rdata;
  logic [7:0] et [2], nb_et [2];
  bcmux_slot_t bcmux_slot;
  logic [8:0] jet;
  logic [35:0] ro_data;
  logic [15:0] l1a_dropped;
  int checks = 0, failures = 0, both = 0, jets = 0, accepts = 0, ro_words = 0;
  int coef [5] = '{2, 5, 8, 4, 1};
  int dly [2] = '{3, 6};
  arr_t src [2], bo [2];
  int et_prev_sum, k, jet_exp, jet_sat = 0;
  logic [35:0] expq [$];
  int a_rx [N + K0 + 40], b_rx [N + K0 + 40];

  pprasic dut (.clk, .rst_n, .adc, .bc, .l1a, .l1a_latency, .n_slices, .sc_we, .sc_addr,
               .sc_wdata, .sc_rdata, .et, .nb_et, .bcmux_slot, .bcmux_collision, .jet,
               .ro_valid, .ro_data, .ro_ready, .l1a_dropped);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sc_wr(int ch, int sp, int off, int d);
    sc_we = 1; sc_addr = {1'(ch), 2'(sp), 12'(off)}; sc_wdata = 32'(d);
    @(posedge clk); #1;
    sc_we = 0;
  endtask

  task automatic sc_rd_check(int ch, int sp, int off, int exp_v);
    sc_addr = {1'(ch), 2'(sp), 12'(off)};
    @(posedge clk); #1;
    checks++;
    if (sc_rdata !== 32'(exp_v)) begin
      failures++;
      $display("sc read ch%0d sp%0d off%0d: %h exp %h", ch, sp, off, sc_rdata, exp_v);
    end
  endtask

  function automatic int et_model(int ch, int kk);  // ET shown after edge kk
    return lut_val(at(bo[ch], kk - CHAN_LAT - dly[ch]));
  endfunction
  function automatic int raw_model(int ch, int kk);
    return at(src[ch], kk - CHAN_LAT - dly[ch]);
  endfunction

  // readout sink
  always @(posedge clk) if (rst_n && ro_valid && ro_ready) begin
    logic [35:0] e;
    ro_words++;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected readout word"); end
    else begin
      e = expq.pop_front();
      if (ro_data !== e) begin
        failures++;
        if (failures < 10) $display("readout %h exp %h", ro_data, e);
      end
    end
  end

  initial begin
    int cw, ev;
    adc = '{0, 0}; nb_et = '{0, 0}; bc = 0; l1a = 0; sc_we = 0; sc_addr = 0; sc_wdata = 0;
    l1a_latency = 8'(LAT); n_slices = 3; ro_ready = 1;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    cw = (coef[4] << 16) | (coef[3] << 12) | (coef[2] << 8) | (coef[1] << 4) | coef[0];
    for (int ch = 0; ch < 2; ch++) begin
      sc_wr(ch, SP_REGS, R_FIFO_DELAY, dly[ch]);
      sc_wr(ch, SP_REGS, R_FIR_COEF, cw);
      sc_wr(ch, SP_REGS, R_FIR_DROP, 3);
      sc_wr(ch, SP_REGS, R_SAT_LEVEL, 1023);
      for (int a = 0; a < 1024; a++) sc_wr(ch, SP_LUT, a, lut_val(a));
    end
    sc_rd_check(1, SP_REGS, R_FIR_COEF, cw);
    sc_rd_check(0, SP_REGS, R_FIFO_DELAY, 3);
    sc_rd_check(1, SP_REGS, R_FIFO_DELAY, 6);
    sc_rd_check(1, SP_LUT, 500, lut_val(500));
    sc_rd_check(0, SP_LUT, 9, lut_val(9));
    // streams, indexed by the edge counter k below
    for (int ch = 0; ch < 2; ch++) begin
      arr_t p;
      p = pulses(N, 8, 1);
      src[ch] = new[N + K0];
      for (int i = 0; i < N + K0; i++) src[ch][i] = (i < K0) ? 0 : p[i - K0];
      bo[ch] = bcid(src[ch], coef, 3, 1023);
    end
    foreach (a_rx[i]) begin a_rx[i] = 0; b_rx[i] = 0; end
    et_prev_sum = 0;
    for (k = 0; k < N + K0 + 30; k++) begin
      adc[0] = 10'(at(src[0], k));
      adc[1] = 10'(at(src[1], k));
      nb_et[0] = 8'($urandom % 200);
      nb_et[1] = 8'($urandom % 200);
      jet_exp = et_prev_sum + int'(nb_et[0]) + int'(nb_et[1]);
      l1a = (k > 200 && k < N && $urandom % 40 == 0);
      if (l1a) begin
        accepts++;
        ev = k - LAT;
        for (int j = 0; j < 3; j++) begin
          int e;
          e = ev - 1 + j - 1;   // stored values are those shown after edge e
          expq.push_back({8'(et_model(1, e)), 10'(raw_model(1, e)),
                          8'(et_model(0, e)), 10'(raw_model(0, e))});
        end
      end
      @(posedge clk); #1;
      // ET of both channels
      for (int ch = 0; ch < 2; ch++) begin
        checks++;
        if (et[ch] !== 8'(et_model(ch, k))) begin
          failures++;
          if (failures < 10) $display("k=%0d ch%0d et=%0d exp=%0d", k, ch, et[ch], et_model(ch, k));
        end
      end
      if (et_model(0, k) != 0 && et_model(1, k) != 0) both++;
      // jet element: own towers of the previous clock, neighbour towers as presented
      checks++;
      if (jet !== 9'((jet_exp > 511) ? 511 : jet_exp)) begin
        failures++;
        if (failures < 10) $display("k=%0d jet=%0d exp=%0d", k, jet, jet_exp);
      end
      if (jet != 0) jets++;
      et_prev_sum = int'(et[0]) + int'(et[1]);
      if (jet == 9'd511) jet_sat++;
      // BC-mux slot belongs to the ETs shown after edge k-1
      if (bcmux_slot.data != 0 && k >= 2) begin
        case (bcmux_slot.code)
          BCMUX_A_NOW:  a_rx[k-1] = bcmux_slot.data;
          BCMUX_B_NOW:  b_rx[k-1] = bcmux_slot.data;
          BCMUX_B_PREV: b_rx[k-2] = bcmux_slot.data;
          default: failures++;
        endcase
      end
      if (bcmux_collision) failures++;
    end
    l1a = 0;
    for (int i = 0; i < N + K0; i++) begin
      checks += 2;
      if (a_rx[i] != et_model(0, i)) begin failures++; if (failures < 10) $display("bcmux A %0d", i); end
      if (b_rx[i] != et_model(1, i)) begin failures++; if (failures < 10) $display("bcmux B %0d", i); end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0 || accepts == 0 || both == 0 || jets == 0 || l1a_dropped != 0) begin
      failures++;
      $display("left %0d accepts %0d both %0d jets %0d", expq.size(), accepts, both, jets);
    end
    $display("accepts %0d readout words %0d simultaneous towers %0d", accepts, ro_words, both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
