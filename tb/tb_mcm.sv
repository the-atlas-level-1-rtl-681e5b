// tb_mcm: self-checking test of one Multi-Chip Module.
// Configures the four channels over slow control (different FIFO delays),
// feeds pulse streams and checks every clock: the 21-bit Cluster Processor
// link word (parity, and both BC-mux slots decoded back into the four
// towers' ET of the model) and the 10-bit jet link word (parity and the
// saturated sum of the four model ETs). Readout of both PPrAsics is checked
// for the number of words per accept.
module tb_mcm;
  import ppr_pkg::*;
  import ppr_model_pkg::*;
  localparam int N = 3000, K0 = 20, LAT = 40, NB = N + K0 + 40;
  logic clk = 0, rst_n = 0;
  logic [9:0] adc [4];
  logic [11:0] bc;
  logic l1a, sc_we;
  logic [7:0] l1a_latency, n_slices;
  logic [15:0] sc_addr, l1a_dropped;
  logic [31:0] sc_wdata, sc_rdata;
  logic [20:0] cp_link;
  logic [9:0] jep_link;
  logic [1:0] bcmux_collision;
  logic ro_valid [2], ro_ready [2];
  logic [35:0] ro_data [2];
  int checks = 0, failures = 0, accepts = 0, jet_sat = 0;
  int words [2] = '{0, 0};
  int coef [5] = '{1, 4, 9, 5, 2};
  int dly [4] = '{0, 2, 4, 7};
  arr_t src [4], bo [4];
  int rx [4][NB];

  mcm dut (.clk, .rst_n, .adc, .bc, .l1a, .l1a_latency, .n_slices, .sc_we, .sc_addr,
           .sc_wdata, .sc_rdata, .cp_link, .jep_link, .bcmux_collision,
           .ro_valid, .ro_data, .ro_ready, .l1a_dropped);

  always #5 clk = ~clk;

  initial begin
    #8000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sc_wr(int ch, int sp, int off, int d);
    // channel ch = 2*asic + local channel
    sc_we = 1; sc_addr = {1'(ch / 2), 1'(ch % 2), 2'(sp), 12'(off)}; sc_wdata = 32'(d);
    @(posedge clk); #1;
    sc_we = 0;
  endtask

  function automatic int et_model(int ch, int kk);
    return lut_val(at(bo[ch], kk - CHAN_LAT - dly[ch]));
  endfunction

  always @(posedge clk) if (rst_n)
    for (int a = 0; a < 2; a++) if (ro_valid[a]) words[a]++;

  task automatic decode(int a, bcmux_slot_t s, int kk);
    // slot shown after edge kk belongs to the ET shown after edge kk-1
    if (s.data != 0 && kk >= 2) begin
      case (s.code)
        BCMUX_A_NOW:  rx[2*a][kk-1]   = s.data;
        BCMUX_B_NOW:  rx[2*a+1][kk-1] = s.data;
        BCMUX_B_PREV: rx[2*a+1][kk-2] = s.data;
        default: failures++;
      endcase
    end
  endtask

  initial begin
    int cw, jexp;
    bcmux_slot_t s0, s1;
    for (int c = 0; c < 4; c++) adc[c] = 0;
    bc = 0; l1a = 0; sc_we = 0; sc_addr = 0; sc_wdata = 0;
    l1a_latency = 8'(LAT); n_slices = 5;
    ro_ready = '{1, 1};
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    cw = (coef[4] << 16) | (coef[3] << 12) | (coef[2] << 8) | (coef[1] << 4) | coef[0];
    for (int ch = 0; ch < 4; ch++) begin
      sc_wr(ch, SP_REGS, R_FIFO_DELAY, dly[ch]);
      sc_wr(ch, SP_REGS, R_FIR_COEF, cw);
      sc_wr(ch, SP_REGS, R_FIR_DROP, 2);
      sc_wr(ch, SP_REGS, R_SAT_LEVEL, 1023);
      for (int a = 0; a < 1024; a++) sc_wr(ch, SP_LUT, a, lut_val(a));
    end
    sc_addr = {1'b1, 1'b1, SP_REGS, 12'(R_FIFO_DELAY)};
    @(posedge clk); #1;
    checks++;
    if (sc_rdata !== 32'd7) begin failures++; $display("read-back %0d", sc_rdata); end
    for (int ch = 0; ch < 4; ch++) begin
      arr_t p;
      p = pulses(N, 8, 2);
      src[ch] = new[N + K0];
      for (int i = 0; i < N + K0; i++) src[ch][i] = (i < K0) ? 0 : p[i - K0];
      bo[ch] = bcid(src[ch], coef, 2, 1023);
      for (int i = 0; i < NB; i++) rx[ch][i] = 0;
    end
    for (int k = 0; k < N + K0 + 30; k++) begin
      for (int c = 0; c < 4; c++) adc[c] = 10'(at(src[c], k));
      l1a = (k > 200 && k < N && $urandom % 60 == 0);
      if (l1a) accepts++;
      @(posedge clk); #1;
      // link words are one clock behind the slots / jet element
      checks += 3;
      if (^cp_link !== 1'b0) failures++;
      if (^jep_link !== 1'b0) failures++;
      s0 = cp_link[9:0];
      s1 = cp_link[19:10];
      decode(0, s0, k - 1);
      decode(1, s1, k - 1);
      jexp = 0;
      for (int c = 0; c < 4; c++) jexp += et_model(c, k - 2);
      if (jexp > 511) begin jexp = 511; jet_sat++; end
      if (jep_link[8:0] !== 9'(jexp)) begin
        failures++;
        if (failures < 10) $display("k=%0d jet %0d exp %0d", k, jep_link[8:0], jexp);
      end
      if (bcmux_collision != 0) failures++;
    end
    l1a = 0;
    for (int c = 0; c < 4; c++)
      for (int i = 0; i < N + K0; i++) begin
        checks++;
        if (rx[c][i] != et_model(c, i)) begin
          failures++;
          if (failures < 10) $display("tower %0d bc %0d: %0d exp %0d", c, i, rx[c][i], et_model(c, i));
        end
      end
    repeat (20) @(posedge clk);
    checks += 2;
    if (words[0] != 5 * accepts || words[1] != 5 * accepts) begin
      failures++; $display("readout words %0d %0d for %0d accepts", words[0], words[1], accepts);
    end
    if (jet_sat == 0) begin failures++; $display("jet saturation never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
