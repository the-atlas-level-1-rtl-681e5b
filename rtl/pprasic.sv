// pprasic: Pre-Processor ASIC serving two trigger-tower channels.
//
// Holds two ppr_channel chains, their configuration registers, the BC-mux
// of the tower pair, the readout pipelines and, when JET_EN is set, the
// 0.2 x 0.2 jet-element adder over its own two towers and the two towers of
// the neighbouring ASIC on the same MCM (nb_et). That the ASIC does BCID,
// calibration, jet pre-summing and pipelined readout follows the
// Pre-Processor description; two channels per ASIC, the register map and
// the bus below are this design's own.
//
// Slow control (one clock read latency, sc_rdata valid the clock after the
// address): sc_addr[14] = channel, sc_addr[13:12] = space
//   space 0, offset [3:0]: channel registers (see ppr_pkg R_*)
//   space 1, offset [9:0]: LUT entry (8 bits)
//   space 2, offset [7:0]: histogram / playback word (16 bits)
// Timing: et(t) as in ppr_channel; bcmux_slot and jet one clock after et.
module pprasic
  import ppr_pkg::*;
#(
  parameter bit JET_EN = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ADC_W-1:0] adc [2],
  input  logic [11:0]      bc,
  input  logic             l1a,
  input  logic [7:0]       l1a_latency,
  input  logic [7:0]       n_slices,
  // slow control
  input  logic             sc_we,
  input  logic [14:0]      sc_addr,
  input  logic [31:0]      sc_wdata,
  output logic [31:0]      sc_rdata,
  // real-time outputs
  output logic [ET_W-1:0]  et    [2],
  input  logic [ET_W-1:0]  nb_et [2],
  output bcmux_slot_t      bcmux_slot,
  output logic             bcmux_collision,
  output logic [JET_W-1:0] jet,
  // readout
  output logic             ro_valid,
  output logic [RO_W-1:0]  ro_data,
  input  logic             ro_ready,
  output logic [15:0]      l1a_dropped
);
  chan_cfg_t        cfg [2];
  logic [ADC_W-1:0] raw [2];
  logic [ET_W-1:0]  lut_rdata [2];
  logic [HIST_CNT_W-1:0] hist_rdata [2];
  logic             sat_flag [2];

  logic       sc_ch;
  logic [1:0] sc_sp;
  logic [3:0] sc_reg;
  assign sc_ch  = sc_addr[14];
  assign sc_sp  = sc_addr[13:12];
  assign sc_reg = sc_addr[3:0];

  // ---- configuration registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++) begin
        cfg[c]           <= '0;
        cfg[c].fir_coef  <= 20'h01210;    // 0,1,2,1,0 : a short smoothing filter
        cfg[c].sat_level <= '1;
        cfg[c].hist_thresh <= '1;
        cfg[c].win_hi    <= 12'hFFF;
        cfg[c].rate_dur  <= 16'd1000;
      end
    end else if (sc_we && sc_sp == SP_REGS) begin
      case (sc_reg)
        R_FIFO_DELAY: cfg[sc_ch].fifo_delay  <= sc_wdata[3:0];
        R_FIR_COEF:   cfg[sc_ch].fir_coef    <= sc_wdata[FIR_TAPS*COEF_W-1:0];
        R_FIR_DROP:   cfg[sc_ch].fir_drop    <= sc_wdata[2:0];
        R_SAT_LEVEL:  cfg[sc_ch].sat_level   <= sc_wdata[ADC_W-1:0];
        R_HIST_MODE: begin
          cfg[sc_ch].hist_mode   <= hist_mode_e'(sc_wdata[1:0]);
          cfg[sc_ch].hist_src_et <= sc_wdata[2];
        end
        R_HIST_THR:   cfg[sc_ch].hist_thresh <= sc_wdata[ADC_W-1:0];
        R_HIST_WIN: begin
          cfg[sc_ch].win_lo <= sc_wdata[11:0];
          cfg[sc_ch].win_hi <= sc_wdata[27:16];
        end
        R_RATE_DUR:   cfg[sc_ch].rate_dur    <= sc_wdata[15:0];
        default: ;
      endcase
    end
  end

  // ---- read-back
  logic       rd_ch_q;
  logic [1:0] rd_sp_q;
  logic [31:0] reg_rd_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ch_q  <= 1'b0;
      rd_sp_q  <= '0;
      reg_rd_q <= '0;
    end else begin
      rd_ch_q <= sc_ch;
      rd_sp_q <= sc_sp;
      case (sc_reg)
        R_FIFO_DELAY: reg_rd_q <= 32'(cfg[sc_ch].fifo_delay);
        R_FIR_COEF:   reg_rd_q <= 32'(cfg[sc_ch].fir_coef);
        R_FIR_DROP:   reg_rd_q <= 32'(cfg[sc_ch].fir_drop);
        R_SAT_LEVEL:  reg_rd_q <= 32'(cfg[sc_ch].sat_level);
        R_HIST_MODE:  reg_rd_q <= 32'({cfg[sc_ch].hist_src_et, cfg[sc_ch].hist_mode});
        R_HIST_THR:   reg_rd_q <= 32'(cfg[sc_ch].hist_thresh);
        R_HIST_WIN:   reg_rd_q <= {4'd0, cfg[sc_ch].win_hi, 4'd0, cfg[sc_ch].win_lo};
        R_RATE_DUR:   reg_rd_q <= 32'(cfg[sc_ch].rate_dur);
        default:      reg_rd_q <= '0;
      endcase
    end
  end

  always_comb begin
    case (rd_sp_q)
      SP_LUT:  sc_rdata = 32'(lut_rdata[rd_ch_q]);
      SP_HIST: sc_rdata = 32'(hist_rdata[rd_ch_q]);
      default: sc_rdata = reg_rd_q;
    endcase
  end

  // ---- channels
  for (genvar c = 0; c < 2; c++) begin : g_ch
    ppr_channel u_ch (
      .clk, .rst_n, .adc(adc[c]), .cfg(cfg[c]), .bc,
      .lut_we(sc_we && sc_sp == SP_LUT && sc_ch == c), .lut_addr(sc_addr[ADC_W-1:0]),
      .lut_wdata(sc_wdata[ET_W-1:0]), .lut_rdata(lut_rdata[c]),
      .hist_we(sc_we && sc_sp == SP_HIST && sc_ch == c), .hist_addr(sc_addr[7:0]),
      .hist_wdata(sc_wdata[HIST_CNT_W-1:0]), .hist_rdata(hist_rdata[c]),
      .raw(raw[c]), .et(et[c]), .sat_flag(sat_flag[c])
    );
  end

  // ---- BC-mux of the tower pair
  bcmux u_bcmux (
    .clk, .rst_n, .et_a(et[0]), .et_b(et[1]), .slot(bcmux_slot), .collision(bcmux_collision)
  );

  // ---- jet element over this ASIC's two towers and the neighbour's two
  if (JET_EN) begin : g_jet
    logic [ET_W-1:0] jet_in [4];
    assign jet_in = '{et[0], et[1], nb_et[0], nb_et[1]};
    jet_adder u_jet (.clk, .rst_n, .et(jet_in), .jet);
  end else begin : g_nojet
    assign jet = '0;
  end

  // ---- readout pipelines
  readout_pipeline u_ro (
    .clk, .rst_n, .raw_in(raw), .et_in(et), .l1a, .latency(l1a_latency),
    .n_slices, .ro_valid, .ro_data, .ro_ready, .l1a_dropped
  );
endmodule
