// ppr_pkg: widths, encodings and configuration types shared by the
// Pre-Processor modules.
//
// Numbers taken from the Pre-Processor description: 10-bit FADC samples,
// 8-bit calibrated transverse energy (1 GeV LSB), 9-bit jet elements, a
// 16-deep synchronisation FIFO, up to 128 readout slices and 2961 bunches
// per turn for the histogram bunch window. The BCID filter size, the BC-mux
// slot encoding, the register map and the readout word formats are this
// design's own choices.
package ppr_pkg;

  localparam int unsigned ADC_W      = 10;   // FADC resolution
  localparam int unsigned ET_W       = 8;    // LUT output, 1 GeV LSB
  localparam int unsigned JET_W      = 9;    // jet element resolution
  localparam int unsigned FIFO_DEPTH = 16;   // synchronisation range in BCs
  localparam int unsigned FIR_TAPS   = 5;    // BCID filter length (own choice)
  localparam int unsigned COEF_W     = 4;    // unsigned coefficient width (own choice)
  localparam int unsigned MAX_SLICES = 128;  // readout slices per event
  localparam int unsigned BUNCHES    = 2961; // bunch window counter wrap
  localparam int unsigned HIST_BINS  = 256;  // histogram/playback words
  localparam int unsigned HIST_CNT_W = 16;   // histogram counter width

  // BC-mux slot: {code, data}. A slot with data == 0 carries nothing.
  typedef enum logic [1:0] {
    BCMUX_A_NOW  = 2'b00,   // tower A, this bunch crossing
    BCMUX_B_NOW  = 2'b01,   // tower B, this bunch crossing
    BCMUX_B_PREV = 2'b11    // tower B, previous bunch crossing
  } bcmux_code_e;

  typedef struct packed {
    bcmux_code_e         code;
    logic [ET_W-1:0]     data;
  } bcmux_slot_t;

  // Histogram / playback memory modes.
  typedef enum logic [1:0] {
    HM_OFF      = 2'd0,
    HM_PLAYBACK = 2'd1,
    HM_RATE     = 2'd2,
    HM_SPECTRUM = 2'd3
  } hist_mode_e;

  // Per-channel configuration, written over slow control.
  typedef struct packed {
    logic [3:0]                      fifo_delay;  // 0..15 BCs
    logic [FIR_TAPS*COEF_W-1:0]      fir_coef;    // c0 in the LSBs, c0 = newest sample
    logic [2:0]                      fir_drop;    // LSBs dropped after the FIR
    logic [ADC_W-1:0]                sat_level;   // saturation threshold
    hist_mode_e                      hist_mode;
    logic                            hist_src_et; // 0: raw FADC, 1: ET after LUT
    logic [ADC_W-1:0]                hist_thresh; // rate mode threshold
    logic [11:0]                     win_lo;      // spectrum bunch window
    logic [11:0]                     win_hi;
    logic [15:0]                     rate_dur;    // rate mode duration in BCs
  } chan_cfg_t;

  // Per-channel register offsets (slow-control space 0).
  localparam logic [3:0] R_FIFO_DELAY = 4'd0;
  localparam logic [3:0] R_FIR_COEF   = 4'd1;
  localparam logic [3:0] R_FIR_DROP   = 4'd2;
  localparam logic [3:0] R_SAT_LEVEL  = 4'd3;
  localparam logic [3:0] R_HIST_MODE  = 4'd4;   // [1:0] mode, [2] source
  localparam logic [3:0] R_HIST_THR   = 4'd5;
  localparam logic [3:0] R_HIST_WIN   = 4'd6;   // [11:0] lo, [27:16] hi
  localparam logic [3:0] R_RATE_DUR   = 4'd7;

  // Slow-control address spaces inside one PPrAsic (address bits 13:12).
  localparam logic [1:0] SP_REGS = 2'd0;
  localparam logic [1:0] SP_LUT  = 2'd1;
  localparam logic [1:0] SP_HIST = 2'd2;

  // Readout: one word per slice per PPrAsic, {ch1 et, ch1 raw, ch0 et, ch0 raw}.
  localparam int unsigned RO_W = 2 * (ADC_W + ET_W);

  // Merged readout / PipelineBus word: {type, asic index, payload}.
  localparam int unsigned PB_W = 2 + 6 + RO_W;
  typedef enum logic [1:0] {
    PB_IDLE   = 2'b00,
    PB_HEADER = 2'b01,
    PB_DATA   = 2'b10
  } pb_type_e;

  // Saturating narrowing.
  function automatic logic [JET_W-1:0] sat_jet(input logic [ET_W+1:0] s);
    return (s > ((1 << JET_W) - 1)) ? {JET_W{1'b1}} : s[JET_W-1:0];
  endfunction

endpackage
