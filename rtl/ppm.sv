// ppm: Pre-Processor Module, the top of the design.
//
// The ATLAS Level-1 Calorimeter Trigger Pre-Processor turns about 7200
// analogue trigger-tower pulses into calibrated 8-bit transverse energies
// tied to their bunch crossing, every 25 ns, and feeds them to the Cluster
// and Jet/Energy-Sum Processors. One module handles 64 towers: 16 MCMs of
// four channels, each MCM with two PPrAsics. Per tower: synchronisation
// FIFO, bunch-crossing identification, calibration LUT, histogram/playback
// memory and two readout pipelines; per tower pair a BC-mux; per four towers
// a 9-bit jet element. A readout merger collects the pipeline readout of all
// 32 PPrAsics after each Level-1 accept and places it on the PipelineBus
// ring. These counts follow the Pre-Processor description.
//
// Outside this module: the analogue receivers, FADCs and strobe-delay chips
// (adc[] are their 10-bit samples), the serialiser chips (cp_link[] and
// jep_link[] are their parallel words) and the readout driver at the end of
// the ring. All logic runs on the 40 MHz bunch-crossing clock.
//
// Slow control, one clock read latency:
//   sc_addr[20] = 1 : PPM registers, sc_addr[3:0]: 0 L1A latency in BCs
//                     (reset 80 = 2 us), 1 readout slices (reset 3),
//                     2 read-only: accepts dropped, 3 read-only: BC-mux
//                     collisions seen (saturating 16 bit)
//   sc_addr[20] = 0 : sc_addr[19:15] PPrAsic index (MCM = index/2),
//                     sc_addr[14:0] address inside that PPrAsic.
// Bunch counter: reset by bcr, wraps after BUNCHES (2961) bunch crossings.
module ppm
  import ppr_pkg::*;
#(
  parameter int unsigned N_MCM = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADC_W-1:0]  adc [4*N_MCM],
  input  logic              l1a,
  input  logic              bcr,
  input  logic              sc_we,
  input  logic [20:0]       sc_addr,
  input  logic [31:0]       sc_wdata,
  output logic [31:0]       sc_rdata,
  output logic [20:0]       cp_link  [N_MCM],
  output logic [9:0]        jep_link [N_MCM],
  input  logic              pbus_in_valid,
  input  logic [PB_W-1:0]   pbus_in_data,
  output logic              pbus_out_valid,
  output logic [PB_W-1:0]   pbus_out_data
);
  localparam int unsigned N_ASIC = 2 * N_MCM;

  logic [11:0] bc_q;
  logic [7:0]  l1a_latency_q, n_slices_q;
  logic [15:0] collisions_q;
  logic [31:0] mcm_rdata [N_MCM];
  logic [15:0] dropped   [N_MCM];
  logic [1:0]  coll      [N_MCM];
  logic        ro_valid  [N_ASIC];
  logic [RO_W-1:0] ro_data [N_ASIC];
  logic        ro_ready  [N_ASIC];
  logic        rem_valid, rem_ready;
  logic [PB_W-1:0] rem_data;
  logic        rd_glob_q;
  logic [4:0]  rd_asic_q;
  logic [31:0] glob_rd_q;
  logic        any_coll;

  // ---- bunch counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           bc_q <= '0;
    else if (bcr)                         bc_q <= '0;
    else if (bc_q == 12'(BUNCHES - 1))    bc_q <= '0;
    else                                  bc_q <= bc_q + 1'b1;
  end

  // ---- PPM registers
  always_comb begin
    any_coll = 1'b0;
    for (int m = 0; m < N_MCM; m++) any_coll |= |coll[m];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1a_latency_q <= 8'd80;
      n_slices_q    <= 8'd3;
      collisions_q  <= '0;
      rd_glob_q     <= 1'b0;
      rd_asic_q     <= '0;
      glob_rd_q     <= '0;
    end else begin
      if (sc_we && sc_addr[20]) begin
        case (sc_addr[3:0])
          4'd0: l1a_latency_q <= sc_wdata[7:0];
          4'd1: n_slices_q    <= sc_wdata[7:0];
          default: ;
        endcase
      end
      if (any_coll && collisions_q != 16'hFFFF) collisions_q <= collisions_q + 1'b1;
      rd_glob_q <= sc_addr[20];
      rd_asic_q <= sc_addr[19:15];
      case (sc_addr[3:0])
        4'd0:    glob_rd_q <= 32'(l1a_latency_q);
        4'd1:    glob_rd_q <= 32'(n_slices_q);
        4'd2:    glob_rd_q <= 32'(dropped[0]);
        4'd3:    glob_rd_q <= 32'(collisions_q);
        default: glob_rd_q <= '0;
      endcase
    end
  end

  assign sc_rdata = rd_glob_q ? glob_rd_q : mcm_rdata[rd_asic_q[4:1]];

  // ---- MCMs
  for (genvar m = 0; m < N_MCM; m++) begin : g_mcm
    logic [ADC_W-1:0] adc_m [4];
    logic             rv [2];
    logic [RO_W-1:0]  rd [2];
    logic             rr [2];
    assign adc_m = '{adc[4*m], adc[4*m+1], adc[4*m+2], adc[4*m+3]};
    mcm u_mcm (
      .clk, .rst_n, .adc(adc_m), .bc(bc_q), .l1a, .l1a_latency(l1a_latency_q),
      .n_slices(n_slices_q),
      .sc_we(sc_we && !sc_addr[20] && sc_addr[19:16] == 4'(m)),
      .sc_addr(sc_addr[15:0]), .sc_wdata, .sc_rdata(mcm_rdata[m]),
      .cp_link(cp_link[m]), .jep_link(jep_link[m]), .bcmux_collision(coll[m]),
      .ro_valid(rv), .ro_data(rd), .ro_ready(rr), .l1a_dropped(dropped[m])
    );
    for (genvar a = 0; a < 2; a++) begin : g_ro
      assign ro_valid[2*m+a] = rv[a];
      assign ro_data[2*m+a]  = rd[a];
      assign rr[a]           = ro_ready[2*m+a];
    end
  end

  // ---- readout merger and PipelineBus station
  rem_asic #(.N_ASIC(N_ASIC)) u_rem (
    .clk, .rst_n, .n_slices(n_slices_q), .in_valid(ro_valid), .in_data(ro_data),
    .in_ready(ro_ready), .out_valid(rem_valid), .out_data(rem_data), .out_ready(rem_ready)
  );

  pipeline_bus_node u_pbus (
    .clk, .rst_n, .up_valid(pbus_in_valid), .up_data(pbus_in_data),
    .loc_valid(rem_valid), .loc_data(rem_data), .loc_ready(rem_ready),
    .dn_valid(pbus_out_valid), .dn_data(pbus_out_data)
  );
endmodule
