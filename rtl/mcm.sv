// mcm: Pre-Processor Multi-Chip Module, four trigger-tower channels.
//
// Two PPrAsics of two channels each. The four towers form one 0.2 x 0.2 jet
// element, summed in ASIC 0 from its own two towers and those of ASIC 1.
// Each ASIC BC-muxes its tower pair into one slot; both slots make up the
// word of one serial link to the Cluster Processor (four towers per link, as
// in the Pre-Processor description). An error-detection code is added
// before the words leave for the serialisers; here it is one even-parity bit
// (the description does not give the code):
//   cp_link  = {parity, slot ASIC1, slot ASIC0}   21 bits per BC
//   jep_link = {parity, jet element}              10 bits per BC
// The serialiser chips themselves are outside this module. Link words are
// registered: one clock after the slots / jet element.
// Slow control: sc_addr[15] selects the ASIC, sc_addr[14:0] as in pprasic.
module mcm
  import ppr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADC_W-1:0]  adc [4],
  input  logic [11:0]       bc,
  input  logic              l1a,
  input  logic [7:0]        l1a_latency,
  input  logic [7:0]        n_slices,
  input  logic              sc_we,
  input  logic [15:0]       sc_addr,
  input  logic [31:0]       sc_wdata,
  output logic [31:0]       sc_rdata,
  output logic [20:0]       cp_link,
  output logic [9:0]        jep_link,
  output logic [1:0]        bcmux_collision,
  output logic              ro_valid [2],
  output logic [RO_W-1:0]   ro_data  [2],
  input  logic              ro_ready [2],
  output logic [15:0]       l1a_dropped
);
  logic [ET_W-1:0]  et    [2][2];
  bcmux_slot_t      slot  [2];
  logic [JET_W-1:0] jet   [2];
  logic [31:0]      rdata [2];
  logic [15:0]      dropped [2];
  logic             rd_sel_q;

  for (genvar a = 0; a < 2; a++) begin : g_asic
    logic [ADC_W-1:0] adc_a [2];
    assign adc_a = '{adc[2*a], adc[2*a+1]};
    pprasic #(.JET_EN(a == 0)) u_asic (
      .clk, .rst_n, .adc(adc_a), .bc, .l1a, .l1a_latency, .n_slices,
      .sc_we(sc_we && sc_addr[15] == a), .sc_addr(sc_addr[14:0]), .sc_wdata,
      .sc_rdata(rdata[a]),
      .et(et[a]), .nb_et(et[1-a]), .bcmux_slot(slot[a]),
      .bcmux_collision(bcmux_collision[a]), .jet(jet[a]),
      .ro_valid(ro_valid[a]), .ro_data(ro_data[a]), .ro_ready(ro_ready[a]),
      .l1a_dropped(dropped[a])
    );
  end

  assign l1a_dropped = dropped[0];   // both ASICs see the same accepts

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cp_link  <= '0;
      jep_link <= '0;
      rd_sel_q <= 1'b0;
    end else begin
      cp_link  <= {^{slot[1], slot[0]}, slot[1], slot[0]};
      jep_link <= {^jet[0], jet[0]};
      rd_sel_q <= sc_addr[15];
    end
  end

  assign sc_rdata = rdata[rd_sel_q];
endmodule
