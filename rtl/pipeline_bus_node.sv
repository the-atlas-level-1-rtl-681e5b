// pipeline_bus_node: one station of the PipelineBus readout ring.
//
// The PipelineBus is a ring-like bus on the backplane that shifts readout
// data from module to module towards a readout driver board. Each station
// is one register stage: a word arriving from upstream is always passed on;
// an empty slot (up_valid low) is filled with the station's own word if it
// has one. The ring thus never stalls and upstream traffic has priority.
// The shifting ring follows the Pre-Processor description; the empty-slot
// insertion rule is this design's own.
// Timing: dn_* after edge k carry the word chosen at edge k.
module pipeline_bus_node #(
  parameter int unsigned W = ppr_pkg::PB_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         up_valid,
  input  logic [W-1:0] up_data,
  input  logic         loc_valid,
  input  logic [W-1:0] loc_data,
  output logic         loc_ready,
  output logic         dn_valid,
  output logic [W-1:0] dn_data
);
  assign loc_ready = !up_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_valid <= 1'b0;
      dn_data  <= '0;
    end else if (up_valid) begin
      dn_valid <= 1'b1;
      dn_data  <= up_data;
    end else begin
      dn_valid <= loc_valid;
      dn_data  <= loc_valid ? loc_data : '0;
    end
  end
endmodule
