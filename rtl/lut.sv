// lut: transverse-energy calibration look-up table of one channel.
//
// Maps the 10-bit value left by bunch-crossing identification to an 8-bit
// transverse energy with 1 GeV per count, as the Pre-Processor description
// specifies. Pedestal subtraction and a noise threshold are not separate
// circuits: they are folded into the table contents (entries below the
// threshold hold 0, the rest hold calibrated value minus pedestal).
//
// A 2^AW x DW memory with one synchronous read port (dout valid one clock
// after addr) and one write port used by slow control to load the table.
// The memory is not reset; it must be loaded before use.
module lut #(
  parameter int unsigned AW = ppr_pkg::ADC_W,
  parameter int unsigned DW = ppr_pkg::ET_W
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] dout,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  // slow-control read-back, one clock latency
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    dout    <= mem[addr];
    rd_data <= mem[rd_addr];
  end
endmodule
