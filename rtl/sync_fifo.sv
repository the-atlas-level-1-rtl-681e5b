// sync_fifo: coarse synchronisation of one trigger-tower channel.
//
// The digitised samples of different channels arrive at different times
// because of time-of-flight and cable length. This block delays a channel by
// a programmable whole number of bunch crossings, 0 to DEPTH-1, so that all
// channels line up on the same bunch crossing. DEPTH = 16 follows the
// Pre-Processor description (16 BCs, i.e. 80 m of cable at 5 ns/m).
//
// It is a DEPTH-entry circular buffer written every clock; the read pointer
// trails the write pointer by 'delay'. Output is registered:
//   dout(t+1) = din(t - delay).
// Changing 'delay' takes effect immediately; the first DEPTH outputs after
// reset read the cleared buffer (zeros).
module sync_fifo #(
  parameter int unsigned W     = ppr_pkg::ADC_W,
  parameter int unsigned DEPTH = ppr_pkg::FIFO_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [W-1:0]             din,
  input  logic [$clog2(DEPTH)-1:0] delay,
  output logic [W-1:0]             dout
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  buf_q [DEPTH];
  logic [AW-1:0] wp;
  logic [AW-1:0] rp;

  assign rp = wp - delay;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp   <= '0;
      dout <= '0;
      for (int i = 0; i < DEPTH; i++) buf_q[i] <= '0;
    end else begin
      buf_q[wp] <= din;
      // delay 0 bypasses the buffer (the word is being written this cycle)
      dout      <= (delay == '0) ? din : buf_q[rp];
      wp        <= wp + 1'b1;
    end
  end
endmodule
