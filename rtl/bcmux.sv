// bcmux: bunch-crossing multiplexing of a tower pair onto one link slot.
//
// After bunch-crossing identification a tower is non-zero in at most one
// bunch crossing of any two consecutive ones. Two towers can therefore share
// one 8-bit link slot, which doubles the useful bandwidth of the serial links
// to the Cluster Processor; that is the Pre-Processor's BC-mux idea. The
// encoding below is this design's own:
//   code A_NOW  : data is tower A of this bunch crossing
//   code B_NOW  : data is tower B of this bunch crossing
//   code B_PREV : data is tower B of the previous bunch crossing
// If both towers are non-zero in one bunch crossing, A is sent at once and B
// in the next slot as B_PREV. The next bunch crossing then has both towers
// zero, so nothing is lost. An empty slot has data 0 and code A_NOW.
// Slot(t+1) is formed from the towers at t (one register stage).
// If the input breaks the rule (a tower non-zero twice in a row while B is
// pending), 'collision' pulses and the new values are dropped.
module bcmux
  import ppr_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ET_W-1:0] et_a,
  input  logic [ET_W-1:0] et_b,
  output bcmux_slot_t     slot,
  output logic            collision
);
  logic            pend_q;
  logic [ET_W-1:0] pend_data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot        <= '{code: BCMUX_A_NOW, data: '0};
      pend_q      <= 1'b0;
      pend_data_q <= '0;
      collision   <= 1'b0;
    end else begin
      collision <= 1'b0;
      pend_q    <= 1'b0;
      if (pend_q) begin
        slot      <= '{code: BCMUX_B_PREV, data: pend_data_q};
        collision <= (et_a != '0) || (et_b != '0);
      end else if (et_a != '0) begin
        slot        <= '{code: BCMUX_A_NOW, data: et_a};
        pend_q      <= (et_b != '0);
        pend_data_q <= et_b;
      end else if (et_b != '0) begin
        slot <= '{code: BCMUX_B_NOW, data: et_b};
      end else begin
        slot <= '{code: BCMUX_A_NOW, data: '0};
      end
    end
  end
endmodule
