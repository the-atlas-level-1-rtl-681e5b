// rem_asic: readout merger of one Pre-Processor Module.
//
// Every PPrAsic produces n_slices readout words per Level-1 accept, all in
// step because they share the accept. The merger collects them into one
// event fragment and hands it to the PipelineBus:
//   header : {PB_HEADER, 6'd0, 36-bit event number}
//   data   : {PB_DATA, asic index, readout word}, n_slices words from ASIC 0,
//            then n_slices from ASIC 1, ... up to ASIC N_ASIC-1.
// A fragment starts when ASIC 0 has data. Inputs and output are valid/ready
// streams; the output is registered and may be stalled by out_ready. That a
// single merger ASIC collects the readout of all PPrAsics follows the
// Pre-Processor description; the fragment format is this design's own.
module rem_asic
  import ppr_pkg::*;
#(
  parameter int unsigned N_ASIC = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [7:0]      n_slices,
  input  logic            in_valid [N_ASIC],
  input  logic [RO_W-1:0] in_data  [N_ASIC],
  output logic            in_ready [N_ASIC],
  output logic            out_valid,
  output logic [PB_W-1:0] out_data,
  input  logic            out_ready
);
  localparam int unsigned IW = (N_ASIC > 1) ? $clog2(N_ASIC) : 1;

  typedef enum logic [1:0] {S_IDLE, S_DATA} state_e;
  state_e        state_q;
  logic [IW-1:0] asic_q;
  logic [7:0]    slice_q;
  logic [7:0]    nsl;
  logic [35:0]   evt_q;
  logic          out_free;
  logic          take;

  assign nsl      = (n_slices == 8'd0) ? 8'd1 : n_slices;
  assign out_free = !out_valid || out_ready;
  assign take     = (state_q == S_DATA) && out_free && in_valid[asic_q];

  always_comb begin
    for (int i = 0; i < N_ASIC; i++) in_ready[i] = take && (asic_q == IW'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      asic_q    <= '0;
      slice_q   <= '0;
      evt_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      case (state_q)
        S_IDLE: if (in_valid[0] && out_free) begin
          out_valid <= 1'b1;
          out_data  <= {PB_HEADER, 6'd0, evt_q};
          evt_q     <= evt_q + 1'b1;
          asic_q    <= '0;
          slice_q   <= '0;
          state_q   <= S_DATA;
        end
        S_DATA: if (take) begin
          out_valid <= 1'b1;
          out_data  <= {PB_DATA, 6'(asic_q), in_data[asic_q]};
          if (slice_q == nsl - 8'd1) begin
            slice_q <= '0;
            if (asic_q == IW'(N_ASIC - 1)) state_q <= S_IDLE;
            else                           asic_q  <= asic_q + 1'b1;
          end else begin
            slice_q <= slice_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
