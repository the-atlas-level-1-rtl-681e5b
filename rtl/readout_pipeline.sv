// readout_pipeline: pipelined readout of raw and calibrated trigger data for
// the two channels of one PPrAsic.
//
// Two pipeline memories, as in the Pre-Processor description: one holds the
// raw FADC samples, one the values after BCID and the look-up table. Both are
// written every bunch crossing at the same address, a DEPTH-entry ring. A
// Level-1 accept arrives 'latency' bunch crossings after the event it selects;
// the block then reads n_slices consecutive time slices centred on that event
// (first slice = event - n_slices/2) and emits one readout word per slice:
//   ro_data = {et ch1, raw ch1, et ch0, raw ch0}  (8+10+8+10 bits)
// n_slices is 1..MAX_SLICES (128, the description's maximum); 0 counts as 1.
// Accepts are queued in an L1A_FIFO-deep queue; one arriving when the queue
// is full is dropped and counted in 'l1a_dropped'. The output is a
// valid/ready stream buffered by an OUT_FIFO-word derandomiser. Slices are
// copied out of the pipeline memory at one per clock whether or not the
// reader stalls, so a whole event of up to 128 slices (or a burst of forty
// 3-slice events) is safe while the readout merger serves other ASICs.
// Data are safe as long as the last slice of an event is read within
// DEPTH - latency - n_slices/2 bunch crossings of the accept. With the
// default 3 slices, one word per BC is read, so back-to-back accepts cost no
// dead time. DEPTH, L1A_FIFO and OUT_FIFO are this design's own sizes.
module readout_pipeline
  import ppr_pkg::*;
#(
  parameter int unsigned DEPTH    = 256,
  parameter int unsigned L1A_FIFO = 8,
  parameter int unsigned OUT_FIFO = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ADC_W-1:0] raw_in [2],
  input  logic [ET_W-1:0]  et_in  [2],
  input  logic             l1a,
  input  logic [7:0]       latency,
  input  logic [7:0]       n_slices,
  output logic             ro_valid,
  output logic [RO_W-1:0]  ro_data,
  input  logic             ro_ready,
  output logic [15:0]      l1a_dropped
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [2*ADC_W-1:0] raw_mem [DEPTH];
  logic [2*ET_W-1:0]  et_mem  [DEPTH];
  logic [AW-1:0]      wp;

  // ---- L1A queue: start address of each accepted event's readout window
  logic [7:0]    nsl;
  logic [AW-1:0] start_addr;
  logic          q_empty, q_full, q_pop;
  logic [AW-1:0] q_dout;

  assign nsl        = (n_slices == 8'd0) ? 8'd1 : n_slices;
  assign start_addr = wp - AW'(latency) - AW'(nsl >> 1);

  ppr_fifo #(.W(AW), .DEPTH(L1A_FIFO)) u_l1a_q (
    .clk, .rst_n, .push(l1a && !q_full), .din(start_addr), .pop(q_pop),
    .dout(q_dout), .empty(q_empty), .full(q_full), .count()
  );

  // ---- read engine
  logic          busy_q;
  logic [AW-1:0] rd_addr_q;
  logic [7:0]    left_q;     // slices still to read of the current event
  logic          rd_issue, rd_pend_q;
  logic [$clog2(OUT_FIFO):0] of_count;
  logic          of_empty;
  logic [RO_W-1:0] rd_word;

  // issue a read when the output FIFO can take it, counting the one in flight
  assign rd_issue = busy_q && (32'(of_count) + 32'(rd_pend_q) < OUT_FIFO);
  assign q_pop    = !busy_q && !q_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp          <= '0;
      busy_q      <= 1'b0;
      rd_addr_q   <= '0;
      left_q      <= '0;
      rd_pend_q   <= 1'b0;
      rd_word     <= '0;
      l1a_dropped <= '0;
    end else begin
      wp <= wp + 1'b1;
      if (l1a && q_full) l1a_dropped <= l1a_dropped + 1'b1;
      if (q_pop) begin
        busy_q    <= 1'b1;
        rd_addr_q <= q_dout;
        left_q    <= nsl;
      end else if (rd_issue) begin
        rd_addr_q <= rd_addr_q + 1'b1;
        left_q    <= left_q - 1'b1;
        if (left_q == 8'd1) busy_q <= 1'b0;
      end
      rd_pend_q <= rd_issue;
      if (rd_issue)
        rd_word <= {et_mem[rd_addr_q][ET_W +: ET_W],  raw_mem[rd_addr_q][ADC_W +: ADC_W],
                    et_mem[rd_addr_q][0 +: ET_W],     raw_mem[rd_addr_q][0 +: ADC_W]};
    end
  end

  // pipeline memories: written every BC, no reset needed (read only after
  // they have been written)
  always_ff @(posedge clk) begin
    raw_mem[wp] <= {raw_in[1], raw_in[0]};
    et_mem[wp]  <= {et_in[1], et_in[0]};
  end

  ppr_fifo #(.W(RO_W), .DEPTH(OUT_FIFO)) u_out_q (
    .clk, .rst_n, .push(rd_pend_q), .din(rd_word), .pop(ro_valid && ro_ready),
    .dout(ro_data), .empty(of_empty), .full(), .count(of_count)
  );
  assign ro_valid = !of_empty;
endmodule
