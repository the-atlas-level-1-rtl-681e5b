// tb_rem_asic: self-checking test of the readout merger with 32 inputs.
// Each input delivers n_slices words per event with random gaps; the output
// is stalled at random. The merged stream must be: a header with the event
// number, then n_slices words of ASIC 0, of ASIC 1, ... of ASIC 31, each
// tagged with its ASIC index, for every event in order.
module tb_rem_asic;
  import ppr_pkg::*;
  localparam int NA = 32;
  localparam int NEV = 12;
  logic clk = 0, rst_n = 0;
  logic [7:0] n_slices;
  logic in_valid [NA];
  logic [RO_W-1:0] in_data [NA];
  logic in_ready [NA];
  logic out_valid, out_ready;
  logic [PB_W-1:0] out_data;
  int checks = 0, failures = 0;
  int sent [NA];                  // words already delivered per input
  logic [PB_W-1:0] expq [$];
  bit gap [NA];

  rem_asic #(.N_ASIC(NA)) dut (.clk, .rst_n, .n_slices, .in_valid, .in_data, .in_ready,
                               .out_valid, .out_data, .out_ready);

  always #5 clk = ~clk;

  function automatic logic [RO_W-1:0] src_word(int a, int i);
    return RO_W'({a[7:0], i[15:0], 12'hA5C});
  endfunction

  // sources: word i of input a, with random gaps
  always_comb for (int a = 0; a < NA; a++) begin
    in_valid[a] = rst_n && !gap[a] && sent[a] < NEV * int'(n_slices);
    in_data[a]  = src_word(a, sent[a]);
  end
  always @(posedge clk) begin
    for (int a = 0; a < NA; a++) begin
      if (in_valid[a] && in_ready[a]) sent[a] <= sent[a] + 1;
      gap[a] <= ($urandom % 4 == 0);
    end
    out_ready <= ($urandom % 3 != 0);
  end

  // sink
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("extra word"); end
    else begin
      logic [PB_W-1:0] e;
      e = expq.pop_front();
      if (out_data !== e) begin
        failures++;
        if (failures < 10) $display("got %h exp %h", out_data, e);
      end
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_slices = 3;
    for (int a = 0; a < NA; a++) begin sent[a] = 0; gap[a] = 0; end
    out_ready = 1;
    for (int e = 0; e < NEV; e++) begin
      expq.push_back({PB_HEADER, 6'd0, 36'(e)});
      for (int a = 0; a < NA; a++)
        for (int s = 0; s < 3; s++) expq.push_back({PB_DATA, 6'(a), src_word(a, e * 3 + s)});
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (expq.size() == 0);
    repeat (20) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("output not idle at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
