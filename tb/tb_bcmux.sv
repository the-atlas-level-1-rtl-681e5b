// tb_bcmux: self-checking test of bunch-crossing multiplexing.
// Generates two tower streams that obey the BCID rule (a non-zero value is
// always followed by a zero), multiplexes them, decodes the slots with an
// independent receiver model and checks that both streams are rebuilt
// exactly, that each slot appears one clock after its bunch crossing, and
// that the "both towers at once" case occurred. A final phase breaks the
// rule on purpose and expects the collision flag.
module tb_bcmux;
  import ppr_pkg::*;
  localparam int N = 4000;
  logic clk = 0, rst_n = 0;
  logic [7:0] et_a, et_b;
  bcmux_slot_t slot;
  logic collision;
  int checks = 0, failures = 0, both = 0, only_b = 0, coll_seen = 0;
  logic [7:0] a_in [N], b_in [N], a_rx [N], b_rx [N];

  bcmux dut (.clk, .rst_n, .et_a, .et_b, .slot, .collision);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    et_a = 0; et_b = 0;
    for (int t = 0; t < N; t++) begin
      a_in[t] = (t > 0 && a_in[t-1] != 0) ? 8'd0 : (($urandom % 10 < 4) ? 8'(1 + $urandom % 255) : 8'd0);
      b_in[t] = (t > 0 && b_in[t-1] != 0) ? 8'd0 : (($urandom % 10 < 4) ? 8'(1 + $urandom % 255) : 8'd0);
      a_rx[t] = 0; b_rx[t] = 0;
      if (a_in[t] != 0 && b_in[t] != 0) both++;
      if (a_in[t] == 0 && b_in[t] != 0) only_b++;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < N + 2; t++) begin
      et_a = (t < N) ? a_in[t] : 8'd0;
      et_b = (t < N) ? b_in[t] : 8'd0;
      @(posedge clk);
      #1;
      // slot now belongs to bunch crossing t
      if (slot.data != 0) begin
        case (slot.code)
          BCMUX_A_NOW:  if (t < N) a_rx[t] = slot.data;
          BCMUX_B_NOW:  if (t < N) b_rx[t] = slot.data;
          BCMUX_B_PREV: if (t >= 1 && t - 1 < N) b_rx[t-1] = slot.data;
          default: begin failures++; $display("bad code"); end
        endcase
      end
      if (collision) failures++;
    end
    for (int t = 0; t < N; t++) begin
      checks += 2;
      if (a_rx[t] !== a_in[t]) begin failures++; if (failures < 10) $display("A t=%0d %0d/%0d", t, a_rx[t], a_in[t]); end
      if (b_rx[t] !== b_in[t]) begin failures++; if (failures < 10) $display("B t=%0d %0d/%0d", t, b_rx[t], b_in[t]); end
    end
    // rule broken: both towers non-zero in two consecutive crossings
    et_a = 8'd5; et_b = 8'd6;
    @(posedge clk);
    et_a = 8'd7; et_b = 8'd8;
    @(posedge clk);
    #1;
    et_a = 0; et_b = 0;
    checks++;
    if (!collision) begin failures++; $display("collision not flagged"); end
    else coll_seen++;
    checks++;
    if (both == 0 || only_b == 0) failures++;
    $display("both-nonzero crossings %0d, B-only crossings %0d", both, only_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
