// tb_sync_fifo: self-checking test of the synchronisation FIFO.
// Drives random samples, changes the programmed delay through 0..15 and
// checks every output against dout(t+1) = din(t - delay) computed from a
// history kept by the testbench (zeros before the first sample).
module tb_sync_fifo;
  localparam int N = 2000;
  logic clk = 0, rst_n = 0;
  logic [9:0] din, dout;
  logic [3:0] delay;
  int checks = 0, failures = 0;
  logic [9:0] hist [N];
  int t;

  sync_fifo dut (.clk, .rst_n, .din, .delay, .dout);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; delay = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (t = 0; t < N; t++) begin
      if (t % 100 == 0) delay = 4'(t / 100);
      din = 10'($urandom);
      hist[t] = din;
      @(posedge clk);
      #1;
      begin
        logic [9:0] exp_v;
        exp_v = (t - int'(delay) >= 0) ? hist[t - int'(delay)] : 10'd0;
        // right after a delay change the buffer still holds older words,
        // which the history also has, so the rule holds throughout
        checks++;
        if (dout !== exp_v) begin
          failures++;
          if (failures < 10) $display("t=%0d delay=%0d dout=%0d exp=%0d", t, delay, dout, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
