// tb_readout_pipeline: self-checking test of the readout pipelines.
// Writes data that encode their own bunch-crossing index, issues Level-1
// accepts and checks every readout word against the slices expected for
// that accept (event = accept - latency, slices centred on it). Phases:
//  1. 3 slices, accepts as close as every 3 BCs, reader always ready: also
//     checks that no accept is dropped (no dead time) and the time from
//     accept to first word;
//  2. 5 slices with a reader that stalls at random;
//  2b. one 128-slice event read by a reader that is ready a third of the time;
//  3. a burst of 12 accepts with 128 slices: 3 must be dropped by the
//     8-deep accept queue and 9 x 128 words must come out.
module tb_readout_pipeline;
  import ppr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] raw_in [2];
  logic [7:0] et_in [2];
  logic l1a, ro_valid, ro_ready;
  logic [7:0] latency, n_slices;
  logic [35:0] ro_data;
  logic [15:0] l1a_dropped;
  int checks = 0, failures = 0;
  int k = 0;                       // index of the clock edge being prepared
  logic [35:0] expq [$];
  int words = 0, first_lat = -1, l1a_time = -1;
  bit check_values = 1;

  readout_pipeline dut (.clk, .rst_n, .raw_in, .et_in, .l1a, .latency, .n_slices,
                        .ro_valid, .ro_data, .ro_ready, .l1a_dropped);

  always #5 clk = ~clk;

  function automatic logic [35:0] word_at(int i);
    return {8'(i * 11 + 3), 10'(i * 7 + 5), 8'(i * 13), 10'(i * 3 + 1)};
  endfunction

  // data for edge k
  always_comb begin
    logic [35:0] w;
    w = word_at(k);
    raw_in[0] = w[9:0];   et_in[0] = w[17:10];
    raw_in[1] = w[27:18]; et_in[1] = w[35:28];
  end

  // consumer
  always @(posedge clk) if (rst_n) begin
    if (ro_valid && ro_ready) begin
      words++;
      if (first_lat < 0 && l1a_time >= 0) first_lat = k - l1a_time;
      if (check_values) begin
        checks++;
        if (expq.size() == 0) begin failures++; $display("unexpected word"); end
        else begin
          logic [35:0] e;
          e = expq.pop_front();
          if (ro_data !== e) begin
            failures++;
            if (failures < 10) $display("word %0d: got %h exp %h", words, ro_data, e);
          end
        end
      end
    end
  end

  always @(posedge clk) k <= k + 1;

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic accept();
    int ev;
    ev = k - int'(latency);
    for (int j = 0; j < int'(n_slices); j++) expq.push_back(word_at(ev - int'(n_slices) / 2 + j));
    l1a = 1;
    tick();
    l1a = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l1a = 0; ro_ready = 1; latency = 80; n_slices = 3;
    @(posedge clk); #1;
    rst_n = 1;
    repeat (200) tick();
    // phase 1
    l1a_time = k;
    accept();
    repeat (10) tick();
    checks++;
    if (first_lat < 1 || first_lat > 5) begin failures++; $display("accept-to-data %0d", first_lat); end
    for (int i = 0; i < 60; i++) begin
      accept();
      repeat (2 + $urandom % 6) tick();
    end
    repeat (50) tick();
    checks++;
    if (l1a_dropped != 0 || expq.size() != 0) begin failures++; $display("phase 1 left %0d, dropped %0d", expq.size(), l1a_dropped); end
    // phase 2
    n_slices = 5;
    fork
      begin
        for (int i = 0; i < 40; i++) begin
          accept();
          repeat (12 + $urandom % 8) tick();
        end
        repeat (100) tick();
      end
      begin
        repeat (1000) begin @(posedge clk); #2 ro_ready = 1'($urandom % 2); end
        ro_ready = 1;
      end
    join
    repeat (50) tick();
    checks++;
    if (expq.size() != 0) begin failures++; $display("phase 2 left %0d", expq.size()); end
    // phase 2b: one event of 128 slices, the maximum, read by a stalling reader
    n_slices = 128;
    fork
      begin accept(); repeat (600) tick(); end
      begin
        repeat (500) begin @(posedge clk); #2 ro_ready = ($urandom % 3 == 0); end
        ro_ready = 1;
      end
    join
    checks++;
    if (expq.size() != 0) begin failures++; $display("phase 2b left %0d", expq.size()); end
    // phase 3
    check_values = 0;
    expq.delete();
    n_slices = 128;
    words = 0;
    repeat (12) begin l1a = 1; tick(); end
    l1a = 0;
    repeat (9 * 128 + 50) tick();
    checks += 2;
    if (l1a_dropped != 3) begin failures++; $display("dropped %0d", l1a_dropped); end
    if (words != 9 * 128) begin failures++; $display("burst words %0d", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
