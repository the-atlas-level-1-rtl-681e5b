// tb_pipeline_bus_node: self-checking test of one PipelineBus station.
// Random upstream traffic and a local queue of words. Checks, one clock
// after each edge: an upstream word passes unchanged; an empty slot carries
// the next local word if one is waiting; local words keep their order and
// none is lost or duplicated.
module tb_pipeline_bus_node;
  localparam int W = 44;
  logic clk = 0, rst_n = 0;
  logic up_valid, loc_valid, loc_ready, dn_valid;
  logic [W-1:0] up_data, loc_data, dn_data;
  int checks = 0, failures = 0, inserted = 0, passed = 0;
  logic [W-1:0] locq [$];
  int next_loc = 0;

  pipeline_bus_node #(.W(W)) dut (.clk, .rst_n, .up_valid, .up_data, .loc_valid,
                                  .loc_data, .loc_ready, .dn_valid, .dn_data);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_v;
    logic [W-1:0] exp_d;
    up_valid = 0; up_data = 0;
    for (int i = 0; i < 500; i++) locq.push_back(W'(64'hC0DE_0000 + i));
    loc_valid = 1; loc_data = locq[0];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      up_valid = ($urandom % 10 < 7);
      up_data  = W'({$urandom, $urandom});
      loc_valid = next_loc < locq.size();
      loc_data  = loc_valid ? locq[next_loc] : '0;
      #1;
      checks++;
      if (loc_ready !== !up_valid) failures++;
      exp_v = up_valid || loc_valid;
      exp_d = up_valid ? up_data : (loc_valid ? loc_data : '0);
      if (!up_valid && loc_valid) begin next_loc++; inserted++; end
      if (up_valid) passed++;
      @(posedge clk); #1;
      checks++;
      if (dn_valid !== exp_v || (exp_v && dn_data !== exp_d)) begin
        failures++;
        if (failures < 10) $display("n=%0d dn %0d %h exp %0d %h", n, dn_valid, dn_data, exp_v, exp_d);
      end
    end
    checks++;
    if (next_loc != locq.size() || passed == 0) failures++;
    $display("passed %0d inserted %0d", passed, inserted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
