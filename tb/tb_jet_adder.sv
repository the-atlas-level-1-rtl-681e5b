// tb_jet_adder: self-checking test of the jet-element adder.
// Random and corner-case towers; expects min(sum, 511) one clock later.
module tb_jet_adder;
  logic clk = 0, rst_n = 0;
  logic [7:0] et [4];
  logic [8:0] jet;
  int checks = 0, failures = 0, sat_seen = 0;

  jet_adder dut (.clk, .rst_n, .et, .jet);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, e;
    et = '{0, 0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      case (i % 4)
        0: for (int k = 0; k < 4; k++) et[k] = 8'($urandom);
        1: for (int k = 0; k < 4; k++) et[k] = 8'($urandom % 64);
        2: for (int k = 0; k < 4; k++) et[k] = 8'(255 - $urandom % 8);
        default: for (int k = 0; k < 4; k++) et[k] = (k == i % 3) ? 8'($urandom) : 8'd0;
      endcase
      s = et[0] + et[1] + et[2] + et[3];
      e = (s > 511) ? 511 : s;
      if (s > 511) sat_seen++;
      @(posedge clk);
      #1;
      checks++;
      if (jet !== 9'(e)) begin
        failures++;
        if (failures < 10) $display("sum %0d jet %0d exp %0d", s, jet, e);
      end
    end
    if (sat_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
