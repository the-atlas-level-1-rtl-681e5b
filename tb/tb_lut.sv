// tb_lut: self-checking test of the calibration look-up table.
// Loads a table computed here (pedestal 20 subtracted, threshold 5 applied,
// gain 5/8, clipped to 255), then reads every address through the real-time
// port and the read-back port and checks the one-clock read latency.
module tb_lut;
  logic clk = 0;
  logic [9:0] addr, wr_addr, rd_addr;
  logic [7:0] dout, wr_data, rd_data;
  logic wr_en;
  int checks = 0, failures = 0;

  lut dut (.clk, .addr, .dout, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  function automatic logic [7:0] calib(int a);
    int v;
    v = ((a - 20) * 5) / 8;
    if (v < 5) v = 0;
    if (v > 255) v = 255;
    return 8'(v);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; addr = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    @(posedge clk);
    for (int a = 0; a < 1024; a++) begin
      #1 wr_en = 1; wr_addr = 10'(a); wr_data = calib(a);
      @(posedge clk);
    end
    #1 wr_en = 0;
    for (int i = 0; i < 1500; i++) begin
      int a, b;
      a = (i < 1024) ? i : int'($urandom % 1024);
      b = int'($urandom % 1024);
      addr = 10'(a); rd_addr = 10'(b);
      @(posedge clk);
      #1;
      checks += 2;
      if (dout !== calib(a))    begin failures++; $display("addr %0d dout %0d", a, dout); end
      if (rd_data !== calib(b)) begin failures++; $display("rd %0d data %0d", b, rd_data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
