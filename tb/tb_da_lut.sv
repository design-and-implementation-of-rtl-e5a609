// tb_da_lut: checks every entry of a divided LUT and its one-clock latency.
// The expected entry for address a is the sum of the coefficients whose
// address bit is set, computed here with integers. Addresses are applied in
// random order, one per clock, and each result is checked one clock later.
module tb_da_lut;
  localparam int ADDR_W = 4, COEF_W = 12, OUT_W = 14;
  localparam logic signed [COEF_W-1:0] C [ADDR_W] = '{12'sd405, -12'sd2048, 12'sd2047, -12'sd158};

  logic clk = 0;
  logic [ADDR_W-1:0] addr = '0;
  logic signed [OUT_W-1:0] data;

  da_lut #(.ADDR_W(ADDR_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .COEF(C)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic int expect_entry(int a);
    int s = 0;
    for (int j = 0; j < ADDR_W; j++) if (a[j]) s += int'(C[j]);
    return s;
  endfunction

  initial begin
    int prev;
    @(negedge clk);
    addr = 0; prev = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      checks++;
      if (int'(data) != expect_entry(prev)) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %0d expected %0d", prev, data, expect_entry(prev));
      end
      prev = (t < 16) ? t : int'($urandom_range(0, 2**ADDR_W - 1));
      addr = ADDR_W'(prev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
