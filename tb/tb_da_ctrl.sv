// tb_da_ctrl: checks the sequencing of the bit controller.
// A model in the testbench tracks, per accepted sample, the cycle of its
// acceptance; bit b must then be on the shift-register side (shift=1,
// div_count=b) b+1 clocks after acceptance and on the accumulator side
// PIPE clocks later with the right first/last flags. in_ready must be high
// exactly when idle or on the last bit, and back-to-back samples must be
// accepted every P_DATA_W clocks.
module tb_da_ctrl;
  localparam int P = 13, PIPE = 3, CW = $clog2(P);

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, load, shift, acc_valid, acc_first, acc_last;
  logic [CW-1:0] div_count, acc_idx;

  da_ctrl #(.P_DATA_W(P), .PIPE(PIPE)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, accepts = 0, back_to_back = 0;
  int last_accept = -100;
  // model: bit index on shift side per cycle, -1 = idle
  int sh_bit [0:4095];

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("cycle %0d: %s", cyc, s);
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) sh_bit[i] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 3000; cyc++) begin
      int mb, ma;
      in_valid = ($urandom_range(0, 2) != 0);
      #1;
      mb = sh_bit[cyc];
      // shift side
      checks++;
      if (shift != (mb >= 0)) fail("shift");
      if (mb >= 0 && int'(div_count) != mb) fail("div_count");
      checks++;
      if (in_ready != (mb < 0 || mb == P-1)) fail("in_ready");
      if (load != (in_valid && in_ready)) fail("load");
      // accumulator side
      ma = (cyc >= PIPE) ? sh_bit[cyc-PIPE] : -1;
      checks++;
      if (acc_valid != (ma >= 0)) fail("acc_valid");
      if (ma >= 0) begin
        if (int'(acc_idx) != ma) fail("acc_idx");
        if (acc_first != (ma == 0)) fail("acc_first");
        if (acc_last != (ma == P-1)) fail("acc_last");
      end
      if (in_valid && in_ready) begin
        if (cyc - last_accept == P) back_to_back++;
        last_accept = cyc;
        accepts++;
        for (int b = 0; b < P; b++) if (cyc+1+b < 4096) sh_bit[cyc+1+b] = b;
      end
      @(negedge clk);
    end
    checks++;
    if (back_to_back == 0 || accepts < 100) fail("too few accepts");
    $display("accepts=%0d back_to_back=%0d", accepts, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
