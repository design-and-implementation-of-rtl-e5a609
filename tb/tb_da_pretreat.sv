// tb_da_pretreat: checks the delay line and pair sums of da_pretreat.
// Random signed samples (including the extreme values) are loaded with random
// gaps; a model history in the testbench gives the expected pair sums
// x[n-i] + x[n-TAPS+1+i] for the window ending with the sample on in_data,
// checked before every edge, loaded or not. Reset must clear the history.
module tb_da_pretreat;
  localparam int TAPS = 32, IN_W = 12, HALF = TAPS/2;

  logic clk = 0, rst_n = 0, load = 0;
  logic signed [IN_W-1:0] in_data = '0;
  logic signed [IN_W:0]   pre_sum [HALF];

  da_pretreat #(.TAPS(TAPS), .IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hist [TAPS];   // hist[k] = x[n-1-k] as integers

  task automatic check_sums();
    int exp_v, xk [TAPS];
    xk[0] = in_data;
    for (int k = 1; k < TAPS; k++) xk[k] = hist[k-1];
    for (int i = 0; i < HALF; i++) begin
      exp_v = xk[i] + xk[TAPS-1-i];
      checks++;
      if (int'(pre_sum[i]) != exp_v) begin
        failures++;
        if (failures < 10) $display("pre_sum[%0d]=%0d expected %0d", i, pre_sum[i], exp_v);
      end
    end
  endtask

  function automatic int pick();
    case ($urandom_range(0, 5))
      0: return -(1 << (IN_W-1));
      1: return (1 << (IN_W-1)) - 1;
      default: return int'($urandom_range(0, (1 << IN_W) - 1)) - (1 << (IN_W-1));
    endcase
  endfunction

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (t == 200) begin
        // reset in the middle: history must clear
        rst_n = 0; load = 0;
        @(negedge clk);
        rst_n = 1;
        for (int k = 0; k < TAPS; k++) hist[k] = 0;
      end
      load    = ($urandom_range(0, 3) != 0);
      in_data = IN_W'(pick());
      #1 check_sums();
      @(posedge clk);
      if (load) begin
        for (int k = TAPS-1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = in_data;
      end
    end
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
