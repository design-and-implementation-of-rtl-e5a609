// tb_da_fir_lowpass: the filter used as a low-pass filter at its default size.
//
// Two sine waves of amplitude 2000 (12-bit input) are filtered in turn: one in
// the pass band (0.05 fs) and one in the stop band (0.40 fs), samples offered
// back to back. Every output is compared with a direct-form model
// sum_k h[k] x[n-k]; after the 32-sample transient the peak output, divided
// by 2^11 (the coefficient scale), gives the gain. The pass-band gain must lie
// within 0.9..1.1 and the stop-band gain below 0.02.
module tb_da_fir_lowpass;
  localparam int TAPS = da_pkg::DEF_TAPS, IN_W = da_pkg::DEF_IN_W, OUT_W = 29;
  localparam int NS = 200;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, out_valid;
  logic signed [IN_W-1:0]  in_data = '0;
  logic signed [OUT_W-1:0] out_data;

  da_fir_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint hist [TAPS];
  longint expq [$];
  int n_out = 0;
  longint peak = 0;

  always @(negedge clk) if (rst_n && out_valid) begin
    longint e, a;
    checks++;
    e = (expq.size() != 0) ? expq.pop_front() : 64'sd0;
    if (longint'(out_data) != e) begin
      failures++;
      if (failures < 10) $display("y=%0d expected %0d", out_data, e);
    end
    a = (out_data < 0) ? -longint'(out_data) : longint'(out_data);
    if (n_out >= TAPS + 8 && a > peak) peak = a;
    n_out++;
  end

  task automatic run_tone(real f, output real gain);
    real ph;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n_out = 0; peak = 0;
    for (int n = 0; n < NS; n++) begin
      longint y;
      int v;
      ph = 2.0 * 3.14159265358979 * f * n;
      v = int'(2000.0 * $sin(ph));
      @(negedge clk);
      in_valid = 1; in_data = IN_W'(v);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      for (int k = TAPS-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = v;
      y = 0;
      for (int k = 0; k < TAPS; k++)
        y += longint'(da_pkg::DEF_COEF[(k < TAPS/2) ? k : TAPS-1-k]) * hist[k];
      expq.push_back(y);
      @(posedge clk);
      #1 in_valid = 0;
    end
    while (expq.size() != 0) @(negedge clk);
    gain = real'(peak) / 2048.0 / 2000.0;
  endtask

  initial begin
    real g_pass, g_stop;
    run_tone(0.05, g_pass);
    run_tone(0.40, g_stop);
    $display("gain at 0.05 fs: %f, at 0.40 fs: %f", g_pass, g_stop);
    checks++;
    if (g_pass < 0.9 || g_pass > 1.1) begin failures++; $display("pass-band gain out of range"); end
    checks++;
    if (g_stop > 0.02) begin failures++; $display("stop-band gain too high"); end
    checks++;
    if (n_out != NS) begin failures++; $display("outputs: %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
