// tb_da_fir_top: end-to-end test of the DA FIR filter at its default size
// (32 taps, 12-bit input, the default low-pass coefficients).
//
// A reference model keeps the input history and computes
// y[n] = sum_k h[k] x[n-k] directly with multiplications, h[31-k] = h[k].
// Phases: an impulse (the output must reproduce the impulse response), a
// full-scale positive and negative step (DC gain), random samples with random
// idle gaps, back-to-back samples at the maximum rate including extreme values,
// and a reset in mid-stream. Every result is compared with the model, its
// latency (17 clocks from acceptance) is checked, and the spacing of
// back-to-back acceptances must be 13 clocks. Counted mechanisms, each of
// which must occur: back-to-back acceptance (pipeline overlap of two samples),
// idle gap, sign-bit subtraction of a non-zero table value, a pair sum at the
// most negative value, and a mid-stream reset.
module tb_da_fir_top;
  localparam int TAPS = da_pkg::DEF_TAPS, IN_W = da_pkg::DEF_IN_W;
  localparam int P = IN_W + 1, LATENCY = P + da_pkg::PIPE_DEPTH + 1;
  localparam int OUT_W = 29;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, out_valid;
  logic signed [IN_W-1:0]  in_data = '0;
  logic signed [OUT_W-1:0] out_data;

  da_fir_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_b2b = 0, n_gap = 0, n_signsub = 0, n_minpair = 0, n_reset = 0;
  longint hist [TAPS];          // hist[k] = x[n-k]
  longint expq [$];
  int     due  [$];             // cycle at which each result is due
  int last_accept = -1000;

  function automatic longint coef(int k);
    return longint'(da_pkg::DEF_COEF[(k < TAPS/2) ? k : TAPS-1-k]);
  endfunction

  function automatic int rnd_sample();
    case ($urandom_range(0, 5))
      0: return -(1 << (IN_W-1));
      1: return (1 << (IN_W-1)) - 1;
      default: return int'($urandom_range(0, (1 << IN_W) - 1)) - (1 << (IN_W-1));
    endcase
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  // sign-bit subtraction of a non-zero table value happens at the accumulator
  always @(posedge clk)
    if (dut.acc_valid && dut.acc_last && dut.table_sum != 0) n_signsub++;

  // output monitor
  always @(negedge clk) if (rst_n && out_valid) begin
    longint e; int d;
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("unexpected out_valid at cycle %0d", cyc);
    end else begin
      e = expq.pop_front(); d = due.pop_front();
      if (longint'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("cycle %0d: y=%0d expected %0d", cyc, out_data, e);
      end
      checks++;
      if (cyc != d) begin
        failures++;
        if (failures < 10) $display("result at cycle %0d, due %0d", cyc, d);
      end
    end
  end

  // Offer one sample, wait until accepted, update the model.
  task automatic send(int v);
    longint y = 0;
    @(negedge clk);
    in_valid = 1; in_data = IN_W'(v);
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    if (cyc - last_accept == P) n_b2b++;
    else if (last_accept >= 0) begin
      checks++;
      if (cyc - last_accept < P) begin failures++; $display("accepts %0d apart", cyc - last_accept); end
    end
    last_accept = cyc;
    for (int k = TAPS-1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    for (int i = 0; i < TAPS/2; i++)
      if (hist[i] + hist[TAPS-1-i] == -(2 ** IN_W)) n_minpair++;
    for (int k = 0; k < TAPS; k++) y += coef(k) * hist[k];
    expq.push_back(y);
    due.push_back(cyc + LATENCY);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic gap(int n);
    n_gap++;
    repeat (n) @(negedge clk);
  endtask

  task automatic drain();
    while (expq.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // impulse: outputs are 1024*h[k]
    send(1024);
    for (int k = 1; k < TAPS + 2; k++) send(0);
    drain();
    // full-scale steps
    for (int k = 0; k < TAPS + 4; k++) send((1 << (IN_W-1)) - 1);
    for (int k = 0; k < TAPS + 4; k++) send(-(1 << (IN_W-1)));
    // random with gaps
    for (int k = 0; k < 300; k++) begin
      send(rnd_sample());
      if ($urandom_range(0, 3) == 0) gap($urandom_range(1, 20));
    end
    // reset in mid-stream: history and pending result are dropped
    send(rnd_sample());
    @(negedge clk);
    rst_n = 0; n_reset++;
    repeat (2) @(negedge clk);
    rst_n = 1;
    expq.delete(); due.delete();
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    last_accept = -1000;
    // back-to-back random
    for (int k = 0; k < 300; k++) send(rnd_sample());
    drain();

    $display("mechanisms: back_to_back=%0d idle_gap=%0d sign_sub=%0d min_pair=%0d reset=%0d",
             n_b2b, n_gap, n_signsub, n_minpair, n_reset);
    checks++; if (n_b2b == 0)     begin failures++; $display("no back-to-back acceptance"); end
    checks++; if (n_gap == 0)     begin failures++; $display("no idle gap"); end
    checks++; if (n_signsub == 0) begin failures++; $display("no sign-bit subtraction"); end
    checks++; if (n_minpair == 0) begin failures++; $display("no most-negative pair sum"); end
    checks++; if (n_reset == 0)   begin failures++; $display("no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
