// tb_da_accumulator: checks the +/- shift-accumulation rule.
// For each operation the testbench draws P_DATA_W random bit values T_b,
// feeds them LSB first with the first/last flags, sometimes with idle cycles
// in between and sometimes back to back with the next operation, and expects
//   -T_{P-1} * 2^(P-1) + sum_{b<P-1} T_b * 2^b
// one clock after the last bit, with out_valid high for exactly one clock.
module tb_da_accumulator;
  localparam int IN_W = 16, P = 13, ACC_W = IN_W + P, CW = $clog2(P);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [CW-1:0] in_idx = '0;
  logic signed [IN_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [ACC_W-1:0] out_data;

  da_accumulator #(.IN_W(IN_W), .P_DATA_W(P), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_valid = 0;
  longint expq [$];

  // output monitor
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      longint e;
      n_valid++;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected out_valid");
      end else begin
        e = expq.pop_front();
        if (longint'(out_data) != e) begin
          failures++;
          if (failures < 10) $display("out=%0d expected %0d", out_data, e);
        end
      end
    end
  end

  function automatic int pick();
    case ($urandom_range(0, 4))
      0: return -(1 << (IN_W-1));
      1: return (1 << (IN_W-1)) - 1;
      default: return int'($urandom_range(0, (1 << IN_W) - 1)) - (1 << (IN_W-1));
    endcase
  endfunction

  initial begin
    int n_ops;
    n_ops = 100;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < n_ops; op++) begin
      longint e;
      int v;
      e = 0;
      for (int b = 0; b < P; b++) begin
        v = pick();
        if (b == P-1) e -= longint'(v) <<< b; else e += longint'(v) <<< b;
        in_valid = 1; in_first = (b == 0); in_last = (b == P-1);
        in_idx = CW'(b); in_data = IN_W'(v);
        @(negedge clk);
        if (b != P-1 && $urandom_range(0, 5) == 0) begin
          in_valid = 0; in_data = IN_W'(pick()); // idle cycle must be ignored
          @(negedge clk);
        end
      end
      expq.push_back(e);
      in_valid = 0; in_first = 0; in_last = 0;
      if (op % 3 == 0) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (n_valid != n_ops || expq.size() != 0) begin
      failures++; $display("results: %0d of %0d", n_valid, n_ops);
    end
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
