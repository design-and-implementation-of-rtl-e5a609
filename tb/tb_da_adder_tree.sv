// tb_da_adder_tree: checks the pipelined four-input sum and its two-clock
// latency with random and extreme inputs applied every clock.
module tb_da_adder_tree;
  localparam int IN_W = 14;

  logic clk = 0;
  logic signed [IN_W-1:0] in [4];
  logic signed [IN_W+1:0] sum;

  da_adder_tree #(.IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int expq [$];

  function automatic int pick();
    case ($urandom_range(0, 4))
      0: return -(1 << (IN_W-1));
      1: return (1 << (IN_W-1)) - 1;
      default: return int'($urandom_range(0, (1 << IN_W) - 1)) - (1 << (IN_W-1));
    endcase
  endfunction

  initial begin
    int s, v;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      s = 0;
      for (int j = 0; j < 4; j++) begin v = pick(); in[j] = IN_W'(v); s += v; end
      expq.push_back(s);
      if (t >= 2) begin
        // sum now shows the inputs applied two clocks ago
        v = expq.pop_front();
        checks++;
        if (int'(sum) != v) begin
          failures++;
          if (failures < 10) $display("t=%0d sum=%0d expected %0d", t, sum, v);
        end
      end
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
