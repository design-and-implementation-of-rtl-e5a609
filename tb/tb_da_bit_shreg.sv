// tb_da_bit_shreg: checks the parallel-in, bit-serial-out register.
// Random words are loaded; over the following W shifts bits_out must show bit
// 0, 1, ... W-1 of every word. Idle cycles (no shift) must hold the bit, and a
// load in the same cycle as a shift must win.
module tb_da_bit_shreg;
  localparam int WORDS = 16, W = 13;

  logic clk = 0, load = 0, shift = 0;
  logic [W-1:0]     par_in [WORDS];
  logic [WORDS-1:0] bits_out;

  da_bit_shreg #(.WORDS(WORDS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] ref_w [WORDS];

  task automatic check_bit(int b);
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (bits_out[i] !== ref_w[i][b]) begin
        failures++;
        if (failures < 10) $display("word %0d bit %0d: got %0b", i, b, bits_out[i]);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      for (int i = 0; i < WORDS; i++) begin
        par_in[i] = W'($urandom);
        ref_w[i]  = par_in[i];
      end
      load = 1; shift = (n % 2 == 1);  // odd rounds: load together with shift
      @(negedge clk);
      load = 0;
      for (int b = 0; b < W; b++) begin
        check_bit(b);
        shift = 1;
        if ($urandom_range(0, 3) == 0) begin
          shift = 0;            // idle cycle: bit must hold
          @(negedge clk);
          check_bit(b);
          shift = 1;
        end
        @(negedge clk);
      end
      shift = 0;
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
