// da_adder_tree: pipelined sum of the four divided-LUT outputs.
//
// The four table outputs are added pairwise (level 1) and the two pair sums
// are added (level 2); a register follows each level. Together with the
// register at each table output this gives the three pipeline stages between
// the LUT address and the accumulator. Every level grows by one bit, so the
// sum is exact: IN_W-bit inputs give an (IN_W+2)-bit result.
//
// Interface and timing: in[0..3] -> sum with a latency of two clocks and a
// throughput of one sum per clock. The registers run freely (no enable, no
// reset); validity travels alongside in the controller.
// The two-level structure with a register per level follows the filter's
// structure; the bit growth per level is this design's choice.
module da_adder_tree #(
  parameter int IN_W = da_pkg::DEF_COEF_W + 2
) (
  input  logic                    clk,
  input  logic signed [IN_W-1:0]  in  [da_pkg::NUM_LUT],
  output logic signed [IN_W+1:0]  sum
);

  logic signed [IN_W:0] lvl1 [2];

  always_ff @(posedge clk) begin
    lvl1[0] <= (IN_W+1)'(in[0]) + (IN_W+1)'(in[1]);
    lvl1[1] <= (IN_W+1)'(in[2]) + (IN_W+1)'(in[3]);
    sum     <= (IN_W+2)'(lvl1[0]) + (IN_W+2)'(lvl1[1]);
  end

  initial assert (da_pkg::NUM_LUT == 4)
    else $error("da_adder_tree: written for four tables");

endmodule
