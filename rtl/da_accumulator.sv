// da_accumulator: +/- shift-accumulator that closes the DA computation.
//
// For a B+1-bit two's-complement operand the filter output is
//   y = -2^B * T_B + sum_{b=0}^{B-1} 2^b * T_b,
// where T_b is the adder-tree value for bit b of the pair sums. One T_b
// arrives per clock, LSB first. The accumulator loads T_0 on the first bit,
// adds T_b * 2^b for the middle bits and subtracts T_B * 2^B for the sign bit;
// the accumulator register is the z^-1 feedback path. When the sign bit has
// been processed the result is copied into out_data and out_valid pulses for
// one clock; out_data then holds until the next result.
//
// Interface and timing: in_valid/in_first/in_last/in_idx qualify in_data in
// the same cycle (they come from the controller, delayed to match the
// pipeline). out_valid rises one clock after the cycle with in_last.
// Synchronous active-low reset clears out_valid and out_data.
// The add/subtract rule and the 2^b weighting follow the filter's structure;
// growing the weight by a left shift of the term, and the output register,
// are this design's choices.
module da_accumulator #(
  parameter int IN_W     = da_pkg::DEF_COEF_W + 4,
  parameter int P_DATA_W = da_pkg::DEF_IN_W + 1,
  parameter int ACC_W    = IN_W + P_DATA_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic                        in_first,
  input  logic                        in_last,
  input  logic [$clog2(P_DATA_W)-1:0] in_idx,
  input  logic signed [IN_W-1:0]      in_data,
  output logic                        out_valid,
  output logic signed [ACC_W-1:0]     out_data
);

  logic signed [ACC_W-1:0] acc, term, acc_next;

  always_comb begin
    term = ACC_W'(in_data) <<< in_idx;
    if (in_first)     acc_next = term;
    else if (in_last) acc_next = acc - term;
    else              acc_next = acc + term;
  end

  always_ff @(posedge clk) begin
    if (in_valid) acc <= acc_next;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid && in_last) out_data <= acc_next;
    end
  end

endmodule
