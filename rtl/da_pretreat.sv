// da_pretreat: input delay line and symmetric pre-adders of the DA FIR filter.
//
// A linear-phase filter has h[k] = h[TAPS-1-k], so the TAPS products collapse
// to TAPS/2 products of a coefficient with a pair sum. This block keeps the
// last TAPS-1 samples and forms, for the window that ends with the sample on
// in_data, pre_sum[i] = x[n-i] + x[n-(TAPS-1)+i] for i = 0..TAPS/2-1, each one
// bit wider than the input so no sum can overflow (12 -> 13 bits).
//
// Interface and timing: pre_sum is combinational from in_data and the stored
// samples, so the next stage can capture it at the same edge on which `load`
// shifts in_data into the delay line. Synchronous active-low reset clears the
// delay line, i.e. the filter starts from an all-zero history.
// The pair sums and their widths follow the filter's structure; keeping the
// sums combinational (so that the shift register is their register) is this
// design's choice.
module da_pretreat #(
  parameter int TAPS = da_pkg::DEF_TAPS,
  parameter int IN_W = da_pkg::DEF_IN_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic signed [IN_W-1:0] in_data,
  output logic signed [IN_W:0]   pre_sum [TAPS/2]
);

  localparam int HALF = TAPS / 2;

  // taps[k] = x[n-1-k]: the samples before the one on in_data
  logic signed [IN_W-1:0] taps [TAPS-1];
  logic signed [IN_W-1:0] win  [TAPS];   // win[k] = x[n-k]

  always_comb begin
    win[0] = in_data;
    for (int k = 1; k < TAPS; k++) win[k] = taps[k-1];
  end

  always_comb begin
    for (int i = 0; i < HALF; i++)
      pre_sum[i] = (IN_W+1)'(win[i]) + (IN_W+1)'(win[TAPS-1-i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS-1; k++) taps[k] <= '0;
    end else if (load) begin
      for (int k = 0; k < TAPS-1; k++) taps[k] <= win[k];
    end
  end

  initial assert (TAPS % 2 == 0 && TAPS >= 2)
    else $error("da_pretreat: TAPS must be even");

endmodule
