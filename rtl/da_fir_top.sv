// da_fir_top: linear-phase FIR filter in distributed arithmetic with a
// divided look-up table.
//
// The filter computes y[n] = sum_{k=0}^{TAPS-1} h[k] x[n-k] without
// multipliers. Because h is symmetric, a pretreatment stage first adds the
// sample pairs that share a coefficient (TAPS/2 sums, one bit wider than the
// input). A shift register then presents these sums one bit position per
// clock, LSB first. Each bit position addresses four small LUTs (TAPS/8
// address bits each, 16 entries at TAPS = 32) whose entries are all subset
// sums of their coefficients; a two-level adder tree adds the four table
// outputs and a +/- accumulator weights the result by 2^b, subtracting it for
// the sign bit. LUT output, adder level 1 and adder level 2 are registered
// (three pipeline stages), so the next sample's bits can enter while the
// current one drains.
//
// Interface: in_valid/in_ready handshake for signed IN_W-bit samples; one
// sample is accepted every P_DATA_W = IN_W+1 clocks at most (13 at the
// defaults). out_valid pulses once per accepted sample with the full-precision
// signed result out_data (OUT_W bits, scaled by 2^(COEF_W-1) for Q1.11
// coefficients). Latency: out_valid is high P_DATA_W + PIPE + 1 = 17 clocks
// after the accepting clock edge. Synchronous active-low reset clears the
// sample history and the control.
// The pretreatment, bit-serial shift register, four LUTs, adder tree with its
// pipeline registers and the +/- accumulator follow the filter's structure;
// the coefficient values and width, the handshake and the output width are
// this design's choices.
module da_fir_top #(
  parameter int TAPS   = da_pkg::DEF_TAPS,
  parameter int IN_W   = da_pkg::DEF_IN_W,
  parameter int COEF_W = da_pkg::DEF_COEF_W,
  parameter logic signed [COEF_W-1:0] COEF [TAPS/2] = da_pkg::DEF_COEF,
  localparam int HALF     = TAPS / 2,
  localparam int NL       = da_pkg::NUM_LUT,
  localparam int LUT_A    = HALF / NL,                 // address bits per LUT
  localparam int LUT_W    = COEF_W + $clog2(LUT_A),
  localparam int P_DATA_W = IN_W + 1,                  // bits per pair sum
  localparam int OUT_W    = LUT_W + 2 + P_DATA_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int CW = $clog2(P_DATA_W);

  logic          load, shift;
  logic [CW-1:0] div_count;
  logic          acc_valid, acc_first, acc_last;
  logic [CW-1:0] acc_idx;

  da_ctrl #(.P_DATA_W(P_DATA_W), .PIPE(da_pkg::PIPE_DEPTH)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load, .shift, .div_count,
    .acc_valid, .acc_first, .acc_last, .acc_idx
  );

  logic signed [IN_W:0] pre_sum [HALF];

  da_pretreat #(.TAPS(TAPS), .IN_W(IN_W)) u_pre (
    .clk, .rst_n, .load, .in_data, .pre_sum
  );

  logic [P_DATA_W-1:0] par_in [HALF];
  logic [HALF-1:0]     bits;

  always_comb begin
    for (int i = 0; i < HALF; i++) par_in[i] = pre_sum[i];
  end

  da_bit_shreg #(.WORDS(HALF), .W(P_DATA_W)) u_shreg (
    .clk, .load, .shift, .par_in, .bits_out(bits)
  );

  logic signed [LUT_W-1:0] lut_out [NL];

  for (genvar g = 0; g < NL; g++) begin : g_lut
    localparam logic signed [COEF_W-1:0] SUB [LUT_A] = COEF[g*LUT_A +: LUT_A];
    da_lut #(.ADDR_W(LUT_A), .COEF_W(COEF_W), .OUT_W(LUT_W), .COEF(SUB)) u_lut (
      .clk, .addr(bits[g*LUT_A +: LUT_A]), .data(lut_out[g])
    );
  end

  logic signed [LUT_W+1:0] table_sum;

  da_adder_tree #(.IN_W(LUT_W)) u_tree (
    .clk, .in(lut_out), .sum(table_sum)
  );

  da_accumulator #(.IN_W(LUT_W+2), .P_DATA_W(P_DATA_W), .ACC_W(OUT_W)) u_acc (
    .clk, .rst_n,
    .in_valid(acc_valid), .in_first(acc_first), .in_last(acc_last),
    .in_idx(acc_idx), .in_data(table_sum),
    .out_valid, .out_data
  );

  initial assert (TAPS % (2 * NL) == 0)
    else $error("da_fir_top: TAPS must be a multiple of %0d", 2 * NL);

endmodule
