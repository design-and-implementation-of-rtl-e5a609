// da_ctrl: bit counter and sequencing of the bit-serial DA FIR filter.
//
// Each input sample takes P_DATA_W clocks: one per bit of the pair sums.
// The controller accepts a sample when in_valid and in_ready are both high
// (in_ready is high when idle and in the cycle of the last bit, so samples
// can follow each other every P_DATA_W clocks with no gap), tells the
// pretreatment and shift register to load, and then counts div_count from
// 0 to P_DATA_W-1 while the shift register presents bit div_count. The bit
// index and first/last flags are delayed by PIPE clocks so that they meet the
// matching adder-tree value at the accumulator.
//
// Interface and timing: load = in_valid & in_ready (same cycle). shift and
// div_count describe the bit on the shift-register output in the current
// cycle. acc_* are shift/div_count delayed by PIPE clocks.
// Synchronous active-low reset empties the controller.
// The per-bit counter follows the filter's description; the valid/ready
// input handshake and the flag pipeline are this design's choices.
module da_ctrl #(
  parameter int P_DATA_W = da_pkg::DEF_IN_W + 1,
  parameter int PIPE     = da_pkg::PIPE_DEPTH,
  localparam int CW      = $clog2(P_DATA_W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          load,
  output logic          shift,
  output logic [CW-1:0] div_count,
  output logic          acc_valid,
  output logic          acc_first,
  output logic          acc_last,
  output logic [CW-1:0] acc_idx
);

  logic busy;
  logic last_bit;

  assign last_bit = busy && (div_count == CW'(P_DATA_W-1));
  assign in_ready = !busy || last_bit;
  assign load     = in_valid && in_ready;
  assign shift    = busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      div_count <= '0;
    end else if (load) begin
      busy      <= 1'b1;
      div_count <= '0;
    end else if (last_bit) begin
      busy      <= 1'b0;
      div_count <= '0;
    end else if (busy) begin
      div_count <= div_count + 1'b1;
    end
  end

  // flag pipeline: valid, first, last, index
  typedef struct packed {
    logic          valid;
    logic          first;
    logic          last;
    logic [CW-1:0] idx;
  } bit_tag_t;

  bit_tag_t tag_pipe [PIPE+1];

  always_comb begin
    tag_pipe[0].valid = busy;
    tag_pipe[0].first = busy && (div_count == '0);
    tag_pipe[0].last  = last_bit;
    tag_pipe[0].idx   = div_count;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 1; s <= PIPE; s++) tag_pipe[s] <= '0;
    end else begin
      for (int s = 1; s <= PIPE; s++) tag_pipe[s] <= tag_pipe[s-1];
    end
  end

  assign acc_valid = tag_pipe[PIPE].valid;
  assign acc_first = tag_pipe[PIPE].first;
  assign acc_last  = tag_pipe[PIPE].last;
  assign acc_idx   = tag_pipe[PIPE].idx;

  initial assert (P_DATA_W >= 2) else $error("da_ctrl: P_DATA_W must be >= 2");

endmodule
