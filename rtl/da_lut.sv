// da_lut: one of the divided look-up tables of the DA FIR filter.
//
// A table serves ADDR_W coefficients c[0..ADDR_W-1]. Address bit j selects
// c[j], and entry a holds the sum of the selected coefficients:
//   table[a] = sum over j with a[j]=1 of c[j]
// (for ADDR_W = 4: 0, c0, c1, c0+c1, c2, ... c0+c1+c2+c3). Splitting the 16
// coefficients of the 32-tap filter over four such tables needs 4 x 16 entries
// instead of the 65536 of a single 16-input table.
//
// The table is a constant array computed at elaboration time from COEF, so it
// maps to a ROM. Its output is registered (the first pipeline register):
// data is the entry for the address presented one clock earlier.
// Entries are COEF_W + clog2(ADDR_W) bits wide, enough for the sum of all
// ADDR_W coefficients. Table contents and the register after the table follow
// the filter's structure; the entry width is this design's choice.
module da_lut #(
  parameter int ADDR_W = 4,
  parameter int COEF_W = da_pkg::DEF_COEF_W,
  parameter int OUT_W  = COEF_W + $clog2(ADDR_W),
  parameter logic signed [COEF_W-1:0] COEF [ADDR_W] = '{default: '0}
) (
  input  logic                    clk,
  input  logic [ADDR_W-1:0]       addr,
  output logic signed [OUT_W-1:0] data
);

  localparam int DEPTH = 2 ** ADDR_W;

  typedef logic signed [OUT_W-1:0] entry_t;
  typedef entry_t table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int a = 0; a < DEPTH; a++) begin
      t[a] = '0;
      for (int j = 0; j < ADDR_W; j++)
        if (a[j]) t[a] = t[a] + OUT_W'(COEF[j]);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) data <= TABLE[addr];

endmodule
