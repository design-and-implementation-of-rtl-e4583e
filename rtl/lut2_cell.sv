// lut2_cell: the 2-bit look-up-table cell from which the arithmetic is built.
//
// Three small tables are indexed by the 4-bit address {a, b}:
//   * sum table  : {carry, sum[1:0]} of a + b + cin, one table for cin = 0 and
//                  one for cin = 1; a 2:1 multiplexer driven by cin picks the
//                  entry, so the carry input never passes through an adder.
//   * diff table : {borrow, diff[1:0]} of a - b - bin, again one table per
//                  value of bin and a 2:1 multiplexer on bin.
//   * prod table : the 4-bit product a * b.
// The tables hold the values of the design's 2-bit A+B, A-B and A*B tables
// (the sum is taken modulo 4 with the carry kept as a third bit; the signed
// difference is stored as a 2-bit remainder plus a borrow). They are computed
// by constant functions at elaboration, so no data file is needed.
// The cell is purely combinational: every output settles in the same cycle.
// Keeping the carry/borrow bit in the table, and the 2:1 mux on the borrow
// input, are this design's choices for chaining cells into wider words.
module lut2_cell (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,   // carry into the sum
  input  logic       bin,   // borrow into the difference
  output logic [1:0] sum,
  output logic       cout,
  output logic [1:0] diff,
  output logic       bout,
  output logic [3:0] prod
);

  // Entry k of each table sits at bits [3k+2:3k] (sum, diff) or [4k+3:4k] (prod),
  // where k = {a, b}.
  function automatic logic [47:0] build_sum_lut(input logic c);
    logic [47:0] t;
    t = '0;
    for (int k = 0; k < 16; k++) begin
      t[3*k +: 3] = 3'((k >> 2) + (k & 3) + int'(c));
    end
    return t;
  endfunction

  function automatic logic [47:0] build_diff_lut(input logic br);
    logic [47:0] t;
    int d;
    t = '0;
    for (int k = 0; k < 16; k++) begin
      d = (k >> 2) - (k & 3) - int'(br);
      t[3*k +: 3] = {d < 0, 2'(d)};
    end
    return t;
  endfunction

  function automatic logic [63:0] build_prod_lut();
    logic [63:0] t;
    t = '0;
    for (int k = 0; k < 16; k++) begin
      t[4*k +: 4] = 4'((k >> 2) * (k & 3));
    end
    return t;
  endfunction

  localparam logic [47:0] SUM_LUT_C0  = build_sum_lut(1'b0);
  localparam logic [47:0] SUM_LUT_C1  = build_sum_lut(1'b1);
  localparam logic [47:0] DIFF_LUT_B0 = build_diff_lut(1'b0);
  localparam logic [47:0] DIFF_LUT_B1 = build_diff_lut(1'b1);
  localparam logic [63:0] PROD_LUT    = build_prod_lut();

  logic [3:0] addr;
  assign addr = {a, b};

  // Table reads, then the 2:1 carry / borrow multiplexers.
  always_comb begin
    {cout, sum} = cin ? SUM_LUT_C1[3*addr +: 3]  : SUM_LUT_C0[3*addr +: 3];
    {bout, diff} = bin ? DIFF_LUT_B1[3*addr +: 3] : DIFF_LUT_B0[3*addr +: 3];
    prod = PROD_LUT[4*addr +: 4];
  end

endmodule
