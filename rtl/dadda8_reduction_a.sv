// Two-stage Dadda reduction of an 8x8 partial product matrix with 4-2
// compressors that carry sideways (layout of the exact multiplier, also used
// by approximate Multipliers 1, 3 and 4).
//
// Column c of the matrix (c = 0..14) holds the bits pp[j][c-j]; its height
// runs 1,2,..,8,..,2,1.  Stage 1 brings every column down to at most four
// bits with 2 half adders, 2 full adders and 8 compressors; stage 2 brings
// every column down to two bits with 1 half adder, 1 full adder and 10
// compressors (columns 3..12).  A compressor's cout feeds the cin of the
// compressor one column to the left in the same stage; the first compressor
// of each stage chain takes the carry of the half adder to its right as its
// cin.  Where a column holds two compressors the cout of the second becomes
// an ordinary input of the second compressor one column up.  Sums and
// carries go to the next stage; the order in which they enter the next
// stage's cells is fixed below, and it matters for the approximate cells,
// which are not symmetric in their inputs.
//
// MULT chooses the cell of every compressor through
// cmp42_pkg::cmp_for_column (N = 8: Multiplier 3 and 4 switch to exact cells
// from column 7 up).  Design 2 cells have no cin/cout: a half-adder carry
// that would be their cin passes on as an ordinary bit instead.
// Outputs row0/row1 are the two 15-bit rows for the final adder.
// Combinational.  The device counts per stage follow the source; the exact
// position of every device and the order of inputs are read off its dot
// diagram and fixed so that the exact variant is exact and Multipliers 3 and
// 4 reproduce the source's count of correct products.
module dadda8_reduction_a
  import cmp42_pkg::*;
#(
  parameter mult_kind_e MULT = MULT_EXACT
) (
  input  logic [7:0][7:0] pp,    // pp[j][i]: weight 2^(i+j)
  output logic [14:0]     row0,
  output logic [14:0]     row1
);
  localparam int N = 8;

  // Cell type per column.
  function automatic cmp_kind_e k(int col);
    return cmp_for_column(MULT, col, N);
  endfunction

  // Bit of row j in column c.
  function automatic logic ppb(logic [7:0][7:0] m, int j, int c);
    return m[j][c-j];
  endfunction

  // ---------------------------------------------------------------- stage 1
  // s1[c][k]: up to four bits of column c after stage 1, in cell-input order.
  logic [3:0] s1 [15];

  // column 4: half adder on rows 0,1
  logic hs4, hc4;
  half_adder u_ha4 (.a(ppb(pp,0,4)), .b(ppb(pp,1,4)), .s(hs4), .c(hc4));

  // column 5: compressor on rows 0..3, cin = hc4 unless the cell has no cin
  localparam bit C5_HA_CIN = (cmp_for_column(MULT, 5, 8) != CMP_D2);
  logic s5, cy5, co5;
  compressor42 #(.KIND(k(5))) u_c5 (
    .x1(ppb(pp,0,5)), .x2(ppb(pp,1,5)), .x3(ppb(pp,2,5)), .x4(ppb(pp,3,5)),
    .cin(C5_HA_CIN ? hc4 : 1'b0), .sum(s5), .carry(cy5), .cout(co5));

  // column 6: compressor on rows 0..3 (cin = co5), half adder on rows 4,5
  logic s6, cy6, co6, hs6, hc6;
  compressor42 #(.KIND(k(6))) u_c6 (
    .x1(ppb(pp,0,6)), .x2(ppb(pp,1,6)), .x3(ppb(pp,2,6)), .x4(ppb(pp,3,6)),
    .cin(co5), .sum(s6), .carry(cy6), .cout(co6));
  half_adder u_ha6 (.a(ppb(pp,4,6)), .b(ppb(pp,5,6)), .s(hs6), .c(hc6));

  // column 7: compressors A (rows 0..3, cin = co6) and B (rows 4..7)
  logic s7a, cy7a, co7a, s7b, cy7b, co7b;
  compressor42 #(.KIND(k(7))) u_c7a (
    .x1(ppb(pp,0,7)), .x2(ppb(pp,1,7)), .x3(ppb(pp,2,7)), .x4(ppb(pp,3,7)),
    .cin(co6), .sum(s7a), .carry(cy7a), .cout(co7a));
  compressor42 #(.KIND(k(7))) u_c7b (
    .x1(ppb(pp,4,7)), .x2(ppb(pp,5,7)), .x3(ppb(pp,6,7)), .x4(ppb(pp,7,7)),
    .cin(1'b0), .sum(s7b), .carry(cy7b), .cout(co7b));

  // column 8: compressor A (rows 1..4, cin = co7a),
  //           compressor B (rows 5..7 and co7b)
  logic s8a, cy8a, co8a, s8b, cy8b, co8b;
  compressor42 #(.KIND(k(8))) u_c8a (
    .x1(ppb(pp,1,8)), .x2(ppb(pp,2,8)), .x3(ppb(pp,3,8)), .x4(ppb(pp,4,8)),
    .cin(co7a), .sum(s8a), .carry(cy8a), .cout(co8a));
  compressor42 #(.KIND(k(8))) u_c8b (
    .x1(ppb(pp,5,8)), .x2(ppb(pp,6,8)), .x3(ppb(pp,7,8)), .x4(co7b),
    .cin(1'b0), .sum(s8b), .carry(cy8b), .cout(co8b));

  // column 9: compressor (rows 2..5, cin = co8a), full adder (rows 6,7, co8b)
  logic s9, cy9, co9, fs9, fc9;
  compressor42 #(.KIND(k(9))) u_c9 (
    .x1(ppb(pp,2,9)), .x2(ppb(pp,3,9)), .x3(ppb(pp,4,9)), .x4(ppb(pp,5,9)),
    .cin(co8a), .sum(s9), .carry(cy9), .cout(co9));
  full_adder u_fa9 (.a(ppb(pp,6,9)), .b(ppb(pp,7,9)), .ci(co8b), .s(fs9), .c(fc9));

  // column 10: compressor (rows 3..6, cin = co9)
  logic s10, cy10, co10;
  compressor42 #(.KIND(k(10))) u_c10 (
    .x1(ppb(pp,3,10)), .x2(ppb(pp,4,10)), .x3(ppb(pp,5,10)), .x4(ppb(pp,6,10)),
    .cin(co9), .sum(s10), .carry(cy10), .cout(co10));

  // column 11: full adder (rows 4,5 and co10)
  logic fs11, fc11;
  full_adder u_fa11 (.a(ppb(pp,4,11)), .b(ppb(pp,5,11)), .ci(co10), .s(fs11), .c(fc11));

  // Stage-1 result, column by column (unused slots are 0).
  always_comb begin
    s1[0]  = {3'b0, ppb(pp,0,0)};
    s1[1]  = {2'b0, ppb(pp,1,1), ppb(pp,0,1)};
    s1[2]  = {1'b0, ppb(pp,2,2), ppb(pp,1,2), ppb(pp,0,2)};
    s1[3]  = {ppb(pp,3,3), ppb(pp,2,3), ppb(pp,1,3), ppb(pp,0,3)};
    s1[4]  = {ppb(pp,4,4), ppb(pp,3,4), ppb(pp,2,4), hs4};
    if (C5_HA_CIN) s1[5] = {1'b0, ppb(pp,5,5), ppb(pp,4,5), s5};
    else           s1[5] = {ppb(pp,5,5), ppb(pp,4,5), s5, hc4};
    s1[6]  = {ppb(pp,6,6), hs6, s6, cy5};
    s1[7]  = {s7b, hc6, s7a, cy6};
    s1[8]  = {s8b, s8a, cy7b, cy7a};
    s1[9]  = {fs9, s9, cy8b, cy8a};
    s1[10] = {ppb(pp,7,10), s10, fc9, cy9};
    s1[11] = {ppb(pp,7,11), ppb(pp,6,11), fs11, cy10};
    s1[12] = {ppb(pp,7,12), ppb(pp,6,12), ppb(pp,5,12), fc11};
    s1[13] = {2'b0, ppb(pp,7,13), ppb(pp,6,13)};
    s1[14] = {3'b0, ppb(pp,7,14)};
  end

  // ---------------------------------------------------------------- stage 2
  // column 2: half adder on its first two bits
  logic hs2, hc2;
  half_adder u_ha2 (.a(s1[2][0]), .b(s1[2][1]), .s(hs2), .c(hc2));

  localparam bit C3_HA_CIN = (cmp_for_column(MULT, 3, 8) != CMP_D2);

  // columns 3..12: one chained compressor each; chain[c] is its cin
  logic [12:3] sum2;
  logic [13:4] car2;
  logic [13:3] chain;
  assign chain[3] = C3_HA_CIN ? hc2 : 1'b0;

  for (genvar c = 3; c <= 12; c++) begin : g_st2
    compressor42 #(.KIND(cmp_for_column(MULT, c, 8))) u_c (
      .x1(s1[c][0]), .x2(s1[c][1]), .x3(s1[c][2]), .x4(s1[c][3]),
      .cin(chain[c]), .sum(sum2[c]), .carry(car2[c+1]), .cout(chain[c+1]));
  end

  // column 13: full adder on its two bits and the last cout
  logic fs13, fc13;
  full_adder u_fa13 (.a(s1[13][0]), .b(s1[13][1]), .ci(chain[13]), .s(fs13), .c(fc13));

  // Final two rows.
  always_comb begin
    row0 = '0;
    row1 = '0;
    row0[0] = s1[0][0];
    row0[1] = s1[1][0];  row1[1] = s1[1][1];
    row0[2] = hs2;       row1[2] = s1[2][2];
    row0[3] = sum2[3];   row1[3] = C3_HA_CIN ? 1'b0 : hc2;
    for (int c = 4; c <= 12; c++) begin
      row0[c] = sum2[c];
      row1[c] = car2[c];
    end
    row0[13] = fs13;     row1[13] = car2[13];
    row0[14] = s1[14][0]; row1[14] = fc13;
  end
endmodule
