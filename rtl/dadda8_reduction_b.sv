// Two-stage Dadda reduction of an 8x8 partial product matrix with
// approximate Design 2 compressors only (approximate Multiplier 2).
//
// Design 2 cells take four bits and give a sum (weight 1) and a carry
// (weight 2), with no sideways carry.  Without a cin, a compressor column
// no longer absorbs the cout of its neighbour, so the layout differs from
// the exact one: stage 1 uses 4 half adders, 1 full adder and 7 compressors
// to bring every column to at most four bits, stage 2 uses 2 half adders
// and 10 compressors (columns 3..12) to bring every column to two bits;
// 6 half adders, 1 full adder and 17 compressors in all, as in the source.
// Column c of the matrix holds pp[j][c-j].  The position of every device
// and the order in which bits enter the next stage are read off the
// source's dot diagram.  Outputs row0/row1 are the two 15-bit rows for the
// final adder.  Combinational.
module dadda8_reduction_b (
  input  logic [7:0][7:0] pp,    // pp[j][i]: weight 2^(i+j)
  output logic [14:0]     row0,
  output logic [14:0]     row1
);
  // Bit of row j in column c.
  function automatic logic ppb(logic [7:0][7:0] m, int j, int c);
    return m[j][c-j];
  endfunction

  // ---------------------------------------------------------------- stage 1
  logic [3:0] s1 [15];

  logic hs4, hc4;
  half_adder u_ha4 (.a(ppb(pp,0,4)), .b(ppb(pp,1,4)), .s(hs4), .c(hc4));

  logic s5, cy5;
  approx_compressor42_d2 u_c5 (
    .x1(ppb(pp,0,5)), .x2(ppb(pp,1,5)), .x3(ppb(pp,2,5)), .x4(ppb(pp,3,5)),
    .sum(s5), .carry(cy5));

  logic s6, cy6, hs6, hc6;
  approx_compressor42_d2 u_c6 (
    .x1(ppb(pp,0,6)), .x2(ppb(pp,1,6)), .x3(ppb(pp,2,6)), .x4(ppb(pp,3,6)),
    .sum(s6), .carry(cy6));
  half_adder u_ha6 (.a(ppb(pp,4,6)), .b(ppb(pp,5,6)), .s(hs6), .c(hc6));

  logic s7a, cy7a, s7b, cy7b;
  approx_compressor42_d2 u_c7a (
    .x1(ppb(pp,0,7)), .x2(ppb(pp,1,7)), .x3(ppb(pp,2,7)), .x4(ppb(pp,3,7)),
    .sum(s7a), .carry(cy7a));
  approx_compressor42_d2 u_c7b (
    .x1(ppb(pp,4,7)), .x2(ppb(pp,5,7)), .x3(ppb(pp,6,7)), .x4(ppb(pp,7,7)),
    .sum(s7b), .carry(cy7b));

  logic s8, cy8, fs8, fc8;
  approx_compressor42_d2 u_c8 (
    .x1(ppb(pp,1,8)), .x2(ppb(pp,2,8)), .x3(ppb(pp,3,8)), .x4(ppb(pp,4,8)),
    .sum(s8), .carry(cy8));
  full_adder u_fa8 (.a(ppb(pp,5,8)), .b(ppb(pp,6,8)), .ci(ppb(pp,7,8)), .s(fs8), .c(fc8));

  logic s9, cy9, hs9, hc9;
  approx_compressor42_d2 u_c9 (
    .x1(ppb(pp,2,9)), .x2(ppb(pp,3,9)), .x3(ppb(pp,4,9)), .x4(ppb(pp,5,9)),
    .sum(s9), .carry(cy9));
  half_adder u_ha9 (.a(ppb(pp,6,9)), .b(ppb(pp,7,9)), .s(hs9), .c(hc9));

  logic s10, cy10;
  approx_compressor42_d2 u_c10 (
    .x1(ppb(pp,3,10)), .x2(ppb(pp,4,10)), .x3(ppb(pp,5,10)), .x4(ppb(pp,6,10)),
    .sum(s10), .carry(cy10));

  logic hs11, hc11;
  half_adder u_ha11 (.a(ppb(pp,4,11)), .b(ppb(pp,5,11)), .s(hs11), .c(hc11));

  always_comb begin
    s1[0]  = {3'b0, ppb(pp,0,0)};
    s1[1]  = {2'b0, ppb(pp,1,1), ppb(pp,0,1)};
    s1[2]  = {1'b0, ppb(pp,2,2), ppb(pp,1,2), ppb(pp,0,2)};
    s1[3]  = {ppb(pp,3,3), ppb(pp,2,3), ppb(pp,1,3), ppb(pp,0,3)};
    s1[4]  = {ppb(pp,4,4), ppb(pp,3,4), ppb(pp,2,4), hs4};
    s1[5]  = {ppb(pp,5,5), ppb(pp,4,5), s5, hc4};
    s1[6]  = {ppb(pp,6,6), hs6, s6, cy5};
    s1[7]  = {s7b, s7a, hc6, cy6};
    s1[8]  = {fs8, s8, cy7b, cy7a};
    s1[9]  = {hs9, s9, fc8, cy8};
    s1[10] = {ppb(pp,7,10), s10, hc9, cy9};
    s1[11] = {ppb(pp,7,11), ppb(pp,6,11), hs11, cy10};
    s1[12] = {ppb(pp,7,12), ppb(pp,6,12), ppb(pp,5,12), hc11};
    s1[13] = {2'b0, ppb(pp,7,13), ppb(pp,6,13)};
    s1[14] = {3'b0, ppb(pp,7,14)};
  end

  // ---------------------------------------------------------------- stage 2
  logic hs2, hc2;
  half_adder u_ha2 (.a(s1[2][0]), .b(s1[2][1]), .s(hs2), .c(hc2));

  logic [12:3] sum2;
  logic [13:4] car2;
  for (genvar c = 3; c <= 12; c++) begin : g_st2
    approx_compressor42_d2 u_c (
      .x1(s1[c][0]), .x2(s1[c][1]), .x3(s1[c][2]), .x4(s1[c][3]),
      .sum(sum2[c]), .carry(car2[c+1]));
  end

  logic hs13, hc13;
  half_adder u_ha13 (.a(s1[13][0]), .b(s1[13][1]), .s(hs13), .c(hc13));

  always_comb begin
    row0 = '0;
    row1 = '0;
    row0[0] = s1[0][0];
    row0[1] = s1[1][0];  row1[1] = s1[1][1];
    row0[2] = hs2;       row1[2] = s1[2][2];
    row0[3] = sum2[3];   row1[3] = hc2;
    for (int c = 4; c <= 12; c++) begin
      row0[c] = sum2[c];
      row1[c] = car2[c];
    end
    row0[13] = hs13;      row1[13] = car2[13];
    row0[14] = s1[14][0]; row1[14] = hc13;
  end
endmodule
