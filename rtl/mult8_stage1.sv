// mult8_stage1 - first reduction layer of the 8x8 partial-product matrix.
//
// The 64 partial products form columns 0..14 of heights 1,2,..,8,..,2,1.
// With the dots of each column packed upward, dot row k (1..8) of column c
// is pp[i][c-i] with i = max(0, c-7) + k - 1. This layer groups the dots
// as follows (columns counted from the LSB):
//   - col 14 row 1, col 11 row 4, col 8 row 7, col 6 row 7, col 4 row 5,
//     col 2 row 3 and col 0 row 1 pass through;
//   - half adders on rows 1-2 of col 13, rows 4-5 of col 10, rows 7-8 of col 7;
//   - full adders on rows 1-3 of cols 12..7 and rows 4-6 of cols 9..7;
//   - six 2-bit approximate adders (aad2, carry in 0) on the 2x2 dot groups
//     at cols 2-1 rows 1-2, cols 4-3 rows 1-2 and 3-4, cols 6-5 rows 1-2,
//     3-4 and 5-6. Each adds the two 2-bit numbers {row r} and {row r+1};
//     its two sum bits keep their columns and its carry guess (the upper A
//     bit) goes two columns up.
// The result has at most six bits per column and is returned as six
// 16-bit rows (rows[j][c] = j-th bit of column c, 0 where a column is
// shorter). Combinational.
//
// The grouping is the one the original design draws for its 8-bit
// multiplier; the assignment of partial-product bits to dot rows and the
// zero carry in of the 2-bit adders are this implementation's choice.
module mult8_stage1 (
  input  logic [7:0][7:0]  pp,
  output logic [5:0][15:0] rows
);
  // Dot matrix: d[c][k], column c, dot row k.
  logic [14:0][8:1] d;

  always_comb begin
    d = '0;
    for (int c = 0; c < 15; c++) begin
      for (int k = 1; k <= 8; k++) begin
        automatic int i = ((c > 7) ? c - 7 : 0) + k - 1;
        if (i <= 7 && c - i >= 0 && c - i <= 7) d[c][k] = pp[i][c-i];
      end
    end
  end

  // Half adders.
  logic hs13, hc13, hs10, hc10, hs7, hc7;
  half_adder u_ha13 (.a(d[13][1]), .b(d[13][2]), .s(hs13), .co(hc13));
  half_adder u_ha10 (.a(d[10][4]), .b(d[10][5]), .s(hs10), .co(hc10));
  half_adder u_ha7  (.a(d[7][7]),  .b(d[7][8]),  .s(hs7),  .co(hc7));

  // Full adders on dot rows 1-3 (cols 12..7) and 4-6 (cols 9..7).
  logic [12:7] st, ct;
  logic [9:7]  sb, cb;
  for (genvar c = 7; c <= 12; c++) begin : g_fa_top
    full_adder u_fa (.a(d[c][1]), .b(d[c][2]), .c(d[c][3]), .s(st[c]), .co(ct[c]));
  end
  for (genvar c = 7; c <= 9; c++) begin : g_fa_bot
    full_adder u_fa (.a(d[c][4]), .b(d[c][5]), .c(d[c][6]), .s(sb[c]), .co(cb[c]));
  end

  // 2-bit approximate adders: (low column, upper dot row) of each 2x2 group.
  localparam int NBOX = 6;
  localparam int BOX_COL [NBOX] = '{1, 3, 5, 3, 5, 5};
  localparam int BOX_ROW [NBOX] = '{1, 1, 1, 3, 3, 5};
  logic [NBOX-1:0][1:0] bs;
  logic [NBOX-1:0]      bc;
  for (genvar j = 0; j < NBOX; j++) begin : g_box
    aad2 u_aad2 (
      .a   ({d[BOX_COL[j]+1][BOX_ROW[j]],   d[BOX_COL[j]][BOX_ROW[j]]}),
      .b   ({d[BOX_COL[j]+1][BOX_ROW[j]+1], d[BOX_COL[j]][BOX_ROW[j]+1]}),
      .cin (1'b0),
      .s   (bs[j]),
      .cout(bc[j])
    );
  end

  // Collect the outputs column by column into rows.
  always_comb begin
    rows = '0;
    // col 0
    rows[0][0]  = d[0][1];
    // col 1
    rows[0][1]  = bs[0][0];
    // col 2
    rows[0][2]  = bs[0][1];  rows[1][2]  = d[2][3];
    // col 3
    rows[0][3]  = bs[1][0];  rows[1][3]  = bs[3][0];  rows[2][3]  = bc[0];
    // col 4
    rows[0][4]  = bs[1][1];  rows[1][4]  = bs[3][1];  rows[2][4]  = d[4][5];
    // col 5
    rows[0][5]  = bs[2][0];  rows[1][5]  = bs[4][0];  rows[2][5]  = bs[5][0];
    rows[3][5]  = bc[1];     rows[4][5]  = bc[3];
    // col 6
    rows[0][6]  = bs[2][1];  rows[1][6]  = bs[4][1];  rows[2][6]  = bs[5][1];
    rows[3][6]  = d[6][7];
    // col 7
    rows[0][7]  = bc[2];     rows[1][7]  = bc[4];     rows[2][7]  = bc[5];
    rows[3][7]  = st[7];     rows[4][7]  = sb[7];     rows[5][7]  = hs7;
    // col 8
    rows[0][8]  = ct[7];     rows[1][8]  = cb[7];     rows[2][8]  = hc7;
    rows[3][8]  = st[8];     rows[4][8]  = sb[8];     rows[5][8]  = d[8][7];
    // col 9
    rows[0][9]  = ct[8];     rows[1][9]  = cb[8];     rows[2][9]  = st[9];
    rows[3][9]  = sb[9];
    // col 10
    rows[0][10] = ct[9];     rows[1][10] = cb[9];     rows[2][10] = st[10];
    rows[3][10] = hs10;
    // col 11
    rows[0][11] = ct[10];    rows[1][11] = hc10;      rows[2][11] = st[11];
    rows[3][11] = d[11][4];
    // col 12
    rows[0][12] = ct[11];    rows[1][12] = st[12];
    // col 13
    rows[0][13] = ct[12];    rows[1][13] = hs13;
    // col 14
    rows[0][14] = hc13;      rows[1][14] = d[14][1];
  end
endmodule
