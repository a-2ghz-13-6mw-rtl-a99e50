// pp_reduction_tree: column-tiled 3:2 compressor tree for the Booth partial products.
//
// The bit matrix has 22 columns. Partial product j supplies its bit b to
// column 2j+b. Negation bit neg[j] is added in column 2j, and the
// sign-extension constant is a 1 in column 12. Column heights therefore rise
// to 6 in columns 8 and 12 and fall off on both sides.
//
// The tree is tiled column by column in three levels, Dadda style. Level 1
// brings every column down to at most 4 bits, level 2 to 3, and level 3 to 2.
// Columns are worked from bit 0 upward. The carries a column receives from
// the column below at the same level count toward its height. In each column
// the earliest-arriving bits are compressed first. A compressor takes three
// bits; where one bit too many remains, it takes two bits and a tied-low third
// input. Each compressor's carry goes one column up, into the next level.
// Wherever a compressor is fed by carries, they go to inputs a and b, which
// are the slow inputs of the compressor. The Carry output is the fast one.
//
// The resulting arrival profile, in compressors on the slowest path into the
// final adder for bits 0..21, is
//   0 0 1 1 2 2 2 3 3 3 3 3 3 3 3 3 3 3 2 2 1 0.
// It rises over the low bits and stays at three across the middle, the shape
// the hybrid completion adder is cut for. The original design publishes a
// profile that is identical up to bit 17 and one compressor deeper at bits
// 18..21. The compressor cell, the three-level depth, the carry-to-slow-input
// rule and the target profile follow the original design. The tiling
// procedure and the exact compressor placement are this design's own.
// The compressors are listed one per line below with their column. Constant
// inputs (the leading 1 of each partial product, the column-12 constant, the
// tied-low inputs) are left for synthesis to simplify.
// Interface: purely combinational. vsum + vcarry = sum of the matrix mod 2^22.
module pp_reduction_tree
  import mult_pkg::*;
(
  input  logic [PPW-1:0]  pp  [NDIG],
  input  logic [NDIG-1:0] neg,
  output logic [SUMW-1:0] vsum,
  output logic [SUMW-1:0] vcarry
);

  localparam int unsigned NCOMP = 48;

  logic [NCOMP-1:0] sm, cy;   // sum and carry of compressor k

  // level 1: columns down to height 4
  compressor_3to2 u_k00 (.a(neg[3]), .b(pp[0][6]), .c(1'b0), .sum(sm[0]), .carry(cy[0]));  // column 6
  compressor_3to2 u_k01 (.a(pp[0][7]), .b(pp[1][5]), .c(1'b0), .sum(sm[1]), .carry(cy[1]));  // column 7
  compressor_3to2 u_k02 (.a(neg[4]), .b(pp[0][8]), .c(pp[1][6]), .sum(sm[2]), .carry(cy[2]));  // column 8
  compressor_3to2 u_k03 (.a(pp[2][4]), .b(pp[3][2]), .c(1'b0), .sum(sm[3]), .carry(cy[3]));  // column 8
  compressor_3to2 u_k04 (.a(pp[0][9]), .b(pp[1][7]), .c(pp[2][5]), .sum(sm[4]), .carry(cy[4]));  // column 9
  compressor_3to2 u_k05 (.a(pp[3][3]), .b(pp[4][1]), .c(1'b0), .sum(sm[5]), .carry(cy[5]));  // column 9
  compressor_3to2 u_k06 (.a(pp[0][10]), .b(pp[1][8]), .c(pp[2][6]), .sum(sm[6]), .carry(cy[6]));  // column 10
  compressor_3to2 u_k07 (.a(pp[3][4]), .b(pp[4][2]), .c(1'b0), .sum(sm[7]), .carry(cy[7]));  // column 10
  compressor_3to2 u_k08 (.a(pp[0][11]), .b(pp[1][9]), .c(pp[2][7]), .sum(sm[8]), .carry(cy[8]));  // column 11
  compressor_3to2 u_k09 (.a(pp[3][5]), .b(pp[4][3]), .c(1'b0), .sum(sm[9]), .carry(cy[9]));  // column 11
  compressor_3to2 u_k10 (.a(1'b1), .b(pp[0][12]), .c(pp[1][10]), .sum(sm[10]), .carry(cy[10]));  // column 12
  compressor_3to2 u_k11 (.a(pp[2][8]), .b(pp[3][6]), .c(pp[4][4]), .sum(sm[11]), .carry(cy[11]));  // column 12
  compressor_3to2 u_k12 (.a(pp[0][13]), .b(pp[1][11]), .c(pp[2][9]), .sum(sm[12]), .carry(cy[12]));  // column 13
  compressor_3to2 u_k13 (.a(pp[3][7]), .b(pp[4][5]), .c(1'b0), .sum(sm[13]), .carry(cy[13]));  // column 13
  compressor_3to2 u_k14 (.a(pp[1][12]), .b(pp[2][10]), .c(pp[3][8]), .sum(sm[14]), .carry(cy[14]));  // column 14
  compressor_3to2 u_k15 (.a(pp[1][13]), .b(pp[2][11]), .c(1'b0), .sum(sm[15]), .carry(cy[15]));  // column 15

  // level 2: columns down to height 3
  compressor_3to2 u_k16 (.a(neg[2]), .b(pp[0][4]), .c(1'b0), .sum(sm[16]), .carry(cy[16]));  // column 4
  compressor_3to2 u_k17 (.a(pp[0][5]), .b(pp[1][3]), .c(1'b0), .sum(sm[17]), .carry(cy[17]));  // column 5
  compressor_3to2 u_k18 (.a(pp[1][4]), .b(pp[2][2]), .c(pp[3][0]), .sum(sm[18]), .carry(cy[18]));  // column 6
  compressor_3to2 u_k19 (.a(cy[0]), .b(pp[2][3]), .c(pp[3][1]), .sum(sm[19]), .carry(cy[19]));  // column 7
  compressor_3to2 u_k20 (.a(cy[1]), .b(pp[4][0]), .c(sm[2]), .sum(sm[20]), .carry(cy[20]));  // column 8
  compressor_3to2 u_k21 (.a(cy[2]), .b(cy[3]), .c(sm[4]), .sum(sm[21]), .carry(cy[21]));  // column 9
  compressor_3to2 u_k22 (.a(cy[4]), .b(cy[5]), .c(sm[6]), .sum(sm[22]), .carry(cy[22]));  // column 10
  compressor_3to2 u_k23 (.a(cy[6]), .b(cy[7]), .c(sm[8]), .sum(sm[23]), .carry(cy[23]));  // column 11
  compressor_3to2 u_k24 (.a(cy[8]), .b(cy[9]), .c(sm[10]), .sum(sm[24]), .carry(cy[24]));  // column 12
  compressor_3to2 u_k25 (.a(cy[10]), .b(cy[11]), .c(sm[12]), .sum(sm[25]), .carry(cy[25]));  // column 13
  compressor_3to2 u_k26 (.a(cy[12]), .b(cy[13]), .c(pp[4][6]), .sum(sm[26]), .carry(cy[26]));  // column 14
  compressor_3to2 u_k27 (.a(cy[14]), .b(pp[3][9]), .c(pp[4][7]), .sum(sm[27]), .carry(cy[27]));  // column 15
  compressor_3to2 u_k28 (.a(pp[2][12]), .b(pp[3][10]), .c(pp[4][8]), .sum(sm[28]), .carry(cy[28]));  // column 16
  compressor_3to2 u_k29 (.a(pp[2][13]), .b(pp[3][11]), .c(1'b0), .sum(sm[29]), .carry(cy[29]));  // column 17

  // level 3: columns down to height 2
  compressor_3to2 u_k30 (.a(neg[1]), .b(pp[0][2]), .c(1'b0), .sum(sm[30]), .carry(cy[30]));  // column 2
  compressor_3to2 u_k31 (.a(pp[0][3]), .b(pp[1][1]), .c(1'b0), .sum(sm[31]), .carry(cy[31]));  // column 3
  compressor_3to2 u_k32 (.a(pp[1][2]), .b(pp[2][0]), .c(sm[16]), .sum(sm[32]), .carry(cy[32]));  // column 4
  compressor_3to2 u_k33 (.a(cy[16]), .b(pp[2][1]), .c(sm[17]), .sum(sm[33]), .carry(cy[33]));  // column 5
  compressor_3to2 u_k34 (.a(cy[17]), .b(sm[0]), .c(sm[18]), .sum(sm[34]), .carry(cy[34]));  // column 6
  compressor_3to2 u_k35 (.a(cy[18]), .b(sm[1]), .c(sm[19]), .sum(sm[35]), .carry(cy[35]));  // column 7
  compressor_3to2 u_k36 (.a(cy[19]), .b(sm[3]), .c(sm[20]), .sum(sm[36]), .carry(cy[36]));  // column 8
  compressor_3to2 u_k37 (.a(cy[20]), .b(sm[5]), .c(sm[21]), .sum(sm[37]), .carry(cy[37]));  // column 9
  compressor_3to2 u_k38 (.a(cy[21]), .b(sm[7]), .c(sm[22]), .sum(sm[38]), .carry(cy[38]));  // column 10
  compressor_3to2 u_k39 (.a(cy[22]), .b(sm[9]), .c(sm[23]), .sum(sm[39]), .carry(cy[39]));  // column 11
  compressor_3to2 u_k40 (.a(cy[23]), .b(sm[11]), .c(sm[24]), .sum(sm[40]), .carry(cy[40]));  // column 12
  compressor_3to2 u_k41 (.a(cy[24]), .b(sm[13]), .c(sm[25]), .sum(sm[41]), .carry(cy[41]));  // column 13
  compressor_3to2 u_k42 (.a(cy[25]), .b(sm[14]), .c(sm[26]), .sum(sm[42]), .carry(cy[42]));  // column 14
  compressor_3to2 u_k43 (.a(cy[26]), .b(sm[15]), .c(sm[27]), .sum(sm[43]), .carry(cy[43]));  // column 15
  compressor_3to2 u_k44 (.a(cy[15]), .b(cy[27]), .c(sm[28]), .sum(sm[44]), .carry(cy[44]));  // column 16
  compressor_3to2 u_k45 (.a(cy[28]), .b(pp[4][9]), .c(sm[29]), .sum(sm[45]), .carry(cy[45]));  // column 17
  compressor_3to2 u_k46 (.a(cy[29]), .b(pp[3][12]), .c(pp[4][10]), .sum(sm[46]), .carry(cy[46]));  // column 18
  compressor_3to2 u_k47 (.a(pp[3][13]), .b(pp[4][11]), .c(1'b0), .sum(sm[47]), .carry(cy[47]));  // column 19

  // two bits per column remain; a missing bit is 0
  assign vsum[0] = neg[0];  assign vcarry[0] = pp[0][0];  // arrives after 0 compressor(s)
  assign vsum[1] = pp[0][1];  assign vcarry[1] = 1'b0;  // arrives after 0 compressor(s)
  assign vsum[2] = pp[1][0];  assign vcarry[2] = sm[30];  // arrives after 1 compressor(s)
  assign vsum[3] = cy[30];  assign vcarry[3] = sm[31];  // arrives after 1 compressor(s)
  assign vsum[4] = cy[31];  assign vcarry[4] = sm[32];  // arrives after 2 compressor(s)
  assign vsum[5] = cy[32];  assign vcarry[5] = sm[33];  // arrives after 2 compressor(s)
  assign vsum[6] = cy[33];  assign vcarry[6] = sm[34];  // arrives after 2 compressor(s)
  assign vsum[7] = cy[34];  assign vcarry[7] = sm[35];  // arrives after 3 compressor(s)
  assign vsum[8] = cy[35];  assign vcarry[8] = sm[36];  // arrives after 3 compressor(s)
  assign vsum[9] = cy[36];  assign vcarry[9] = sm[37];  // arrives after 3 compressor(s)
  assign vsum[10] = cy[37];  assign vcarry[10] = sm[38];  // arrives after 3 compressor(s)
  assign vsum[11] = cy[38];  assign vcarry[11] = sm[39];  // arrives after 3 compressor(s)
  assign vsum[12] = cy[39];  assign vcarry[12] = sm[40];  // arrives after 3 compressor(s)
  assign vsum[13] = cy[40];  assign vcarry[13] = sm[41];  // arrives after 3 compressor(s)
  assign vsum[14] = cy[41];  assign vcarry[14] = sm[42];  // arrives after 3 compressor(s)
  assign vsum[15] = cy[42];  assign vcarry[15] = sm[43];  // arrives after 3 compressor(s)
  assign vsum[16] = cy[43];  assign vcarry[16] = sm[44];  // arrives after 3 compressor(s)
  assign vsum[17] = sm[45];  assign vcarry[17] = cy[44];  // arrives after 3 compressor(s)
  assign vsum[18] = cy[45];  assign vcarry[18] = sm[46];  // arrives after 2 compressor(s)
  assign vsum[19] = sm[47];  assign vcarry[19] = cy[46];  // arrives after 2 compressor(s)
  assign vsum[20] = pp[4][12];  assign vcarry[20] = cy[47];  // arrives after 1 compressor(s)
  assign vsum[21] = pp[4][13];  assign vcarry[21] = 1'b0;  // arrives after 0 compressor(s)

endmodule
