// booth_selection: 6:1 Booth selection of the five 14-bit partial products.
//
// For each Booth digit a one-hot AND-OR multiplexer picks one of the six
// 13-bit candidates formed from the multiplicand Y (sign extended to 13
// bits): 0, Y, 2Y, 2Y#, Y#, or the all-ones word. A negative digit leaves
// a one's complement; its +1 comes out on neg[j] (high for S3, S4, S5).
//
// Sign extension is compressed instead of being carried across the tree:
// with s the sign bit of the selected 13-bit word c, every partial product is
//   pp[j] = {1'b1, ~s, c[11:0]}                     (14 bits)
// and the tree adds one constant 1 at bit 12. Summed with weights 4^j, the
// five leading 1s, the complemented signs and that constant equal the sign
// extension of all five products modulo 2^22. The original design states that the
// signs are merged and their sum pre-computed; this particular bit pattern
// is this design's choice.
// Interface: purely combinational. mcand and sel in, pp[j] and neg[j] out.
module booth_selection
  import mult_pkg::*;
(
  input  logic [YW-1:0]  mcand,
  input  booth_sel_t     sel [NDIG],
  output logic [PPW-1:0] pp  [NDIG],
  output logic [NDIG-1:0] neg
);

  logic [SELW-1:0] c_y, c_2y;
  assign c_y  = {mcand[YW-1], mcand};
  assign c_2y = {mcand, 1'b0};

  for (genvar j = 0; j < NDIG; j++) begin : g_pp
    logic [SELW-1:0] c;
    always_comb begin
      c = ({SELW{sel[j].zero}} & '0)
        | ({SELW{sel[j].y}}    & c_y)
        | ({SELW{sel[j].y2}}   & c_2y)
        | ({SELW{sel[j].y2n}}  & ~c_2y)
        | ({SELW{sel[j].yn}}   & ~c_y)
        | ({SELW{sel[j].one}}  & '1);
      pp[j]  = {1'b1, ~c[SELW-1], c[SELW-2:0]};
      neg[j] = sel[j].y2n | sel[j].yn | sel[j].one;
    end
  end

endmodule
