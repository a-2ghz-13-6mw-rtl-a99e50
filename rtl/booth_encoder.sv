// booth_encoder: one-hot radix-4 Booth encoder for the 9-bit multiplier.
//
// The multiplier X is cut into 5 overlapping triplets (x[2j+1], x[2j],
// x[2j-1]) with x[-1] = 0 and x[9] = x[8] (sign extension). Each triplet
// drives six select lines S0..S5, exactly one of which is high:
//   S0 = !x[i-1] & !x[i] & !x[i+1]   -> 0     (000)
//   S1 = (x[i-1] ^ x[i]) & !x[i+1]   -> Y     (001, 010)
//   S2 =  x[i-1] &  x[i] & !x[i+1]   -> 2Y    (011)
//   S3 = !x[i-1] & !x[i] &  x[i+1]   -> 2Y#   (100)
//   S4 = (x[i-1] ^ x[i]) &  x[i+1]   -> Y#    (101, 110)
//   S5 =  x[i-1] &  x[i] &  x[i+1]   -> 1     (111)
// The assignment of S0..S5 to the six candidates and the triplet literals
// feeding each select follow the original design's encoder; they are written here as
// Boolean equations rather than as its gates. Negative digits (S3, S4, S5) select a
// one's complement; the +1 that completes the negation is the digit's
// x[i+1] bit, added later in the compressor tree.
// An assertion checks that every digit's selects are one-hot.
// Interface: purely combinational, mplier in, sel[j] out for digit j
// (weight 4^j).
module booth_encoder
  import mult_pkg::*;
(
  input  logic [XW-1:0] mplier,
  output booth_sel_t    sel [NDIG]
);

  // x[-1] = 0 at index 0, x[XW] = sign at the top
  logic [XW+1:0] xe;
  assign xe = {mplier[XW-1], mplier, 1'b0};

  for (genvar j = 0; j < NDIG; j++) begin : g_dig
    logic lo, mid, hi;   // x[i-1], x[i], x[i+1] with i = 2j
    assign lo  = xe[2*j];
    assign mid = xe[2*j+1];
    assign hi  = xe[2*j+2];

    always_comb begin
      sel[j].zero = ~lo & ~mid & ~hi;
      sel[j].y    = (lo ^ mid) & ~hi;
      sel[j].y2   =  lo &  mid & ~hi;
      sel[j].y2n  = ~lo & ~mid &  hi;
      sel[j].yn   = (lo ^ mid) &  hi;
      sel[j].one  =  lo &  mid &  hi;
    end

    // exactly one select per digit, whatever the multiplier
    a_onehot: assert final ($onehot(sel[j]))
      else $error("Booth digit %0d select not one-hot: %b", j, sel[j]);
  end

endmodule
