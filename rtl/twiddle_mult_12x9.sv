// twiddle_mult_12x9: single-cycle 12x9b two's complement multiplier.
//
// The multiplier of an FFT twiddle datapath: every clock cycle it takes a
// 12-bit multiplicand and a 9-bit multiplier and, one cycle later, delivers
// their full 21-bit two's complement product. One multiply is done per
// cycle; there is no handshake and no stall.
//
// Between the input and output flip-flops sit three stages:
//   1. booth_encoder:     radix-4 one-hot Booth encoding of the multiplier
//                         (5 digits x 6 select bits) and booth_selection:
//                         6:1 selection of five 14-bit partial products
//   2. pp_reduction_tree: three levels of 3:2 compressors to two 22-bit
//                         carry-save vectors
//   3. completion_adder:  6-bit ripple / 11-bit carry-lookahead / 5-bit
//                         conditional sum adder
// The adder spans 22 positions because the compressed sign extension reaches
// bit 21; bit 21 of the sum equals bit 20 (the product's sign), which an
// assertion checks, and is not brought out.
// Timing: operands at the inputs before rising edge k are registered at edge
// k and their product appears on `product` right after edge k+1.
// The three-stage structure, the flip-flops at both ends and the single-cycle
// throughput follow the original design; the absence of a reset and of any
// valid/ready signalling, and which operand is which, are this design's
// choices, since the original specifies neither.
module twiddle_mult_12x9
  import mult_pkg::*;
(
  input  logic             clk,
  input  logic [YW-1:0]    multiplicand,
  input  logic [XW-1:0]    multiplier,
  output logic [PRODW-1:0] product
);

  logic [YW-1:0]    y_q;
  logic [XW-1:0]    x_q;
  booth_sel_t       sel [NDIG];
  logic [PPW-1:0]   pp  [NDIG];
  logic [NDIG-1:0]  neg;
  logic [SUMW-1:0]  vsum, vcarry, total;
  logic             cout_unused;

  wp_flipflop #(.W(YW)) u_in_y (.clk(clk), .d(multiplicand), .q(y_q));
  wp_flipflop #(.W(XW)) u_in_x (.clk(clk), .d(multiplier),   .q(x_q));

  booth_encoder u_enc (
    .mplier(x_q),
    .sel   (sel)
  );

  booth_selection u_sel (
    .mcand(y_q),
    .sel  (sel),
    .pp   (pp),
    .neg  (neg)
  );

  pp_reduction_tree u_tree (
    .pp    (pp),
    .neg   (neg),
    .vsum  (vsum),
    .vcarry(vcarry)
  );

  completion_adder u_add (
    .a   (vsum),
    .b   (vcarry),
    .sum (total),
    .cout(cout_unused)
  );

  // The 22-position sum is the product sign extended by one bit: bit 21 must
  // always repeat the product's sign bit.
  a_sign_redundant: assert property (@(posedge clk) total[SUMW-1] == total[PRODW-1])
    else $error("completion adder bit %0d differs from the product sign", SUMW - 1);

  wp_flipflop #(.W(PRODW)) u_out (.clk(clk), .d(total[PRODW-1:0]), .q(product));

endmodule
