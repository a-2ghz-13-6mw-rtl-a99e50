// completion_adder: arrival-profile aware hybrid carry-propagate adder.
//
// Adds the two carry-save vectors of the compressor tree. The low tree
// outputs settle early and the middle ones last, so the adder is split:
//   bits  5:0   ripple carry (its carry is ready before the middle bits are)
//   bits 16:6   variable block carry-lookahead, blocks 8:6, 13:9 and 16:14;
//               each block computes its generate/propagate pair and its
//               internal carries by lookahead from the block carry-in, and
//               the block carry-out is G | P & cin
//   bits 21:17  conditional sum: two ripple chains, for carry-in 0 and 1,
//               and a 2:1 multiplexer driven by the carry out of bit 16
// The segment and block boundaries are the original design's; the bit-level logic
// inside each segment is written as plain Boolean equations.
// Interface: purely combinational, sum = a + b modulo 2^W, cout is the carry
// out of the top bit.
module completion_adder #(
  parameter int unsigned RCA_W  = 6,  // ripple segment
  parameter int unsigned CLA_W0 = 3,  // lookahead block 8:6
  parameter int unsigned CLA_W1 = 5,  // lookahead block 13:9
  parameter int unsigned CLA_W2 = 3,  // lookahead block 16:14
  parameter int unsigned CS_W   = 5,  // conditional sum segment
  localparam int unsigned W = RCA_W + CLA_W0 + CLA_W1 + CLA_W2 + CS_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned CLA_LO = RCA_W;
  localparam int unsigned CS_LO  = RCA_W + CLA_W0 + CLA_W1 + CLA_W2;
  localparam int unsigned BLK_LO [3] = '{CLA_LO, CLA_LO + CLA_W0, CLA_LO + CLA_W0 + CLA_W1};
  localparam int unsigned BLK_W  [3] = '{CLA_W0, CLA_W1, CLA_W2};

  logic [W-1:0] g, p;
  assign g = a & b;
  assign p = a ^ b;

  // c[i] is the carry into bit i (c[0] = 0)
  logic [CS_LO:0] c;
  assign c[0] = 1'b0;

  // ripple segment
  for (genvar i = 0; i < RCA_W; i++) begin : g_rca
    assign c[i+1] = g[i] | (p[i] & c[i]);
  end

  // carry-lookahead blocks: gg[i]/pp[i] are the group generate/propagate of
  // the block's bits below offset i; c = gg | pp & (block carry-in)
  for (genvar k = 0; k < 3; k++) begin : g_cla
    localparam int unsigned LO = BLK_LO[k];
    localparam int unsigned BW = BLK_W[k];
    logic [BW:0] gg, pp;
    assign gg[0] = 1'b0;
    assign pp[0] = 1'b1;
    for (genvar i = 0; i < BW; i++) begin : g_bit
      assign gg[i+1] = g[LO + i] | (p[LO + i] & gg[i]);
      assign pp[i+1] = p[LO + i] & pp[i];
      if (i > 0) begin : g_c
        assign c[LO + i] = gg[i] | (pp[i] & c[LO]);
      end
    end
    // block carry-out from the block (G, P) pair
    assign c[LO + BW] = gg[BW] | (pp[BW] & c[LO]);
  end

  // conditional sum segment: both carry-in assumptions, then select
  logic [CS_W-1:0] s0, s1;
  logic [CS_W:0]   r0, r1;
  assign r0[0] = 1'b0;
  assign r1[0] = 1'b1;
  for (genvar i = 0; i < CS_W; i++) begin : g_cs
    assign s0[i]   = p[CS_LO + i] ^ r0[i];
    assign s1[i]   = p[CS_LO + i] ^ r1[i];
    assign r0[i+1] = g[CS_LO + i] | (p[CS_LO + i] & r0[i]);
    assign r1[i+1] = g[CS_LO + i] | (p[CS_LO + i] & r1[i]);
  end

  assign sum[CS_LO-1:0]  = p[CS_LO-1:0] ^ c[CS_LO-1:0];
  assign sum[W-1:CS_LO]  = c[CS_LO] ? s1 : s0;
  assign cout            = c[CS_LO] ? r1[CS_W] : r0[CS_W];

endmodule
