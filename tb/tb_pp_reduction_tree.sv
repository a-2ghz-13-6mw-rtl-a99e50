// tb_pp_reduction_tree: checks the carry-save reduction of the bit matrix.
//
// Random partial products and negation bits (plus all-zero and all-one
// corners) are applied; vsum + vcarry modulo 2^22 must equal the sum of the
// shifted partial products, the negation bits at positions 2j and the
// constant 2^12, computed here with plain integer arithmetic.
module tb_pp_reduction_tree;
  import mult_pkg::*;

  logic [PPW-1:0]  pp  [NDIG];
  logic [NDIG-1:0] neg;
  logic [SUMW-1:0] vsum, vcarry;
  int checks = 0, failures = 0;

  pp_reduction_tree dut (.pp(pp), .neg(neg), .vsum(vsum), .vcarry(vcarry));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint exp_v, got;
      for (int j = 0; j < NDIG; j++) begin
        pp[j] = (t == 0) ? '0 : (t == 1) ? '1 : PPW'($urandom);
      end
      neg = (t == 0) ? '0 : (t == 1) ? '1 : NDIG'($urandom);
      #1;
      exp_v = longint'(1) << YW;
      for (int j = 0; j < NDIG; j++) begin
        exp_v += (longint'(pp[j]) << (2 * j)) + (longint'(neg[j]) << (2 * j));
      end
      exp_v = exp_v % (longint'(1) << SUMW);
      got   = (longint'(vsum) + longint'(vcarry)) % (longint'(1) << SUMW);
      checks++;
      if (got != exp_v) begin
        failures++;
        $display("FAIL t=%0d got %0h exp %0h", t, got, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
