// tb_booth_encoder: exhaustive check of the one-hot radix-4 Booth encoder.
//
// For all 512 multiplier values it checks that each digit's select vector is
// one-hot, that the chosen select matches the Booth digit recomputed here
// from the triplet (-2*x[i+1] + x[i] + x[i-1], with -0 for triplet 111), and
// that the digits, weighted by 4^j, add up to the signed multiplier.
module tb_booth_encoder;
  import mult_pkg::*;

  logic [XW-1:0] mplier;
  booth_sel_t    sel [NDIG];
  int checks = 0, failures = 0;

  booth_encoder dut (.mplier(mplier), .sel(sel));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << XW); v++) begin
      int total;
      mplier = XW'(v);
      #1;
      total = 0;
      for (int j = 0; j < NDIG; j++) begin
        int lo, mid, hi, d;
        booth_sel_t exp_sel;
        lo  = (j == 0) ? 0 : int'(mplier[2*j-1]);
        mid = int'(mplier[2*j]);
        hi  = (2*j+1 < XW) ? int'(mplier[2*j+1]) : int'(mplier[XW-1]);
        d   = -2*hi + mid + lo;
        exp_sel = '0;
        case (d)
          0:  if (hi == 1) exp_sel.one = 1'b1; else exp_sel.zero = 1'b1;
          1:  exp_sel.y   = 1'b1;
          2:  exp_sel.y2  = 1'b1;
          -2: exp_sel.y2n = 1'b1;
          -1: exp_sel.yn  = 1'b1;
          default: ;
        endcase
        checks++;
        if (sel[j] !== exp_sel || !$onehot(sel[j])) begin
          failures++;
          $display("FAIL x=%0h digit %0d sel=%b exp=%b", mplier, j, sel[j], exp_sel);
        end
        // digit value from the selects alone
        total += (sel[j].y - sel[j].yn + 2*sel[j].y2 - 2*sel[j].y2n) * (4 ** j);
      end
      checks++;
      if (total != int'($signed(mplier))) begin
        failures++;
        $display("FAIL x=%0h digit sum %0d", mplier, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
