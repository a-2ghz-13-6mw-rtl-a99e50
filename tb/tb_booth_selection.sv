// tb_booth_selection: checks the 6:1 Booth selection and its sign handling.
//
// For random and corner multiplicands and every one-hot select, each 14-bit
// partial product must have a leading 1, and the 13-bit word {sign, low 12
// bits} recovered from it (sign = complement of bit 12), read as a signed
// number, plus the neg bit must equal digit * Y. The multiplicands include
// -2048 so that +/-2Y reach the ends of the 13-bit range.
module tb_booth_selection;
  import mult_pkg::*;

  logic [YW-1:0]   mcand;
  booth_sel_t      sel [NDIG];
  logic [PPW-1:0]  pp  [NDIG];
  logic [NDIG-1:0] neg;
  int checks = 0, failures = 0;

  booth_selection dut (.mcand(mcand), .sel(sel), .pp(pp), .neg(neg));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit_of(int k);
    // select index k = 0..5 -> digit 0, 1, 2, -2, -1, -0
    int d [6] = '{0, 1, 2, -2, -1, 0};
    return d[k];
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0: mcand = 12'h800;
        1: mcand = 12'h7FF;
        2: mcand = 12'h000;
        3: mcand = 12'hFFF;
        default: mcand = YW'($urandom);
      endcase
      for (int k = 0; k < 6; k++) begin
        for (int j = 0; j < NDIG; j++) begin
          sel[j] = booth_sel_t'(6'(1 << ((k + j) % 6)));
        end
        #1;
        for (int j = 0; j < NDIG; j++) begin
          int kk, got, exp_v;
          logic [SELW-1:0] word;
          kk    = (k + j) % 6;
          word  = {~pp[j][YW], pp[j][YW-1:0]};
          got   = int'($signed(word)) + int'(neg[j]);
          exp_v = digit_of(kk) * int'($signed(mcand));
          checks++;
          if (got != exp_v || pp[j][PPW-1] !== 1'b1 || neg[j] !== (kk >= 3)) begin
            failures++;
            $display("FAIL y=%0d sel=%0d digit %0d: pp=%b neg=%b got %0d exp %0d",
                     $signed(mcand), kk, j, pp[j], neg[j], got, exp_v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
