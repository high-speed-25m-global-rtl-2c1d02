// tb_test_pattern_gen: self-checking test of the test pattern source.
// For random positions, values and ADC codes every pattern is compared with
// its definition (fixed value, column, row, row + column, ADC pass-through),
// masked to 10 or 12 bits.
module tb_test_pattern_gen;
  import cis_pkg::*;

  tp_mode_e    mode;
  adc_mode_e   adc_mode;
  logic [11:0] value, adc_dn, word;
  logic [15:0] row, col;
  int checks = 0, failures = 0;

  test_pattern_gen dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, msk;
    for (int i = 0; i < 3000; i++) begin
      mode     = tp_mode_e'($urandom_range(4));
      adc_mode = adc_mode_e'($urandom_range(1));
      value    = 12'($urandom);
      adc_dn   = 12'($urandom);
      row      = 16'($urandom_range(5119));
      col      = 16'($urandom_range(5119));
      #1;
      msk = (adc_mode == ADC_12B) ? 'hFFF : 'h3FF;
      case (mode)
        TP_FIXED: e = int'(value) & msk;
        TP_HRAMP: e = int'(col) & msk;
        TP_VRAMP: e = int'(row) & msk;
        TP_DIAG:  e = (int'(row) + int'(col)) & msk;
        default:  e = int'(adc_dn) & msk;
      endcase
      checks++;
      if (int'(word) != e) begin
        failures++;
        $display("FAIL mode=%0d word=%h exp=%h", mode, word, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
