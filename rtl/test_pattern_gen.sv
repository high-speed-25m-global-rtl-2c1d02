// test_pattern_gen: test pattern source of the data block.
//
// In TP_OFF the ADC code passes; otherwise it is replaced by a pattern known
// from the pixel position alone, so a receiver can check the whole link:
// a constant (TP_FIXED), the array column index (TP_HRAMP), the row index
// (TP_VRAMP) or row + column (TP_DIAG), all taken modulo the word range of
// the selected depth. The sensor provides test pattern generation; the set
// of patterns is this design's own choice. Purely combinational.
module test_pattern_gen
  import cis_pkg::*;
(
  input  tp_mode_e    mode,
  input  adc_mode_e   adc_mode,
  input  logic [11:0] value,     // constant for TP_FIXED
  input  logic [15:0] row,       // array row of the word
  input  logic [15:0] col,       // array column of the word
  input  logic [11:0] adc_dn,    // ADC code, used in TP_OFF
  output logic [11:0] word
);

  logic [11:0] sum;
  logic [11:0] mask;

  always_comb begin
    sum  = row[11:0] + col[11:0];
    mask = (adc_mode == ADC_12B) ? 12'hFFF : 12'h3FF;
    unique case (mode)
      TP_FIXED: word = value & mask;
      TP_HRAMP: word = col[11:0] & mask;
      TP_VRAMP: word = row[11:0] & mask;
      TP_DIAG:  word = sum & mask;
      default:  word = adc_dn & mask;
    endcase
  end

endmodule
