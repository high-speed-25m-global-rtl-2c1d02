// dn_calc: extracts the ADC code from one column's counter outputs.
//
//   DN = 2*K*N_MSB + 2*N_LSB + N_EB
//
// K is the frequency ratio CLK_H / CLK_L. With digital CDS the counts are net
// values (reset conversion counted down, signal conversion up), so the raw DN
// is signed. The result is clamped to the code range of the selected depth,
// 0 .. 2^10-1 or 0 .. 2^12-1; ovf/udf report that clamping happened.
//
// The equation is the sensor's; the clamping is this design's choice.
// Purely combinational.
module dn_calc
  import cis_pkg::*;
#(
  parameter int unsigned K = K_DEF  // CLK_H / CLK_L
) (
  input  col_count_t  cnt,
  input  adc_mode_e   adc_mode,
  output logic [11:0] dn,       // clamped code, upper bits zero in 10 bit mode
  output logic        ovf,      // raw value above full scale
  output logic        udf       // raw value below zero
);

  logic signed [DN_RAW_W-1:0] raw;
  logic signed [DN_RAW_W-1:0] full;

  always_comb begin
    raw  = DN_RAW_W'(signed'(2 * K)) * DN_RAW_W'(cnt.msb)
         + DN_RAW_W'(cnt.lsb) * DN_RAW_W'(signed'(2))
         + DN_RAW_W'(cnt.eb);
    full = (adc_mode == ADC_12B) ? DN_RAW_W'(signed'(4095)) : DN_RAW_W'(signed'(1023));
    ovf  = raw > full;
    udf  = raw < 0;
    if (udf)      dn = '0;
    else if (ovf) dn = full[11:0];
    else          dn = raw[11:0];
  end

endmodule
