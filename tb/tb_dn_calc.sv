// tb_dn_calc: self-checking test of the equation (1) code extraction.
// Random signed counter values in both depths are compared with
// DN = 2*K*MSB + 2*LSB + EB computed here in integers, clamped to the code
// range; the flags must match the clamping. Corner values hit both clamps.
module tb_dn_calc;
  import cis_pkg::*;

  localparam int unsigned K = 8;

  col_count_t  cnt;
  adc_mode_e   adc_mode;
  logic [11:0] dn;
  logic        ovf, udf;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_udf = 0, n_in = 0;

  dn_calc #(.K(K)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int m, input int l, input int e, input adc_mode_e md);
    int raw, full, exp_dn;
    cnt.msb  = MSB_W'(m);
    cnt.lsb  = LSB_W'(l);
    cnt.eb   = EB_W'(e);
    adc_mode = md;
    #1;
    raw    = 2 * K * m + 2 * l + e;
    full   = (md == ADC_12B) ? 4095 : 1023;
    exp_dn = (raw < 0) ? 0 : (raw > full) ? full : raw;
    if (raw < 0) n_udf++; else if (raw > full) n_ovf++; else n_in++;
    checks += 3;
    if (int'(dn) != exp_dn) begin
      failures++; $display("FAIL dn=%0d exp=%0d (m=%0d l=%0d e=%0d)", dn, exp_dn, m, l, e);
    end
    if (ovf != (raw > full)) begin
      failures++; $display("FAIL ovf");
    end
    if (udf != (raw < 0)) begin
      failures++; $display("FAIL udf");
    end
  endtask

  initial begin
    try(0, 0, 0, ADC_10B);
    try(63, 8, 0, ADC_10B);     // 2*8*63 + 16 = 1024: one above 10 bit full scale
    try(63, 7, 1, ADC_10B);     // 1023
    try(255, 7, 1, ADC_12B);    // 4095
    try(-1, 0, 0, ADC_12B);
    try(10, -3, -1, ADC_10B);
    for (int i = 0; i < 2000; i++)
      try($urandom_range(300) - 40, $urandom_range(2 * K) - K, $urandom_range(4) - 2,
          adc_mode_e'($urandom_range(1)));
    checks++;
    if (n_ovf == 0 || n_udf == 0 || n_in == 0) begin
      failures++; $display("FAIL clamp cases not all reached");
    end
    $display("in-range=%0d overflow=%0d underflow=%0d", n_in, n_ovf, n_udf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
