// tb_dcde_counter: self-checking test of one column counter.
//
// A ramp of R CLK_L periods starts on a CLK_L edge at T0; the comparator model
// rises at T0 + (h + 1/2) half periods of CLK_H, between two CLK_H edges. The
// expected code is the number of CLK_H edges, rising and falling, between the
// crossing and the ramp end, 2*K*R - h (0 if it never crosses), and the three
// counters are predicted separately from the crossing position. Conversions
// run alone (analog CDS) and as reset-down / signal-up pairs (digital CDS).
// Time base: 1 ns = a quarter CLK_H period.
`timescale 1ns / 1ps
module tb_dcde_counter;
  import cis_pkg::*;

  localparam int unsigned K = 8;

  logic clk_h = 1'b0, clk_l = 1'b0;
  logic rst_n = 1'b0;
  logic conv_en = 1'b0, cnt_down = 1'b0, cnt_clr = 1'b0, latch = 1'b0, comp = 1'b0;
  col_count_t count_q;

  int checks = 0, failures = 0;
  int n_eb = 0, n_noeb = 0, n_down = 0, n_msb0 = 0, n_nocross = 0;
  int hcnt = 0;

  dcde_counter dut (.*);

  // CLK_H period 4 ns; CLK_L = CLK_H / K, rising together with CLK_H.
  always #2 begin
    clk_h = ~clk_h;
    if (clk_h) begin
      clk_l = (hcnt < K / 2);
      hcnt  = (hcnt + 1) % K;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected split of one conversion into MSB, LSB and EB counts.
  function automatic void expect_counts(input int r, input int h,
                                        output int msb, output int lsb, output int eb);
    int k, e;
    if (h >= 2 * K * r) begin
      msb = 0; lsb = 0; eb = 0;
      return;
    end
    k   = h / (2 * K) + 1;       // first CLK_L edge after the crossing
    msb = r - k;
    e   = 2 * K * r - h - 2 * K * msb;
    lsb = e / 2;
    eb  = e % 2;
  endfunction

  // One ramp of r CLK_L periods, crossing after h + 1/2 half periods
  // (4*K ns per CLK_L period, 2 ns per half period).
  task automatic ramp(input int r, input int h, input bit down);
    int tc;
    tc = 2 * h + 1;
    @(posedge clk_l);
    cnt_down <= down;
    conv_en  <= 1'b1;
    if (tc < r * 4 * K) begin
      #(tc);
      comp = 1'b1;
      repeat (r - tc / (4 * K)) @(posedge clk_l);
      conv_en <= 1'b0;
    end else begin
      repeat (r) @(posedge clk_l);
      conv_en <= 1'b0;
      #(tc - r * 4 * K);
      comp = 1'b1;
    end
    // Comparator reset before the next ramp.
    @(posedge clk_l);
    #1;
    comp = 1'b0;
  endtask

  task automatic clear();
    @(posedge clk_l);
    cnt_clr <= 1'b1;
    @(posedge clk_l);
    cnt_clr <= 1'b0;
  endtask

  task automatic do_latch();
    @(posedge clk_l);
    latch <= 1'b1;
    @(posedge clk_l);
    latch <= 1'b0;
    @(posedge clk_l);
  endtask

  task automatic check(input int e_msb, input int e_lsb, input int e_eb);
    int dn, e_dn;
    dn   = 2 * K * int'(count_q.msb) + 2 * int'(count_q.lsb) + int'(count_q.eb);
    e_dn = 2 * K * e_msb + 2 * e_lsb + e_eb;
    checks += 4;
    if (int'(count_q.msb) != e_msb) begin
      failures++; $display("FAIL msb %0d exp %0d", count_q.msb, e_msb);
    end
    if (int'(count_q.lsb) != e_lsb) begin
      failures++; $display("FAIL lsb %0d exp %0d", count_q.lsb, e_lsb);
    end
    if (int'(count_q.eb) != e_eb) begin
      failures++; $display("FAIL eb %0d exp %0d", count_q.eb, e_eb);
    end
    if (dn != e_dn) begin
      failures++; $display("FAIL dn %0d exp %0d", dn, e_dn);
    end
  endtask

  initial begin
    int r, h, hr, rr, m, l, e, mr, lr, er;
    repeat (3) @(posedge clk_h);
    rst_n = 1'b1;

    // Analog CDS: one up-counting ramp; sweep every crossing position of a
    // short ramp, then random positions on 10 bit length ramps.
    for (int i = 0; i < 2 * K * 3 + 3; i++) begin
      clear();
      ramp(3, i, 1'b0);
      do_latch();
      expect_counts(3, i, m, l, e);
      if (e != 0) n_eb++; else n_noeb++;
      if (m == 0 && i < 2 * K * 3) n_msb0++;
      if (i >= 2 * K * 3) n_nocross++;
      check(m, l, e);
    end
    for (int i = 0; i < 20; i++) begin
      r = 64;
      h = $urandom_range(2 * K * r - 1);
      clear();
      ramp(r, h, 1'b0);
      do_latch();
      expect_counts(r, h, m, l, e);
      check(m, l, e);
    end

    // Digital CDS: reset ramp counted down, signal ramp counted up, net counts.
    for (int i = 0; i < 40; i++) begin
      rr = 16;
      r  = 64;
      hr = $urandom_range(2 * K * rr - 1);
      h  = $urandom_range(2 * K * r - 1);
      clear();
      ramp(rr, hr, 1'b1);
      ramp(r, h, 1'b0);
      do_latch();
      expect_counts(rr, hr, mr, lr, er);
      expect_counts(r, h, m, l, e);
      n_down++;
      check(m - mr, l - lr, e - er);
    end

    // The latch holds while the counters run the next conversion.
    clear();
    ramp(4, 5, 1'b0);
    checks++;
    expect_counts(r, h, m, l, e);
    if (2 * K * int'(count_q.msb) + 2 * int'(count_q.lsb) + int'(count_q.eb) !=
        2 * K * (m - mr) + 2 * (l - lr) + (e - er)) begin
      failures++; $display("FAIL latch did not hold");
    end

    checks++;
    if (n_eb == 0 || n_noeb == 0 || n_down == 0 || n_msb0 == 0 || n_nocross == 0) begin
      failures++;
      $display("FAIL mechanism not exercised eb=%0d noeb=%0d down=%0d msb0=%0d nocross=%0d",
               n_eb, n_noeb, n_down, n_msb0, n_nocross);
    end
    $display("mechanisms: extra-bit=%0d no-extra-bit=%0d cds-down=%0d msb-zero=%0d no-crossing=%0d",
             n_eb, n_noeb, n_down, n_msb0, n_nocross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
