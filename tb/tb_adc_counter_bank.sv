// tb_adc_counter_bank: self-checking test of one side's column counters.
// All columns convert together; each column's comparator model crosses at
// its own random time (an odd number of ns after the ramp start, 1 ns being
// a quarter CLK_H period). The code of every column, taken from the latched
// counts with equation (1), must equal the number of CLK_H edges between its
// crossing and the ramp end, for single ramps and reset-down / signal-up pairs.
`timescale 1ns / 1ps
module tb_adc_counter_bank;
  import cis_pkg::*;

  localparam int unsigned K = 8;
  localparam int unsigned N = 16;

  logic clk_h = 1'b0, clk_l = 1'b0, rst_n = 1'b0;
  logic conv_en = 1'b0, cnt_down = 1'b0, cnt_clr = 1'b0, latch = 1'b0;
  logic [N-1:0] comp = '0;
  col_count_t counts [N];
  int checks = 0, failures = 0, hcnt = 0;
  int tc [N];

  adc_counter_bank #(.N_COLS(N)) dut (.*);

  always #2 begin
    clk_h = ~clk_h;
    if (clk_h) begin
      clk_l = (hcnt < K / 2);
      hcnt  = (hcnt + 1) % K;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Ramp of r CLK_L periods; returns each column's expected code.
  task automatic ramp(input int r, input bit down, output int dn [N]);
    time t0;
    for (int c = 0; c < N; c++) begin
      tc[c] = 2 * $urandom_range(2 * K * r + 2) + 1;
      dn[c] = (tc[c] < r * 4 * K) ? 2 * K * r - tc[c] / 2 : 0;
    end
    @(posedge clk_l);
    t0 = $time;
    cnt_down <= down;
    conv_en  <= 1'b1;
    fork
      begin
        repeat (r) @(posedge clk_l);
        conv_en <= 1'b0;
      end
      begin
        while ($time < t0 + (r + 1) * 4 * K) begin
          #1;
          for (int c = 0; c < N; c++) comp[c] = ($time - t0 >= time'(tc[c]));
        end
      end
    join
    comp = '0;
  endtask

  initial begin
    int dr [N], ds [N], got;
    repeat (3) @(posedge clk_h);
    rst_n = 1'b1;
    for (int it = 0; it < 30; it++) begin
      bit cds;
      cds = it[0];
      @(posedge clk_l) cnt_clr <= 1'b1;
      @(posedge clk_l) cnt_clr <= 1'b0;
      if (cds) ramp(16, 1'b1, dr);
      else     dr = '{default: 0};
      ramp(64, 1'b0, ds);
      @(posedge clk_l) latch <= 1'b1;
      @(posedge clk_l) latch <= 1'b0;
      @(posedge clk_l);
      for (int c = 0; c < N; c++) begin
        got = 2 * K * int'(counts[c].msb) + 2 * int'(counts[c].lsb) + int'(counts[c].eb);
        checks++;
        if (got != ds[c] - dr[c]) begin
          failures++;
          $display("FAIL it=%0d col=%0d got=%0d exp=%0d", it, c, got, ds[c] - dr[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
