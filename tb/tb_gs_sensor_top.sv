// tb_gs_sensor_top: end-to-end test of the sensor's digital readout at a
// reduced array size (32 columns, 6 rows, 4 lanes per side).
//
// Frames stream back to back through six configurations: 10 and 12 bit depth,
// analog and digital CDS, test patterns. sensor_model supplies the analog
// column chain (sample-and-hold, ramp, comparators), predicts every pixel's
// code and checks every word received on the 8 lanes. This testbench adds
// the frame period check (ROWS + 2 + vblank slots of OVH + R_SIG + 1 CLK_L
// cycles, + R_RST + 1 with digital CDS, K CLK_H cycles each), the exposure
// window (GRST low for exp_rows slots ending with the global transfer), that
// every predicted line arrived on every lane, no overrun, and that each
// mechanism (extra bit, clamping both ways, non-crossing pixel, digital CDS,
// 12 bit mode, test pattern, start of frame, mode switch) happened.
`timescale 1ns / 1ps
module tb_gs_sensor_top;
  import cis_pkg::*;

  localparam int unsigned COLS  = 32;
  localparam int unsigned ROWS  = 6;
  localparam int unsigned K     = 8;
  localparam int unsigned LANES = 4;
  localparam int unsigned OVH   = 8;
  localparam int unsigned NF    = 7;   // frames to stream

  logic              clk_h = 1'b0, clk_l = 1'b0, rst_n = 1'b0;
  cfg_t              cfg;
  logic              grst, gtx, row_sel, row_rst, row_tx, sh_rst, sh_sig, sh_bank;
  logic              ramp_en, ramp_sig, frame_start, running, line_busy, overrun;
  logic [15:0]       row_addr;
  logic [COLS/2-1:0] comp_top, comp_bot;
  logic [1:0]        ser_top [LANES];
  logic [1:0]        ser_bot [LANES];
  logic [7:0]        clamp_cnt;
  int checks = 0, failures = 0, hcnt = 0;

  gs_sensor_top #(.COLS(COLS), .ROWS(ROWS), .K(K), .LANES(LANES), .OVH(OVH)) dut (.*);

  sensor_model #(.COLS(COLS), .K(K), .LANES(LANES)) model (
    .clk_h, .clk_l, .rst_n, .sh_rst, .sh_sig, .sh_bank, .row_addr, .ramp_en, .ramp_sig,
    .tp_mode(cfg.tp_mode), .tp_value(cfg.tp_value), .ser_top, .ser_bot, .comp_top, .comp_bot
  );

  always #2 begin
    clk_h = ~clk_h;
    if (clk_h) begin
      clk_l = (hcnt < K / 2);
      hcnt  = (hcnt + 1) % K;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + model.checks, failures + model.failures);
    $finish;
  end

  // Frame plan: depth, CDS, test pattern, exposure rows, vertical blanking.
  typedef struct {
    adc_mode_e m;
    bit        dcds;
    tp_mode_e  tp;
    int        exp_rows;
    int        vblank;
  } plan_t;
  plan_t plan [NF];

  function automatic int slot_len(plan_t p);
    int rs = ((p.m == ADC_12B) ? 4096 : 1024) / (2 * K);
    return OVH + (p.dcds ? rs / 4 + 1 : 0) + rs + 1;
  endfunction

  task automatic apply(input int f_mode, input int f_tp);
    cfg.adc_mode = plan[f_mode].m;
    cfg.dcds     = plan[f_mode].dcds;
    cfg.exp_rows = 16'(plan[f_mode].exp_rows);
    cfg.vblank   = 16'(plan[f_mode].vblank);
    cfg.tp_mode  = plan[f_tp].tp;
    cfg.tp_value = 12'($urandom);
  endtask

  // Exposure: clk_h cycles with GRST low, per frame (within one CLK_L cycle
  // either side, for the transfer cycle and sampling alignment).
  int grst_low = 0, n_exposures = 0, n_switch = 0;
  always @(posedge clk_h) if (rst_n && running && !grst) grst_low++;

  initial begin
    longint t_prev;
    int     f, exp_cyc;
    plan[0] = '{ADC_10B, 1'b0, TP_OFF,   3, 0};
    plan[1] = '{ADC_10B, 1'b1, TP_OFF,   2, 1};
    plan[2] = '{ADC_12B, 1'b0, TP_OFF,   5, 0};
    plan[3] = '{ADC_12B, 1'b1, TP_OFF,   1, 2};
    plan[4] = '{ADC_10B, 1'b0, TP_HRAMP, 4, 0};
    plan[5] = '{ADC_12B, 1'b1, TP_DIAG,  2, 1};
    plan[6] = '{ADC_10B, 1'b1, TP_FIXED, 3, 0};
    cfg = '0;
    apply(0, 0);
    repeat (3) @(posedge clk_h);
    rst_n = 1'b1;
    repeat (4) @(posedge clk_l);
    cfg.stream_en = 1'b1;
    for (f = 0; f < int'(NF); f++) begin
      // frame f starts at this global transfer
      @(posedge clk_l iff frame_start);
      if (f > 0) begin
        // period of frame f-1, in clk_h cycles
        checks++;
        if (($time - t_prev) / 4 != longint'((ROWS + 2 + plan[f - 1].vblank) *
                                             slot_len(plan[f - 1]) * K)) begin
          failures++;
          $display("FAIL frame %0d period %0d cycles", f - 1, ($time - t_prev) / 4);
        end
        // exposure that ended at this transfer: exp_rows slots of frame f-1
        exp_cyc = plan[f - 1].exp_rows * slot_len(plan[f - 1]) * int'(K);
        checks++;
        if (grst_low < exp_cyc || grst_low > exp_cyc + 2 * int'(K)) begin
          failures++;
          $display("FAIL exposure %0d cycles, expected %0d", grst_low, exp_cyc);
        end
        n_exposures++;
        if (plan[f].m != plan[f - 1].m || plan[f].dcds != plan[f - 1].dcds) n_switch++;
      end
      t_prev   = $time;
      grst_low = 0;
      @(negedge clk_l);
      // this frame's test pattern now; the next frame's settings take effect
      // at the next frame boundary
      apply((f + 1 < int'(NF)) ? f + 1 : f, f);
      if (f == int'(NF) - 1) cfg.stream_en = 1'b0;
    end
    wait (!running);
    repeat (2000) @(posedge clk_h);

    checks++;
    if (model.lines_done != model.n_lines_exp || model.lanes_behind() != 0 ||
        model.n_lines_exp != int'(NF * ROWS)) begin
      failures++;
      $display("FAIL lines: received %0d, converted %0d, expected %0d",
               model.lines_done, model.n_lines_exp, NF * ROWS);
    end
    checks++;
    if (overrun) begin
      failures++; $display("FAIL overrun");
    end
    checks++;
    if (int'(clamp_cnt) == 0) begin
      failures++; $display("FAIL clamp counter never counted");
    end
    checks++;
    if (model.n_eb == 0 || model.n_noeb == 0 || model.n_ovf == 0 || model.n_udf == 0 ||
        model.n_nocross == 0 || model.n_dcds == 0 || model.n_12b == 0 || model.n_tp == 0 ||
        model.n_sof == 0 || n_exposures == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: extra-bit=%0d even=%0d clamp-high=%0d clamp-low=%0d no-crossing=%0d",
             model.n_eb, model.n_noeb, model.n_ovf, model.n_udf, model.n_nocross);
    $display("            digital-cds-lines=%0d 12bit-lines=%0d test-pattern-lines=%0d sof=%0d exposures=%0d mode-switches=%0d",
             model.n_dcds, model.n_12b, model.n_tp, model.n_sof, n_exposures, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks + model.checks, failures + model.failures);
    $finish;
  end
endmodule
