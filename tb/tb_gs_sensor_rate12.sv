// tb_gs_sensor_rate12: the sensor's digital readout at full size in 12 bit
// mode with analog CDS. A frame starts and the first NL rows are sampled,
// converted with the 256 CLK_L period ramp and sent as 12 bit words on all
// 64 lanes, where sensor_model checks every pixel word. The row slot is
// measured and the frame rate it implies at CLK_H = 480 MHz is checked
// against 40 frames/s at 12 bit. The 40 frames/s target and the 12 bit depth
// are the sensor's; the 480 MHz clock and the number of rows checked are
// this testbench's choices.
`timescale 1ns / 1ps
module tb_gs_sensor_rate12;
  import cis_pkg::*;

  localparam int unsigned COLS  = 5120;
  localparam int unsigned ROWS  = 5120;
  localparam int unsigned K     = 8;
  localparam int unsigned LANES = 32;
  localparam int unsigned NL    = 3;     // lines to check

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

  gs_sensor_top dut (.*);

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
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + model.checks, failures + model.failures);
    $finish;
  end

  initial begin
    time    t_s0;
    longint slot_cyc;
    real    fps;
    cfg = '0;
    cfg.adc_mode = ADC_12B;
    cfg.exp_rows = 16'd100;
    repeat (3) @(posedge clk_h);
    rst_n = 1'b1;
    repeat (2) @(posedge clk_l);
    cfg.stream_en = 1'b1;
    @(posedge clk_l iff frame_start);
    @(posedge clk_l iff sh_sig);
    t_s0 = $time;
    @(posedge clk_l iff sh_sig);
    slot_cyc = longint'(($time - t_s0) / 4);
    fps = 480.0e6 / (real'(slot_cyc) * real'(ROWS + 2));
    checks++;
    if (fps < 40.0) begin
      failures++; $display("FAIL %0.1f fps at 12 bit", fps);
    end
    wait (model.lines_done == int'(NL));
    repeat (100) @(posedge clk_h);
    checks++;
    if (model.lanes_behind() != 0 || overrun) begin
      failures++; $display("FAIL lanes out of step or overrun");
    end
    checks++;
    if (model.n_12b != int'(NL) + 1 && model.n_12b != int'(NL)) begin
      failures++; $display("FAIL not all lines in 12 bit");
    end
    checks++;
    if (model.n_sof != 1) begin
      failures++; $display("FAIL start of frame not seen");
    end
    $display("row slot %0d CLK_H cycles: %0.1f frames/s at 480 MHz, %0d lines of %0d pixels checked",
             slot_cyc, fps, model.lines_done, COLS);
    $display("TB_RESULT checks=%0d failures=%0d", checks + model.checks, failures + model.failures);
    $finish;
  end
endmodule
