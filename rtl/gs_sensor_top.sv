// gs_sensor_top: digital readout of a 25 Mpixel global shutter image sensor
// with column-parallel double clock, double edge counting ramp ADCs.
//
// Structure (array of ROWS x COLS pixels, columns numbered from 1):
//   readout_sequencer   global shutter pixel timing, S&H and ramp control,
//                       row pipeline (sample row n, convert row n-1, send
//                       row n-2), CLK_L domain
//   adc_counter_bank x2 top side: odd columns 1,3,5,... (index 0,2,4,...)
//                       bottom side: even columns 2,4,6,... (index 1,3,5,...)
//   data_block x2       per side: channel multiplexing, equation (1), test
//                       patterns and serialisation onto LANES lanes
// The pixel array, row drivers, PGAs, sample-and-holds, ramp generator,
// comparators, clock generation and sub-LVDS drivers are analog and sit
// outside: this module drives their controls and takes the comparator
// outputs (comp_top, comp_bot) as inputs.
//
// Clocks: clk_h is the fast counting clock CLK_H, also the data block and
// serializer clock (two bits per cycle per lane, 960 Mbit/s at 480 MHz);
// clk_l is CLK_L = CLK_H / K with its rising edges on CLK_H rising edges.
// rst_n is an asynchronous active-low reset.
//
// Array size, pixel pitch, 10/12 bit depth, the odd/even top/bottom split,
// the counting scheme, equation (1) and the 960 Mbit/s lanes follow the sensor
// description; K = 8, 5120 x 5120 pixels and 32 lanes per side are this
// design's own choices, sized so 10 bit frames run above 150 fps and 12 bit
// frames above 40 fps with CLK_H at 480 MHz.
module gs_sensor_top
  import cis_pkg::*;
#(
  parameter int unsigned COLS  = 5120,   // pixel columns (even)
  parameter int unsigned ROWS  = 5120,   // pixel rows
  parameter int unsigned K     = K_DEF,  // CLK_H / CLK_L
  parameter int unsigned LANES = 32,     // output lanes per side
  parameter int unsigned OVH   = 8       // CLK_L cycles before the first ramp of a slot
) (
  input  logic              clk_h,
  input  logic              clk_l,
  input  logic              rst_n,
  input  cfg_t              cfg,
  // pixel array
  output logic              grst,
  output logic              gtx,
  output logic [15:0]       row_addr,
  output logic              row_sel,
  output logic              row_rst,
  output logic              row_tx,
  // column analog chain
  output logic              sh_rst,
  output logic              sh_sig,
  output logic              sh_bank,
  output logic              ramp_en,
  output logic              ramp_sig,
  input  logic [COLS/2-1:0] comp_top,   // comparators of columns 1,3,5,...
  input  logic [COLS/2-1:0] comp_bot,   // comparators of columns 2,4,6,...
  // serial outputs, two bits per clk_h cycle each
  output logic [1:0]        ser_top [LANES],
  output logic [1:0]        ser_bot [LANES],
  // status
  output logic              frame_start,
  output logic              running,
  output logic              line_busy,
  output logic              overrun,
  output logic [7:0]        clamp_cnt
);

  localparam int unsigned HALF = COLS / 2;

  logic        cnt_down, cnt_clr, cnt_latch;
  logic        line_start, line_first;
  logic [15:0] line_row;
  adc_mode_e   adc_mode;
  col_count_t  counts_top [HALF];
  col_count_t  counts_bot [HALF];
  logic        busy_top, busy_bot, ovr_top, ovr_bot;
  logic [7:0]  clamp_top, clamp_bot;

  readout_sequencer #(.ROWS(ROWS), .K(K), .OVH(OVH)) u_seq (
    .clk        (clk_l),
    .rst_n      (rst_n),
    .cfg        (cfg),
    .grst       (grst),
    .gtx        (gtx),
    .row_addr   (row_addr),
    .row_sel    (row_sel),
    .row_rst    (row_rst),
    .row_tx     (row_tx),
    .sh_rst     (sh_rst),
    .sh_sig     (sh_sig),
    .sh_bank    (sh_bank),
    .ramp_en    (ramp_en),
    .ramp_sig   (ramp_sig),
    .cnt_down   (cnt_down),
    .cnt_clr    (cnt_clr),
    .cnt_latch  (cnt_latch),
    .line_start (line_start),
    .line_row   (line_row),
    .line_first (line_first),
    .adc_mode   (adc_mode),
    .frame_start(frame_start),
    .running    (running)
  );

  adc_counter_bank #(.N_COLS(HALF)) u_bank_top (
    .clk_h   (clk_h),
    .clk_l   (clk_l),
    .rst_n   (rst_n),
    .conv_en (ramp_en),
    .cnt_down(cnt_down),
    .cnt_clr (cnt_clr),
    .latch   (cnt_latch),
    .comp    (comp_top),
    .counts  (counts_top)
  );

  adc_counter_bank #(.N_COLS(HALF)) u_bank_bot (
    .clk_h   (clk_h),
    .clk_l   (clk_l),
    .rst_n   (rst_n),
    .conv_en (ramp_en),
    .cnt_down(cnt_down),
    .cnt_clr (cnt_clr),
    .latch   (cnt_latch),
    .comp    (comp_bot),
    .counts  (counts_bot)
  );

  data_block #(.N_COLS(HALF), .LANES(LANES), .K(K), .COL_OFFSET(0)) u_data_top (
    .clk       (clk_h),
    .rst_n     (rst_n),
    .adc_mode  (adc_mode),
    .tp_mode   (cfg.tp_mode),
    .tp_value  (cfg.tp_value),
    .counts    (counts_top),
    .line_start(line_start),
    .line_row  (line_row),
    .line_first(line_first),
    .ser       (ser_top),
    .line_busy (busy_top),
    .overrun   (ovr_top),
    .clamp_cnt (clamp_top)
  );

  data_block #(.N_COLS(HALF), .LANES(LANES), .K(K), .COL_OFFSET(1)) u_data_bot (
    .clk       (clk_h),
    .rst_n     (rst_n),
    .adc_mode  (adc_mode),
    .tp_mode   (cfg.tp_mode),
    .tp_value  (cfg.tp_value),
    .counts    (counts_bot),
    .line_start(line_start),
    .line_row  (line_row),
    .line_first(line_first),
    .ser       (ser_bot),
    .line_busy (busy_bot),
    .overrun   (ovr_bot),
    .clamp_cnt (clamp_bot)
  );

  assign line_busy = busy_top | busy_bot;
  assign overrun   = ovr_top | ovr_bot;
  assign clamp_cnt = (8'hFF - clamp_top < clamp_bot) ? 8'hFF : clamp_top + clamp_bot;

endmodule
