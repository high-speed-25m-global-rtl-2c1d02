// sensor_model: behavioural model of the sensor's analog column chain plus a
// receiver and scoreboard for the serial lanes, shared by the sensor-level
// testbenches.
//
// Analog side: when sh_rst / sh_sig are sampled on a CLK_L edge, every column
// stores a random reset and signal level into the sample-and-hold bank
// selected by sh_bank. A level is expressed directly as the ramp crossing
// position h in half periods of CLK_H. When a ramp starts (ramp_en rises),
// every column's comparator output rises (h + 1/2) half periods later, using
// the other S&H bank and the reset or signal level as ramp_sig says, and
// falls when the ramp ends. Time base: 1 ns = a quarter CLK_H period, so
// crossings fall on odd ns and clock edges on even ns.
//
// Expected data: at the end of each signal ramp the model works out every
// column's code from the crossings and the measured ramp lengths: the number
// of CLK_H edges between crossing and ramp end, minus the same for the reset
// ramp when there was one, clamped to 0 .. 2K*R_sig - 1; or the test pattern
// in force. That line is queued.
//
// Receiver: each lane's bit pairs are searched for a 10 or 12 bit header;
// the words that follow are compared with the queued line, lane by lane.
`timescale 1ns / 1ps
module sensor_model
  import cis_pkg::*;
#(
  parameter int unsigned COLS  = 32,
  parameter int unsigned K     = 8,
  parameter int unsigned LANES = 4
) (
  input  logic              clk_h,
  input  logic              clk_l,
  input  logic              rst_n,
  input  logic              sh_rst,
  input  logic              sh_sig,
  input  logic              sh_bank,
  input  logic [15:0]       row_addr,
  input  logic              ramp_en,
  input  logic              ramp_sig,
  input  tp_mode_e          tp_mode,    // test pattern of the current frame
  input  logic [11:0]       tp_value,
  input  logic [1:0]        ser_top [LANES],
  input  logic [1:0]        ser_bot [LANES],
  output logic [COLS/2-1:0] comp_top,
  output logic [COLS/2-1:0] comp_bot
);

  localparam int unsigned HALF = COLS / 2;
  localparam int unsigned CPL  = HALF / LANES;
  localparam int unsigned NRX  = 2 * LANES;

  int checks = 0, failures = 0;
  // mechanisms seen
  int n_eb = 0, n_noeb = 0, n_ovf = 0, n_udf = 0, n_nocross = 0;
  int n_dcds = 0, n_12b = 0, n_tp = 0, n_sof = 0, n_lines_exp = 0;

  // S&H banks: reset and signal level per column, row of the sample.
  int hold_r [2][COLS];
  int hold_s [2][COLS];
  int hold_row [2];
  int last_rs = 64, last_rr = 16;

  typedef int line_t [COLS];
  line_t exp_q [$];
  bit    exp_first [$];

  // Pending reset conversion result of the current slot.
  int  dn_rst [COLS];
  bit  had_rst;
  bit  conv_sig;
  int  conv_bank;

  function automatic int edges_after(int h, int r);
    return (h < 2 * int'(K) * r) ? 2 * int'(K) * r - h : 0;
  endfunction

  function automatic void put_comp(int c, bit v);
    if (c % 2 == 0) comp_top[c / 2] = v;
    else            comp_bot[c / 2] = v;
  endfunction

  initial begin
    comp_top = '0;
    comp_bot = '0;
  end

  // Sample and hold.
  always @(posedge clk_l) if (rst_n) begin
    if (sh_rst)
      for (int c = 0; c < COLS; c++)
        hold_r[sh_bank][c] = $urandom_range(2 * K * last_rr + 2);
    if (sh_sig) begin
      for (int c = 0; c < COLS; c++)
        // one pixel in 16 at the top of the range, to reach full scale
        hold_s[sh_bank][c] = ($urandom_range(15) == 0) ? 0 : $urandom_range(2 * K * last_rs + 6);
      hold_row[sh_bank] = int'(row_addr);
    end
  end

  // Ramp and comparators.
  always begin
    time t0;
    int  tc [COLS];
    int  r, full, raw, row;
    line_t ln;
    @(posedge ramp_en);
    t0        = $time;
    conv_sig  = ramp_sig;
    conv_bank = sh_bank ? 0 : 1;
    for (int c = 0; c < COLS; c++)
      tc[c] = 2 * (conv_sig ? hold_s[conv_bank][c] : hold_r[conv_bank][c]) + 1;
    while (ramp_en) begin
      #1;
      for (int c = 0; c < COLS; c++)
        if ($time - t0 == time'(tc[c])) put_comp(c, 1'b1);
    end
    r = int'(($time - t0) / (4 * K));
    comp_top = '0;
    comp_bot = '0;
    if (!conv_sig) begin
      last_rr = r;
      had_rst = 1'b1;
      for (int c = 0; c < COLS; c++) dn_rst[c] = edges_after(hold_r[conv_bank][c], r);
    end else begin
      last_rs = r;
      full    = 2 * K * r - 1;
      row     = hold_row[conv_bank];
      for (int c = 0; c < COLS; c++) begin
        raw = edges_after(hold_s[conv_bank][c], r) - (had_rst ? dn_rst[c] : 0);
        if (hold_s[conv_bank][c] >= 2 * K * r) n_nocross++;
        else if (hold_s[conv_bank][c] % 2 == 1) n_eb++;
        else n_noeb++;
        case (tp_mode)
          TP_FIXED: ln[c] = int'(tp_value) & full;
          TP_HRAMP: ln[c] = c & full;
          TP_VRAMP: ln[c] = row & full;
          TP_DIAG:  ln[c] = (row + c) & full;
          default: begin
            if (raw < 0) n_udf++;
            if (raw > full) n_ovf++;
            ln[c] = (raw < 0) ? 0 : (raw > full) ? full : raw;
          end
        endcase
      end
      if (had_rst) n_dcds++;
      if (full == 4095) n_12b++;
      if (tp_mode != TP_OFF) n_tp++;
      exp_q.push_back(ln);
      exp_first.push_back(row == 0);
      n_lines_exp++;
      had_rst = 1'b0;
    end
  end

  // Lane receivers: 0..LANES-1 top, LANES..2*LANES-1 bottom.
  longint hist [NRX];
  int     rx_ws [NRX];      // 0 while searching for a header
  int     rx_cnt [NRX];     // bits collected of the current word
  int     rx_word [NRX];
  int     rx_idx [NRX];     // word of the line
  bit     rx_first [NRX];
  int     rx_line [NRX];    // lines received
  int     lines_done = 0;

  function automatic bit hdr_match(longint h, int ws, output bit first);
    longint pat_sol, pat_sof, msk;
    int sh = 12 - ws;
    pat_sol = (longint'(HDR0 >> sh) << (2 * ws)) | (longint'(HDR1 >> sh) << ws) | longint'(HDR_SOL >> sh);
    pat_sof = (longint'(HDR0 >> sh) << (2 * ws)) | (longint'(HDR1 >> sh) << ws) | longint'(HDR_SOF >> sh);
    msk     = (longint'(1) << (3 * ws)) - 1;
    first   = ((h & msk) == pat_sof);
    return ((h & msk) == pat_sol) || first;
  endfunction

  task automatic rx_bit(int l, bit b);
    bit f;
    int col, e;
    if (rx_ws[l] == 0) begin
      hist[l] = (hist[l] << 1) | longint'(b);
      if (hdr_match(hist[l], 10, f)) begin
        rx_ws[l] = 10; rx_first[l] = f;
      end else if (hdr_match(hist[l], 12, f)) begin
        rx_ws[l] = 12; rx_first[l] = f;
      end
      rx_cnt[l] = 0; rx_idx[l] = 0; rx_word[l] = 0;
      return;
    end
    rx_word[l] = (rx_word[l] << 1) | int'(b);
    rx_cnt[l]++;
    if (rx_cnt[l] < rx_ws[l]) return;
    // one pixel word
    col = (l < LANES) ? 2 * (l * CPL + rx_idx[l]) : 2 * ((l - LANES) * CPL + rx_idx[l]) + 1;
    checks++;
    if (rx_line[l] >= exp_q.size()) begin
      failures++;
      $display("FAIL lane %0d: line %0d received, not expected", l, rx_line[l]);
    end else begin
      e = exp_q[rx_line[l]][col];
      if (rx_word[l] != e) begin
        failures++;
        if (failures < 20)
          $display("FAIL line %0d col %0d: got %0d exp %0d", rx_line[l], col, rx_word[l], e);
      end
      if (rx_idx[l] == 0) begin
        checks++;
        if (rx_first[l] != exp_first[rx_line[l]]) begin
          failures++; $display("FAIL line %0d lane %0d: SOF flag", rx_line[l], l);
        end
        if (rx_first[l] && l == 0) n_sof++;
      end
    end
    rx_word[l] = 0;
    rx_cnt[l]  = 0;
    rx_idx[l]++;
    if (rx_idx[l] == int'(CPL)) begin
      rx_ws[l] = 0;
      hist[l]  = 0;
      rx_line[l]++;
      if (l == 0) lines_done++;
    end
  endtask

  initial begin
    for (int l = 0; l < NRX; l++) begin
      hist[l] = 0; rx_ws[l] = 0; rx_cnt[l] = 0; rx_word[l] = 0; rx_idx[l] = 0;
      rx_first[l] = 0; rx_line[l] = 0;
    end
    had_rst = 1'b0;
  end

  always @(negedge clk_h) if (rst_n) begin
    for (int l = 0; l < LANES; l++) begin
      rx_bit(l, ser_top[l][1]);
      rx_bit(l, ser_top[l][0]);
      rx_bit(l + LANES, ser_bot[l][1]);
      rx_bit(l + LANES, ser_bot[l][0]);
    end
  end

  // All lanes must have delivered the same number of lines.
  function automatic int lanes_behind();
    int n = 0;
    for (int l = 0; l < NRX; l++) if (rx_line[l] != rx_line[0]) n++;
    return n;
  endfunction

endmodule
