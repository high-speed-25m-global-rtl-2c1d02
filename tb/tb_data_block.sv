// tb_data_block: self-checking test of one side's data block.
// Random counter values are presented for N columns; a line is announced and
// a receiver model collects every lane's bit pairs, finds the three word
// header in the stream and decodes the pixel words that follow. Each word
// must equal the equation (1) code of its column, clamped to the depth, or
// the selected test pattern. Checked as well: the SOF/SOL header word, that
// the lanes are idle (TRAIN) before the header, the line length of
// (3 + N/LANES) words, the start latency, 10 and 12 bit words, the clamp
// counter and the overrun flag.
module tb_data_block;
  import cis_pkg::*;

  localparam int unsigned K     = 8;
  localparam int unsigned N     = 16;
  localparam int unsigned LANES = 4;
  localparam int unsigned CPL   = N / LANES;
  localparam int unsigned OFS   = 1;

  logic        clk = 1'b0, rst_n = 1'b0;
  adc_mode_e   adc_mode = ADC_10B;
  tp_mode_e    tp_mode = TP_OFF;
  logic [11:0] tp_value = '0;
  col_count_t  counts [N];
  logic        line_start = 1'b0, line_first = 1'b0;
  logic [15:0] line_row = '0;
  logic [1:0]  ser [LANES];
  logic        line_busy, overrun;
  logic [7:0]  clamp_cnt;
  int checks = 0, failures = 0;
  int n_clamp_exp = 0, n_tp = 0, n_12 = 0, n_sof = 0;

  data_block #(.N_COLS(N), .LANES(LANES), .K(K), .COL_OFFSET(OFS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit bits [LANES][$];
  int cyc = 0;
  bit rec = 1'b0;

  always @(negedge clk) begin
    cyc++;
    if (rec)
      for (int l = 0; l < LANES; l++) begin
        bits[l].push_back(ser[l][1]);
        bits[l].push_back(ser[l][0]);
      end
  end

  function automatic int getw(int l, int pos, int wb);
    int v = 0;
    for (int b = 0; b < wb; b++) v = (v << 1) | int'(bits[l][pos + b]);
    return v;
  endfunction

  function automatic int exp_pixel(int col, int row, int wb);
    int raw, full, msk;
    full = (1 << wb) - 1;
    msk  = full;
    case (tp_mode)
      TP_FIXED: return int'(tp_value) & msk;
      TP_HRAMP: return (2 * col + OFS) & msk;
      TP_VRAMP: return row & msk;
      TP_DIAG:  return (row + 2 * col + OFS) & msk;
      default: begin
        raw = 2 * K * int'(counts[col].msb) + 2 * int'(counts[col].lsb) + int'(counts[col].eb);
        return (raw < 0) ? 0 : (raw > full) ? full : raw;
      end
    endcase
  endfunction

  task automatic send_line(input int row, input bit first, input bit mode_changed);
    int wb, sh, start_cyc, pos, found, lat;
    int h2;
    wb = (adc_mode == ADC_12B) ? 12 : 10;
    sh = 12 - wb;
    for (int c = 0; c < N; c++) begin
      counts[c].msb = MSB_W'($urandom_range(140) - 10);
      counts[c].lsb = LSB_W'($urandom_range(2 * K) - K);
      counts[c].eb  = EB_W'($urandom_range(4) - 2);
    end
    for (int l = 0; l < LANES; l++) bits[l].delete();
    rec = 1'b1;
    @(negedge clk);
    line_row   = 16'(row);
    line_first = first;
    line_start = 1'b1;
    start_cyc  = cyc;
    repeat (K) @(negedge clk);
    line_start = 1'b0;
    wait (!line_busy);
    repeat (3 * wb) @(negedge clk);
    rec = 1'b0;
    h2 = int'((first ? HDR_SOF : HDR_SOL) >> sh);
    for (int l = 0; l < LANES; l++) begin
      found = -1;
      for (int p = 0; p + (3 + CPL) * wb <= bits[l].size(); p++)
        if (getw(l, p, wb) == int'(HDR0 >> sh) && getw(l, p + wb, wb) == int'(HDR1 >> sh) &&
            getw(l, p + 2 * wb, wb) == h2) begin
          found = p;
          break;
        end
      checks++;
      if (found < 0) begin
        failures++; $display("FAIL lane %0d: no header", l);
        continue;
      end
      if (first) n_sof++;
      // start latency: header within two word periods of line_start
      lat = found / 2;
      checks++;
      if (lat > 2 * wb / 2 + 2) begin
        failures++; $display("FAIL lane %0d: header after %0d cycles", l, lat);
      end
      // idle before the header (the word before is shorter after a mode change)
      if (found >= wb && !mode_changed) begin
        checks++;
        if (getw(l, found - wb, wb) != int'(TRAIN_WORD >> sh)) begin
          failures++; $display("FAIL lane %0d: not idle before header", l);
        end
      end
      for (int w = 0; w < CPL; w++) begin
        int col, e, g;
        col = l * CPL + w;
        e = exp_pixel(col, row, wb);
        g = getw(l, found + (3 + w) * wb, wb);
        checks++;
        if (g != e) begin
          failures++;
          $display("FAIL lane %0d word %0d: got %h exp %h (tp %0d)", l, w, g, e, tp_mode);
        end
      end
      // idle after the line
      checks++;
      if (getw(l, found + (3 + CPL) * wb, wb) != int'(TRAIN_WORD >> sh)) begin
        failures++; $display("FAIL lane %0d: not idle after line", l);
      end
    end
    if (tp_mode == TP_OFF)
      for (int c = 0; c < N; c++) begin
        int raw = 2 * K * int'(counts[c].msb) + 2 * int'(counts[c].lsb) + int'(counts[c].eb);
        if (raw < 0 || raw > (1 << wb) - 1) n_clamp_exp++;
      end
    else n_tp++;
    if (wb == 12) n_12++;
  endtask

  initial begin
    int row = 0;
    for (int c = 0; c < N; c++) counts[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    for (int i = 0; i < 24; i++) begin
      adc_mode = (i >= 12) ? ADC_12B : ADC_10B;
      tp_mode  = (i % 6 < 2) ? TP_OFF : tp_mode_e'(i % 6 - 1);
      tp_value = 12'($urandom);
      send_line(row, i % 5 == 0, i == 12);
      row = row + 1 + $urandom_range(50);
      repeat ($urandom_range(20)) @(posedge clk);
    end
    checks++;
    if (overrun) begin
      failures++; $display("FAIL overrun without cause");
    end
    // clamp counter saw the clamped pixel words (saturating at 255)
    checks++;
    if (n_clamp_exp == 0 || int'(clamp_cnt) == 0 || int'(clamp_cnt) > n_clamp_exp) begin
      failures++; $display("FAIL clamp_cnt %0d, clamped words %0d", clamp_cnt, n_clamp_exp);
    end
    // a new line while one is running
    @(negedge clk) line_start = 1'b1;
    repeat (K) @(negedge clk);
    line_start = 1'b0;
    repeat (20) @(negedge clk);
    line_start = 1'b1;
    repeat (K) @(negedge clk);
    line_start = 1'b0;
    checks++;
    if (!overrun) begin
      failures++; $display("FAIL overrun not flagged");
    end
    checks++;
    if (n_tp == 0 || n_12 == 0 || n_sof == 0) begin
      failures++; $display("FAIL mechanism not reached");
    end
    $display("clamped=%0d tp-lines=%0d 12b-lines=%0d sof-lanes=%0d", n_clamp_exp, n_tp, n_12, n_sof);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
