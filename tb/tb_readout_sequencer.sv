// tb_readout_sequencer: self-checking test of the frame and row timing.
// Runs frames with a few rows in each combination of depth (10/12 bit) and
// CDS (analog/digital), changing the configuration while streaming, then
// stops streaming. A monitor samples the outputs on every CLK_L edge and
// compares them with the timing specification: slot length OVH + R_SIG + 1
// (+ R_RST + 1 with digital CDS), R_SIG = 2^bits / (2K), R_RST = R_SIG / 4;
// ramps only in the slots that convert a row; counters counting down exactly
// during the reset ramp; latch and line_start once per row, rows in order,
// SOF flag on the first; row sampling in order; one global transfer per
// frame; GRST low for exactly exp_rows slots before it; settings applied at
// frame boundaries only.
module tb_readout_sequencer;
  import cis_pkg::*;

  localparam int unsigned ROWS = 4;
  localparam int unsigned K    = 8;
  localparam int unsigned OVH  = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  cfg_t cfg;
  logic        grst, gtx, row_sel, row_rst, row_tx, sh_rst, sh_sig, sh_bank;
  logic        ramp_en, ramp_sig, cnt_down, cnt_clr, cnt_latch;
  logic        line_start, line_first, frame_start, running;
  logic [15:0] row_addr, line_row;
  adc_mode_e   adc_mode;
  int checks = 0, failures = 0;
  int n_frames = 0, n_dcds = 0, n_12 = 0, n_stop = 0;

  readout_sequencer #(.ROWS(ROWS), .K(K), .OVH(OVH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Settings of the frame in progress, captured by the monitor at gtx.
  cfg_t cur;
  int   n = -1;  // cycle since gtx

  function automatic int r_sig(cfg_t c);
    return ((c.adc_mode == ADC_12B) ? 4096 : 1024) / (2 * K);
  endfunction
  function automatic int slot_len(cfg_t c);
    return OVH + (c.dcds ? r_sig(c) / 4 + 1 : 0) + r_sig(c) + 1;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL n=%0d %s", n, what);
    end
  endtask

  cfg_t pending;
  int   exp_line_row;

  always @(posedge clk) if (rst_n) begin
    int L, F, s, t, rs, rr, sig0;
    bit e_ramp, e_down, e_samp;
    if (gtx) begin
      // a new frame starts with the settings offered at its start
      cur = pending;
      n   = 0;
      n_frames++;
      if (cur.dcds) n_dcds++;
      if (cur.adc_mode == ADC_12B) n_12++;
      exp_line_row = 0;
    end
    if (n >= 0 && running) begin
      L  = slot_len(cur);
      F  = ROWS + 2 + int'(cur.vblank);
      s  = n / L;
      t  = n % L;
      rs = r_sig(cur);
      rr = rs / 4;
      sig0 = OVH + (cur.dcds ? rr + 1 : 0);
      e_ramp = (s >= 1 && s <= ROWS) &&
               ((cur.dcds && t >= OVH && t < OVH + rr) || (t >= sig0 && t < sig0 + rs));
      e_down = cur.dcds && t < sig0;
      e_samp = s < ROWS;
      chk(s < F, "frame too long");
      chk(gtx == (n == 0), "gtx");
      chk(ramp_en == e_ramp, "ramp_en");
      if (ramp_en) chk(cnt_down == e_down, "cnt_down");
      chk(cnt_latch == (s >= 2 && s <= ROWS + 1 && t == 0), "latch");
      chk(cnt_clr == (s >= 1 && s <= ROWS && t == 1), "clear");
      chk(sh_sig == (e_samp && t == 6), "sh_sig");
      chk(sh_rst == (e_samp && t == 3), "sh_rst");
      if (sh_sig) chk(int'(row_addr) == s, "row_addr");
      if (line_start) begin
        chk(int'(line_row) == exp_line_row, "line_row");
        chk(line_first == (exp_line_row == 0), "line_first");
        exp_line_row++;
      end
      if (s == F - 1 && t == L - 1) begin
        chk(exp_line_row == ROWS, "lines per frame");
        n_stop += pending.stream_en ? 0 : 1;
      end
      // GRST low exactly for the last exp_rows slots and the gtx cycle
      chk(grst == !(n == 0 || s >= F - int'(cur.exp_rows)), "grst");
      chk(adc_mode == cur.adc_mode, "mode switched inside a frame");
      n++;
    end else begin
      chk(grst, "grst while idle");
      chk(!ramp_en && !line_start, "activity while idle");
    end
  end

  task automatic set_cfg(input bit dcds, input adc_mode_e m, input int exp_rows, input int vb);
    pending = '0;
    pending.stream_en = 1'b1;
    pending.dcds      = dcds;
    pending.adc_mode  = m;
    pending.exp_rows  = 16'(exp_rows);
    pending.vblank    = 16'(vb);
    cfg = pending;
  endtask

  initial begin
    int f0;
    set_cfg(0, ADC_10B, 3, 1);
    cfg.stream_en = 1'b0;
    pending = cfg;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    // Change the configuration in the middle of each frame.
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      set_cfg(i[0], adc_mode_e'(i[1]), 1 + i % 4, i % 3);
      f0 = n_frames;
      wait (n_frames == f0 + 1);
      repeat (50) @(negedge clk);
    end
    @(negedge clk);
    cfg.stream_en = 1'b0;
    pending = cfg;
    wait (!running);
    repeat (100) @(posedge clk);
    checks++;
    if (n_frames < 8 || n_dcds == 0 || n_12 == 0 || n_stop == 0) begin
      failures++; $display("FAIL frames=%0d dcds=%0d 12b=%0d stop=%0d", n_frames, n_dcds, n_12, n_stop);
    end
    $display("frames=%0d digital-cds=%0d 12-bit=%0d stops=%0d", n_frames, n_dcds, n_12, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
