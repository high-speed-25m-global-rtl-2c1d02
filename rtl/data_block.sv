// data_block: turns one side's latched column counts into serial lane data.
//
// The columns of a side are split into LANES channels of CPL = N_COLS/LANES
// neighbouring columns; channel l carries side columns l*CPL .. l*CPL+CPL-1.
// For every line the sequencer announces (line_start, a CLK_L-long pulse),
// each lane sends a three word header (HDR0, HDR1, then HDR_SOF on the first
// line of a frame or HDR_SOL), followed by its CPL pixel words in column
// order. Between lines the lanes send TRAIN_WORD so a receiver can find the
// word boundaries. A pixel word is the column's counts multiplexed onto the
// channel, converted by equation (1) in dn_calc, and optionally replaced by a
// test pattern. Words are 10 or 12 bits as configured.
//
// Channel multiplexing, equation (1), test patterns and parallel to serial
// conversion are the data block's tasks in the sensor description; the
// channel grouping, the framing words and the one-word prefetch are this
// design's own choices.
//
// Timing: all in the CLK_H domain. The rising edge of line_start is detected
// at a CLK_H edge; the header starts at the next word boundary, within one
// word period. A line lasts (3 + CPL) word periods of 5 (10 bit) or 6
// (12 bit) CLK_H cycles. counts must stay stable until the line is sent; a
// line_start that arrives before the previous line ended sets the sticky
// `overrun` flag and restarts the line.
module data_block
  import cis_pkg::*;
#(
  parameter int unsigned N_COLS     = 2560,  // columns of this side
  parameter int unsigned LANES      = 32,    // output lanes of this side
  parameter int unsigned K          = K_DEF, // CLK_H / CLK_L
  parameter int unsigned COL_OFFSET = 0      // array column of side column j is 2*j + COL_OFFSET
) (
  input  logic        clk,         // CLK_H
  input  logic        rst_n,
  input  adc_mode_e   adc_mode,
  input  tp_mode_e    tp_mode,
  input  logic [11:0] tp_value,
  input  col_count_t  counts [N_COLS],
  input  logic        line_start,  // from the sequencer, CLK_L domain
  input  logic [15:0] line_row,    // array row of the line
  input  logic        line_first,  // first line of a frame
  output logic [1:0]  ser [LANES], // lane outputs, two bits per cycle
  output logic        line_busy,   // a line is being sent
  output logic        overrun,     // sticky: new line before the last ended
  output logic [7:0]  clamp_cnt    // saturating count of clamped pixel words
);

  localparam int unsigned CPL   = N_COLS / LANES;
  localparam int unsigned IDX_W = (CPL > 1) ? $clog2(CPL) : 1;

  typedef enum logic [2:0] {
    S_IDLE,
    S_H0,
    S_H1,
    S_H2,
    S_DATA
  } state_e;

  state_e             state, state_nx;
  logic [IDX_W-1:0]   idx, idx_nx;
  logic               ls_d, start, pending;
  logic [15:0]        row_q;
  logic               first_q;
  logic               take;
  logic [LANES-1:0]   take_l;
  logic [11:0]        word_q  [LANES];
  logic [11:0]        word_nx [LANES];
  logic [LANES-1:0]   clamp_l;
  logic [1:0]         sh;

  initial begin
    assert (N_COLS % LANES == 0) else $error("N_COLS must be a multiple of LANES");
  end

  assign start = line_start & ~ls_d;
  assign take  = take_l[0];
  assign sh    = (adc_mode == ADC_12B) ? 2'd0 : 2'd2;

  // Word sequencer, advanced at every word boundary.
  always_comb begin
    state_nx = state;
    idx_nx   = idx;
    if (pending || start) begin
      state_nx = S_H0;
      idx_nx   = '0;
    end else begin
      unique case (state)
        S_IDLE: state_nx = S_IDLE;
        S_H0:   state_nx = S_H1;
        S_H1:   state_nx = S_H2;
        S_H2:   state_nx = S_DATA;
        S_DATA: begin
          if (idx == IDX_W'(CPL - 1)) state_nx = S_IDLE;
          else                        idx_nx   = idx + 1'b1;
        end
        default: state_nx = S_IDLE;
      endcase
    end
  end

  // Next word of each lane, for the state being entered.
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [11:0] dn, tp_word;
    logic        ovf, udf;
    logic [15:0] col;

    assign col = 16'(2 * (l * CPL + int'(idx_nx)) + COL_OFFSET);

    dn_calc #(.K(K)) u_dn (
      .cnt     (counts[l * CPL + int'(idx_nx)]),
      .adc_mode(adc_mode),
      .dn      (dn),
      .ovf     (ovf),
      .udf     (udf)
    );

    test_pattern_gen u_tp (
      .mode    (tp_mode),
      .adc_mode(adc_mode),
      .value   (tp_value),
      .row     (row_q),
      .col     (col),
      .adc_dn  (dn),
      .word    (tp_word)
    );

    assign clamp_l[l] = (state_nx == S_DATA) && (tp_mode == TP_OFF) && (ovf || udf);

    always_comb begin
      unique case (state_nx)
        S_H0:    word_nx[l] = HDR0 >> sh;
        S_H1:    word_nx[l] = HDR1 >> sh;
        S_H2:    word_nx[l] = (first_q ? HDR_SOF : HDR_SOL) >> sh;
        S_DATA:  word_nx[l] = tp_word;
        default: word_nx[l] = TRAIN_WORD >> sh;
      endcase
    end

    lane_serializer u_ser (
      .clk     (clk),
      .rst_n   (rst_n),
      .adc_mode(adc_mode),
      .word    (word_q[l]),
      .take    (take_l[l]),
      .ser     (ser[l])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    word_q[l] <= '0;
      else if (take) word_q[l] <= word_nx[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      ls_d      <= 1'b0;
      pending   <= 1'b0;
      row_q     <= '0;
      first_q   <= 1'b0;
      overrun   <= 1'b0;
      clamp_cnt <= '0;
    end else begin
      ls_d <= line_start;
      if (start) begin
        row_q   <= line_row;
        first_q <= line_first;
        if (state != S_IDLE || pending) overrun <= 1'b1;
      end
      if (take) begin
        state   <= state_nx;
        idx     <= idx_nx;
        pending <= 1'b0;
        if (|clamp_l && clamp_cnt != 8'hFF) clamp_cnt <= clamp_cnt + 1'b1;
      end else if (start) begin
        pending <= 1'b1;
      end
    end
  end

  assign line_busy = (state != S_IDLE) || pending;

endmodule
