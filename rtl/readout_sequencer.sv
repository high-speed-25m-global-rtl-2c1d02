// readout_sequencer: global shutter timing and pipelined row readout.
//
// Exposure is global: the photodiodes of all pixels are held in reset by GRST,
// which stays high until exposure starts; at the end of exposure a global
// transfer pulse (gtx) moves every photodiode's charge into its in-pixel
// memory node (MN). The memory nodes are then read row by row while the next
// exposure already runs (pipelined global shutter).
//
// Time is cut into row slots. In slot s of a frame three rows are in flight:
//   * row s is sampled: select, reset of the floating diffusion, sampling of
//     the reset level (sh_rst), transfer MN -> floating diffusion (row_tx),
//     sampling of the signal level (sh_sig), through the column PGA into the
//     column sample-and-hold (two banks, sh_bank alternates per slot);
//   * row s-1, held in the other S&H bank, is converted by the column ADCs:
//     with digital CDS a short reset ramp counted down and a signal ramp
//     counted up, with analog CDS (done in the PGA) the signal ramp only;
//   * row s-2, converted in the previous slot, is latched in cycle 0 and sent
//     out by the data blocks (line_start in cycle 1).
// A frame has ROWS + 2 + vblank slots. GRST falls exp_rows slots before the
// frame ends and gtx fires in cycle 0 of the next frame's first slot.
// Mode, CDS and exposure settings are taken at the start of a frame. The first
// frame after streaming starts carries no exposure (the photodiodes were held
// in reset) and reads out dark.
//
// Slot timing in CLK_L cycles t: 0 latch (+ gtx in slot 0); 1 counter clear,
// line_start, row_rst (1..2); 3 sh_rst; 4..5 row_tx; 6 sh_sig; row_sel 1..6;
// from OVH the ramps: reset ramp R_RST cycles and one idle cycle (digital CDS
// only), signal ramp R_SIG cycles, one idle cycle. R_SIG = 2^bits / (2K), so
// the ramp spans 2^bits half periods of CLK_H; R_RST = R_SIG / 4.
//
// The global reset held high before exposure, the global charge transfer to
// MN, the pipelining of sampling with the conversion of the previous row and
// the choice of analog or digital CDS follow the sensor description. The
// slot layout, pulse positions and lengths, the reset ramp length and the
// two S&H banks are this design's own choices. All outputs are decoded from
// CLK_L registers.
module readout_sequencer
  import cis_pkg::*;
#(
  parameter int unsigned ROWS = 5120,   // pixel rows
  parameter int unsigned K    = K_DEF,  // CLK_H / CLK_L
  parameter int unsigned OVH  = 8       // CLK_L cycles before the first ramp
) (
  input  logic        clk,         // CLK_L
  input  logic        rst_n,
  input  cfg_t        cfg,
  // pixel array control
  output logic        grst,        // global photodiode reset
  output logic        gtx,         // global transfer PD -> MN
  output logic [15:0] row_addr,    // row being sampled
  output logic        row_sel,
  output logic        row_rst,
  output logic        row_tx,      // transfer MN -> floating diffusion
  // column analog chain
  output logic        sh_rst,      // sample reset level
  output logic        sh_sig,      // sample signal level
  output logic        sh_bank,     // S&H bank written in this slot
  output logic        ramp_en,     // ramp running (conv_en of the counters)
  output logic        ramp_sig,    // 1: signal ramp, 0: reset ramp
  // column counters
  output logic        cnt_down,
  output logic        cnt_clr,
  output logic        cnt_latch,
  // data blocks
  output logic        line_start,
  output logic [15:0] line_row,
  output logic        line_first,
  output adc_mode_e   adc_mode,    // mode of the running frame
  output logic        frame_start, // cycle 0 of slot 0
  output logic        running
);

  localparam int unsigned R10 = (1 << 10) / (2 * K);
  localparam int unsigned R12 = (1 << 12) / (2 * K);

  logic [15:0] slot;      // slot in frame
  logic [11:0] t;         // CLK_L cycle in slot
  cfg_t        cfg_q;     // settings of the running frame

  logic [11:0] r_sig, r_rst, sig0, slot_len;
  logic [15:0] frame_len, exp_eff;
  logic        last_t, last_slot;

  always_comb begin
    r_sig     = (cfg_q.adc_mode == ADC_12B) ? 12'(R12) : 12'(R10);
    r_rst     = r_sig >> 2;
    sig0      = 12'(OVH) + (cfg_q.dcds ? r_rst + 12'd1 : 12'd0);
    slot_len  = sig0 + r_sig + 12'd1;
    frame_len = 16'(ROWS + 2) + cfg_q.vblank;
    exp_eff   = (cfg_q.exp_rows >= frame_len) ? frame_len - 16'd1 : cfg_q.exp_rows;
    last_t    = (t == slot_len - 12'd1);
    last_slot = (slot == frame_len - 16'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= 1'b0;
      slot        <= '0;
      t           <= '0;
      cfg_q       <= '0;
    end else if (!running) begin
      if (cfg.stream_en) begin
        running <= 1'b1;
        slot    <= '0;
        t       <= '0;
        cfg_q   <= cfg;
      end
    end else if (last_t) begin
      t <= '0;
      if (last_slot) begin
        slot        <= '0;
        if (cfg.stream_en) cfg_q   <= cfg;
        else               running <= 1'b0;
      end else begin
        slot <= slot + 16'd1;
      end
    end else begin
      t <= t + 12'd1;
    end
  end

  logic samp_row, conv_row, out_row;

  always_comb begin
    samp_row = running && (slot < 16'(ROWS));
    conv_row = running && (slot >= 16'd1) && (slot <= 16'(ROWS));
    out_row  = running && (slot >= 16'd2) && (slot <= 16'(ROWS + 1));

    // GRST holds the photodiodes in reset outside exposure; it stays low
    // through the transfer that ends the exposure.
    gtx      = running && (slot == 16'd0) && (t == 12'd0);
    grst     = !running || (!gtx && slot < frame_len - exp_eff);
    row_addr = samp_row ? slot : 16'd0;
    row_sel  = samp_row && (t >= 12'd1) && (t <= 12'd6);
    row_rst  = samp_row && (t >= 12'd1) && (t <= 12'd2);
    sh_rst   = samp_row && (t == 12'd3);
    row_tx   = samp_row && (t >= 12'd4) && (t <= 12'd5);
    sh_sig   = samp_row && (t == 12'd6);
    sh_bank  = slot[0];

    ramp_sig = (t >= sig0);
    ramp_en  = conv_row &&
               ((cfg_q.dcds && t >= 12'(OVH) && t < 12'(OVH) + r_rst) ||
                (t >= sig0 && t < sig0 + r_sig));
    cnt_down = cfg_q.dcds && (t < sig0);
    cnt_clr  = conv_row && (t == 12'd1);
    cnt_latch  = out_row && (t == 12'd0);
    line_start = out_row && (t == 12'd1);
    line_row   = out_row ? slot - 16'd2 : 16'd0;
    line_first = out_row && (slot == 16'd2);
    adc_mode    = cfg_q.adc_mode;
    frame_start = gtx;
  end

endmodule
