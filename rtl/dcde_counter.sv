// dcde_counter: column counter of the ramp ADC, counting with two clocks and
// with both edges of the fast clock.
//
// The comparator output `comp` rises when the ramp crosses the sampled pixel
// level (time t_c) and stays high until the ramp ends. The counter measures
// the time from t_c to the end of the ramp in half periods of CLK_H:
//   * MSB_EN is `comp` sampled by CLK_L. CNT_MSB counts CLK_L rising edges
//     while MSB_EN is high, i.e. the whole CLK_L periods from the first CLK_L
//     edge after t_c to the end of the ramp. Only one slow counter toggles
//     during most of the ramp, which keeps column power low.
//   * LSB_EN = comp & ~MSB_EN & conv_en is high from t_c to the next CLK_L
//     edge. Over that short window the CLK_H edges are counted: LSB_EN is
//     delayed by the falling edge of CLK_H (lsb_f) and, at each CLK_H rising
//     edge, a falling/rising pair inside the window advances CNT_LSB
//     (LSB_EN & lsb_f) while an edge without its partner advances the extra
//     bit counter CNT_EB (LSB_EN ^ lsb_f). CNT_EB pulses at most twice per
//     window (once for the windows used here, which end on a rising edge),
//     so at most four times in a digital-CDS conversion.
// The ADC code is DN = 2*K*CNT_MSB + 2*CNT_LSB + CNT_EB (see dn_calc), the
// number of CLK_H edges, rising and falling, between t_c and the ramp end.
//
// The use of CLK_L, both CLK_H edges, the MSB/LSB enables and the EB counter
// follow the sensor description. The exact EB logic (pairing of edges), the
// up/down counting for digital CDS and the output latch that lets the next
// conversion run while the previous row is read out are this design's own.
//
// Timing: CLK_L is CLK_H divided by K with rising edges aligned. conv_en,
// cnt_down, cnt_clr and latch come from CLK_L flops; conv_en is high for
// exactly the ramp, counting uses the CLK_L/CLK_H edges strictly after the
// ramp start and up to and including the ramp end. `comp` is asynchronous
// (an analog comparator) and must be low when the ramp starts. cnt_clr
// (one CLK_L period) zeroes all three counters; latch copies them to
// count_q at the next CLK_L edge.
module dcde_counter
  import cis_pkg::*;
(
  input  logic       clk_h,    // fast counting clock, both edges used
  input  logic       clk_l,    // slow counting clock, CLK_H / K
  input  logic       rst_n,    // asynchronous reset, active low
  input  logic       conv_en,  // ramp running
  input  logic       cnt_down, // 1: count down (reset conversion of digital CDS)
  input  logic       cnt_clr,  // clear the counters
  input  logic       latch,    // copy the counters to count_q
  input  logic       comp,     // comparator output, asynchronous
  output col_count_t count_q   // latched counter values
);

  logic                    msb_en;   // comp sampled by CLK_L
  logic                    lsb_en;
  logic                    lsb_f;    // LSB_EN delayed by the falling edge of CLK_H
  logic signed [MSB_W-1:0] cnt_msb;
  logic signed [LSB_W-1:0] cnt_lsb;
  logic signed [EB_W-1:0]  cnt_eb;

  assign lsb_en = comp & conv_en & ~msb_en;

  // Slow clock domain: MSB enable, coarse counter and output latch.
  always_ff @(posedge clk_l or negedge rst_n) begin
    if (!rst_n) begin
      msb_en  <= 1'b0;
      cnt_msb <= '0;
      count_q <= '0;
    end else begin
      msb_en <= comp & conv_en;
      if (cnt_clr)
        cnt_msb <= '0;
      else if (conv_en && msb_en)
        cnt_msb <= cnt_down ? cnt_msb - 1'b1 : cnt_msb + 1'b1;
      if (latch)
        count_q <= '{msb: cnt_msb, lsb: cnt_lsb, eb: cnt_eb};
    end
  end

  // LSB_EN delayed by the falling edge of CLK_H.
  always_ff @(negedge clk_h or negedge rst_n) begin
    if (!rst_n) lsb_f <= 1'b0;
    else        lsb_f <= lsb_en;
  end

  // Fast clock domain: pairs of CLK_H edges and the unpaired extra edges.
  always_ff @(posedge clk_h or negedge rst_n) begin
    if (!rst_n) begin
      cnt_lsb <= '0;
      cnt_eb  <= '0;
    end else if (cnt_clr) begin
      cnt_lsb <= '0;
      cnt_eb  <= '0;
    end else begin
      if (lsb_en && lsb_f)
        cnt_lsb <= cnt_down ? cnt_lsb - 1'b1 : cnt_lsb + 1'b1;
      if (lsb_en ^ lsb_f)
        cnt_eb <= cnt_down ? cnt_eb - 1'b1 : cnt_eb + 1'b1;
    end
  end

  // The sequencer never clears or latches while a ramp runs.
  a_no_clear_in_ramp: assert property (@(posedge clk_l) disable iff (!rst_n)
                                       conv_en |-> !cnt_clr && !latch);

endmodule
