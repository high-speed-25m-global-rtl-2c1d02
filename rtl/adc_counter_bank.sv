// adc_counter_bank: the column-parallel counters of one readout side.
//
// Pixel columns are read out on both edges of the array: odd columns by the
// circuits above it, even columns by the circuits below, each at twice the
// pixel pitch. This module is one such side: N_COLS dcde_counter instances
// sharing the conversion controls from the readout sequencer, each fed by
// its own column comparator. All columns convert the same row at the same
// time; their latched counts stay stable for the data block while the next
// row converts.
//
// The split into two sides follows the sensor description; sharing one set of
// control lines across a side is this design's own (and the usual) choice.
// Interface and timing are those of dcde_counter, one comparator input and one
// latched count per column.
module adc_counter_bank
  import cis_pkg::*;
#(
  parameter int unsigned N_COLS = 2560  // columns of one side (5120 / 2)
) (
  input  logic       clk_h,
  input  logic       clk_l,
  input  logic       rst_n,
  input  logic       conv_en,
  input  logic       cnt_down,
  input  logic       cnt_clr,
  input  logic       latch,
  input  logic [N_COLS-1:0] comp,
  output col_count_t counts [N_COLS]
);

  for (genvar c = 0; c < N_COLS; c++) begin : g_col
    dcde_counter u_cnt (
      .clk_h   (clk_h),
      .clk_l   (clk_l),
      .rst_n   (rst_n),
      .conv_en (conv_en),
      .cnt_down(cnt_down),
      .cnt_clr (cnt_clr),
      .latch   (latch),
      .comp    (comp[c]),
      .count_q (counts[c])
    );
  end

endmodule
