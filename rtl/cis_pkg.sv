// cis_pkg: types and constants shared by the digital readout of the 25M
// global shutter sensor.
//
// The column ADC is a ramp ADC whose conversion time is measured with two
// clocks: a slow clock CLK_L (CLK_H divided by K) for the coarse count and
// both edges of a fast clock CLK_H for the fine count. Equation
//   DN = 2*K*N_MSB + 2*N_LSB + N_EB
// turns the three counter values into the ADC code. The 10/12 bit depths and
// the split of odd/even columns to top/bottom readout follow the sensor
// description; the clock ratio K, the counter widths, the test pattern set
// and the lane framing words are this design's own choices.
package cis_pkg;

  // Frequency ratio CLK_H / CLK_L (not given by the sensor description).
  localparam int unsigned K_DEF = 8;

  // Counter widths, all two's complement because digital CDS counts the
  // reset conversion down and the signal conversion up.
  localparam int unsigned MSB_W = 11;  // coarse count, up to 2^12/(2K) = 256
  localparam int unsigned LSB_W = 6;   // pairs of CLK_H edges, at most K per window
  localparam int unsigned EB_W  = 3;   // extra half-period bit, at most 2 per window

  // Width of a raw DN before clamping (covers 2*K*MSB with K up to 64).
  localparam int unsigned DN_RAW_W = 20;

  // One column's latched counter outputs.
  typedef struct packed {
    logic signed [MSB_W-1:0] msb;
    logic signed [LSB_W-1:0] lsb;
    logic signed [EB_W-1:0]  eb;
  } col_count_t;


  // ADC bit depth (Table 1: 10 bit at 150 fps, 12 bit at 40 fps).
  typedef enum logic {
    ADC_10B = 1'b0,
    ADC_12B = 1'b1
  } adc_mode_e;

  // Test patterns inserted by the data block in place of ADC data.
  typedef enum logic [2:0] {
    TP_OFF   = 3'd0,  // ADC data
    TP_FIXED = 3'd1,  // constant value from the configuration
    TP_HRAMP = 3'd2,  // column index
    TP_VRAMP = 3'd3,  // row index
    TP_DIAG  = 3'd4   // row + column
  } tp_mode_e;

  // Configuration word of the sensor (registers of the control interface).
  typedef struct packed {
    logic             stream_en;  // run frames back to back
    adc_mode_e        adc_mode;
    logic             dcds;       // 1: digital CDS (reset and signal ramps), 0: analog CDS in the PGA
    tp_mode_e         tp_mode;
    logic [11:0]      tp_value;
    logic [15:0]      exp_rows;   // exposure time in row periods
    logic [15:0]      vblank;     // extra row periods per frame
  } cfg_t;

  // Word length on a lane for the given mode.
  function automatic int unsigned word_bits(adc_mode_e m);
    return (m == ADC_12B) ? 12 : 10;
  endfunction

  // Lane framing: three header words open each line, TRAIN fills idle time.
  // Values given for a 12 bit word; in 10 bit mode the two LSBs are dropped.
  localparam logic [11:0] HDR0       = 12'hFFF;
  localparam logic [11:0] HDR1       = 12'h000;
  localparam logic [11:0] HDR_SOF    = 12'hC00;  // first line of a frame
  localparam logic [11:0] HDR_SOL    = 12'h800;  // other lines
  localparam logic [11:0] TRAIN_WORD = 12'h5A4;

endpackage
