// lane_serializer: parallel to serial conversion for one output lane.
//
// Words of 10 or 12 bits leave MSB first, two bits per CLK_H cycle: ser[1]
// is the bit for the high half of the cycle and ser[0] the bit for the low
// half, so a double data rate output cell driving the sub-LVDS pair sends
// 2 * f(CLK_H) bits/s (960 Mbit/s at 480 MHz). A 10 bit word takes 5 cycles,
// a 12 bit word 6. The serializer streams without gaps: in the last cycle of
// each word it loads `word` and pulses `take`, after which the source
// presents the next word. The word length is read at that load, so a mode
// change takes effect on a word boundary.
//
// Parallel to serial conversion at up to 960 Mbit/s follows the sensor
// description; the two bits per cycle and the load handshake are this
// design's own choices.
module lane_serializer
  import cis_pkg::*;
(
  input  logic        clk,       // CLK_H
  input  logic        rst_n,
  input  adc_mode_e   adc_mode,
  input  logic [11:0] word,      // next word, right aligned
  output logic        take,      // word is loaded at the end of this cycle
  output logic [1:0]  ser        // bit pair of this cycle, ser[1] first
);

  logic [11:0] sr;
  logic [2:0]  cnt;   // cycles left in the current word, minus one
  logic [2:0]  last;

  assign last = (adc_mode == ADC_12B) ? 3'd5 : 3'd4;
  assign take = (cnt == 3'd0);
  assign ser  = sr[11:10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= '0;
      cnt <= '0;
    end else if (take) begin
      sr  <= (adc_mode == ADC_12B) ? word : {word[9:0], 2'b00};
      cnt <= last;
    end else begin
      sr  <= {sr[9:0], 2'b00};
      cnt <= cnt - 3'd1;
    end
  end

  // A word lasts at least five cycles, so two loads are never adjacent.
  a_take_spacing: assert property (@(posedge clk) disable iff (!rst_n) take |=> !take);

endmodule
