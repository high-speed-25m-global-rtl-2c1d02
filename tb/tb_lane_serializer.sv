// tb_lane_serializer: self-checking test of the lane serializer.
// A source presents random words and replaces each one when `take` pulses.
// A receiver model collects the bit pairs, knowing that the first word leaves
// in the cycle after the first load, and rebuilds the words; they must match
// what was offered, in order, in 10 bit and then 12 bit mode. The word period
// (5 or 6 cycles) is checked from the spacing of `take`.
module tb_lane_serializer;
  import cis_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  adc_mode_e   adc_mode = ADC_10B;
  logic [11:0] word;
  logic        take;
  logic [1:0]  ser;
  int checks = 0, failures = 0;

  lane_serializer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] sent [$];
  int          nbits, last_take, cyc;
  logic [11:0] acc;
  bit          rx_on;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
  end

  task automatic run_mode(input adc_mode_e m, input int nwords);
    int wb, got;
    wb = (m == ADC_12B) ? 12 : 10;
    // switch mode at a word boundary
    @(negedge clk);
    while (!take) @(negedge clk);
    adc_mode = m;
    sent.delete();
    got = 0;
    word = 12'($urandom) & ((1 << wb) - 1);
    // Load happens at the end of this cycle; collect from the next cycle on.
    sent.push_back(word);
    acc = '0; nbits = 0; last_take = cyc;
    @(negedge clk);
    while (got < nwords) begin
      acc = {acc[9:0], ser};
      nbits += 2;
      if (nbits == wb) begin
        checks++;
        if ((acc & 12'((1 << wb) - 1)) != sent[0]) begin
          failures++;
          $display("FAIL word %0d got %h exp %h", got, acc & ((1 << wb) - 1), sent[0]);
        end
        void'(sent.pop_front());
        got++; nbits = 0; acc = '0;
      end
      if (take) begin
        checks++;
        if (cyc - last_take != wb / 2) begin
          failures++; $display("FAIL word period %0d", cyc - last_take);
        end
        last_take = cyc;
        word = 12'($urandom) & ((1 << wb) - 1);
        sent.push_back(word);
        // the word just pushed is loaded at the end of this cycle
      end
      @(negedge clk);
    end
  endtask

  initial begin
    word = '0;
    cyc  = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_mode(ADC_10B, 200);
    run_mode(ADC_12B, 200);
    run_mode(ADC_10B, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
