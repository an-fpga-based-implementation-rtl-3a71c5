// blm_adc_range -- ADC effective-range correction of one detector channel.
//
// The ADC that digitises the CFC integrator voltage does not use its full
// scale; the part it does use is found by tracking the smallest and the
// largest sample seen since reset. Their difference (the effective range) is
// multiplied by the sample, delayed so that it meets the range that already
// includes it, and the 12 least significant bits of the 24-bit product are cut
// off, leaving a 12-bit corrected value.
//
// Max and Min trackers, the subtraction A-B, the delay, the 12x12 -> 24-bit
// multiplication and the final cut of 12 LSBs follow the block diagram of the
// range correction. Reset values (max = 0, min = all ones) and the two-stage
// pipeline are this design's own.
//
// Interface: in_valid/in_adc once per acquisition; out_valid/out_adc two
// clock cycles later. range_o shows the current effective range.
module blm_adc_range #(
  parameter int unsigned ADC_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [ADC_W-1:0] in_adc,
  output logic             out_valid,
  output logic [ADC_W-1:0] out_adc,
  output logic [ADC_W-1:0] range_o
);

  logic [ADC_W-1:0]   max_q, min_q, adc_d;
  logic               v1;
  logic [2*ADC_W-1:0] product;

  // Stage 1: update the extremes and delay the sample by the same amount.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_q <= '0;
      min_q <= '1;
      adc_d <= '0;
      v1    <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        adc_d <= in_adc;
        if (in_adc > max_q) max_q <= in_adc;
        if (in_adc < min_q) min_q <= in_adc;
      end
    end
  end

  // Effective range; 0 until a sample has been seen.
  always_comb begin
    range_o = (max_q >= min_q) ? max_q - min_q : '0;
    product = adc_d * range_o;
  end

  // Stage 2: multiply and cut the 12 LSBs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_adc   <= '0;
    end else begin
      out_valid <= v1;
      if (v1) out_adc <= product[2*ADC_W-1:ADC_W];
    end
  end

endmodule
