// blm_data_combine -- merges the CFC count and the ADC fraction of one
// detector channel into one 20-bit detector value per 40 us acquisition.
//
// The CFC counter tells how many whole charge quanta arrived during the last
// acquisition; the ADC tells the fraction left between the last count and the
// next. The difference of the last two (range-corrected) ADC values is that
// fraction for the last 40 us, so it is added to the count with the count
// moved up by 12 bits (12 zero LSBs appended). The ADC difference A-B, with A
// the held previous value and B the newest one, is a 12-bit signed number and
// is sign-extended to 20 bits before the addition.
//
// The range correction, the hold of the previous value, the 12-bit signed
// difference, the extension to 20 bits and the appended 12 LSBs follow the
// data-combine block diagram. This design's own choices: the previous value
// is taken equal to the first sample after reset (difference 0); the counter
// is delayed to meet the range-corrected ADC value; and, since an 8-bit count
// with 12 appended bits fills all 20 bits, the result is read as an unsigned
// value and a negative sum (count 0 with a negative difference) gives 0.
//
// Interface: in_valid with in_cnt and in_adc once per acquisition;
// out_valid/out_det three clock cycles later.
module blm_data_combine #(
  parameter int unsigned ADC_W = 12,
  parameter int unsigned CNT_W = 8,
  parameter int unsigned DET_W = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [CNT_W-1:0] in_cnt,
  input  logic [ADC_W-1:0] in_adc,
  output logic             out_valid,
  output logic [DET_W-1:0] out_det
);

  logic             rc_valid;
  logic [ADC_W-1:0] rc_adc;
  logic [ADC_W-1:0] range_unused;
  logic [CNT_W-1:0] cnt_d1, cnt_d2;
  logic [ADC_W-1:0] prev_q;   // held previous range-corrected value (A)
  logic             have_prev;

  logic signed [ADC_W-1:0] diff;
  logic signed [DET_W:0]   sum;

  blm_adc_range #(.ADC_W(ADC_W)) u_range (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_adc   (in_adc),
    .out_valid(rc_valid),
    .out_adc  (rc_adc),
    .range_o  (range_unused)
  );

  // Delay the count by the two cycles of the range correction.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_d1 <= '0;
      cnt_d2 <= '0;
    end else begin
      cnt_d1 <= in_cnt;
      cnt_d2 <= cnt_d1;
    end
  end

  always_comb begin
    diff = signed'(have_prev ? prev_q - rc_adc : '0);
    sum  = signed'({1'b0, cnt_d2, {(DET_W-CNT_W){1'b0}}})
         + (DET_W+1)'(diff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q    <= '0;
      have_prev <= 1'b0;
      out_valid <= 1'b0;
      out_det   <= '0;
    end else begin
      out_valid <= rc_valid;
      if (rc_valid) begin
        prev_q    <= rc_adc;
        have_prev <= 1'b1;
        out_det   <= sum[DET_W] ? '0 : sum[DET_W-1:0];
      end
    end
  end

endmodule
