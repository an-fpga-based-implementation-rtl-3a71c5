// blm_running_sum -- one running-sum stage: a multipoint shift register with a
// subtract/accumulate running sum at each of its taps.
//
// A running sum over the last T input values is kept by adding, for every new
// value, the difference between the new value and the value that entered T
// values earlier; that older value is read from tap T of a shift register.
// The difference can be negative, so the accumulator is signed. One shift
// register of length max(TAP0, TAP1) serves up to two windows by reading it
// at two points (a multipoint shift register), so overlapping histories are
// stored once. Each accumulator always equals the sum of the newest T entries
// of the shift register, so it can itself feed the next stage.
//
// Subtract-then-accumulate, signed arithmetic and the multipoint shift
// register follow the description; the register-based shift register with a
// reset to zero and the two-tap limit are this design's own.
//
// Interface: in_en with in_data shifts one value in; the sums are updated on
// the same clock edge, so out_valid (one cycle after in_en) marks new sums.
module blm_running_sum #(
  parameter int unsigned W     = 42,
  parameter int unsigned NTAPS = 2,
  parameter int unsigned TAP0  = 2,
  parameter int unsigned TAP1  = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_en,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] sum_o [NTAPS]
);

  localparam int unsigned LEN = (NTAPS > 1 && TAP1 > TAP0) ? TAP1 : TAP0;

  logic signed [W-1:0] sr [LEN];
  logic signed [W-1:0] acc [NTAPS];

  function automatic int unsigned tap_of(int unsigned j);
    return (j == 0) ? TAP0 : TAP1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < LEN; i++) sr[i] <= '0;
      for (int unsigned j = 0; j < NTAPS; j++) acc[j] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_en;
      if (in_en) begin
        sr[0] <= in_data;
        for (int unsigned i = 1; i < LEN; i++) sr[i] <= sr[i-1];
        for (int unsigned j = 0; j < NTAPS; j++)
          acc[j] <= acc[j] + (in_data - sr[tap_of(j)-1]);
      end
    end
  end

  assign sum_o = acc;

  initial begin
    assert (TAP0 >= 1 && (NTAPS == 1 || TAP1 >= 1) && NTAPS >= 1 && NTAPS <= 2)
      else $error("blm_running_sum: bad tap configuration");
  end

endmodule
