// blm_threshold_comparator -- compares every running sum with its threshold
// and drives the two beam permit lines.
//
// For each entry of the multiplexer's stream the comparator reads the
// threshold of that channel, period and present beam-energy level from the
// tables and, one cycle later, checks whether the sum exceeds it. Over one
// scan it collects which channels exceeded any of their thresholds. At the end
// of the scan the maskable permit is removed if any channel exceeded, and the
// unmaskable permit if a channel that is not maskable exceeded. Permits are
// re-evaluated on every scan (they are not latched here).
//
// Comparison with channel- and energy-dependent thresholds, channel masking
// and the two permit outputs follow the description; the rule that ties the
// maskable bit to the two permits is this design's own.
//
// Interface: the stream from blm_mux; thr_addr_o to blm_tables and thr_i from
// it (one-cycle read); energy_level is sampled at the start of a scan.
// permit outputs and over_o update one cycle after the last stream entry;
// scan_done_o pulses then.
module blm_threshold_comparator
  import blm_pkg::*;
#(
  parameter int unsigned N_LEVELS = 32,
  localparam int unsigned LVL_W   = $clog2(N_LEVELS),
  localparam int unsigned AW      = $clog2(N_LEVELS * N_CH * N_RS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             s_valid,
  input  logic             s_first,
  input  logic             s_last,
  input  logic [CH_W-1:0]  s_ch,
  input  logic [RS_W-1:0]  s_rs,
  input  sum_t             s_value,
  input  logic [LVL_W-1:0] energy_level,
  output logic [AW-1:0]    thr_addr_o,
  input  sum_t             thr_i,
  input  logic [N_CH-1:0]  maskable_i,
  output logic             permit_maskable_o,
  output logic             permit_unmaskable_o,
  output logic [N_CH-1:0]  over_o,
  output logic             scan_done_o
);

  logic [LVL_W-1:0] lvl_q;
  logic [LVL_W-1:0] lvl;
  logic             v_q, first_q, last_q;
  logic [CH_W-1:0]  ch_q;
  sum_t             value_q;
  logic [N_CH-1:0]  over_acc, over_next;

  // The level is frozen for a whole scan.
  assign lvl        = s_first ? energy_level : lvl_q;
  assign thr_addr_o = AW'((32'(lvl) * N_CH + 32'(s_ch)) * N_RS + 32'(s_rs));

  always_comb begin
    over_next = first_q ? '0 : over_acc;
    if (v_q && value_q > thr_i) over_next[ch_q] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lvl_q               <= '0;
      v_q                 <= 1'b0;
      first_q             <= 1'b0;
      last_q              <= 1'b0;
      ch_q                <= '0;
      value_q             <= '0;
      over_acc            <= '0;
      over_o              <= '0;
      permit_maskable_o   <= 1'b0;
      permit_unmaskable_o <= 1'b0;
      scan_done_o         <= 1'b0;
    end else begin
      if (s_valid && s_first) lvl_q <= energy_level;
      v_q         <= s_valid;
      first_q     <= s_valid && s_first;
      last_q      <= s_valid && s_last;
      ch_q        <= s_ch;
      value_q     <= s_value;
      scan_done_o <= 1'b0;
      if (v_q) over_acc <= over_next;
      if (v_q && last_q) begin
        over_o              <= over_next;
        permit_maskable_o   <= ~|over_next;
        permit_unmaskable_o <= ~|(over_next & ~maskable_i);
        scan_done_o         <= 1'b1;
      end
    end
  end

endmodule
