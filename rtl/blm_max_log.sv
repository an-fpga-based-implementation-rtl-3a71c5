// blm_max_log -- maximum values of every running sum for on-line logging.
//
// The logging system reads the card once per logging period (1 s). Between
// two reads, this block keeps for every channel and every integration period
// the largest sum that the multiplexer presented. A log_strobe copies all
// maxima into a snapshot that the reader can address at leisure, and starts
// the next period afresh with the next sum seen.
//
// Keeping maxima for logging at a 1 Hz rate follows the description; the
// snapshot-and-restart on the strobe and the read port are this design's
// own.
//
// Interface: the stream from blm_mux; log_strobe (one cycle, typically once
// per second); rd_ch/rd_rs select a snapshot entry, shown combinationally on
// rd_value. snap_valid_o tells whether the snapshot has seen any sum.
module blm_max_log
  import blm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            s_valid,
  input  logic [CH_W-1:0] s_ch,
  input  logic [RS_W-1:0] s_rs,
  input  sum_t            s_value,
  input  logic            log_strobe,
  input  logic [CH_W-1:0] rd_ch,
  input  logic [RS_W-1:0] rd_rs,
  output sum_t            rd_value,
  output logic            snap_valid_o
);

  localparam sum_t MOST_NEG = {1'b1, {(SUM_W-1){1'b0}}};

  sum_t max_q  [N_CH][N_RS];
  sum_t snap_q [N_CH][N_RS];
  logic seen_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++)
        for (int r = 0; r < N_RS; r++) begin
          max_q[c][r]  <= MOST_NEG;
          snap_q[c][r] <= '0;
        end
      seen_q       <= 1'b0;
      snap_valid_o <= 1'b0;
    end else begin
      if (log_strobe) begin
        snap_q       <= max_q;
        snap_valid_o <= seen_q;
        seen_q       <= 1'b0;
      end else if (s_valid) begin
        seen_q <= 1'b1;
      end
      for (int c = 0; c < N_CH; c++)
        for (int r = 0; r < N_RS; r++)
          if (s_valid && 32'(s_ch) == c && 32'(s_rs) == r &&
              (log_strobe || s_value > max_q[c][r]))
            max_q[c][r] <= s_value;
          else if (log_strobe)
            max_q[c][r] <= MOST_NEG;
    end
  end

  assign rd_value = snap_q[rd_ch][rd_rs];

endmodule
