// blm_collimation -- collimation data buffer: the last 20.48 ms of every
// detector as 32 consecutive 640 us sums.
//
// For setting up and aligning collimators the last 20.48 ms of losses are
// wanted on request. The 640 us running sum (RS3, 16 acquisitions) takes a
// new, non-overlapping value every 16 acquisitions; this block stores each
// such value of every channel in a circular buffer of 32 entries per channel.
// While freeze is high no entry is written, so that a reader sees one
// consistent 20.48 ms picture.
//
// The 32 x 640 us content follows the description; taking the sums from RS3,
// the circular buffer and the freeze input are this design's own.
//
// Interface: the stream from blm_mux; freeze; rd_ch and rd_age (0 = newest)
// select an entry, rd_value follows one clock later. count_o is the number of
// entries written per channel since reset, saturating at N_SUMS.
module blm_collimation
  import blm_pkg::*;
#(
  parameter int unsigned N_SUMS  = 32,
  parameter int unsigned COLL_RS = 3,
  localparam int unsigned DECIM  = rs_window(COLL_RS) / rs_refresh(COLL_RS),
  localparam int unsigned IW     = $clog2(N_SUMS),
  localparam int unsigned PW     = (DECIM > 1) ? $clog2(DECIM) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            s_valid,
  input  logic [CH_W-1:0] s_ch,
  input  logic [RS_W-1:0] s_rs,
  input  sum_t            s_value,
  input  logic            s_refresh,
  input  logic            freeze,
  input  logic [CH_W-1:0] rd_ch,
  input  logic [IW-1:0]   rd_age,
  output sum_t            rd_value,
  output logic [IW:0]     count_o
);

  sum_t          mem [N_CH * N_SUMS];
  logic [IW-1:0] wp_q;       // slot written in the current 640 us period
  logic          upd;        // a refreshed COLL_RS entry in the stream
  logic          wr;
  logic [PW-1:0] phase_q;    // refreshes since the last stored one
  logic [IW-1:0] rd_slot;

  assign upd     = s_valid && s_refresh && 32'(s_rs) == COLL_RS;
  assign wr      = upd && 32'(phase_q) == DECIM - 1 && !freeze;
  assign rd_slot = wp_q - IW'(1) - rd_age;

  always_ff @(posedge clk) begin
    if (wr) mem[32'(s_ch) * N_SUMS + 32'(wp_q)] <= s_value;
    rd_value <= mem[32'(rd_ch) * N_SUMS + 32'(rd_slot)];
  end

  // The phase and the slot pointer advance after the last channel.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q    <= '0;
      count_o <= '0;
      phase_q <= '0;
    end else if (upd && s_ch == CH_W'(N_CH-1)) begin
      phase_q <= (32'(phase_q) == DECIM - 1) ? '0 : phase_q + 1'b1;
      if (wr) begin
        wp_q <= wp_q + 1'b1;
        if (count_o != (IW+1)'(N_SUMS)) count_o <= count_o + 1'b1;
      end
    end
  end

endmodule
