// blm_mux -- serialises the running sums of all channels for the blocks that
// follow the processing (threshold comparison, maximum logging, collimation
// and post-mortem data).
//
// After each acquisition the sixteen channels hold twelve running sums each.
// The multiplexer walks through them, channel by channel and, within a
// channel, from RS0 to RS11, presenting one sum per clock cycle together with
// its channel and period numbers and whether that sum took a new value in
// this acquisition. A scan takes N_CH*N_RS = 192 cycles, far less than the
// 40 us between acquisitions at any usual FPGA clock.
//
// The block is named in the description of the surface FPGA; the scan order,
// the one-sum-per-cycle stream and the overrun flag are this design's own.
//
// Interface: in_valid starts a scan of rs_i/refresh_i, which must stay stable
// until the scan ends. Stream: o_valid, o_first (first entry of a scan),
// o_last (last entry), o_ch, o_rs, o_value, o_refresh. overrun_o is set, and
// stays set until reset, if a new acquisition arrives during a scan.
module blm_mux
  import blm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  sum_t            rs_i [N_CH][N_RS],
  input  logic [N_RS-1:0] refresh_i,
  output logic            o_valid,
  output logic            o_first,
  output logic            o_last,
  output logic [CH_W-1:0] o_ch,
  output logic [RS_W-1:0] o_rs,
  output sum_t            o_value,
  output logic            o_refresh,
  output logic            overrun_o
);

  logic            busy_q;
  logic [CH_W-1:0] ch_q;
  logic [RS_W-1:0] rs_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      ch_q      <= '0;
      rs_q      <= '0;
      overrun_o <= 1'b0;
    end else begin
      if (in_valid && busy_q) overrun_o <= 1'b1;
      if (in_valid) begin
        busy_q <= 1'b1;
        ch_q   <= '0;
        rs_q   <= '0;
      end else if (busy_q) begin
        if (rs_q == RS_W'(N_RS-1)) begin
          rs_q <= '0;
          if (ch_q == CH_W'(N_CH-1)) busy_q <= 1'b0;
          else                        ch_q   <= ch_q + 1'b1;
        end else begin
          rs_q <= rs_q + 1'b1;
        end
      end
    end
  end

  always_comb begin
    o_valid   = busy_q;
    o_first   = busy_q && ch_q == '0 && rs_q == '0;
    o_last    = busy_q && ch_q == CH_W'(N_CH-1) && rs_q == RS_W'(N_RS-1);
    o_ch      = ch_q;
    o_rs      = rs_q;
    o_value   = rs_i[ch_q][rs_q];
    o_refresh = refresh_i[rs_q];
  end

endmodule
