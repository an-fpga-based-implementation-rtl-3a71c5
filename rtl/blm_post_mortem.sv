// blm_post_mortem -- post-mortem buffer of the acquired detector data.
//
// After a beam dump the last 20,000 LHC turns of acquired data of every
// detector are wanted. This block keeps the 40 us detector values (RS0) of
// all channels in a circular buffer deep enough for 20,000 turns: with one
// turn lasting 88.924 us that is 44,462 acquisitions. A trigger freezes the
// buffer, so that its contents can be read out, until it is released.
//
// The 20,000-turn depth follows the description (the turn period is the LHC
// revolution time, not stated there). The buffer is written here as an array;
// on the card it lives in an external SRAM, whose interface is not described.
// The averages over up to 40 minutes that also belong to post-mortem data are
// not built. Freeze/release and the read port are this design's own.
//
// Interface: the stream from blm_mux; trigger freezes writing (sticky),
// release resumes it. rd_ch/rd_age (0 = newest) select an entry; rd_value
// follows one clock later. frozen_o shows the state.
module blm_post_mortem
  import blm_pkg::*;
#(
  parameter int unsigned DEPTH = 44462,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            s_valid,
  input  logic [CH_W-1:0] s_ch,
  input  logic [RS_W-1:0] s_rs,
  input  sum_t            s_value,
  input  logic            trigger,
  input  logic            release_i,
  input  logic [CH_W-1:0] rd_ch,
  input  logic [AW-1:0]   rd_age,
  output det_t            rd_value,
  output logic            frozen_o
);

  det_t          mem [DEPTH * N_CH];
  logic [AW-1:0] wp_q;
  logic          wr;
  logic [AW-1:0] rd_slot;
  logic [AW:0]   back;

  assign wr = s_valid && s_rs == '0 && !frozen_o;

  // Slot of the entry rd_age acquisitions before the newest, modulo DEPTH.
  always_comb begin
    back    = {1'b0, wp_q} + (AW+1)'(DEPTH) - (AW+1)'(1) - {1'b0, rd_age};
    rd_slot = (back >= (AW+1)'(DEPTH)) ? AW'(back - (AW+1)'(DEPTH)) : AW'(back);
  end

  always_ff @(posedge clk) begin
    if (wr) mem[32'(wp_q) * N_CH + 32'(s_ch)] <= s_value[DET_W-1:0];
    rd_value <= mem[32'(rd_slot) * N_CH + 32'(rd_ch)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q     <= '0;
      frozen_o <= 1'b0;
    end else begin
      if (trigger)        frozen_o <= 1'b1;
      else if (release_i) frozen_o <= 1'b0;
      if (wr && s_ch == CH_W'(N_CH-1))
        wp_q <= (wp_q == AW'(DEPTH-1)) ? '0 : wp_q + 1'b1;
    end
  end

endmodule
