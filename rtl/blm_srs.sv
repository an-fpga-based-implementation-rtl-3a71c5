// blm_srs -- Successive Running Sums of one detector channel: twelve
// integration periods, from one 40 us acquisition to 2^21 of them (84 s).
//
// Long windows are not built from long histories. Instead running-sum stages
// are cascaded: the longest sum of one stage, taken once every time its window
// has been completely renewed, is the input of the next stage. The next stage
// therefore stores one value where the first stage stores thousands, and its
// sums are sums of consecutive, non-overlapping sub-sums. The gating of the
// next stage's input (the "read delay") is a counter of the stage's updates.
//
// RS0 is the detector value itself; RS1..RS11 come from six blm_running_sum
// stages whose tap lengths are listed in blm_pkg. The cascade, the use of a
// stage's running sum as the next stage's input, the multipoint shift
// registers and the 12 periods from 40 us to 84 s follow the description; the
// intermediate windows and the 41-bit sum width are this design's own.
//
// Interface: in_valid/in_det once per acquisition, at least N_STAGES
// cycles apart (an assertion checks this). N_STAGES cycles after in_valid,
// out_valid pulses; rs_o then holds all twelve sums (stable until the next
// acquisition) and refresh_o[k] tells whether RS k took a new value in this
// acquisition.
module blm_srs
  import blm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [DET_W-1:0] in_det,
  output logic             out_valid,
  output sum_t             rs_o [N_RS],
  output logic [N_RS-1:0]  refresh_o
);

  logic                 st_en  [N_STAGES+1];
  sum_t                 st_in  [N_STAGES+1];
  logic [N_STAGES-1:0]  upd_q;
  logic [N_STAGES-1:0]  vdly;
  det_t                 det_q;

  assign st_en[0] = in_valid;
  assign st_in[0] = sum_t'({1'b0, in_det});

  for (genvar s = 0; s < N_STAGES; s++) begin : g_stage
    localparam int unsigned NT    = stage_ntaps(s);
    localparam int unsigned T0    = stage_tap(s, 0);
    localparam int unsigned T1    = stage_tap(s, 1);
    localparam int unsigned TLAST = stage_tap(s, NT-1);
    localparam int unsigned FIRST = stage_first_rs(s);

    sum_t sums [NT];
    logic valid_unused;
    localparam int unsigned CW = $clog2(TLAST+1);
    logic [CW-1:0] cnt_q;
    logic fire_q;

    blm_running_sum #(.W(SUM_W), .NTAPS(NT), .TAP0(T0), .TAP1(T1)) u_rs (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_en    (st_en[s]),
      .in_data  (st_in[s]),
      .out_valid(valid_unused),
      .sum_o    (sums)
    );

    // Read delay: pass the longest sum on after every TLAST updates, when its
    // window holds only values the next stage has not yet seen.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt_q  <= '0;
        fire_q <= 1'b0;
      end else begin
        fire_q <= st_en[s] && (cnt_q == CW'(TLAST-1));
        if (st_en[s]) cnt_q <= (cnt_q == CW'(TLAST-1)) ? '0 : cnt_q + 1'b1;
      end
    end

    assign st_en[s+1] = fire_q;
    assign st_in[s+1] = sums[NT-1];

    for (genvar t = 0; t < NT; t++) begin : g_out
      assign rs_o[FIRST+t]      = sums[t];
      assign refresh_o[FIRST+t] = upd_q[s];
    end
  end

  // Which stages took a new value during the current acquisition.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_q <= '0;
      vdly  <= '0;
      det_q <= '0;
    end else begin
      vdly <= {vdly[N_STAGES-2:0], in_valid};
      if (in_valid) det_q <= in_det;
      for (int unsigned s = 0; s < N_STAGES; s++) begin
        if (st_en[s])      upd_q[s] <= 1'b1;
        else if (in_valid) upd_q[s] <= 1'b0;
      end
    end
  end

  // Rule of the interface: a new acquisition only once the cascade has
  // settled from the previous one.
  always @(posedge clk) begin
    if (in_valid)
      assert (vdly[N_STAGES-2:0] == '0)
        else $error("blm_srs: acquisitions closer than %0d cycles", N_STAGES);
  end

  assign rs_o[0]      = sum_t'({1'b0, det_q});
  assign refresh_o[0] = 1'b1;
  assign out_valid    = vdly[N_STAGES-1];

endmodule
