// blm_surface_fpga -- real-time processing of the Beam Loss Monitor surface
// card: 16 detector channels, twelve integration periods each, threshold
// comparison and the two beam permit lines, plus the logging, collimation and
// post-mortem data.
//
// Every 40 us each channel delivers a CFC count and an ADC sample (already
// received and checked from the optical links). Per channel, blm_data_combine
// merges them into a 20-bit detector value and blm_srs turns that value into
// twelve running sums from 40 us to 84 s. blm_mux then presents all 192 sums
// one per clock to four consumers: blm_threshold_comparator (with thresholds
// from blm_tables, chosen by channel, period and beam-energy level) removes
// the maskable and/or unmaskable beam permit; blm_max_log keeps the maxima
// for 1 Hz logging; blm_collimation keeps the last 32 x 640 us sums;
// blm_post_mortem keeps the last 20,000 turns of 40 us values.
//
// The arrangement of these blocks follows the description of the surface
// FPGA. Not built: the optical-link reception and checking (its output, the
// count/ADC pairs, enters through acq_*), the error and status reporting, and
// the VME interface (the tables, log, collimation and post-mortem ports are
// brought out as plain ports instead).
//
// Timing: acq_valid at most once per 200 clock cycles (the 40 us acquisition
// period is 1600 cycles at 40 MHz). The permits and over are updated, and
// scan_done is high, in the 203rd cycle after the one with acq_valid: 3 cycles
// of data combine, 6 of running sums, 1 to start the scan, 192 scan entries
// and 1 of comparison.
module blm_surface_fpga
  import blm_pkg::*;
#(
  parameter int unsigned N_LEVELS = 32,
  parameter int unsigned PM_DEPTH = 44462,
  localparam int unsigned LVL_W   = $clog2(N_LEVELS),
  localparam int unsigned TAW     = $clog2(N_LEVELS * N_CH * N_RS),
  localparam int unsigned PAW     = $clog2(PM_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // acquisitions (one strobe for all channels)
  input  logic             acq_valid,
  input  logic [CNT_W-1:0] acq_cnt [N_CH],
  input  logic [ADC_W-1:0] acq_adc [N_CH],
  // beam energy and tables
  input  logic [LVL_W-1:0] energy_level,
  input  logic             thr_wr_en,
  input  logic [TAW-1:0]   thr_wr_addr,
  input  sum_t             thr_wr_data,
  input  logic             mask_we,
  input  logic [N_CH-1:0]  mask_data,
  // beam permits
  output logic             permit_maskable,
  output logic             permit_unmaskable,
  output logic [N_CH-1:0]  over,
  output logic             scan_done,
  output logic             overrun,
  // logging (maxima)
  input  logic             log_strobe,
  input  logic [CH_W-1:0]  log_rd_ch,
  input  logic [RS_W-1:0]  log_rd_rs,
  output sum_t             log_rd_value,
  output logic             log_valid,
  // collimation
  input  logic             coll_freeze,
  input  logic [CH_W-1:0]  coll_rd_ch,
  input  logic [4:0]       coll_rd_age,
  output sum_t             coll_rd_value,
  output logic [5:0]       coll_count,
  // post mortem
  input  logic             pm_trigger,
  input  logic             pm_release,
  input  logic [CH_W-1:0]  pm_rd_ch,
  input  logic [PAW-1:0]   pm_rd_age,
  output det_t             pm_rd_value,
  output logic             pm_frozen
);

  logic            det_valid [N_CH];
  det_t            det       [N_CH];
  logic            srs_valid [N_CH];
  sum_t            rs        [N_CH][N_RS];
  logic [N_RS-1:0] refresh   [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    blm_data_combine #(.ADC_W(ADC_W), .CNT_W(CNT_W), .DET_W(DET_W)) u_combine (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (acq_valid),
      .in_cnt   (acq_cnt[c]),
      .in_adc   (acq_adc[c]),
      .out_valid(det_valid[c]),
      .out_det  (det[c])
    );

    blm_srs u_srs (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (det_valid[c]),
      .in_det   (det[c]),
      .out_valid(srs_valid[c]),
      .rs_o     (rs[c]),
      .refresh_o(refresh[c])
    );
  end

  // All channels run in lock step; channel 0's strobes stand for all.
  logic            m_valid, m_first, m_last, m_refresh;
  logic [CH_W-1:0] m_ch;
  logic [RS_W-1:0] m_rs;
  sum_t            m_value;

  blm_mux u_mux (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (srs_valid[0]),
    .rs_i     (rs),
    .refresh_i(refresh[0]),
    .o_valid  (m_valid),
    .o_first  (m_first),
    .o_last   (m_last),
    .o_ch     (m_ch),
    .o_rs     (m_rs),
    .o_value  (m_value),
    .o_refresh(m_refresh),
    .overrun_o(overrun)
  );

  logic [TAW-1:0]  thr_rd_addr;
  sum_t            thr;
  logic [N_CH-1:0] maskable;

  blm_tables #(.N_LEVELS(N_LEVELS)) u_tables (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (thr_wr_en),
    .wr_addr   (thr_wr_addr),
    .wr_data   (thr_wr_data),
    .rd_addr   (thr_rd_addr),
    .rd_data   (thr),
    .mask_we   (mask_we),
    .mask_data (mask_data),
    .maskable_o(maskable)
  );

  blm_threshold_comparator #(.N_LEVELS(N_LEVELS)) u_cmp (
    .clk                (clk),
    .rst_n              (rst_n),
    .s_valid            (m_valid),
    .s_first            (m_first),
    .s_last             (m_last),
    .s_ch               (m_ch),
    .s_rs               (m_rs),
    .s_value            (m_value),
    .energy_level       (energy_level),
    .thr_addr_o         (thr_rd_addr),
    .thr_i              (thr),
    .maskable_i         (maskable),
    .permit_maskable_o  (permit_maskable),
    .permit_unmaskable_o(permit_unmaskable),
    .over_o             (over),
    .scan_done_o        (scan_done)
  );

  blm_max_log u_log (
    .clk         (clk),
    .rst_n       (rst_n),
    .s_valid     (m_valid),
    .s_ch        (m_ch),
    .s_rs        (m_rs),
    .s_value     (m_value),
    .log_strobe  (log_strobe),
    .rd_ch       (log_rd_ch),
    .rd_rs       (log_rd_rs),
    .rd_value    (log_rd_value),
    .snap_valid_o(log_valid)
  );

  blm_collimation u_coll (
    .clk      (clk),
    .rst_n    (rst_n),
    .s_valid  (m_valid),
    .s_ch     (m_ch),
    .s_rs     (m_rs),
    .s_value  (m_value),
    .s_refresh(m_refresh),
    .freeze   (coll_freeze),
    .rd_ch    (coll_rd_ch),
    .rd_age   (coll_rd_age),
    .rd_value (coll_rd_value),
    .count_o  (coll_count)
  );

  blm_post_mortem #(.DEPTH(PM_DEPTH)) u_pm (
    .clk      (clk),
    .rst_n    (rst_n),
    .s_valid  (m_valid),
    .s_ch     (m_ch),
    .s_rs     (m_rs),
    .s_value  (m_value),
    .trigger  (pm_trigger),
    .release_i(pm_release),
    .rd_ch    (pm_rd_ch),
    .rd_age   (pm_rd_age),
    .rd_value (pm_rd_value),
    .frozen_o (pm_frozen)
  );

endmodule
