// tb_blm_pm_20000_turns -- post-mortem workload at full size: 20,000 LHC turns
// of 40 us data (44,462 acquisitions) for all 16 channels.
//
// The whole surface-card design runs with default parameters for 44,600
// acquisitions, so that the post-mortem buffer fills and wraps. Thresholds
// are set out of reach, so the permits must stay high throughout. After a
// trigger the testbench reads back every one of the 44,462 stored ages of
// three channels and compares them with detector values computed by its own
// model of the range correction and CFC/ADC merge, which also proves that
// the 138 acquisitions beyond the depth were overwritten in order.
module tb_blm_pm_20000_turns;
  import blm_pkg::*;
  localparam int unsigned PM_DEPTH = 44462;
  localparam int unsigned N_ACQ    = 44600;
  localparam int unsigned SPACING  = 205;
  localparam int unsigned TAW      = $clog2(32 * N_CH * N_RS);

  logic             clk = 0, rst_n = 0;
  logic             acq_valid = 0;
  logic [CNT_W-1:0] acq_cnt [N_CH];
  logic [ADC_W-1:0] acq_adc [N_CH];
  logic [4:0]       energy_level = '0;
  logic             thr_wr_en = 0;
  logic [TAW-1:0]   thr_wr_addr = '0;
  sum_t             thr_wr_data = '0;
  logic             mask_we = 0;
  logic [N_CH-1:0]  mask_data = '0;
  logic             permit_maskable, permit_unmaskable, scan_done, overrun;
  logic [N_CH-1:0]  over;
  logic             log_strobe = 0, log_valid;
  logic [CH_W-1:0]  log_rd_ch = '0, coll_rd_ch = '0, pm_rd_ch = '0;
  logic [RS_W-1:0]  log_rd_rs = '0;
  sum_t             log_rd_value, coll_rd_value;
  logic             coll_freeze = 0;
  logic [4:0]       coll_rd_age = '0;
  logic [5:0]       coll_count;
  logic             pm_trigger = 0, pm_release = 0, pm_frozen;
  logic [15:0]      pm_rd_age = '0;
  det_t             pm_rd_value;

  blm_surface_fpga dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_scans = 0;
  int mx [N_CH], mn [N_CH], prev [N_CH];
  int unsigned det_hist [N_CH][$];

  always @(posedge clk) if (rst_n && acq_valid) begin
    for (int c = 0; c < N_CH; c++) begin
      int adc, rc, d, s;
      adc = int'(acq_adc[c]);
      if (adc > mx[c]) mx[c] = adc;
      if (adc < mn[c]) mn[c] = adc;
      rc = (adc * (mx[c] - mn[c])) >> 12;
      d  = (prev[c] < 0) ? 0 : prev[c] - rc;
      d  = d & 12'hfff;
      if (d >= 2048) d -= 4096;
      s  = int'(acq_cnt[c]) * 4096 + d;
      if (s < 0) s = 0;
      prev[c] = rc;
      det_hist[c].push_back(s);
    end
  end

  always @(posedge clk) if (rst_n && scan_done) begin
    n_scans++;
    checks++;
    if (!permit_maskable || !permit_unmaskable || overrun) failures++;
  end

  initial begin
    repeat (N_ACQ * SPACING + 3 * PM_DEPTH * 2 + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N_CH; c++) begin
      mx[c] = 0;
      mn[c] = 4095;
      prev[c] = -1;
      acq_cnt[c] = '0;
      acq_adc[c] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int unsigned a = 0; a < 32 * N_CH * N_RS; a++) begin
      thr_wr_en   <= 1;
      thr_wr_addr <= TAW'(a);
      thr_wr_data <= sum_t'(64'sd1 << 40);
      @(posedge clk);
    end
    thr_wr_en <= 0;
    for (int unsigned i = 0; i < N_ACQ; i++) begin
      for (int c = 0; c < N_CH; c++) begin
        acq_cnt[c] = CNT_W'($urandom_range(0, 255));
        acq_adc[c] = ADC_W'($urandom_range(0, 4095));
      end
      acq_valid <= 1;
      @(posedge clk);
      acq_valid <= 0;
      repeat (SPACING - 1) @(posedge clk);
    end
    pm_trigger <= 1;
    @(posedge clk);
    pm_trigger <= 0;
    for (int k = 0; k < 3; k++) begin
      int c;
      c = (k == 0) ? 0 : (k == 1) ? 7 : 15;
      for (int unsigned a = 0; a < PM_DEPTH; a++) begin
        pm_rd_ch  <= CH_W'(c);
        pm_rd_age <= 16'(a);
        @(posedge clk);
        @(negedge clk);
        checks++;
        if (32'(pm_rd_value) != det_hist[c][det_hist[c].size() - 1 - a]) begin
          failures++;
          if (failures < 10) $display("ch %0d age %0d got %0d", c, a, pm_rd_value);
        end
      end
    end
    checks++;
    if (n_scans != int'(N_ACQ)) failures++;
    $display("scans %0d, post-mortem ages checked per channel %0d", n_scans, PM_DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
