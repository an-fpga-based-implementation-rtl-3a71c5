// tb_blm_surface_fpga -- end-to-end test of the surface-card processing with
// every parameter at its default.
//
// Sixteen channels receive random CFC counts and ADC samples every 210 clock
// cycles; bursts of high counts on chosen channels simulate beam losses. The
// testbench keeps its own model of the whole chain -- range correction and
// CFC/ADC merge per channel, the twelve running sums from prefix sums of the
// detector values, the threshold comparison for the present energy level and
// the maskable bits -- and after every scan compares the over-threshold flags,
// both beam permits and the scan latency. At the end it checks the logged
// maxima, the collimation buffer (frozen) and the post-mortem buffer
// (triggered), then forces an acquisition during a scan (overrun).
// Each mechanism is counted and one that never happened counts as a failure.
module tb_blm_surface_fpga;
  import blm_pkg::*;
  localparam int unsigned N_ACQ   = 3000;
  localparam int unsigned SPACING = 210;
  localparam int unsigned LAT     = 203;   // acq_valid to scan_done, in cycles
  localparam int unsigned TAW     = $clog2(32 * N_CH * N_RS);

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

  int checks = 0, failures = 0;
  // mechanisms
  int n_mask_only = 0, n_both = 0, n_restored = 0, n_clamp = 0, n_range_grow = 0;
  int n_energy_switch = 0, n_long_rs_over = 0, n_log = 0, n_coll = 0, n_pm = 0, n_overrun = 0;

  // ---------------- reference model ----------------
  localparam logic [N_CH-1:0] MASKABLE = 16'h00FF;
  int     mx [N_CH], mn [N_CH], prev [N_CH];
  longint pref [N_CH][$];
  int unsigned det_hist [N_CH][$];
  longint coll_hist [N_CH][$];
  longint logmax [N_CH][N_RS];
  int unsigned n_samp = 0;
  int unsigned cyc = 0, acq_cyc = 0;
  logic [N_CH-1:0] last_over = '0;

  function automatic sum_t thr_of(int unsigned lvl, int unsigned r);
    // the allowance per acquisition falls as the energy level rises and is
    // lower for the longer windows
    return sum_t'((longint'(rs_window(r)) * 4096 * (60 - lvl)) >> (r / 3));
  endfunction

  function automatic longint rs_model(int c, int unsigned k);
    int unsigned w, m, e, s;
    w = rs_window(k);
    m = rs_refresh(k);
    e = (n_samp / m) * m;
    s = (e > w) ? e - w : 0;
    return pref[c][e] - pref[c][s];
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  // model of range correction + merge, fed with what the design samples
  always @(posedge clk) if (rst_n && acq_valid) begin
    acq_cyc = cyc;
    for (int c = 0; c < N_CH; c++) begin
      int adc, rc, d, s, oldr;
      adc  = int'(acq_adc[c]);
      oldr = mx[c] - mn[c];
      if (adc > mx[c]) mx[c] = adc;
      if (adc < mn[c]) mn[c] = adc;
      if (n_samp > 0 && mx[c] - mn[c] > oldr) n_range_grow++;
      rc = (adc * (mx[c] - mn[c])) >> 12;
      d  = (prev[c] < 0) ? 0 : prev[c] - rc;
      d  = d & 12'hfff;
      if (d >= 2048) d -= 4096;
      s  = int'(acq_cnt[c]) * 4096 + d;
      if (s < 0) begin
        s = 0;
        n_clamp++;
      end
      prev[c] = rc;
      det_hist[c].push_back(s);
      pref[c].push_back(pref[c][pref[c].size()-1] + longint'(s));
    end
    n_samp++;
    if (n_samp % 16 == 0)
      for (int c = 0; c < N_CH; c++) coll_hist[c].push_back(rs_model(c, 3));
  end

  // after every scan: over flags, permits, latency, logged maxima
  always @(posedge clk) if (rst_n && scan_done) begin
    logic [N_CH-1:0] exp_over;
    logic exp_pm, exp_pu;
    exp_over = '0;
    for (int c = 0; c < N_CH; c++)
      for (int k = 0; k < N_RS; k++) begin
        longint v;
        v = rs_model(c, k);
        if (v > logmax[c][k]) logmax[c][k] = v;
        if (v > 64'(thr_of(energy_level, k))) begin
          exp_over[c] = 1'b1;
          if (k >= 6) n_long_rs_over++;
        end
      end
    exp_pm = ~|exp_over;
    exp_pu = ~|(exp_over & ~MASKABLE);
    checks += 4;
    if (cyc - acq_cyc != LAT) begin
      failures++;
      $display("scan latency %0d", cyc - acq_cyc);
    end
    if (over !== exp_over) begin
      failures++;
      if (failures < 20) $display("acq %0d over %h exp %h", n_samp, over, exp_over);
    end
    if (permit_maskable !== exp_pm || permit_unmaskable !== exp_pu) begin
      failures++;
      if (failures < 20) $display("acq %0d permits %b%b exp %b%b", n_samp,
                                  permit_maskable, permit_unmaskable, exp_pm, exp_pu);
    end
    if (!exp_pm && exp_pu) n_mask_only++;
    if (!exp_pu) n_both++;
    if (last_over != '0 && exp_over == '0) n_restored++;
    last_over = exp_over;
  end

  initial begin
    repeat (N_ACQ * SPACING + 200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic acquire(input int loss_ch, input int loss_cnt);
    for (int c = 0; c < N_CH; c++) begin
      acq_cnt[c] = (c == loss_ch) ? CNT_W'(loss_cnt) : CNT_W'($urandom_range(0, 3));
      acq_adc[c] = ADC_W'(1000 + $urandom_range(0, 400 + 5 * c) + ((n_samp > 500) ? $urandom_range(0, 1500) : 0));
    end
    acq_valid <= 1;
    @(posedge clk);
    acq_valid <= 0;
    repeat (SPACING - 1) @(posedge clk);
  endtask

  initial begin
    for (int c = 0; c < N_CH; c++) begin
      mx[c] = 0;
      mn[c] = 4095;
      prev[c] = -1;
      pref[c].push_back(0);
      acq_cnt[c] = '0;
      acq_adc[c] = '0;
      for (int k = 0; k < N_RS; k++) logmax[c][k] = -(64'sd1 << 62);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // load the threshold tables and the maskable bits
    for (int unsigned a = 0; a < 32 * N_CH * N_RS; a++) begin
      thr_wr_en   <= 1;
      thr_wr_addr <= TAW'(a);
      thr_wr_data <= thr_of(a / (N_CH * N_RS), a % N_RS);
      @(posedge clk);
    end
    thr_wr_en <= 0;
    mask_we   <= 1;
    mask_data <= MASKABLE;
    @(posedge clk);
    mask_we   <= 0;
    @(posedge clk);

    for (int unsigned i = 0; i < N_ACQ; i++) begin
      int ch, cnt;
      // losses: short spikes, then a long moderate loss that only the
      // long windows see; channel 3 is maskable, channel 12 is not
      ch = -1;
      cnt = 0;
      if (i % 400 >= 100 && i % 400 < 103) begin
        ch  = (i % 800 < 400) ? 3 : 12;
        cnt = 200;
      end
      if (i >= 2000 && i < 2600) begin
        ch  = 9;
        cnt = 40;
      end
      if (i == 1500) begin
        energy_level <= 5'd20;
        n_energy_switch++;
      end
      if (i == 1000) begin
        log_strobe <= 1;          // start a fresh logging period
        @(posedge clk);
        log_strobe <= 0;
        for (int c = 0; c < N_CH; c++)
          for (int k = 0; k < N_RS; k++) logmax[c][k] = -(64'sd1 << 62);
      end
      acquire(ch, cnt);
    end
    repeat (10) @(posedge clk);

    // logged maxima since acquisition 1000
    log_strobe <= 1;
    @(posedge clk);
    log_strobe <= 0;
    @(posedge clk);
    checks++;
    if (!log_valid) failures++;
    for (int c = 0; c < N_CH; c++)
      for (int k = 0; k < N_RS; k++) begin
        log_rd_ch <= CH_W'(c);
        log_rd_rs <= RS_W'(k);
        @(negedge clk);
        checks++;
        n_log++;
        if (64'(log_rd_value) != logmax[c][k]) begin
          failures++;
          if (failures < 20) $display("log ch %0d rs %0d got %0d exp %0d", c, k, log_rd_value, logmax[c][k]);
        end
      end

    // collimation data, frozen while read
    coll_freeze <= 1;
    checks++;
    if (coll_count != 6'd32) failures++;
    for (int c = 0; c < N_CH; c++)
      for (int a = 0; a < 32; a++) begin
        coll_rd_ch  <= CH_W'(c);
        coll_rd_age <= 5'(a);
        @(posedge clk);
        @(negedge clk);
        checks++;
        n_coll++;
        if (64'(coll_rd_value) != coll_hist[c][coll_hist[c].size() - 1 - a]) begin
          failures++;
          if (failures < 20) $display("coll ch %0d age %0d got %0d exp %0d", c, a, coll_rd_value,
                                      coll_hist[c][coll_hist[c].size() - 1 - a]);
        end
      end
    coll_freeze <= 0;

    // post mortem: trigger, then read the newest 500 acquisitions
    pm_trigger <= 1;
    @(posedge clk);
    pm_trigger <= 0;
    acquire(-1, 0);           // must not be recorded
    checks++;
    if (!pm_frozen) failures++;
    for (int c = 0; c < N_CH; c++)
      for (int a = 0; a < 500; a++) begin
        pm_rd_ch  <= CH_W'(c);
        pm_rd_age <= 16'(a);
        @(posedge clk);
        @(negedge clk);
        checks++;
        n_pm++;
        if (32'(pm_rd_value) != det_hist[c][det_hist[c].size() - 2 - a]) begin
          failures++;
          if (failures < 20) $display("pm ch %0d age %0d got %0d", c, a, pm_rd_value);
        end
      end

    // an acquisition that arrives while the previous scan is still running
    checks++;
    if (overrun) failures++;
    acq_valid <= 1;
    @(posedge clk);
    acq_valid <= 0;
    repeat (100) @(posedge clk);
    acq_valid <= 1;
    @(posedge clk);
    acq_valid <= 0;
    repeat (SPACING) @(posedge clk);
    if (overrun) n_overrun++;

    $display("mechanisms: maskable-only drop %0d, both drop %0d, restored %0d, clamp %0d, range growth %0d",
             n_mask_only, n_both, n_restored, n_clamp, n_range_grow);
    $display("            energy switch %0d, long-window over %0d, log reads %0d, collimation reads %0d, pm reads %0d, overrun %0d",
             n_energy_switch, n_long_rs_over, n_log, n_coll, n_pm, n_overrun);
    checks++;
    if (n_mask_only == 0 || n_both == 0 || n_restored == 0 || n_clamp == 0 || n_range_grow == 0 ||
        n_energy_switch == 0 || n_long_rs_over == 0 || n_log == 0 || n_coll == 0 || n_pm == 0 ||
        n_overrun == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
