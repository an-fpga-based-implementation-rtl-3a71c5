// tb_blm_threshold_comparator -- drives scans of N_CH*N_RS entries into the
// comparator, answers its table reads from a model of the threshold memory
// (threshold = function of channel, period and energy level, one-cycle read)
// and checks the per-channel over flags and both beam permits after each
// scan: no loss, a loss on a maskable channel, a loss on an unmaskable one,
// and a loss that exceeds only at another energy level.
module tb_blm_threshold_comparator;
  import blm_pkg::*;
  localparam int unsigned AW = $clog2(32 * N_CH * N_RS);
  logic            clk = 0, rst_n = 0;
  logic            s_valid = 0, s_first = 0, s_last = 0;
  logic [CH_W-1:0] s_ch = '0;
  logic [RS_W-1:0] s_rs = '0;
  sum_t            s_value = '0;
  logic [4:0]      energy_level = '0;
  logic [AW-1:0]   thr_addr_o;
  sum_t            thr_i;
  logic [N_CH-1:0] maskable_i = '0;
  logic            permit_maskable_o, permit_unmaskable_o, scan_done_o;
  logic [N_CH-1:0] over_o;
  int checks = 0, failures = 0;
  int n_mask_drop = 0, n_unmask_drop = 0;

  blm_threshold_comparator dut (.*);

  always #5 clk = ~clk;

  // threshold of (level, channel, period)
  function automatic sum_t thr_of(int unsigned lvl, int unsigned c, int unsigned r);
    return sum_t'(100000 * (r + 1) + 1000 * c + 50000 * (31 - lvl));
  endfunction

  always @(posedge clk) begin
    int unsigned a;
    a = thr_addr_o;
    thr_i <= thr_of(a / (N_CH * N_RS), (a / N_RS) % N_CH, a % N_RS);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One scan. Channel hot_ch gets, on period hot_rs, its threshold plus delta.
  task automatic scan(input int lvl, input int hot_ch, input int hot_rs, input int delta,
                      input logic [N_CH-1:0] maskable,
                      input logic [N_CH-1:0] exp_over, input logic exp_pm, input logic exp_pu);
    energy_level <= 5'(lvl);
    maskable_i   <= maskable;
    for (int c = 0; c < N_CH; c++)
      for (int r = 0; r < N_RS; r++) begin
        s_valid <= 1;
        s_first <= (c == 0 && r == 0);
        s_last  <= (c == N_CH - 1 && r == N_RS - 1);
        s_ch    <= CH_W'(c);
        s_rs    <= RS_W'(r);
        s_value <= (c == hot_ch && r == hot_rs) ? thr_of(lvl, c, r) + sum_t'(delta)
                                                : thr_of(lvl, c, r) - sum_t'(1 + r);
        @(posedge clk);
      end
    s_valid <= 0;
    s_first <= 0;
    s_last  <= 0;
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (!scan_done_o) failures++;
    checks += 3;
    if (over_o !== exp_over) begin
      failures++;
      $display("over %h exp %h", over_o, exp_over);
    end
    if (permit_maskable_o !== exp_pm) begin
      failures++;
      $display("maskable permit %b exp %b", permit_maskable_o, exp_pm);
    end
    if (permit_unmaskable_o !== exp_pu) begin
      failures++;
      $display("unmaskable permit %b exp %b", permit_unmaskable_o, exp_pu);
    end
    if (!permit_maskable_o) n_mask_drop++;
    if (!permit_unmaskable_o) n_unmask_drop++;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks += 2;
    if (permit_maskable_o || permit_unmaskable_o) failures++;  // no permit before a scan
    if (scan_done_o) failures++;
    // value exactly at threshold is not a loss
    scan(31, 3, 5, 0, '0, '0, 1, 1);
    // one above threshold on a maskable channel: maskable permit drops
    scan(31, 3, 5, 1, 16'h0008, 16'h0008, 0, 1);
    // same on an unmaskable channel: both permits drop
    scan(31, 3, 5, 1, 16'h0000, 16'h0008, 0, 0);
    // back to quiet
    scan(10, 0, 0, -5, 16'hffff, '0, 1, 1);
    // last channel, longest period, another energy level
    scan(7, 15, 11, 12345, 16'h7fff, 16'h8000, 0, 0);
    // a level whose table differs: value from level 31's table is below level 0's
    for (int i = 0; i < 10; i++) begin
      int ch, r, lvl;
      logic [N_CH-1:0] m;
      ch  = $urandom_range(0, N_CH - 1);
      r   = $urandom_range(0, N_RS - 1);
      lvl = $urandom_range(0, 31);
      m   = N_CH'($urandom);
      scan(lvl, ch, r, 1 + $urandom_range(0, 1000), m, N_CH'(1) << ch, 0, m[ch]);
    end
    checks++;
    if (n_mask_drop == 0 || n_unmask_drop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
