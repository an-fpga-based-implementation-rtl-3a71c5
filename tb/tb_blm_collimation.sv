// tb_blm_collimation -- streams scans into the collimation buffer, with the
// 640 us period (RS3) refreshed on every fourth scan, and checks that all 32
// ages of every channel read back the newest 32 stored RS3 sums -- every
// second refresh, as RS3 (16 acquisitions) refreshes every 8 -- that other
// periods and non-refreshed RS3 values are ignored, that the buffer wraps,
// and that freeze stops writing.
module tb_blm_collimation;
  import blm_pkg::*;
  logic            clk = 0, rst_n = 0;
  logic            s_valid = 0, s_refresh = 0, freeze = 0;
  logic [CH_W-1:0] s_ch = '0, rd_ch = '0;
  logic [RS_W-1:0] s_rs = '0;
  sum_t            s_value = '0, rd_value;
  logic [4:0]      rd_age = '0;
  logic [5:0]      count_o;
  int checks = 0, failures = 0;
  longint hist [N_CH][$];    // refreshed RS3 values written, newest last
  int n_frozen_scans = 0;
  int n_refresh = 0;         // refreshed scans seen, frozen or not

  blm_collimation dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_scan(input int s, input bit refreshed);
    for (int c = 0; c < N_CH; c++)
      for (int r = 0; r < N_RS; r++) begin
        longint v;
        v = longint'(s) * 100000 + c * 100 + r - 3000;
        s_valid   <= 1;
        s_ch      <= CH_W'(c);
        s_rs      <= RS_W'(r);
        s_value   <= sum_t'(v);
        s_refresh <= (r == 0) || (refreshed && r == 3) || (r == 1);
        if (refreshed && r == 3 && n_refresh % 2 == 1 && !freeze) hist[c].push_back(v);
        @(posedge clk);
      end
    s_valid <= 0;
    if (refreshed) n_refresh++;
    repeat (4) @(posedge clk);
  endtask

  task automatic check_all();
    for (int c = 0; c < N_CH; c++)
      for (int a = 0; a < 32 && a < hist[c].size(); a++) begin
        rd_ch  <= CH_W'(c);
        rd_age <= 5'(a);
        @(posedge clk);
        @(negedge clk);
        checks++;
        if (64'(rd_value) != hist[c][hist[c].size() - 1 - a]) begin
          failures++;
          if (failures < 10) $display("ch %0d age %0d got %0d exp %0d", c, a, rd_value,
                                      hist[c][hist[c].size() - 1 - a]);
        end
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int s = 0; s < 40; s++) do_scan(s, s % 4 == 3);
    checks++;
    if (count_o != 6'd5) failures++;
    check_all();
    for (int s = 40; s < 200; s++) do_scan(s, s % 4 == 3);
    checks++;
    if (count_o != 6'd25) failures++;
    check_all();
    // frozen: nothing changes
    freeze <= 1;
    @(posedge clk);
    for (int s = 200; s < 220; s++) begin
      do_scan(s, 1);
      n_frozen_scans++;
    end
    check_all();
    freeze <= 0;
    @(posedge clk);
    for (int s = 220; s < 240; s++) do_scan(s, 1);
    checks++;
    if (count_o != 6'd32) failures++;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
