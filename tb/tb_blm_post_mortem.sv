// tb_blm_post_mortem -- streams acquisitions into a post-mortem buffer made
// small (DEPTH = 50) so that it wraps several times, and checks every channel
// at every age against the stored history; a trigger must freeze the buffer
// until release.
module tb_blm_post_mortem;
  import blm_pkg::*;
  localparam int unsigned DEPTH = 50;
  localparam int unsigned AW = $clog2(DEPTH);
  logic            clk = 0, rst_n = 0;
  logic            s_valid = 0, trigger = 0, release_i = 0, frozen_o;
  logic [CH_W-1:0] s_ch = '0, rd_ch = '0;
  logic [RS_W-1:0] s_rs = '0;
  sum_t            s_value = '0;
  logic [AW-1:0]   rd_age = '0;
  det_t            rd_value;
  int checks = 0, failures = 0;
  int unsigned hist [N_CH][$];

  blm_post_mortem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_scan(input bit record);
    for (int c = 0; c < N_CH; c++)
      for (int r = 0; r < N_RS; r++) begin
        int unsigned v;
        v = $urandom_range(0, (1 << DET_W) - 1);
        s_valid <= 1;
        s_ch    <= CH_W'(c);
        s_rs    <= RS_W'(r);
        s_value <= sum_t'(v) + ((r == 0) ? sum_t'(0) : sum_t'(1) << 30);
        if (r == 0 && record) hist[c].push_back(v);
        @(posedge clk);
      end
    s_valid <= 0;
    @(posedge clk);
  endtask

  task automatic check_all();
    for (int c = 0; c < N_CH; c++)
      for (int a = 0; a < int'(DEPTH) && a < hist[c].size(); a++) begin
        rd_ch  <= CH_W'(c);
        rd_age <= AW'(a);
        @(posedge clk);
        @(negedge clk);
        checks++;
        if (32'(rd_value) != hist[c][hist[c].size() - 1 - a]) begin
          failures++;
          if (failures < 10) $display("ch %0d age %0d got %0d", c, a, rd_value);
        end
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int s = 0; s < 30; s++) do_scan(1);
    check_all();
    for (int s = 0; s < 137; s++) do_scan(1);
    check_all();
    trigger <= 1;
    @(posedge clk);
    trigger <= 0;
    @(posedge clk);
    checks++;
    if (!frozen_o) failures++;
    for (int s = 0; s < 20; s++) do_scan(0);
    check_all();
    release_i <= 1;
    @(posedge clk);
    release_i <= 0;
    @(posedge clk);
    checks++;
    if (frozen_o) failures++;
    for (int s = 0; s < 7; s++) do_scan(1);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
