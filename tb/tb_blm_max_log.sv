// tb_blm_max_log -- streams random sums (negative ones included) into the
// maximum logger over several logging periods and checks every snapshot entry
// against the maxima kept by the testbench.
module tb_blm_max_log;
  import blm_pkg::*;
  logic            clk = 0, rst_n = 0;
  logic            s_valid = 0;
  logic [CH_W-1:0] s_ch = '0, rd_ch = '0;
  logic [RS_W-1:0] s_rs = '0, rd_rs = '0;
  sum_t            s_value = '0, rd_value;
  logic            log_strobe = 0, snap_valid_o;
  int checks = 0, failures = 0;
  longint mx [N_CH][N_RS];

  blm_max_log dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_model();
    for (int c = 0; c < N_CH; c++)
      for (int r = 0; r < N_RS; r++) mx[c][r] = -(64'sd1 << 62);
  endtask

  initial begin
    clear_model();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int period = 0; period < 4; period++) begin
      for (int s = 0; s < 5 + period; s++)
        for (int c = 0; c < N_CH; c++)
          for (int r = 0; r < N_RS; r++) begin
            longint v;
            v = longint'($urandom_range(0, 2000000)) - 1000000 + longint'(period) * 300000;
            s_valid <= 1;
            s_ch    <= CH_W'(c);
            s_rs    <= RS_W'(r);
            s_value <= sum_t'(v);
            if (v > mx[c][r]) mx[c][r] = v;
            @(posedge clk);
          end
      s_valid    <= 0;
      log_strobe <= 1;
      @(posedge clk);
      log_strobe <= 0;
      @(posedge clk);
      checks++;
      if (!snap_valid_o) failures++;
      for (int c = 0; c < N_CH; c++)
        for (int r = 0; r < N_RS; r++) begin
          rd_ch <= CH_W'(c);
          rd_rs <= RS_W'(r);
          @(negedge clk);
          checks++;
          if (64'(rd_value) != mx[c][r]) begin
            failures++;
            $display("period %0d ch %0d rs %0d got %0d exp %0d", period, c, r, rd_value, mx[c][r]);
          end
        end
      clear_model();
    end
    // a period with no data leaves the snapshot marked invalid
    log_strobe <= 1;
    @(posedge clk);
    log_strobe <= 0;
    @(posedge clk);
    checks++;
    if (snap_valid_o) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
