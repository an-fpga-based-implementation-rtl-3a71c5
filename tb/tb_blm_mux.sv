// tb_blm_mux -- checks the scan order, values, first/last markers and refresh
// flags of the multiplexer stream, the scan length of N_CH*N_RS cycles, and
// that a new acquisition during a scan sets the overrun flag.
module tb_blm_mux;
  import blm_pkg::*;
  logic            clk = 0, rst_n = 0;
  logic            in_valid = 0;
  sum_t            rs_i [N_CH][N_RS];
  logic [N_RS-1:0] refresh_i = '0;
  logic            o_valid, o_first, o_last, o_refresh, overrun_o;
  logic [CH_W-1:0] o_ch;
  logic [RS_W-1:0] o_rs;
  sum_t            o_value;
  int checks = 0, failures = 0;
  int idx = 0;
  bit check_on = 1;

  blm_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input int seed);
    for (int c = 0; c < N_CH; c++)
      for (int r = 0; r < N_RS; r++)
        rs_i[c][r] = sum_t'(seed * 1000 + c * 16 + r) - sum_t'(500);
    refresh_i = N_RS'(seed * 37 + 1);
  endtask

  // Expected stream entry idx: channel idx / N_RS, period idx % N_RS.
  always @(posedge clk) if (rst_n && o_valid && check_on) begin
    int c, r;
    c = idx / N_RS;
    r = idx % N_RS;
    checks++;
    if (32'(o_ch) != c || 32'(o_rs) != r || o_value != rs_i[c][r] ||
        o_refresh != refresh_i[r] || o_first != (idx == 0) ||
        o_last != (idx == N_CH * N_RS - 1)) begin
      failures++;
      $display("entry %0d: ch %0d rs %0d value %0d", idx, o_ch, o_rs, o_value);
    end
    idx++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 3; s++) begin
      fill(s);
      idx = 0;
      @(posedge clk);
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      repeat (N_CH * N_RS + 5) @(posedge clk);
      checks++;
      if (idx != N_CH * N_RS) begin
        failures++;
        $display("scan %0d had %0d entries", s, idx);
      end
    end
    checks++;
    if (overrun_o) failures++;
    // acquisition arriving in the middle of a scan
    check_on = 0;
    in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
    repeat (20) @(posedge clk);
    in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
    repeat (N_CH * N_RS + 5) @(posedge clk);
    checks++;
    if (!overrun_o) begin
      failures++;
      $display("overrun not flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
