// tb_blm_srs -- checks all twelve running sums and their refresh flags after
// every acquisition against prefix sums of the full input history. A sum of
// window W and refresh period M must equal the sum of the W newest samples
// ending at the last sample count that is a multiple of M. 2,100,000
// acquisitions reach the first refresh of RS11 (2^21 samples, 84 s); the
// output strobe must come N_STAGES cycles after the input strobe.
module tb_blm_srs;
  import blm_pkg::*;
  localparam int unsigned N_ACQ = 2100000;
  logic            clk = 0, rst_n = 0;
  logic            in_valid = 0;
  logic [DET_W-1:0] in_det = '0;
  logic            out_valid;
  sum_t            rs_o [N_RS];
  logic [N_RS-1:0] refresh_o;
  int checks = 0, failures = 0;
  longint pref [$];          // pref[n] = sum of the first n samples
  int unsigned n = 0;        // samples taken
  int unsigned refreshes [N_RS];
  int unsigned cyc = 0, in_cyc = 0;

  blm_srs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (N_ACQ * 12 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid) begin
    pref.push_back(pref[pref.size()-1] + longint'(in_det));
    n++;
    in_cyc = cyc;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (cyc - in_cyc != N_STAGES) begin
      failures++;
      $display("latency %0d", cyc - in_cyc);
    end
    for (int unsigned k = 0; k < N_RS; k++) begin
      int unsigned w, m, e, s;
      longint expv;
      w = rs_window(k);
      m = rs_refresh(k);
      e = (n / m) * m;
      s = (e > w) ? e - w : 0;
      expv = pref[e] - pref[s];
      checks += 2;
      if (64'(rs_o[k]) != expv) begin
        failures++;
        if (failures < 20) $display("n=%0d RS%0d got %0d exp %0d", n, k, rs_o[k], expv);
      end
      if (refresh_o[k] != (n % m == 0)) begin
        failures++;
        if (failures < 20) $display("n=%0d RS%0d refresh %b", n, k, refresh_o[k]);
      end
      if (refresh_o[k]) refreshes[k]++;
    end
  end

  initial begin
    pref.push_back(0);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int unsigned i = 0; i < N_ACQ; i++) begin
      in_valid <= 1;
      // mostly small values, some bursts up to full scale
      in_det <= (i % 50000 < 2000) ? DET_W'($urandom_range(0, (1 << DET_W) - 1))
                                : DET_W'($urandom_range(0, 4096));
      @(posedge clk);
      in_valid <= 0;
      repeat (N_STAGES + 1) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    // every period must have been refreshed at least once
    for (int k = 0; k < N_RS; k++) begin
      checks++;
      if (refreshes[k] == 0) begin
        failures++;
        $display("RS%0d never refreshed", k);
      end
    end
    $display("windows: %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d",
             rs_window(0), rs_window(1), rs_window(2), rs_window(3), rs_window(4),
             rs_window(5), rs_window(6), rs_window(7), rs_window(8), rs_window(9),
             rs_window(10), rs_window(11));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
