// tb_blm_data_combine -- checks the CFC/ADC merge against a reference model:
// range-corrected ADC (min/max tracking, product, 12 LSBs cut), signed 12-bit
// difference previous - newest, count shifted up by 12 bits, negative results
// floored at 0, three-cycle latency.
module tb_blm_data_combine;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  logic [7:0]  in_cnt = '0;
  logic [11:0] in_adc = '0;
  logic        out_valid;
  logic [19:0] out_det;
  int checks = 0, failures = 0, clamps = 0;
  int mx = 0, mn = 4095, prev = -1;
  int exp_q [$];
  int unsigned cyc = 0, sent_cyc [$];

  blm_data_combine dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, fed with what the block samples.
  always @(posedge clk) if (rst_n && in_valid) begin
    int rc, d, s, adc, cnt;
    adc = int'(in_adc);
    cnt = int'(in_cnt);
    if (adc > mx) mx = adc;
    if (adc < mn) mn = adc;
    rc = (adc * (mx - mn)) >> 12;
    d  = (prev < 0) ? 0 : prev - rc;
    // the difference is a 12-bit two's complement number
    d  = d & 12'hfff;
    if (d >= 2048) d -= 4096;
    s  = cnt * 4096 + d;
    if (s < 0) begin
      s = 0;
      clamps++;
    end
    prev = rc;
    exp_q.push_back(s);
    sent_cyc.push_back(cyc);
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
    end else begin
      int e;
      int unsigned c0;
      e  = exp_q.pop_front();
      c0 = sent_cyc.pop_front();
      if (out_det !== 20'(e) || cyc - c0 != 3) begin
        failures++;
        $display("mismatch: got %0d exp %0d latency %0d", out_det, e, cyc - c0);
      end
    end
  end

  task automatic send(input int cnt, input int adc);
    in_valid <= 1;
    in_cnt   <= 8'(cnt);
    in_adc   <= 12'(adc);
    @(posedge clk);
    in_valid <= 0;
    repeat ($urandom_range(1, 4)) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send(0, 4095);
    send(0, 0);
    for (int i = 0; i < 1000; i++)
      send($urandom_range(0, 255), $urandom_range(0, 4095));
    for (int i = 0; i < 200; i++)
      send($urandom_range(0, 2), $urandom_range(0, 4095));
    send(255, 4095);
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || clamps == 0) begin
      failures++;
      $display("left %0d clamps %0d", exp_q.size(), clamps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
