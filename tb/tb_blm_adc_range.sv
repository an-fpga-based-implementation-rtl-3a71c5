// tb_blm_adc_range -- checks the ADC range correction against a reference
// computed in the testbench: running min/max including the current sample,
// product of sample and range, upper 12 bits kept, two-cycle latency.
module tb_blm_adc_range;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0;
  logic [11:0] in_adc = '0;
  logic        out_valid;
  logic [11:0] out_adc, range_o;
  int checks = 0, failures = 0;
  int unsigned mx = 0, mn = 4095;
  int unsigned exp_q [$];
  int unsigned cyc = 0, sent_cyc [$];

  blm_adc_range dut (.*);

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
    int unsigned v;
    v = in_adc;
    if (v > mx) mx = v;
    if (v < mn) mn = v;
    exp_q.push_back(((v * (mx - mn)) >> 12) & 12'hfff);
    sent_cyc.push_back(cyc);
  end

  // Compare every output with the oldest expected value and its latency.
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected output");
    end else begin
      int unsigned e, c0;
      e  = exp_q.pop_front();
      c0 = sent_cyc.pop_front();
      if (out_adc !== 12'(e) || cyc - c0 != 2) begin
        failures++;
        $display("mismatch: got %0d exp %0d latency %0d", out_adc, e, cyc - c0);
      end
    end
  end

  task automatic send(input int unsigned v);
    in_valid <= 1;
    in_adc   <= 12'(v);
    @(posedge clk);
    in_valid <= 0;
    repeat ($urandom_range(1, 3)) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // narrow range first, then it widens in steps
    for (int i = 0; i < 200; i++) send(1800 + $urandom_range(0, 100));
    for (int i = 0; i < 200; i++) send(1000 + $urandom_range(0, 1500));
    for (int i = 0; i < 400; i++) send($urandom_range(0, 4095));
    send(0); send(4095); send(4095); send(2048);
    repeat (5) @(posedge clk);
    checks++;
    if (range_o !== 12'(mx - mn)) begin
      failures++;
      $display("range %0d exp %0d", range_o, mx - mn);
    end
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
