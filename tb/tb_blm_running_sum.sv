// tb_blm_running_sum -- checks both taps of a multipoint running sum against
// sums recomputed from the full input history.
module tb_blm_running_sum;
  localparam int unsigned W = 42;
  localparam int unsigned TAP0 = 3, TAP1 = 11;
  logic                clk = 0, rst_n = 0;
  logic                in_en = 0;
  logic signed [W-1:0] in_data = '0;
  logic                out_valid;
  logic signed [W-1:0] sum_o [2];
  int checks = 0, failures = 0;
  longint hist [$];

  blm_running_sum #(.W(W), .NTAPS(2), .TAP0(TAP0), .TAP1(TAP1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_sum(int unsigned t);
    longint s = 0;
    for (int i = 0; i < int'(t) && i < hist.size(); i++) s += hist[hist.size()-1-i];
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      longint v;
      v = longint'($urandom_range(0, 1 << 20)) - ((n % 3 == 0) ? longint'(1 << 19) : 0);
      in_en   <= 1;
      in_data <= W'(v);
      hist.push_back(v);
      @(posedge clk);
      in_en <= 0;
      @(posedge clk);
      checks++;
      if (!out_valid) failures++;
      checks += 2;
      if (64'(sum_o[0]) != ref_sum(TAP0)) begin
        failures++;
        $display("tap0 n=%0d got %0d exp %0d", n, sum_o[0], ref_sum(TAP0));
      end
      if (64'(sum_o[1]) != ref_sum(TAP1)) begin
        failures++;
        $display("tap1 n=%0d got %0d exp %0d", n, sum_o[1], ref_sum(TAP1));
      end
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
