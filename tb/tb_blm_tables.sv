// tb_blm_tables -- writes the whole threshold memory with values derived
// from the address, reads it back with the one-cycle read latency, and checks
// the maskable-bit register and its reset value.
module tb_blm_tables;
  import blm_pkg::*;
  localparam int unsigned DEPTH = 32 * N_CH * N_RS;
  localparam int unsigned AW = $clog2(DEPTH);
  logic            clk = 0, rst_n = 0;
  logic            wr_en = 0;
  logic [AW-1:0]   wr_addr = '0, rd_addr = '0;
  sum_t            wr_data = '0, rd_data;
  logic            mask_we = 0;
  logic [N_CH-1:0] mask_data = '0, maskable_o;
  int checks = 0, failures = 0;

  blm_tables dut (.*);

  always #5 clk = ~clk;

  function automatic sum_t pattern(int unsigned a);
    return sum_t'(longint'(a) * 7919 + 64'h1_2345_6789) ^ (sum_t'(a) << 25);
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++;
    if (maskable_o !== '0) failures++;
    for (int unsigned a = 0; a < DEPTH; a++) begin
      wr_en   <= 1;
      wr_addr <= AW'(a);
      wr_data <= pattern(a);
      @(posedge clk);
    end
    wr_en <= 0;
    for (int i = 0; i < 3000; i++) begin
      int unsigned a;
      a = $urandom_range(0, DEPTH - 1);
      rd_addr <= AW'(a);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (rd_data !== pattern(a)) begin
        failures++;
        $display("addr %0d got %h", a, rd_data);
      end
    end
    mask_we   <= 1;
    mask_data <= 16'hA5C3;
    @(posedge clk);
    mask_we   <= 0;
    mask_data <= 16'h0000;
    @(posedge clk);
    checks++;
    if (maskable_o !== 16'hA5C3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
