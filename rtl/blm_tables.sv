// blm_tables -- threshold and channel-mask tables of the surface card.
//
// Every running sum of every channel is compared with a threshold that
// depends on the channel, on the integration period and on the beam energy.
// This block holds those thresholds in one memory, addressed by
// ((energy level * N_CH) + channel) * N_RS + period, with a synchronous read
// port for the comparator and a write port through which the table is loaded
// (from the card's non-volatile memory or over VME). It also holds one bit per
// channel telling whether the channel is maskable.
//
// The existence of the tables, and that the thresholds depend on channel and
// beam energy, follow the description; the 32 energy levels, the memory
// layout, the load port and the maskable-bit register are this design's own.
//
// Interface: wr_en/wr_addr/wr_data write one threshold; rd_addr is read on
// every clock and rd_data follows one cycle later. mask_we loads mask_data.
module blm_tables
  import blm_pkg::*;
#(
  parameter int unsigned N_LEVELS = 32,
  localparam int unsigned DEPTH   = N_LEVELS * N_CH * N_RS,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  logic [AW-1:0]   wr_addr,
  input  sum_t            wr_data,
  input  logic [AW-1:0]   rd_addr,
  output sum_t            rd_data,
  input  logic            mask_we,
  input  logic [N_CH-1:0] mask_data,
  output logic [N_CH-1:0] maskable_o
);

  sum_t thr_mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) thr_mem[wr_addr] <= wr_data;
    rd_data <= thr_mem[rd_addr];
  end

  // After reset every channel is unmaskable, the safe default.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       maskable_o <= '0;
    else if (mask_we) maskable_o <= mask_data;
  end

endmodule
