// blm_pkg -- shared widths, sizes and the integration-window table of the
// Beam Loss Monitor surface processing FPGA.
//
// One surface card treats 16 detector channels. Each 40 us acquisition of a
// channel gives an 8-bit CFC count and a 12-bit ADC sample that are merged into
// a 20-bit detector value. For every channel twelve running sums (RS0..RS11)
// are kept, spanning one acquisition (40 us) up to 2^21 acquisitions (84 s).
// The channel count, the number of periods, the two end points and the data
// widths follow the description of the system; the intermediate window lengths
// and the way they are grouped into cascaded stages are this design's choice:
//
//   stage  input (window)   taps        outputs (window in 40 us samples)
//     1    RS0  (1)         2, 8        RS1 = 2,      RS2 = 8
//     2    RS2  (8)         2, 8        RS3 = 16,     RS4 = 64
//     3    RS4  (64)        4, 32       RS5 = 256,    RS6 = 2048
//     4    RS6  (2048)      8, 16       RS7 = 16384,  RS8 = 32768
//     5    RS8  (32768)     4, 16       RS9 = 131072, RS10 = 524288
//     6    RS10 (524288)    4           RS11 = 2097152 (83.9 s)
package blm_pkg;

  localparam int unsigned N_CH     = 16;  // channels per surface card
  localparam int unsigned N_RS     = 12;  // integration periods per channel
  localparam int unsigned ADC_W    = 12;  // ADC sample width
  localparam int unsigned CNT_W    = 8;   // CFC counter width
  localparam int unsigned DET_W    = 20;  // combined detector value width
  localparam int unsigned N_STAGES = 6;   // cascaded running-sum stages
  localparam int unsigned MAX_TAPS = 2;   // taps of one multipoint shift register
  // log2 of the longest window (2^21 samples); a sum of that many unsigned
  // 20-bit values needs 41 bits, plus a sign bit for the signed accumulators.
  localparam int unsigned LOG2_MAX_WIN = 21;
  localparam int unsigned SUM_W    = DET_W + LOG2_MAX_WIN + 1;

  localparam int unsigned CH_W     = $clog2(N_CH);
  localparam int unsigned RS_W     = $clog2(N_RS);

  typedef logic signed [SUM_W-1:0] sum_t;
  typedef logic        [DET_W-1:0] det_t;

  // Number of taps used in stage s.
  function automatic int unsigned stage_ntaps(int unsigned s);
    return (s == N_STAGES - 1) ? 1 : 2;
  endfunction

  // Position of tap t of stage s, in units of the stage input's refresh
  // period (see the table above).
  function automatic int unsigned stage_tap(int unsigned s, int unsigned t);
    case (s)
      0, 1:    return (t == 0) ? 2 : 8;
      2:       return (t == 0) ? 4 : 32;
      3:       return (t == 0) ? 8 : 16;
      4:       return (t == 0) ? 4 : 16;
      default: return 4;
    endcase
  endfunction

  // Window of running sum k, counted in 40 us acquisitions.
  function automatic int unsigned rs_window(int unsigned k);
    int unsigned w;
    int unsigned n;
    w = 1;
    n = 0;
    if (k == 0) return 1;
    for (int unsigned s = 0; s < N_STAGES; s++) begin
      for (int unsigned t = 0; t < stage_ntaps(s); t++) begin
        n++;
        if (n == k) return w * stage_tap(s, t);
      end
      w = w * stage_tap(s, stage_ntaps(s)-1);
    end
    return 0;
  endfunction

  // Index of the first running sum produced by stage s.
  function automatic int unsigned stage_first_rs(int unsigned s);
    int unsigned n;
    n = 1;
    for (int unsigned i = 0; i < s; i++) n += stage_ntaps(i);
    return n;
  endfunction

  // Refresh period of running sum k: how many acquisitions pass between two
  // updates of its value (the window of the stage's input).
  function automatic int unsigned rs_refresh(int unsigned k);
    int unsigned w;
    int unsigned n;
    w = 1;
    n = 0;
    if (k == 0) return 1;
    for (int unsigned s = 0; s < N_STAGES; s++) begin
      for (int unsigned t = 0; t < stage_ntaps(s); t++) begin
        n++;
        if (n == k) return w;
      end
      w = w * stage_tap(s, stage_ntaps(s)-1);
    end
    return 0;
  endfunction

endpackage
