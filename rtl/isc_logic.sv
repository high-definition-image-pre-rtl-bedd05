// Image sensor control logic of the ICAI (pixel-clock domain).
//
// Acquisition: a line-period counter, loaded from the host's exposure setting
// cfg_line_period (in pixel clocks; 1000 clocks of 250 ns = 250 us in the
// prototype), raises the acquisition strobe for STROBE_CYCLES at the start of
// every time stage while cfg_enable is set. The strobe makes all strips read out
// their line concurrently, one pixel per clock with cis_valid.
//
// Horizontal-overlap calibration: each strip has its own 1-based pixel counter.
// With C_K from the overlap rule, an odd strip keeps pixels 1..C_K (C_K = 704 - OV_K)
// and an even strip keeps pixels C_K..704 (C_K = OV_K, at least 1); the rest
// are overlap pixels and are not written. Kept pixels are pushed, upper 8 bits
// of the 10-bit code, into the memory block selected for this line.
//
// Double buffering: at the start of each time stage (the clock on which the
// strobe rises) the block written during the previous stage is handed to the
// host side - done_bank names it and done_tgl toggles - provided every strip
// delivered all its pixels; the other block becomes the write block and is
// cleared. So line N is read out during stage N+1 while line N+1 is acquired
// (reference timing). done_bank stays stable for a whole stage.
//
// Interface and timing: din is the top 8 bits of cis_data, wired straight
// through with no register (the memories register it on the same clock as
// push), so a synthesis report lists those 32 bits as driven by an input.
// push is combinational from cis_valid and the pixel counters. strobe and
// done_tgl are registered. The 8-bit truncation of the 10-bit code is this
// design's choice, following the 8 bits per pixel the original bandwidth
// estimates assume.
module isc_logic
  import hdipp_pkg::*;
#(
  parameter int unsigned NCIS          = CIS_PER_ICAI,
  parameter int unsigned PIXELS        = CIS_PIXELS,
  parameter int unsigned STROBE_CYCLES = 4,
  parameter int unsigned PERIOD_W      = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 cfg_enable,
  input  logic [PERIOD_W-1:0]  cfg_line_period,
  input  ov_t                  cfg_ov     [NCIS],
  output logic                 strobe,
  input  logic [NCIS-1:0]      cis_valid,
  input  logic [ADC_BITS-1:0]  cis_data   [NCIS],
  output logic                 wbank,
  output logic [1:0]           wr_clear,
  output logic [NCIS-1:0]      push       [2],
  output pixel_t               din        [NCIS],
  output logic                 done_tgl,
  output logic                 done_bank
);
  logic [PERIOD_W-1:0] tcnt;
  logic                stage_start;
  pidx_t               pcnt   [NCIS];   // pixels received so far this line
  logic  [NCIS-1:0]    keep;
  logic  [NCIS-1:0]    strip_done;

  assign stage_start = cfg_enable && (tcnt == '0);

  always_ff @(posedge clk)
    if (rst || !cfg_enable)                 tcnt <= '0;
    else if (tcnt >= cfg_line_period - 1'b1) tcnt <= '0;
    else                                    tcnt <= tcnt + 1'b1;

  always_ff @(posedge clk)
    if (rst) strobe <= 1'b0;
    else     strobe <= cfg_enable && (tcnt < PERIOD_W'(STROBE_CYCLES));

  // Bank switch, line handover and per-strip pixel counters. At the start of
  // a stage the block written in the previous stage is handed over if every
  // strip delivered its whole line, and the other block takes the new line.
  always_ff @(posedge clk)
    if (rst) begin
      wbank     <= 1'b1;    // the first line goes to block 0
      done_tgl  <= 1'b0;
      done_bank <= 1'b0;
      for (int k = 0; k < NCIS; k++) pcnt[k] <= '0;
    end else if (stage_start) begin
      wbank <= ~wbank;
      if (&strip_done) begin
        done_bank <= wbank;
        done_tgl  <= ~done_tgl;
      end
      for (int k = 0; k < NCIS; k++) pcnt[k] <= '0;
    end else begin
      for (int k = 0; k < NCIS; k++)
        if (cis_valid[k] && pcnt[k] != pidx_t'(PIXELS)) pcnt[k] <= pcnt[k] + 1'b1;
    end

  assign wr_clear[0] = stage_start &&  wbank;   // block 0 is next
  assign wr_clear[1] = stage_start && !wbank;

  always_comb
    for (int k = 0; k < NCIS; k++) begin
      // pixel index (1-based) of the pixel now on cis_data[k]
      automatic pidx_t idx = pcnt[k] + 1'b1;
      automatic pidx_t ck  = calib_index(k % 2 == 0, cfg_ov[k]);
      strip_done[k] = (pcnt[k] == pidx_t'(PIXELS));
      if (k % 2 == 0) keep[k] = (idx <= ck);
      else            keep[k] = (idx >= ck);
      din[k]     = cis_data[k][ADC_BITS-1 -: PIX_BITS];
      push[0][k] = !stage_start && cis_valid[k] && !strip_done[k] && keep[k] && !wbank;
      push[1][k] = !stage_start && cis_valid[k] && !strip_done[k] && keep[k] &&  wbank;
    end
endmodule
