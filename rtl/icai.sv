// Image combiner and acquisition interface (ICAI) for four strip CISs.
//
// The ICAI is the hardware accelerator between the strips and the host
// processor. It has the three parts of the original design: image sensor control
// logic (strobe, acquisition, overlap removal), two memory blocks of FIFO/
// stack/FIFO/stack that form a double buffer, and a combiner that streams a
// finished line to the host. While one block is filled with line N at the
// sensor pixel rate (wclk), the other is read out with line N-1 at the host
// rate (rclk), so acquisition is continuous.
//
// Clock crossing: at the start of each stage the control logic toggles
// done_tgl to hand over the block filled during the previous stage;
// the toggle passes a two-flop synchronizer and its edge starts the combiner.
// The block number and pixel counts it then reads were set before the toggle and
// hold for a whole line period. Line N therefore streams out during stage N+1
// (as in the reference timing), starting a few host clocks after the stage boundary. The host
// must take each line within one line
// period (the original design's premise: line processing shorter than a time stage).
//
// line_ready pulses for one rclk cycle when a new line is available (the
// notification to the processor). The beat format is hdipp_pkg::icai_beat_t.
module icai
  import hdipp_pkg::*;
#(
  parameter int unsigned NCIS          = CIS_PER_ICAI,
  parameter int unsigned PIXELS        = CIS_PIXELS,
  parameter int unsigned STROBE_CYCLES = 4,
  parameter int unsigned PERIOD_W      = 16,
  localparam int unsigned CW           = $clog2(PIXELS + 1)
) (
  // sensor side, pixel clock
  input  logic                wclk,
  input  logic                wrst,
  input  logic                cfg_enable,
  input  logic [PERIOD_W-1:0] cfg_line_period,
  input  ov_t                 cfg_ov   [NCIS],
  output logic                strobe,
  input  logic [NCIS-1:0]     cis_valid,
  input  logic [ADC_BITS-1:0] cis_data [NCIS],
  // host side, processor clock
  input  logic                rclk,
  input  logic                rrst,
  output logic                line_ready,
  output logic                busy,
  output logic                out_valid,
  input  logic                out_ready,
  output icai_beat_t          out_beat
);
  logic [1:0]      wr_clear;
  logic [NCIS-1:0] push  [2];
  pixel_t          din   [NCIS];
  logic            done_tgl, done_bank;
  logic [CW-1:0]   count [2][NCIS];
  logic [1:0]      rd_load;
  logic [NCIS-1:0] pop   [2];
  pixel_t          dout  [2][NCIS];
  logic            tgl_sync, tgl_seen;

  isc_logic #(.NCIS(NCIS), .PIXELS(PIXELS), .STROBE_CYCLES(STROBE_CYCLES),
              .PERIOD_W(PERIOD_W)) u_ctrl (
    .clk (wclk), .rst (wrst), .cfg_enable, .cfg_line_period, .cfg_ov,
    .strobe, .cis_valid, .cis_data, .wbank (), .wr_clear, .push, .din,
    .done_tgl, .done_bank
  );

  for (genvar b = 0; b < 2; b++) begin : g_block
    icai_mem_block #(.NCIS(NCIS), .DEPTH(PIXELS)) u_mem (
      .wclk, .wrst, .wr_clear (wr_clear[b]), .push (push[b]), .din,
      .count (count[b]),
      .rclk, .rrst, .rd_load (rd_load[b]), .pop (pop[b]), .dout (dout[b])
    );
  end

  sync_2ff u_sync (.clk (rclk), .rst (rrst), .d (done_tgl), .q (tgl_sync));

  always_ff @(posedge rclk)
    if (rrst) tgl_seen <= 1'b0;
    else      tgl_seen <= tgl_sync;

  assign line_ready = tgl_sync ^ tgl_seen;

  icai_combiner #(.NCIS(NCIS), .DEPTH(PIXELS)) u_comb (
    .clk (rclk), .rst (rrst), .start (line_ready), .bank (done_bank), .busy,
    .count, .rd_load, .pop, .dout, .out_valid, .out_ready, .out_beat
  );
endmodule
