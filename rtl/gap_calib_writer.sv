// Vertical-gap calibration write engine: the per-line task the original design gives
// to the first microprocessor, built as hardware. It fetches each pixel of the
// combined lines from the ICAIs and writes it to the SDRAM image memory at an
// address chosen so that the interlaced strips land on the same image row
// (vertical-gap calibration).
//
// Write pointers, as defined by the original design: for strip K and line N
//   WPtr(K,N)   = Init_WPtr(K) + (N-1) * Comb_Pixels
//   Init_WPtr(K) = (pixels kept by strips 1..K-1) + GP_K * Comb_Pixels
// where GP_K is the strip's vertical gap in lines and Comb_Pixels the sum of
// the pixels all strips keep (2,800..2,816 for four strips, 11,200..11,264 for
// sixteen). Inside a strip's segment successive pixels go to successive
// addresses, so only the first pixel of each segment needs the table. The
// table is evaluated once after cfg_load (power-on), one strip per clock with a
// single multiplier; init_done then rises and streaming may begin. The image
// starts at address cfg_base; addresses wrap at the top of the SDRAM.
//
// Interfaces: NICAI valid/ready pixel streams, consumed in order ICAI 0..NICAI-1
// for each line; a valid/ready byte write port to the SDRAM controller. One
// pixel moves per clock while the SDRAM side is ready. line_done pulses after
// the last pixel of a line, lines counts completed lines.
module gap_calib_writer
  import hdipp_pkg::*;
#(
  parameter int unsigned NICAI = N_ICAI,
  parameter int unsigned NCIS  = CIS_PER_ICAI,
  parameter int unsigned AW    = SDRAM_AW,
  localparam int unsigned NK   = NICAI * NCIS,
  localparam int unsigned IW   = (NICAI > 1) ? $clog2(NICAI) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cfg_load,
  input  ov_t           cfg_ov   [NK],
  input  gp_t           cfg_gp   [NK],
  input  logic [AW-1:0] cfg_base,
  output logic          init_done,
  // combined lines from the ICAIs
  input  logic [NICAI-1:0] in_valid,
  output logic [NICAI-1:0] in_ready,
  input  icai_beat_t    in_beat  [NICAI],
  // SDRAM write port
  output logic          mem_valid,
  input  logic          mem_ready,
  output logic [AW-1:0] mem_addr,
  output pixel_t        mem_data,
  output logic          line_done,
  output logic [31:0]   lines
);
  logic [AW-1:0] comb;                 // Comb_Pixels
  logic [AW-1:0] init_wptr [NK];
  logic [AW-1:0] colstart;
  logic [$clog2(NK)-1:0] ik;
  logic          busy_init;
  logic [IW-1:0] cur;                  // ICAI being read
  logic [AW-1:0] line_base;            // (N-1) * Comb_Pixels
  logic [AW-1:0] next_addr;
  icai_beat_t    beat;
  logic          fire;
  logic [$clog2(NK)-1:0] seg;          // global strip index of the beat

  always_comb begin
    comb = '0;
    for (int k = 0; k < NK; k++)
      comb += AW'(kept_pixels(k % 2 == 0, cfg_ov[k]));
  end

  // Power-on evaluation of Init_WPtr.
  always_ff @(posedge clk)
    if (rst) begin
      busy_init <= 1'b0;
      init_done <= 1'b0;
      ik        <= '0;
      colstart  <= '0;
      for (int k = 0; k < NK; k++) init_wptr[k] <= '0;
    end else if (cfg_load) begin
      busy_init <= 1'b1;
      init_done <= 1'b0;
      ik        <= '0;
      colstart  <= '0;
    end else if (busy_init) begin
      init_wptr[ik] <= colstart + AW'(cfg_gp[ik]) * comb;
      colstart      <= colstart + AW'(kept_pixels(ik % 2 == 0, cfg_ov[ik]));
      if (ik == $bits(ik)'(NK - 1)) begin
        busy_init <= 1'b0;
        init_done <= 1'b1;
      end
      ik <= ik + 1'b1;
    end

  // Streaming: pass the current ICAI's pixels straight to the SDRAM port.
  assign beat      = in_beat[cur];
  assign mem_valid = init_done && in_valid[cur];
  assign mem_data  = beat.pix;
  assign seg       = $bits(seg)'(cur * NCIS) + $bits(seg)'(beat.cis);
  assign mem_addr  = beat.first
                   ? cfg_base + init_wptr[seg] + line_base
                   : next_addr;
  assign fire      = mem_valid && mem_ready;

  always_comb begin
    in_ready      = '0;
    in_ready[cur] = init_done && mem_ready;
  end

  always_ff @(posedge clk)
    if (rst || cfg_load) begin
      cur       <= '0;
      line_base <= '0;
      next_addr <= '0;
      line_done <= 1'b0;
      lines     <= '0;
    end else begin
      line_done <= 1'b0;
      if (fire) begin
        next_addr <= mem_addr + 1'b1;
        if (beat.last) begin
          if (cur == IW'(NICAI - 1)) begin
            cur       <= '0;
            line_base <= line_base + comb;
            line_done <= 1'b1;
            lines     <= lines + 1'b1;
          end else begin
            cur <= cur + 1'b1;
          end
        end
      end
    end
endmodule
