// High-definition image pre-processing system, final configuration: sixteen
// strip CISs in an interlaced, overlapping two-row assembly, four ICAIs (one per
// four strips), the I2C controller that configures the strips, and the
// vertical-gap write engine that stores the combined image into SDRAM.
//
// Data path per line: the ICAIs strobe their strips together at the start of
// each time stage; every strip reads out 704 pixels; each ICAI drops the
// overlap pixels, reverses the top-row strips and double-buffers the line; in
// the next time stage the write engine takes the four combined lines in ICAI
// order and writes each strip's segment to SDRAM at its gap-calibrated write
// pointer, so one image row holds the sensor data of one ground line
// (11,200..11,264 pixels).
//
// The strips and their placement are part of this system model: ASM_OV and
// ASM_GP describe how the dies were assembled (overlap of each strip with the
// next, vertical gap of each strip in lines), packed strip 1 in the lowest
// field. The chip learns the same numbers at run time through cfg_ov/cfg_gp,
// as the host would set them after measuring the assembly. Default placement:
// the three pairs of a measured four-strip assembly (no overlap/42-line gap, 2-pixel overlap/40,
// 1-pixel overlap/40) repeated for every ICAI, last strip overlap 1.
//
// Clocks: wclk is the sensor pixel clock (4 MHz, 250 ns, in the prototype
// timing), rclk the processor/system clock. Where the processor, system bus and
// SDRAM controller would connect, the pixel write port (mem_*), the I2C
// command port (i2c_*) and the configuration inputs are brought out.
module hdipp_top
  import hdipp_pkg::*;
#(
  parameter int unsigned NICAI    = N_ICAI,
  parameter int unsigned PIXELS   = CIS_PIXELS,
  parameter int unsigned I2C_DIV  = 250,
  localparam int unsigned NK      = NICAI * CIS_PER_ICAI,
  parameter logic [NK*OV_BITS-1:0] ASM_OV = {NICAI{4'd1, 4'd1, 4'd2, 4'd0}},
  parameter logic [NK*GP_BITS-1:0] ASM_GP = {NICAI{7'd0, 7'd40, 7'd0, 7'd42}}
) (
  input  logic                 wclk,
  input  logic                 wrst,
  input  logic                 rclk,
  input  logic                 rrst,
  // configuration from the host
  input  logic                 cfg_enable,
  input  logic [15:0]          cfg_line_period,
  input  ov_t                  cfg_ov [NK],
  input  gp_t                  cfg_gp [NK],
  input  logic [SDRAM_AW-1:0]  cfg_base,
  input  logic                 cfg_load,
  output logic                 init_done,
  // I2C configuration commands from the host
  input  logic                 i2c_cmd_valid,
  output logic                 i2c_cmd_ready,
  input  logic [6:0]           i2c_cmd_dev,
  input  logic [7:0]           i2c_cmd_reg,
  input  logic [7:0]           i2c_cmd_data,
  output logic                 i2c_done,
  output logic                 i2c_ack_err,
  // SDRAM write port
  output logic                 mem_valid,
  input  logic                 mem_ready,
  output logic [SDRAM_AW-1:0]  mem_addr,
  output pixel_t               mem_data,
  // status
  output logic                 strobe,
  output logic [NICAI-1:0]     line_ready,
  output logic                 line_done,
  output logic [31:0]          lines
);
  // Scene column seen by pixel 1 (odd strip) or pixel 704 (even strip).
  function automatic int unsigned x_off(input int unsigned k);
    int unsigned s = 0;
    for (int unsigned j = 0; j < k; j++)
      s += int'(kept_pixels(j % 2 == 0, ASM_OV[j*OV_BITS +: OV_BITS]));
    return s;
  endfunction

  logic                scl, sda, sda_m;
  logic [NK-1:0]       sda_s;
  logic [NICAI-1:0]    strobes;
  logic [NK-1:0]       pix_valid;
  logic [ADC_BITS-1:0] pix_data [NK];
  logic [NICAI-1:0]    s_valid, s_ready;
  icai_beat_t          s_beat [NICAI];

  // open-drain I2C bus: SCL has a single driver, SDA is wired-AND
  assign sda    = sda_m & (&sda_s);
  assign strobe = strobes[0];

  i2c_controller #(.DIV(I2C_DIV)) u_i2c (
    .clk (rclk), .rst (rrst),
    .cmd_valid (i2c_cmd_valid), .cmd_ready (i2c_cmd_ready),
    .cmd_dev (i2c_cmd_dev), .cmd_reg (i2c_cmd_reg), .cmd_data (i2c_cmd_data),
    .done (i2c_done), .ack_err (i2c_ack_err),
    .scl_o (scl), .sda_o (sda_m), .sda_i (sda)
  );

  for (genvar k = 0; k < NK; k++) begin : g_cis
    cis_strip #(
      .I2C_ADDR  (7'h30 + 7'(k)),
      .X_OFF     (x_off(k)),
      .ROW_AHEAD (int'(ASM_GP[k*GP_BITS +: GP_BITS])),
      .REVERSED  (k % 2 == 1),
      .PIXELS    (PIXELS)
    ) u_cis (
      .clk (wclk), .rst (wrst), .strobe (strobes[k / CIS_PER_ICAI]),
      .scl, .sda_i (sda), .sda_o (sda_s[k]),
      .pix_valid (pix_valid[k]), .pix_data (pix_data[k])
    );
  end

  for (genvar i = 0; i < NICAI; i++) begin : g_icai
    icai #(.NCIS(CIS_PER_ICAI), .PIXELS(PIXELS)) u_icai (
      .wclk, .wrst, .cfg_enable, .cfg_line_period,
      .cfg_ov    (cfg_ov[i*CIS_PER_ICAI +: CIS_PER_ICAI]),
      .strobe    (strobes[i]),
      .cis_valid (pix_valid[i*CIS_PER_ICAI +: CIS_PER_ICAI]),
      .cis_data  (pix_data[i*CIS_PER_ICAI +: CIS_PER_ICAI]),
      .rclk, .rrst,
      .line_ready (line_ready[i]), .busy (),
      .out_valid (s_valid[i]), .out_ready (s_ready[i]), .out_beat (s_beat[i])
    );
  end

  gap_calib_writer #(.NICAI(NICAI), .NCIS(CIS_PER_ICAI), .AW(SDRAM_AW)) u_writer (
    .clk (rclk), .rst (rrst), .cfg_load, .cfg_ov, .cfg_gp, .cfg_base, .init_done,
    .in_valid (s_valid), .in_ready (s_ready), .in_beat (s_beat),
    .mem_valid, .mem_ready, .mem_addr, .mem_data, .line_done, .lines
  );
endmodule
