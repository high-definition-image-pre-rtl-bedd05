// Calibration-range workload: one ICAI (four strips) assembled at the limits
// of the calibration range - horizontal overlaps of 0 and 8 pixels and
// vertical gaps of 0 and 64 lines - and configured to match. The strip models
// are placed with the same numbers (ASM_OV/ASM_GP of the top), so after
// calibration every image row that all four strips have seen must equal the
// scene pixel by pixel (2,801 pixels per line here). Same procedure and
// checks as the prototype test: I2C configuration, a refused I2C write,
// 100 lines at 1000-clock stages, write counts, segments, back-pressure and
// per-stage store time.
module tb_calib_range;
  import hdipp_pkg::*;

  localparam int unsigned NI     = 1;
  localparam int unsigned NK     = NI * CIS_PER_ICAI;
  localparam int unsigned PERIOD = 1000;          // pixel clocks per time stage
  localparam int unsigned LINES  = 100;
  localparam int unsigned W_NS   = 250;           // pixel clock period
  localparam int unsigned R_NS   = 10;            // system clock period
  localparam int unsigned STALL  = 8;             // SDRAM refuses 1 write in STALL
  localparam int unsigned OV [4] = '{0, 8, 8, 1};  // assembly at the range limits
  localparam int unsigned GP [4] = '{64, 0, 64, 17};

  logic wclk = 1'b0, rclk = 1'b0, wrst = 1'b1, rrst = 1'b1;
  always #(W_NS * 1ns / 2) wclk = ~wclk;
  always #(R_NS * 1ns / 2) rclk = ~rclk;

  logic                cfg_enable = 1'b0, cfg_load = 1'b0, init_done;
  ov_t                 cfg_ov [NK];
  gp_t                 cfg_gp [NK];
  logic                i2c_cmd_valid = 1'b0, i2c_cmd_ready, i2c_done, i2c_ack_err;
  logic [6:0]          i2c_cmd_dev = '0;
  logic [7:0]          i2c_cmd_reg = '0, i2c_cmd_data = '0;
  logic                mem_valid, mem_ready;
  logic [SDRAM_AW-1:0] mem_addr;
  pixel_t              mem_data;
  logic                strobe, line_done;
  logic [NI-1:0]       line_ready;
  logic [31:0]         lines;

  hdipp_top #(
    .NICAI  (NI),
    .ASM_OV ({4'd1, 4'd8, 4'd8, 4'd0}),
    .ASM_GP ({7'd17, 7'd64, 7'd0, 7'd64})
  ) dut (
    .wclk, .wrst, .rclk, .rrst, .cfg_enable, .cfg_line_period (16'(PERIOD)),
    .cfg_ov, .cfg_gp, .cfg_base ('0), .cfg_load, .init_done,
    .i2c_cmd_valid, .i2c_cmd_ready, .i2c_cmd_dev, .i2c_cmd_reg, .i2c_cmd_data,
    .i2c_done, .i2c_ack_err,
    .mem_valid, .mem_ready, .mem_addr, .mem_data,
    .strobe, .line_ready, .line_done, .lines
  );

  int unsigned checks = 0, failures = 0;
  int unsigned n_i2c_ok = 0, n_i2c_nack = 0, n_strobe = 0, n_line_ready = 0;
  int unsigned n_stall = 0, n_segments = 0, n_writes = 0, n_dup = 0;
  int unsigned max_stage_cycles = 0;
  pixel_t      frame [int unsigned];
  logic [SDRAM_AW-1:0] prev_addr = '0;
  logic        first_write = 1'b1;

  function automatic logic [7:0] scene(input int unsigned row, input int unsigned col);
    logic [31:0] h;
    h = row * 32'd97 + col * 32'd31 + ((row ^ col) >> 2) * 32'd13;
    return h[7:0] ^ h[15:8];
  endfunction

  function automatic int unsigned kept(input int unsigned k, input int unsigned ov);
    if (k % 2 == 0) return 704 - ov;
    return (ov == 0) ? 704 : 705 - ov;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic i2c_write(input logic [6:0] dev, input logic [7:0] r, input logic [7:0] d,
                           output logic err);
    @(posedge rclk);
    while (!i2c_cmd_ready) @(posedge rclk);
    i2c_cmd_valid <= 1'b1; i2c_cmd_dev <= dev; i2c_cmd_reg <= r; i2c_cmd_data <= d;
    @(posedge rclk);
    i2c_cmd_valid <= 1'b0;
    while (!i2c_done) @(posedge rclk);
    err = i2c_ack_err;
  endtask

  // SDRAM model with random back-pressure
  always_ff @(posedge rclk) begin
    mem_ready <= rrst ? 1'b0 : ($urandom_range(0, STALL - 1) != 0);
    if (mem_valid && !mem_ready) n_stall++;
    if (mem_valid && mem_ready) begin
      n_writes++;
      if (frame.exists(int'(mem_addr))) n_dup++;
      frame[int'(mem_addr)] = mem_data;
      if (first_write || mem_addr != prev_addr + 1'b1) n_segments++;
      prev_addr   <= mem_addr;
      first_write <= 1'b0;
    end
  end

  // time-stage bookkeeping: a line must be stored before the next one is ready
  int unsigned stage_cnt = 0;
  logic        strobe_q = 1'b0;
  always_ff @(posedge wclk) begin
    strobe_q <= strobe;
    if (strobe && !strobe_q && !wrst) n_strobe++;
  end
  always_ff @(posedge rclk) begin
    if (line_ready[0]) begin
      n_line_ready++;
      stage_cnt <= 0;
    end else stage_cnt <= stage_cnt + 1;
    if (line_done && stage_cnt > max_stage_cycles) max_stage_cycles = stage_cnt;
  end

  initial begin
    #(1ms * (LINES + 45) * PERIOD * W_NS / 1000000);
    $display("FAIL: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic err;
    int unsigned comb, gmax, gmin;
    for (int k = 0; k < NK; k++) begin
      cfg_ov[k] = ov_t'(OV[k % 4]);
      cfg_gp[k] = gp_t'(GP[k % 4]);
    end
    repeat (4) @(posedge wclk);
    wrst = 1'b0; rrst = 1'b0;

    // one-shot power-on configuration of every strip
    for (int k = 0; k < NK; k++) begin
      i2c_write(7'h30 + 7'(k), 8'd0, 8'd16, err);   // PGA gain = 1
      check(!err, $sformatf("I2C gain write to strip %0d not acknowledged", k + 1));
      if (!err) n_i2c_ok++;
      i2c_write(7'h30 + 7'(k), 8'd1, 8'd1, err);    // enable read-out
      check(!err, $sformatf("I2C enable write to strip %0d not acknowledged", k + 1));
      if (!err) n_i2c_ok++;
    end
    i2c_write(7'h7f, 8'd0, 8'd16, err);
    check(err, "I2C write to an absent device was acknowledged");
    if (err) n_i2c_nack++;

    @(posedge rclk) cfg_load <= 1'b1;
    @(posedge rclk) cfg_load <= 1'b0;
    while (!init_done) @(posedge rclk);
    @(posedge wclk) cfg_enable <= 1'b1;

    while (lines < LINES) @(posedge rclk);
    @(posedge wclk) cfg_enable <= 1'b0;
    repeat (10) @(posedge rclk);

    comb = 0; gmax = 0; gmin = 1000;
    for (int k = 0; k < NK; k++) begin
      comb += kept(k, OV[k % 4]);
      if (GP[k % 4] > gmax) gmax = GP[k % 4];
      if (GP[k % 4] < gmin) gmin = GP[k % 4];
    end
    $display("combined pixels per line %0d, rows %0d..%0d checked", comb, gmax, gmin + LINES - 1);
    check(comb >= 700 * NK && comb <= 704 * NK, "combined line length outside 700..704 per strip");
    check(n_writes == LINES * comb, $sformatf("%0d pixel writes, expected %0d", n_writes, LINES * comb));
    check(n_dup == 0, $sformatf("%0d addresses written twice", n_dup));
    check(n_segments == LINES * NK, $sformatf("%0d write segments, expected %0d", n_segments, LINES * NK));

    for (int unsigned r = gmax; r <= gmin + LINES - 1; r++) begin
      int unsigned bad;
      bad = 0;
      for (int unsigned c = 0; c < comb; c++) begin
        int unsigned a;
        a = r * comb + c;
        if (!frame.exists(a) || frame[a] != scene(r, c)) begin
          if (bad == 0 && failures < 20)
            $display("row %0d col %0d: got %0h want %0h", r, c,
                     frame.exists(a) ? frame[a] : 8'hxx, scene(r, c));
          bad++;
        end
      end
      check(bad == 0, $sformatf("image row %0d has %0d wrong pixels", r, bad));
    end

    // a strip's segment outside the aligned rows still lands at its own column
    check(frame.exists(GP[0] * comb) && frame[GP[0] * comb] == scene(GP[0], 0),
          "first pixel of strip 1 not at row GP_1, column 0");

    check(max_stage_cycles < PERIOD * W_NS / R_NS,
          $sformatf("a line took %0d system clocks, more than one time stage", max_stage_cycles));
    $display("line store time: at most %0d system clocks (%0d ns) of a %0d ns stage",
             max_stage_cycles, max_stage_cycles * R_NS, PERIOD * W_NS);
    $display("mechanisms: i2c_ok=%0d i2c_nack=%0d strobes=%0d lines_ready=%0d stalls=%0d segments=%0d",
             n_i2c_ok, n_i2c_nack, n_strobe, n_line_ready, n_stall, n_segments);
    check(n_i2c_ok == 2 * NK, "I2C configuration writes missing");
    check(n_i2c_nack > 0, "no refused I2C write");
    check(n_strobe >= LINES, "fewer strobes than lines");
    check(n_line_ready >= LINES, "fewer line notifications than lines");
    check(n_stall > 0, "SDRAM back-pressure never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
