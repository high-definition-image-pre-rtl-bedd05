// Test of the strip CIS model: two strips on one I2C bus, one mounted normally
// and one reversed, at different scene positions. Before configuration a
// strobe must produce no pixels. After both are configured over I2C (unity
// gain for one, double gain for the other, read-out enabled), each strobe must
// produce exactly 704 valid pixels on consecutive clocks, the first one
// READ_LAT+1 clocks after the strobe edge is sampled, with the values the
// optical model defines (scene row = line + ROW_AHEAD, columns forward or
// reversed, 10-bit code = min(1023, scene * gain / 4)).
module tb_cis_strip;
  import hdipp_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #125ns clk = ~clk;

  logic                scl = 1'b1, sda_m = 1'b1, sda;
  logic [1:0]          sda_s, valid;
  logic [ADC_BITS-1:0] data [2];
  logic                strobe = 1'b0;

  assign sda = sda_m & (&sda_s);

  cis_strip #(.I2C_ADDR(7'h30), .X_OFF(0),    .ROW_AHEAD(3),  .REVERSED(1'b0)) u_a (
    .clk, .rst, .strobe, .scl, .sda_i (sda), .sda_o (sda_s[0]), .pix_valid (valid[0]), .pix_data (data[0]));
  cis_strip #(.I2C_ADDR(7'h31), .X_OFF(1400), .ROW_AHEAD(40), .REVERSED(1'b1)) u_b (
    .clk, .rst, .strobe, .scl, .sda_i (sda), .sda_o (sda_s[1]), .pix_valid (valid[1]), .pix_data (data[1]));

  int unsigned checks = 0, failures = 0;
  localparam time Q = 2500ns;
  int unsigned xoff [2] = '{0, 1400};
  int unsigned ahead [2] = '{3, 40};
  int unsigned gain [2] = '{16, 32};

  function automatic logic [7:0] scene(input int unsigned row, input int unsigned col);
    logic [31:0] h;
    h = row * 32'd97 + col * 32'd31 + ((row ^ col) >> 2) * 32'd13;
    return h[7:0] ^ h[15:8];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic i2c_byte(input logic [7:0] b, output bit ack);
    for (int i = 7; i >= 0; i--) begin
      sda_m = b[i]; #Q;
      scl = 1'b1; #(2 * Q);
      scl = 1'b0; #Q;
    end
    sda_m = 1'b1; #Q;
    scl = 1'b1; #Q;
    ack = !sda; #Q;
    scl = 1'b0; #Q;
  endtask

  task automatic reg_write(input logic [6:0] a, input logic [7:0] r, input logic [7:0] v);
    bit ack, all;
    sda_m = 1'b1; scl = 1'b1; #Q;
    sda_m = 1'b0; #Q;
    scl = 1'b0; #Q;
    all = 1'b1;
    i2c_byte({a, 1'b0}, ack); all &= ack;
    i2c_byte(r, ack);         all &= ack;
    i2c_byte(v, ack);         all &= ack;
    sda_m = 1'b0; #Q;
    scl = 1'b1; #Q;
    sda_m = 1'b1; #(4 * Q);
    check(all, $sformatf("register write to %0h not acknowledged", a));
  endtask

  // one strobe; returns the pixels and the delay of the first one
  task automatic acquire(output logic [ADC_BITS-1:0] px [2][$], output int lat, output bit gapless);
    int cyc;
    bit started, stopped;
    px[0].delete(); px[1].delete();
    lat = -1; gapless = 1'b1; started = 1'b0; stopped = 1'b0;
    @(posedge clk) strobe <= 1'b1;
    for (cyc = 0; cyc < 900; cyc++) begin
      @(posedge clk);
      if (cyc == 3) strobe <= 1'b0;
      #1ns;
      if (valid[0] && lat < 0) lat = cyc;
      if (valid[0] && stopped) gapless = 1'b0;
      if (!valid[0] && started) stopped = 1'b1;
      if (valid[0]) started = 1'b1;
      for (int s = 0; s < 2; s++) if (valid[s]) px[s].push_back(data[s]);
    end
  endtask

  initial begin
    #50ms;
    $display("FAIL: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ADC_BITS-1:0] px [2][$];
    int lat;
    bit gapless;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    acquire(px, lat, gapless);
    check(px[0].size() == 0 && px[1].size() == 0, "unconfigured strip produced pixels");
    reg_write(7'h30, 8'd0, 8'd16);
    reg_write(7'h31, 8'd0, 8'd32);
    reg_write(7'h30, 8'd1, 8'd1);
    reg_write(7'h31, 8'd1, 8'd1);
    for (int n = 0; n < 3; n++) begin
      acquire(px, lat, gapless);
      check(lat == 3, $sformatf("line %0d: first pixel %0d clocks after the strobe", n, lat));
      check(gapless, $sformatf("line %0d: pixel stream has gaps", n));
      for (int s = 0; s < 2; s++) begin
        int bad;
        check(px[s].size() == 704, $sformatf("strip %0d line %0d: %0d pixels", s, n, px[s].size()));
        bad = 0;
        for (int p = 1; p <= px[s].size(); p++) begin
          int unsigned col, v;
          col = (s == 0) ? xoff[s] + p - 1 : xoff[s] + 704 - p;
          v = scene(n + ahead[s], col) * gain[s] / 4;
          if (v > 1023) v = 1023;
          if (px[s][p - 1] != ADC_BITS'(v)) bad++;
        end
        check(bad == 0, $sformatf("strip %0d line %0d: %0d wrong pixels", s, n, bad));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
