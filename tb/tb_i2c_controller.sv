// Test of the I2C controller against a bus-level slave model in the
// testbench. The model detects START and STOP conditions from the line levels,
// shifts bits in on rising SCL, and pulls SDA low for the acknowledge clock
// when acknowledging is enabled. Random register writes must arrive as exactly
// three bytes (address + write bit, register, data) between one START and one
// STOP, with ack_err clear; with the model not acknowledging, ack_err must be
// set. The SCL high and low times must be 2*DIV clocks.
module tb_i2c_controller;
  localparam int unsigned DIV = 8;
  logic clk = 1'b0, rst = 1'b1;
  always #5ns clk = ~clk;

  logic       cmd_valid = 1'b0, cmd_ready, done, ack_err;
  logic [6:0] cmd_dev = '0;
  logic [7:0] cmd_reg = '0, cmd_data = '0;
  logic       scl_o, sda_o, sda;
  logic       slave_low = 1'b0, ack_en = 1'b1;

  assign sda = sda_o & ~slave_low;

  i2c_controller #(.DIV(DIV)) dut (.clk, .rst, .cmd_valid, .cmd_ready, .cmd_dev, .cmd_reg,
                                   .cmd_data, .done, .ack_err, .scl_o, .sda_o, .sda_i (sda));

  int unsigned checks = 0, failures = 0;
  int unsigned n_start = 0, n_stop = 0, nbits = 0;
  logic [7:0]  bytes [$];
  logic [7:0]  sh;
  logic        scl_q = 1'b1, sda_q = 1'b1;
  int unsigned hi_len = 0, lo_len = 0, bad_timing = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // bus-level slave model, sampled every system clock
  always @(posedge clk) begin
    scl_q <= scl_o;
    sda_q <= sda;
    if (scl_o && scl_q && sda_q && !sda) begin n_start++; nbits = 0; end
    if (scl_o && scl_q && !sda_q && sda) n_stop++;
    if (scl_o && !scl_q) begin                       // rising SCL
      if (nbits < 8) sh = {sh[6:0], sda};
      nbits++;
      if (nbits == 8) bytes.push_back(sh);
    end
    if (!scl_o && scl_q) begin                       // falling SCL
      if (nbits == 8) slave_low <= ack_en;
      if (nbits == 9) begin slave_low <= 1'b0; nbits = 0; end
    end
    // SCL phase lengths inside a byte
    if (scl_o) hi_len++; else lo_len++;
    if (scl_o && !scl_q && lo_len != 0) begin
      if (lo_len != 2 * DIV && nbits > 1) bad_timing++;
      lo_len = 0;
    end
    if (!scl_o && scl_q) begin
      if (hi_len != 2 * DIV && n_start > 0 && nbits > 0) bad_timing++;
      hi_len = 0;
    end
  end

  task automatic write(input logic [6:0] d, input logic [7:0] r, input logic [7:0] v);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    cmd_valid <= 1'b1; cmd_dev <= d; cmd_reg <= r; cmd_data <= v;
    @(posedge clk) cmd_valid <= 1'b0;
    while (!done) @(posedge clk);
  endtask

  initial begin
    #2ms;
    $display("FAIL: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 12; t++) begin
      logic [6:0] d;
      logic [7:0] r, v;
      int unsigned s0, p0;
      d = 7'($urandom); r = 8'($urandom); v = 8'($urandom);
      ack_en = (t % 4 != 3);
      bytes.delete();
      s0 = n_start; p0 = n_stop;
      write(d, r, v);
      repeat (4 * DIV) @(posedge clk);
      check(n_start == s0 + 1 && n_stop == p0 + 1, $sformatf("write %0d: %0d START, %0d STOP", t, n_start - s0, n_stop - p0));
      check(bytes.size() == 3, $sformatf("write %0d: %0d bytes on the bus", t, bytes.size()));
      if (bytes.size() == 3)
        check(bytes[0] == {d, 1'b0} && bytes[1] == r && bytes[2] == v,
              $sformatf("write %0d: bytes %0h %0h %0h, want %0h %0h %0h", t, bytes[0], bytes[1], bytes[2], {d, 1'b0}, r, v));
      check(ack_err == !ack_en, $sformatf("write %0d: ack_err %0b with acknowledge %0b", t, ack_err, ack_en));
    end
    check(bad_timing == 0, $sformatf("%0d SCL phases of the wrong length", bad_timing));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
