// Test of the CIS I2C slave register bank, driven by a bit-level I2C master
// in the testbench (SCL 100 kHz against a 4 MHz slave clock). Checked: single
// and multi-byte writes with auto-incrementing register pointer; that every
// byte of a frame for this bank is acknowledged; that a frame for another
// address and a read frame are not acknowledged and change nothing.
module tb_cis_reg_bank;
  localparam logic [6:0] ADDR = 7'h35;
  logic clk = 1'b0, rst = 1'b1;
  always #125ns clk = ~clk;

  logic       scl = 1'b1, sda_m = 1'b1, sda_o, sda;
  logic [7:0] regs [8];
  logic [7:0] model [8];

  assign sda = sda_m & sda_o;

  cis_reg_bank #(.ADDR(ADDR), .NREGS(8)) dut (.clk, .rst, .scl_i (scl), .sda_i (sda), .sda_o, .regs);

  int unsigned checks = 0, failures = 0;
  localparam time Q = 2500ns;              // quarter of a 100 kHz bit

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic i2c_start();
    sda_m = 1'b1; scl = 1'b1; #Q;
    sda_m = 1'b0; #Q;
    scl = 1'b0; #Q;
  endtask
  task automatic i2c_stop();
    sda_m = 1'b0; #Q;
    scl = 1'b1; #Q;
    sda_m = 1'b1; #Q;
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

  task automatic frame(input logic [6:0] a, input logic rw, input logic [7:0] ptr,
                       input logic [7:0] data [$], input bit expect_ack);
    bit ack;
    i2c_start();
    i2c_byte({a, rw}, ack);
    check(ack == expect_ack, $sformatf("address %0h rw %0b: ack %0b", a, rw, ack));
    if (ack) begin
      i2c_byte(ptr, ack);
      check(ack, "register pointer not acknowledged");
      foreach (data[i]) begin
        i2c_byte(data[i], ack);
        check(ack, $sformatf("data byte %0d not acknowledged", i));
        model[(ptr + i) % 8] = data[i];
      end
    end
    i2c_stop();
    #(4 * Q);
  endtask

  task automatic compare(input string when);
    for (int i = 0; i < 8; i++)
      check(regs[i] == model[i], $sformatf("%s: reg %0d = %0h, want %0h", when, i, regs[i], model[i]));
  endtask

  initial begin
    #20ms;
    $display("FAIL: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) model[i] = '0;
    #1us rst = 1'b0;
    #1us compare("after reset");
    frame(ADDR, 1'b0, 8'd0, '{8'h10}, 1'b1);
    compare("single write");
    frame(ADDR, 1'b0, 8'd2, '{8'hA5, 8'h5A, 8'hC3}, 1'b1);
    compare("burst write");
    frame(ADDR + 7'd1, 1'b0, 8'd0, '{8'hFF}, 1'b0);
    compare("other address");
    frame(ADDR, 1'b1, 8'd0, '{8'hFF}, 1'b0);
    compare("read frame");
    for (int t = 0; t < 4; t++) begin
      logic [7:0] d [$];
      d.delete();
      for (int i = 0; i < 1 + t; i++) d.push_back(8'($urandom));
      frame(ADDR, 1'b0, 8'($urandom_range(0, 7)), d, 1'b1);
      compare($sformatf("random write %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
