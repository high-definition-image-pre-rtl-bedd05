// Test of the image sensor control logic. Four strips are modelled in the
// testbench: on each strobe they send 704 pixels, one per clock, after a short
// delay; pixel i of strip k carries the tag (i + 37k) in its upper 8 bits.
// Checked: the strobe period and width; that each line is written into the
// other memory block than the previous one; that exactly the pixels the overlap rule
// keeps are pushed, in order (odd strip 1..C_K, even strip C_K..704); that the
// completion toggle flips once per line, on the clock the next strobe rises,
// and names the block just written.
module tb_isc_logic;
  import hdipp_pkg::*;
  localparam int unsigned PERIOD = 1000;
  localparam int unsigned LINES  = 5;
  logic clk = 1'b0, rst = 1'b1;
  always #125ns clk = ~clk;

  logic                cfg_enable = 1'b0;
  ov_t                 cfg_ov [4];
  logic                strobe;
  logic [3:0]          cis_valid = '0;
  logic [ADC_BITS-1:0] cis_data [4];
  logic                wbank, done_tgl, done_bank;
  logic [1:0]          wr_clear;
  logic [3:0]          push [2];
  pixel_t              din [4];

  isc_logic dut (.clk, .rst, .cfg_enable, .cfg_line_period (16'(PERIOD)), .cfg_ov,
                 .strobe, .cis_valid, .cis_data, .wbank, .wr_clear, .push, .din,
                 .done_tgl, .done_bank);

  int unsigned checks = 0, failures = 0;
  int unsigned ovs [4] = '{3, 5, 0, 8};
  int unsigned cyc = 0, last_rise = 0, n_rise = 0, high_len = 0;
  int unsigned n_toggle = 0;
  logic        strobe_q = 1'b0, tgl_q = 1'b0;  // reset values of the DUT
  int          line = -1;
  pixel_t      got [2][4][$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // strip models: read out 704 pixels 3 clocks after the strobe rises
  initial begin
    for (int k = 0; k < 4; k++) cis_data[k] = '0;
    forever begin
      @(posedge clk);
      if (strobe && !strobe_q && !rst) begin
        repeat (3) @(posedge clk);
        for (int i = 1; i <= 704; i++) begin
          cis_valid <= '1;
          for (int k = 0; k < 4; k++) cis_data[k] <= {8'(i + 37 * k), 2'(k)};
          @(posedge clk);
        end
        cis_valid <= '0;
      end
    end
  end

  // monitor
  always @(posedge clk) if (!rst) begin
    cyc++;
    strobe_q <= strobe;
    if (strobe && !strobe_q) begin
      if (n_rise > 0) check(cyc - last_rise == PERIOD, $sformatf("strobe period %0d", cyc - last_rise));
      if (n_rise > 0) check(high_len == 4, $sformatf("strobe width %0d", high_len));
      high_len = 0;
      last_rise = cyc;
      n_rise++;
    end
    if (strobe) high_len++;
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < 4; k++)
        if (push[b][k]) got[b][k].push_back(din[k]);
    tgl_q <= done_tgl;
    if (done_tgl != tgl_q) check(strobe && !strobe_q, "line handed over away from a stage start");
    if (done_tgl != tgl_q) begin
      int b;
      n_toggle++;
      line++;
      b = line % 2;
      check(done_bank == 1'(b), $sformatf("line %0d reported in block %0d", line, done_bank));
      check(got[1 - b][0].size() == 0 && got[1 - b][1].size() == 0,
            $sformatf("line %0d wrote into the wrong block", line));
      for (int k = 0; k < 4; k++) begin
        int unsigned c, lo, hi;
        c  = (k % 2 == 0) ? 704 - ovs[k] : (ovs[k] == 0 ? 1 : ovs[k]);
        lo = (k % 2 == 0) ? 1 : c;
        hi = (k % 2 == 0) ? c : 704;
        check(got[b][k].size() == hi - lo + 1,
              $sformatf("line %0d strip %0d kept %0d pixels, want %0d", line, k + 1, got[b][k].size(), hi - lo + 1));
        for (int unsigned i = lo; i <= hi && i - lo < got[b][k].size(); i++)
          if (got[b][k][i - lo] != 8'(i + 37 * k)) begin
            check(1'b0, $sformatf("line %0d strip %0d pixel %0d wrong", line, k + 1, i));
            break;
          end
        got[b][k].delete();
      end
    end
  end

  initial begin
    #5ms;
    $display("FAIL: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) cfg_ov[k] = ov_t'(ovs[k]);
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(posedge clk) cfg_enable <= 1'b1;
    wait (n_toggle == LINES);
    check(n_rise >= LINES, "too few strobes");
    check(line == LINES - 1, "line count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
