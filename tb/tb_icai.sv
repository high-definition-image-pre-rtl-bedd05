// Test of a complete ICAI: four strips modelled in the testbench answer every
// strobe with 704 pixels; pixel i of strip k in line n carries a tag derived
// from (n, k, i). The host side takes the combined lines with random
// back-pressure on a 100 MHz clock. Each line must arrive in spatial order:
// strip 1 pixels 1..C_1, strip 2 pixels 704 down to C_2, strip 3 1..C_3,
// strip 4 704 down to C_4 (overlaps removed, top strips reversed), one
// line_ready per line, lines in order with nothing lost, and each line handed
// over at the start of the next time stage and read within that stage of
// 1000 pixel clocks.
module tb_icai;
  import hdipp_pkg::*;
  localparam int unsigned PERIOD = 1000;
  localparam int unsigned LINES  = 6;
  logic wclk = 1'b0, rclk = 1'b0, wrst = 1'b1, rrst = 1'b1;
  always #125ns wclk = ~wclk;
  always #5ns   rclk = ~rclk;

  logic                cfg_enable = 1'b0;
  ov_t                 cfg_ov [4];
  logic                strobe, line_ready, busy, out_valid, out_ready = 1'b0;
  logic [3:0]          cis_valid = '0;
  logic [ADC_BITS-1:0] cis_data [4];
  icai_beat_t          out_beat;

  icai dut (.wclk, .wrst, .cfg_enable, .cfg_line_period (16'(PERIOD)), .cfg_ov, .strobe,
            .cis_valid, .cis_data, .rclk, .rrst, .line_ready, .busy,
            .out_valid, .out_ready, .out_beat);

  int unsigned checks = 0, failures = 0;
  int unsigned ovs [4] = '{8, 4, 2, 1};
  int unsigned n_ready = 0, n_strobe = 0, rcyc = 0;
  logic        strobe_q = 1'b0;

  function automatic pixel_t tag(input int n, input int k, input int i);
    return pixel_t'(i * 3 + k * 61 + n * 17);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // strip models
  initial begin
    static int n = 0;
    for (int k = 0; k < 4; k++) cis_data[k] = '0;
    forever begin
      @(posedge wclk);
      strobe_q <= strobe;
      if (strobe && !strobe_q && !wrst) begin
        n_strobe++;
        repeat (2) @(posedge wclk);
        for (int i = 1; i <= 704; i++) begin
          cis_valid <= '1;
          for (int k = 0; k < 4; k++) cis_data[k] <= {tag(n, k, i), 2'b10};
          @(posedge wclk);
        end
        cis_valid <= '0;
        n++;
      end
    end
  end

  always @(posedge rclk) begin
    rcyc++;
    out_ready <= ($urandom_range(0, 3) != 0);
    if (line_ready && !rrst) n_ready++;
  end

  initial begin
    #10ms;
    $display("FAIL: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) cfg_ov[k] = ov_t'(ovs[k]);
    repeat (3) @(posedge wclk);
    wrst = 1'b0; rrst = 1'b0;
    @(posedge wclk) cfg_enable <= 1'b1;
    for (int n = 0; n < LINES; n++) begin
      pixel_t exp [$];
      int     cis [$];
      int     m, bad, t_start, t_end;
      exp.delete();
      cis.delete();
      for (int k = 0; k < 4; k++) begin
        int c;
        c = (k % 2 == 0) ? 704 - ovs[k] : ovs[k];
        if (k % 2 == 0) for (int i = 1; i <= c; i++)   begin exp.push_back(tag(n, k, i)); cis.push_back(k); end
        else            for (int i = 704; i >= c; i--) begin exp.push_back(tag(n, k, i)); cis.push_back(k); end
      end
      while (!line_ready) @(posedge rclk);
      t_start = rcyc;
      m = 0; bad = 0;
      while (m < exp.size()) begin
        @(posedge rclk);
        if (out_valid && out_ready) begin
          if (out_beat.pix != exp[m] || int'(out_beat.cis) != cis[m] ||
              out_beat.last != (m == exp.size() - 1) ||
              out_beat.first != (m == 0 || cis[m] != cis[m - 1])) begin
            if (bad == 0) $display("line %0d beat %0d: got %0h/%0d want %0h/%0d", n, m,
                                   out_beat.pix, out_beat.cis, exp[m], cis[m]);
            bad++;
          end
          m++;
        end
      end
      t_end = rcyc;
      check(bad == 0, $sformatf("line %0d: %0d wrong beats of %0d", n, bad, exp.size()));
      check(t_end - t_start < PERIOD * 25, $sformatf("line %0d read-out took %0d host clocks, more than a stage", n, t_end - t_start));
      check(n_strobe == n + 2, $sformatf("line %0d handed over in stage %0d, not in the next stage", n, n_strobe));
    end
    repeat (20) @(posedge rclk);
    check(!out_valid && !busy, "output after the last line");
    check(n_ready == LINES, $sformatf("%0d line notifications for %0d lines", n_ready, LINES));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
