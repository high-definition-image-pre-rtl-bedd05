// Test of the ICAI combiner against a model of the two memory blocks: each of
// the eight memories holds a known pixel sequence in read-out order. For
// several lines, alternating between the blocks and with different strip
// lengths, the output stream must be strip 1, 2, 3, 4 back to back with the
// right strip tags, a first flag on each strip's first pixel and a last flag
// on the final pixel only. Lines are read once with random back-pressure and
// once with the host always ready, where the line must take no more than one
// clock per pixel plus one per strip and a few clocks of start-up.
module tb_icai_combiner;
  import hdipp_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5ns clk = ~clk;

  logic       start = 1'b0, bank = 1'b0, busy;
  logic [9:0] count [2][4];
  logic [1:0] rd_load;
  logic [3:0] pop [2];
  pixel_t     dout [2][4];
  logic       out_valid, out_ready;
  icai_beat_t out_beat;

  icai_combiner dut (.clk, .rst, .start, .bank, .busy, .count, .rd_load, .pop, .dout,
                     .out_valid, .out_ready, .out_beat);

  int unsigned checks = 0, failures = 0;
  pixel_t      seq  [2][4][$];
  int unsigned rptr [2][4];
  bit          random_ready = 1'b1;
  int          cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // memory model: rewind on rd_load, registered data on pop
  always @(posedge clk) begin
    cyc++;
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < 4; k++) begin
        if (rd_load[b]) rptr[b][k] = 0;
        else if (pop[b][k]) begin
          dout[b][k] <= seq[b][k][rptr[b][k]];
          rptr[b][k]++;
        end
      end
    out_ready <= random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  initial begin
    #10ms;
    $display("FAIL: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++) for (int k = 0; k < 4; k++) begin
      dout[b][k] = '0; count[b][k] = '0; rptr[b][k] = 0;
    end
    out_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int line = 0; line < 6; line++) begin
      int b, total, n, k_exp, i_exp, t0, t1;
      b = line % 2;
      random_ready = (line < 4);
      total = 0;
      for (int k = 0; k < 4; k++) begin
        int len;
        len = 696 + $urandom_range(0, 8);
        seq[b][k].delete();
        for (int i = 0; i < len; i++) seq[b][k].push_back(pixel_t'($urandom));
        count[b][k] = 10'(len);
        total += len;
      end
      @(posedge clk) begin start <= 1'b1; bank <= 1'(b); end
      @(posedge clk) start <= 1'b0;
      t0 = cyc;
      n = 0; k_exp = 0; i_exp = 0; t1 = 0;
      while (n < total) begin
        @(posedge clk);
        if (out_valid && out_ready) begin
          while (i_exp >= seq[b][k_exp].size()) begin k_exp++; i_exp = 0; end
          check(out_beat.pix == seq[b][k_exp][i_exp] && out_beat.cis == 2'(k_exp),
                $sformatf("line %0d beat %0d: pixel %0h strip %0d, want %0h strip %0d",
                          line, n, out_beat.pix, out_beat.cis, seq[b][k_exp][i_exp], k_exp));
          check(out_beat.first == (i_exp == 0), $sformatf("line %0d beat %0d first flag", line, n));
          check(out_beat.last == (n == total - 1), $sformatf("line %0d beat %0d last flag", line, n));
          i_exp++; n++;
          t1 = cyc;
        end
      end
      repeat (3) @(posedge clk);
      check(!busy && !out_valid, $sformatf("line %0d: extra output after the last pixel", line));
      if (!random_ready)
        check(t1 - t0 <= total + 4 + 3, $sformatf("line %0d took %0d clocks for %0d pixels", line, t1 - t0, total));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
