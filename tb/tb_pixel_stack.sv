// Test of the 704-byte line stack: several lines of random length (one longer
// than the stack, to check that extra pushes are dropped) are pushed on a
// 4 MHz write clock and popped on an unrelated 33 MHz read clock with random
// pauses; the data must come back in reverse order (last pushed first), one read clock after
// each pop, and count must equal the number of pushes kept.
module tb_pixel_stack;
  localparam int unsigned DEPTH = 704;
  logic wclk = 1'b0, rclk = 1'b0, wrst = 1'b1, rrst = 1'b1;
  always #125ns wclk = ~wclk;
  always #15ns  rclk = ~rclk;

  logic        wr_clear = 1'b0, push = 1'b0, rd_load = 1'b0, pop = 1'b0;
  logic [7:0]  din = '0, dout;
  logic [9:0]  count;

  pixel_stack dut (.wclk, .wrst, .wr_clear, .push, .din, .count,
                   .rclk, .rrst, .rd_load, .pop, .dout);

  int unsigned checks = 0, failures = 0;
  logic [7:0]  line_data [DEPTH];

  initial begin
    #20ms;
    $display("FAIL: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned lens [4] = '{704, 100, 707, 1};
    repeat (3) @(posedge wclk);
    wrst = 1'b0; rrst = 1'b0;
    foreach (lens[t]) begin
      int unsigned n;
      n = (lens[t] > DEPTH) ? DEPTH : lens[t];
      @(posedge wclk) wr_clear <= 1'b1;
      @(posedge wclk) wr_clear <= 1'b0;
      for (int unsigned i = 0; i < lens[t]; i++) begin
        logic [7:0] v;
        v = 8'($urandom);
        if (i < DEPTH) line_data[i] = v;
        @(posedge wclk) begin push <= 1'b1; din <= v; end
      end
      @(posedge wclk) push <= 1'b0;
      @(posedge wclk);
      checks++;
      if (count != 10'(n)) begin
        failures++;
        $display("FAIL: line %0d count %0d, expected %0d", t, count, n);
      end
      @(posedge rclk) rd_load <= 1'b1;
      @(posedge rclk) rd_load <= 1'b0;
      for (int unsigned i = 0; i < n; i++) begin
        logic [7:0] exp;
        while ($urandom_range(0, 3) == 0) @(posedge rclk);
        pop <= 1'b1;
        @(posedge rclk) pop <= 1'b0;
        @(negedge rclk);
        exp = line_data[n - 1 - i];
        checks++;
        if (dout !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL: line %0d pixel %0d got %0h want %0h", t, i, dout, exp);
        end
        @(posedge rclk);
        checks++;
        if (dout !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL: line %0d pixel %0d not held while idle", t, i);
        end
        #1ns;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
