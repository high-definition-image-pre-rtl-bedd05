// Test of one ICAI memory block: four lines of different lengths are written
// into the FIFO, stack, FIFO and stack at the same time (pixel clock), then
// read back on the host clock. Strips 1 and 3 must return their pixels in
// arrival order, strips 2 and 4 in reverse order; counts must match.
module tb_icai_mem_block;
  import hdipp_pkg::*;
  localparam int unsigned DEPTH = 704;
  logic wclk = 1'b0, rclk = 1'b0, wrst = 1'b1, rrst = 1'b1;
  always #125ns wclk = ~wclk;
  always #6ns   rclk = ~rclk;

  logic        wr_clear = 1'b0, rd_load = 1'b0;
  logic [3:0]  push = '0, pop = '0;
  pixel_t      din [4], dout [4];
  logic [9:0]  count [4];

  icai_mem_block dut (.wclk, .wrst, .wr_clear, .push, .din, .count,
                      .rclk, .rrst, .rd_load, .pop, .dout);

  int unsigned checks = 0, failures = 0;
  pixel_t      ref_q [4][$];
  int unsigned lens [4] = '{700, 697, 704, 703};

  initial begin
    #10ms;
    $display("FAIL: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) din[k] = '0;
    repeat (3) @(posedge wclk);
    wrst = 1'b0; rrst = 1'b0;
    for (int rep = 0; rep < 2; rep++) begin
      @(posedge wclk) wr_clear <= 1'b1;
      @(posedge wclk) wr_clear <= 1'b0;
      for (int k = 0; k < 4; k++) ref_q[k].delete();
      for (int unsigned i = 0; i < DEPTH; i++) begin
        @(posedge wclk);
        for (int k = 0; k < 4; k++) begin
          push[k] <= (i < lens[k]);
          din[k]  <= pixel_t'($urandom);
        end
        #1ns;
        for (int k = 0; k < 4; k++) if (push[k]) ref_q[k].push_back(din[k]);
      end
      @(posedge wclk) push <= '0;
      @(posedge wclk);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (count[k] != 10'(lens[k])) begin
          failures++;
          $display("FAIL: strip %0d count %0d want %0d", k + 1, count[k], lens[k]);
        end
      end
      @(posedge rclk) rd_load <= 1'b1;
      @(posedge rclk) rd_load <= 1'b0;
      for (int k = 0; k < 4; k++) begin
        for (int unsigned i = 0; i < lens[k]; i++) begin
          pixel_t exp;
          @(posedge rclk) pop <= 4'(1 << k);
          @(posedge rclk) pop <= '0;
          #1ns;
          exp = (k % 2 == 0) ? ref_q[k][i] : ref_q[k][lens[k] - 1 - i];
          checks++;
          if (dout[k] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL: strip %0d pixel %0d got %0h want %0h", k + 1, i, dout[k], exp);
          end
        end
      end
      lens = '{704, 704, 696, 698};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
