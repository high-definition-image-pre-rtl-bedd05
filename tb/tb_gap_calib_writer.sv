// Test of the vertical-gap write engine with four ICAI streams. For random
// overlaps (0..8) and vertical gaps (0..64) per strip, the testbench computes
// Comb_Pixels and every strip's initial write pointer itself, then
// feeds lines on all four streams at once with random gaps while the SDRAM
// port applies random back-pressure. Every write must carry the expected pixel
// to base + Init_WPtr(K) + (N-1)*Comb_Pixels + offset in segment, in
// ICAI order; line_done and the line counter must follow. The table is then
// reloaded with a second configuration and the test repeated.
module tb_gap_calib_writer;
  import hdipp_pkg::*;
  localparam int unsigned NI = 4, NK = 16, LINES = 3;
  logic clk = 1'b0, rst = 1'b1;
  always #5ns clk = ~clk;

  logic                cfg_load = 1'b0, init_done;
  ov_t                 cfg_ov [NK];
  gp_t                 cfg_gp [NK];
  logic [SDRAM_AW-1:0] cfg_base;
  logic [NI-1:0]       in_valid = '0, in_ready;
  icai_beat_t          in_beat [NI];
  logic                mem_valid, mem_ready = 1'b0, line_done;
  logic [SDRAM_AW-1:0] mem_addr;
  pixel_t              mem_data;
  logic [31:0]         lines;

  gap_calib_writer dut (.clk, .rst, .cfg_load, .cfg_ov, .cfg_gp, .cfg_base, .init_done,
                        .in_valid, .in_ready, .in_beat, .mem_valid, .mem_ready,
                        .mem_addr, .mem_data, .line_done, .lines);

  int unsigned checks = 0, failures = 0, bad = 0, n_done = 0;
  int unsigned kept [NK];
  longint      exp_addr [$];
  pixel_t      exp_pix  [$];

  function automatic pixel_t tag(input int n, input int k, input int j);
    return pixel_t'(j * 7 + k * 29 + n * 3);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    mem_ready <= ($urandom_range(0, 4) != 0);
    if (line_done && !rst) n_done++;
    if (mem_valid && mem_ready) begin
      checks++;
      if (exp_addr.size() == 0 || longint'(mem_addr) != exp_addr[0] || mem_data != exp_pix[0]) begin
        failures++;
        if (failures < 10)
          $display("FAIL: write %0h<=%0h, want %0h<=%0h", mem_addr, mem_data,
                   exp_addr.size() ? exp_addr[0] : 64'd0, exp_pix.size() ? exp_pix[0] : 0);
      end
      if (exp_addr.size()) begin
        void'(exp_addr.pop_front());
        void'(exp_pix.pop_front());
      end
    end
  end

  // stream i: line n of ICAI i, strips 4i..4i+3
  task automatic drive(input int i, input int n);
    int total, m;
    total = 0;
    for (int k = 4 * i; k < 4 * i + 4; k++) total += kept[k];
    m = 0;
    for (int k = 4 * i; k < 4 * i + 4; k++)
      for (int j = 0; j < kept[k]; j++) begin
        in_beat[i].pix   <= tag(n, k, j);
        in_beat[i].cis   <= 2'(k % 4);
        in_beat[i].first <= (j == 0);
        in_beat[i].last  <= (m == total - 1);
        in_valid[i]      <= ($urandom_range(0, 5) != 0);
        @(posedge clk);
        while (!(in_valid[i] && in_ready[i])) begin
          in_valid[i] <= 1'b1;
          @(posedge clk);
        end
        m++;
      end
    in_valid[i] <= 1'b0;
  endtask

  initial begin
    #20ms;
    $display("FAIL: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NI; i++) in_beat[i] = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int pass = 0; pass < 2; pass++) begin
      longint comb, col, init;
      int     base_lines;
      base_lines = int'(lines);
      cfg_base = SDRAM_AW'($urandom_range(0, 1 << 20));
      comb = 0;
      for (int k = 0; k < NK; k++) begin
        int ov;
        ov = (pass == 0) ? $urandom_range(0, 8) : (k == NK - 1 ? 1 : 8 - k % 9);
        cfg_ov[k] = ov_t'(ov);
        cfg_gp[k] = gp_t'((pass == 0) ? $urandom_range(0, 64) : 64 - k);
        kept[k] = (k % 2 == 0) ? 704 - ov : (ov == 0 ? 704 : 705 - ov);
        comb += kept[k];
      end
      // expected writes
      for (int n = 0; n < LINES; n++) begin
        col = 0;
        for (int k = 0; k < NK; k++) begin
          init = col + longint'(cfg_gp[k]) * comb;
          for (int j = 0; j < kept[k]; j++) begin
            exp_addr.push_back((longint'(cfg_base) + init + n * comb + j) % (longint'(1) << SDRAM_AW));
            exp_pix.push_back(tag(n, k, j));
          end
          col += kept[k];
        end
      end
      @(posedge clk) cfg_load <= 1'b1;
      @(posedge clk) cfg_load <= 1'b0;
      // streams start before the table is ready: nothing may be written early
      fork
        for (int n = 0; n < LINES; n++) drive(0, n);
        for (int n = 0; n < LINES; n++) drive(1, n);
        for (int n = 0; n < LINES; n++) drive(2, n);
        for (int n = 0; n < LINES; n++) drive(3, n);
      join
      repeat (5) @(posedge clk);
      check(exp_addr.size() == 0, $sformatf("pass %0d: %0d writes missing", pass, exp_addr.size()));
      check(int'(lines) == LINES, $sformatf("pass %0d: line counter %0d", pass, lines));
      check(n_done == LINES * (pass + 1), $sformatf("pass %0d: %0d line_done pulses", pass, n_done));
      $display("pass %0d: Comb_Pixels %0d", pass, comb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
