// Combiner of the ICAI (host-clock domain).
//
// When a line has been handed over (start, with the number of the full memory
// block in bank), the combiner rewinds that block's FIFOs and stacks and reads
// them out in strip order CIS1, CIS2, CIS3, CIS4 (FIFO, stack, FIFO, stack), so
// the output is the line in spatial order with overlaps already removed.
// Pixels leave as a valid/ready stream, one per clock while the host is ready;
// each beat carries the strip number, a flag on the first pixel of each strip
// and a flag on the last pixel of the combined line. The pixel counts of the
// block come from the write side and are stable while the block is read.
//
// Timing: one clock to rewind, then one clock per pixel plus one idle clock per
// strip, so a 2,816-pixel line takes about 2,821 host clocks.
module icai_combiner
  import hdipp_pkg::*;
#(
  parameter int unsigned NCIS  = CIS_PER_ICAI,
  parameter int unsigned DEPTH = CIS_PIXELS,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned KW   = $clog2(NCIS),
  localparam int unsigned TW   = $clog2(NCIS * DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic            bank,
  output logic            busy,
  // memory blocks
  input  logic [CW-1:0]   count  [2][NCIS],
  output logic [1:0]      rd_load,
  output logic [NCIS-1:0] pop    [2],
  input  pixel_t          dout   [2][NCIS],
  // combined line to the host
  output logic            out_valid,
  input  logic            out_ready,
  output icai_beat_t      out_beat
);
  typedef enum logic [1:0] {IDLE, LOAD, RUN} state_t;
  state_t        state;
  logic          rbank;
  logic [KW-1:0] k;
  logic [CW-1:0] rem;        // pixels of strip k not yet read
  logic [TW-1:0] total;      // pixels of the line not yet read
  logic          issue;
  logic          q_bank;
  logic [KW-1:0] q_k;
  logic          q_first, q_last;
  logic [TW-1:0] line_len;   // pixels of the whole line in the block

  assign busy  = (state != IDLE);
  assign issue = (state == RUN) && (rem != '0) && (!out_valid || out_ready);

  always_ff @(posedge clk)
    if (rst) begin
      state <= IDLE;
      rbank <= 1'b0;
      k     <= '0;
      rem   <= '0;
      total <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          rbank <= bank;
          state <= LOAD;
        end
        LOAD: begin
          k     <= '0;
          rem   <= count[rbank][0];
          total <= line_len;
          state <= RUN;
        end
        RUN: begin
          if (issue) begin
            rem   <= rem - 1'b1;
            total <= total - 1'b1;
          end else if (rem == '0) begin
            if (k == KW'(NCIS - 1)) state <= IDLE;
            else begin
              k   <= k + 1'b1;
              rem <= count[rbank][k + 1'b1];
            end
          end
        end
        default: state <= IDLE;
      endcase
    end

  always_comb begin
    line_len = '0;
    for (int i = 0; i < NCIS; i++) line_len += TW'(count[rbank][i]);
  end

  always_comb begin
    rd_load = '0;
    rd_load[rbank] = (state == LOAD);
    pop[0] = '0;
    pop[1] = '0;
    pop[rbank][k] = issue;
  end

  always_ff @(posedge clk)
    if (rst) out_valid <= 1'b0;
    else if (!out_valid || out_ready) out_valid <= issue;

  always_ff @(posedge clk)
    if (issue) begin
      q_bank  <= rbank;
      q_k     <= k;
      q_first <= (rem == count[rbank][k]);
      q_last  <= (total == TW'(1));
    end

  assign out_beat.pix   = dout[q_bank][q_k];
  assign out_beat.cis   = q_k;
  assign out_beat.first = q_first;
  assign out_beat.last  = q_last;
endmodule
