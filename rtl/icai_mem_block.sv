// One ICAI memory block: a 704-byte FIFO, a stack, a FIFO and a stack, one per
// strip CIS in the order CIS1..CIS4. Odd strips (bottom row,
// pixels in spatial order) use FIFOs; even strips (top row, mounted in reverse)
// use stacks so that they are read out last pixel first. Two of these blocks
// form the ICAI's double buffer.
//
// All four memories share the write clock (sensor pixel rate) and a clear, and
// share the read clock (host rate) and a rewind; each has its own push and pop.
// Read data appears one read-clock cycle after pop.
module icai_mem_block
  import hdipp_pkg::*;
#(
  parameter int unsigned NCIS  = CIS_PER_ICAI,
  parameter int unsigned DEPTH = CIS_PIXELS,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic               wclk,
  input  logic               wrst,
  input  logic               wr_clear,
  input  logic [NCIS-1:0]    push,
  input  pixel_t             din   [NCIS],
  output logic [CW-1:0]      count [NCIS],
  input  logic               rclk,
  input  logic               rrst,
  input  logic               rd_load,
  input  logic [NCIS-1:0]    pop,
  output pixel_t             dout  [NCIS]
);
  for (genvar k = 0; k < NCIS; k++) begin : g_mem
    if (k % 2 == 0) begin : g_fifo      // CIS1, CIS3, ...: bottom strips
      pixel_fifo #(.DEPTH(DEPTH), .WIDTH(PIX_BITS)) u_fifo (
        .wclk, .wrst, .wr_clear, .push (push[k]), .din (din[k]), .count (count[k]),
        .rclk, .rrst, .rd_load, .pop (pop[k]), .dout (dout[k])
      );
    end else begin : g_stack            // CIS2, CIS4, ...: reversed top strips
      pixel_stack #(.DEPTH(DEPTH), .WIDTH(PIX_BITS)) u_stack (
        .wclk, .wrst, .wr_clear, .push (push[k]), .din (din[k]), .count (count[k]),
        .rclk, .rrst, .rd_load, .pop (pop[k]), .dout (dout[k])
      );
    end
  end
endmodule
