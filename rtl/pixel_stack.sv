// 704-byte line stack of the ICAI, used for the top (even-numbered) strips.
// Those strips are mounted in reverse, so their pixel 704 lies leftmost in
// space; popping the last pushed pixel first restores spatial order with no
// arithmetic on the pixel data.
//
// Write side (wclk, the sensor pixel clock): wr_clear empties the stack at the
// start of a line, each push stores din on top; pushes past DEPTH are dropped.
// count is the stack depth (wclk domain).
// Read side (rclk, the host clock): rd_load points at the top of the stack,
// each pop returns the next pixel, last pushed first, on dout one cycle later.
// count is only read by the host domain after the line has been handed over.
module pixel_stack #(
  parameter int unsigned DEPTH = hdipp_pkg::CIS_PIXELS,
  parameter int unsigned WIDTH = hdipp_pkg::PIX_BITS,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wr_clear,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic [CW-1:0]    count,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd_load,
  input  logic             pop,
  output logic [WIDTH-1:0] dout
);
  logic [AW-1:0] rptr;
  logic          full;
  logic [CW-1:0] top;

  assign full = (count == CW'(DEPTH));
  assign top  = count - 1'b1;

  always_ff @(posedge wclk)
    if (wrst || wr_clear)  count <= '0;
    else if (push && !full) count <= count + 1'b1;

  always_ff @(posedge rclk)
    if (rrst)         rptr <= '0;
    else if (rd_load) rptr <= top[AW-1:0];
    else if (pop)     rptr <= rptr - 1'b1;

  dc_line_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_ram (
    .wclk (wclk), .we (push && !full), .waddr (count[AW-1:0]), .wdata (din),
    .rclk (rclk), .rd_en (pop), .raddr (rptr), .rdata (dout)
  );
endmodule
