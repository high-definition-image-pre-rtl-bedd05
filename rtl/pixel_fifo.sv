// 704-byte line FIFO of the ICAI, used for the bottom (odd-numbered) strips,
// whose pixels already arrive in spatial order.
//
// Write side (wclk, the sensor pixel clock): wr_clear empties the FIFO at the
// start of a line, each push stores din at the next address; pushes past DEPTH
// are dropped. count is the number of stored pixels (wclk domain).
// Read side (rclk, the host clock): rd_load rewinds to the first stored pixel,
// each pop returns the next pixel in arrival order on dout one cycle later.
// count is read by the host domain only after the line has been handed over,
// when it no longer changes; a line is written completely before it is read
// (double buffering), so the two pointers are never compared across clocks.
module pixel_fifo #(
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

  assign full = (count == CW'(DEPTH));

  always_ff @(posedge wclk)
    if (wrst || wr_clear)  count <= '0;
    else if (push && !full) count <= count + 1'b1;

  always_ff @(posedge rclk)
    if (rrst || rd_load) rptr <= '0;
    else if (pop)        rptr <= rptr + 1'b1;

  dc_line_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_ram (
    .wclk (wclk), .we (push && !full), .waddr (count[AW-1:0]), .wdata (din),
    .rclk (rclk), .rd_en (pop), .raddr (rptr), .rdata (dout)
  );
endmodule
