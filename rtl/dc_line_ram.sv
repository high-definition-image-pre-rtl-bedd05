// Dual-clock line memory: one write port on the pixel clock, one read port on
// the host clock. The read data is registered and only changes on a cycle with
// rd_en, so a stalled reader keeps its word. Both ports are plain synchronous
// RAM ports; no ordering between them is guaranteed, so the user must not read
// a word in the same line period in which it is written (the ICAI's double
// buffering ensures that). Memory contents are not reset.
module dc_line_ram #(
  parameter int unsigned DEPTH = 704,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic             rd_en,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge rclk)
    if (rd_en) rdata <= mem[raddr];
endmodule
