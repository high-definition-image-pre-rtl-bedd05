// Two-flop synchronizer for a single level signal crossing into clk's domain.
// Used for the toggle that tells the host side a line is complete; the data
// that goes with it (bank number, pixel counts) is held stable by the sender
// for a whole line period and is sampled only after the toggle has arrived.
module sync_2ff (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk)
    if (rst) {q, meta} <= '0;
    else     {q, meta} <= {meta, d};
endmodule
