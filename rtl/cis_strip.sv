// Behavioural model of one strip CMOS image sensor (not synthesizable as a
// sensor: the photodiodes, PGA and cyclic ADC are analog). It has the digital
// ports of the real strip: pixel clock, acquisition strobe from the ICAI, the
// I2C bus, and a serial 10-bit pixel output with a valid flag.
//
// Contents: the I2C slave register bank (real RTL, cis_reg_bank), a timing
// unit that on each strobe reads the 704 pixels out serially, one per clock,
// starting READ_LAT clocks after the strobe's rising edge, and an optical
// model. The scene seen by the strip is the pattern scene_pixel(row, col): line
// n of the strip sees scene row n + ROW_AHEAD (its vertical position in the
// focal plane, in lines) and pixel p (1..704) sees scene column
// X_OFF + p - 1, or X_OFF + 704 - p when the die is mounted reversed (top row).
// The PGA/ADC model gives code = min(1023, scene * gain / 4), gain in register
// 0 (16 = unity, so the upper 8 bits of the code equal the scene value);
// register 1 bit 0 enables the read-out. Both registers reset to zero, so a
// strip outputs nothing until configured over I2C. The register map, the read
// latency and the gain law are this model's choices.
module cis_strip
  import hdipp_pkg::*;
#(
  parameter logic [6:0]  I2C_ADDR  = 7'h30,
  parameter int unsigned X_OFF     = 0,
  parameter int unsigned ROW_AHEAD = 0,
  parameter bit          REVERSED  = 1'b0,
  parameter int unsigned PIXELS    = CIS_PIXELS,
  parameter int unsigned READ_LAT  = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                strobe,
  input  logic                scl,
  input  logic                sda_i,
  output logic                sda_o,
  output logic                pix_valid,
  output logic [ADC_BITS-1:0] pix_data
);
  logic [7:0]  regs [8];
  logic        strobe_q;
  logic [15:0] line;       // lines read out so far
  logic [15:0] wait_cnt;
  logic [15:0] p;          // pixel now being read, 1-based
  logic        reading;

  cis_reg_bank #(.ADDR(I2C_ADDR), .NREGS(8)) u_regs (
    .clk, .rst, .scl_i (scl), .sda_i, .sda_o, .regs
  );

  // Scene brightness (8 bits) at a row and column of the ground image.
  function automatic logic [7:0] scene_pixel(input int unsigned row, input int unsigned col);
    logic [31:0] h;
    h = row * 32'd97 + col * 32'd31 + ((row ^ col) >> 2) * 32'd13;
    return h[7:0] ^ h[15:8];
  endfunction

  function automatic logic [ADC_BITS-1:0] adc(input logic [7:0] s, input logic [7:0] gain);
    logic [17:0] v;
    v = (18'(s) * 18'(gain)) >> 2;
    return (v > 18'd1023) ? ADC_BITS'(1023) : v[ADC_BITS-1:0];
  endfunction

  always_ff @(posedge clk)
    if (rst) begin
      strobe_q  <= 1'b0;
      line      <= '0;
      wait_cnt  <= '0;
      p         <= '0;
      reading   <= 1'b0;
      pix_valid <= 1'b0;
      pix_data  <= '0;
    end else begin
      strobe_q  <= strobe;
      pix_valid <= 1'b0;
      if (strobe && !strobe_q && regs[1][0] && !reading) begin
        reading  <= 1'b1;
        wait_cnt <= 16'(READ_LAT);
        p        <= 16'd1;
      end else if (reading) begin
        if (wait_cnt != '0) wait_cnt <= wait_cnt - 1'b1;
        else begin
          pix_valid <= 1'b1;
          pix_data  <= adc(scene_pixel(32'(line) + ROW_AHEAD,
                                       REVERSED ? X_OFF + PIXELS - 32'(p)
                                                : X_OFF + 32'(p) - 1),
                           regs[0]);
          if (p == 16'(PIXELS)) begin
            reading <= 1'b0;
            line    <= line + 1'b1;
          end
          p <= p + 1'b1;
        end
      end
    end
endmodule
