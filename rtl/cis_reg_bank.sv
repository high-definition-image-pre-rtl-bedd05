// I2C slave register bank of a strip CIS. It holds the configuration of the
// strip's circuit blocks (timing unit, PGA, ADC), written once at power-on by
// the system's I2C controller.
//
// The bus is oversampled with the strip's own clock through two-flop
// synchronizers, so SCL must be slower than about clk/8. A write frame is
// START, address byte (7-bit ADDR, R/W = 0), register pointer, then any number
// of data bytes written to consecutive registers; every byte is acknowledged.
// Frames for another address, and read frames, are ignored (not acknowledged).
// sda_o low pulls the data line low. Registers reset to zero.
//
// The original design states only that all configurations are held in an I2C slave
// register bank; the protocol subset, register count and reset values are this
// design's choices.
module cis_reg_bank #(
  parameter logic [6:0]  ADDR  = 7'h30,
  parameter int unsigned NREGS = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       sda_o,
  output logic [7:0] regs [NREGS]
);
  localparam int unsigned PW = $clog2(NREGS);

  logic       scl_s, sda_s, scl_q, sda_q;
  logic       scl_rise, scl_fall, start_c, stop_c;
  logic       active;             // inside a frame addressed to this bank
  logic [3:0] bitn;               // bits of the current byte received so far
  logic [1:0] byten;              // 0 address, 1 pointer, 2 data
  logic [7:0] shreg;
  logic [PW-1:0] ptr;
  logic       ack_drive;
  logic       ack_phase;          // between the two falling edges of the acknowledge

  sync_2ff u_scl (.clk, .rst, .d (scl_i), .q (scl_s));
  sync_2ff u_sda (.clk, .rst, .d (sda_i), .q (sda_s));

  always_ff @(posedge clk)
    if (rst) {scl_q, sda_q} <= 2'b11;
    else     {scl_q, sda_q} <= {scl_s, sda_s};

  assign scl_rise = scl_s && !scl_q;
  assign scl_fall = !scl_s && scl_q;
  assign start_c  = scl_s && scl_q && sda_q && !sda_s;
  assign stop_c   = scl_s && scl_q && !sda_q && sda_s;

  always_ff @(posedge clk)
    if (rst) begin
      active    <= 1'b0;
      bitn      <= '0;
      byten     <= '0;
      shreg     <= '0;
      ptr       <= '0;
      ack_drive <= 1'b0;
      ack_phase <= 1'b0;
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (start_c) begin
      active    <= 1'b1;
      bitn      <= '0;
      byten     <= '0;
      ack_drive <= 1'b0;
      ack_phase <= 1'b0;
    end else if (stop_c) begin
      active    <= 1'b0;
      ack_drive <= 1'b0;
      ack_phase <= 1'b0;
    end else if (active) begin
      // bits are counted on rising SCL edges; the acknowledge is driven from
      // the falling edge after the eighth bit to the falling edge after the
      // acknowledge clock
      if (scl_rise && bitn < 4'd8) begin
        shreg <= {shreg[6:0], sda_s};
        bitn  <= bitn + 1'b1;
      end
      if (scl_fall && bitn == 4'd8) begin
        if (!ack_phase) begin
          ack_phase <= 1'b1;
          unique case (byten)
            2'd0: begin
              if (shreg[7:1] == ADDR && !shreg[0]) ack_drive <= 1'b1;
              else active <= 1'b0;
            end
            2'd1: begin
              ptr       <= shreg[PW-1:0];
              ack_drive <= 1'b1;
            end
            default: begin
              regs[ptr] <= shreg;
              ptr       <= ptr + 1'b1;
              ack_drive <= 1'b1;
            end
          endcase
        end else begin
          ack_phase <= 1'b0;
          ack_drive <= 1'b0;
          bitn      <= '0;
          if (byten != 2'd2) byten <= byten + 1'b1;
        end
      end
    end

  assign sda_o = !ack_drive;
endmodule
