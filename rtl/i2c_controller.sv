// I2C controller (bus master) that writes the power-on configuration of the
// strip CISs into their I2C slave register banks.
//
// Each command is one register write: START, device address with the write
// bit, register address, data byte, STOP. The host presents a command with
// cmd_valid and it is taken when cmd_ready is high; done pulses when the STOP
// has been sent, with ack_err set if any of the three bytes was not
// acknowledged. Outputs are open-drain style: scl_o/sda_o low means pull the
// line low, high means release it; sda_i is the resolved bus line.
//
// Timing: every bit takes four phases of DIV clocks (SCL low/high/high/low),
// so the SCL rate is f_clk / (4*DIV); the default gives 100 kHz from 100 MHz.
// A write takes 29 bit times (start, 27 bits, stop). The original design only names
// the controller; write-only operation, the frame format and the rate are this
// design's choices (standard I2C, no clock stretching, single master).
module i2c_controller #(
  parameter int unsigned DIV = 250
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  logic [6:0] cmd_dev,
  input  logic [7:0] cmd_reg,
  input  logic [7:0] cmd_data,
  output logic       done,
  output logic       ack_err,
  output logic       scl_o,
  output logic       sda_o,
  input  logic       sda_i
);
  typedef enum logic [1:0] {IDLE, START, BITS, STOP} state_t;
  state_t                    state;
  logic [$clog2(DIV)-1:0]    dcnt;
  logic [1:0]                phase;
  logic [3:0]                bitn;    // 0..7 data bits, 8 = acknowledge
  logic [1:0]                byten;   // 0 address, 1 register, 2 data
  logic [23:0]               shreg;
  logic                      tick;

  assign tick      = (dcnt == $bits(dcnt)'(DIV - 1));
  assign cmd_ready = (state == IDLE);

  always_ff @(posedge clk)
    if (rst || state == IDLE || tick) dcnt <= '0;
    else                              dcnt <= dcnt + 1'b1;

  always_ff @(posedge clk)
    if (rst) begin
      state   <= IDLE;
      phase   <= '0;
      bitn    <= '0;
      byten   <= '0;
      shreg   <= '0;
      done    <= 1'b0;
      ack_err <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (cmd_valid) begin
          shreg   <= {cmd_dev, 1'b0, cmd_reg, cmd_data};
          ack_err <= 1'b0;
          phase   <= '0;
          state   <= START;
        end
        START: if (tick) begin
          phase <= phase + 1'b1;
          if (phase == 2'd3) begin
            bitn  <= '0;
            byten <= '0;
            state <= BITS;
          end
        end
        BITS: if (tick) begin
          phase <= phase + 1'b1;
          // acknowledge is sampled in the middle of the SCL high time
          if (phase == 2'd1 && bitn == 4'd8 && sda_i) ack_err <= 1'b1;
          if (phase == 2'd3) begin
            if (bitn == 4'd8) begin
              bitn <= '0;
              if (byten == 2'd2) state <= STOP;
              else               byten <= byten + 1'b1;
            end else begin
              bitn  <= bitn + 1'b1;
              shreg <= {shreg[22:0], 1'b0};
            end
          end
        end
        STOP: if (tick) begin
          phase <= phase + 1'b1;
          if (phase == 2'd3) begin
            done  <= 1'b1;
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end

  // Line levels per state and phase.
  always_comb begin
    scl_o = 1'b1;
    sda_o = 1'b1;
    unique case (state)
      IDLE:  ;
      START: begin
        sda_o = (phase < 2'd2);
        scl_o = (phase != 2'd3);
      end
      BITS: begin
        sda_o = (bitn == 4'd8) ? 1'b1 : shreg[23];
        scl_o = (phase == 2'd1 || phase == 2'd2);
      end
      STOP: begin
        sda_o = (phase >= 2'd2);
        scl_o = (phase != 2'd0);
      end
      default: ;
    endcase
  end
endmodule
