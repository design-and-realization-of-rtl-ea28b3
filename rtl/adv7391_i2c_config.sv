// adv7391_i2c_config: writes the set-up registers of the ADV7391 video
// encoder over I2C after reset.
//
// After POWERUP_CYCLES clocks the master sends, for each entry of REG_TABLE
// (first entry in the most significant 16 bits), one I2C write transfer:
// START, device address DEV_ADDR with R/W = 0, register address, register
// value, STOP. Every bit takes four quarter periods of QUARTER clocks
// (27 MHz / (4 * 68) ~ 99 kHz by default). The master only ever pulls the
// lines low (open drain, pull-ups on the board): scl_low/sda_low high means
// drive the pin to 0. The slave's ACK is sampled in the middle of the ninth
// SCL high phase; a missing ACK sets the sticky nack flag and the sequence
// continues with the next entry. done goes high after the last STOP.
//
// The document states that the encoder is configured through I2C and that
// SCL and SDA have pull-ups; the device address and register values are not
// given there and come from the encoder's data sheet (software reset, DACs
// and PLL on, SD input mode, NTSC with luma filter, pixel port set-up).
module adv7391_i2c_config #(
  parameter int unsigned          QUARTER        = 68,
  parameter int unsigned          POWERUP_CYCLES = 27000,   // 1 ms
  parameter logic [6:0]           DEV_ADDR       = 7'h2A,   // 54h as an 8-bit write address
  parameter int unsigned          NUM_REGS       = 5,
  parameter logic [NUM_REGS*16-1:0] REG_TABLE    = {16'h1702, 16'h001C, 16'h0100, 16'h8010, 16'h82CB}
) (
  input  logic clk,
  input  logic rst_n,
  output logic scl_low,
  output logic sda_low,
  input  logic sda_in,
  output logic done,
  output logic nack
);
  typedef enum logic [2:0] {S_POWERUP, S_START, S_BIT, S_STOP, S_DONE} state_e;

  state_e      state;
  logic [15:0] qcnt;
  logic [14:0] pcnt;
  logic [1:0]  phase;
  logic [3:0]  bit_idx;        // 0..7 data (MSB first), 8 = ACK
  logic [1:0]  byte_idx;       // 0 address, 1 register, 2 value
  logic [$clog2(NUM_REGS+1)-1:0] reg_idx;
  logic        tick;
  logic [7:0]  cur_byte;
  logic [15:0] entry;

  assign tick  = (qcnt == '0);
  assign entry = REG_TABLE[(NUM_REGS - 1 - int'(reg_idx)) * 16 +: 16];

  always_comb begin
    unique case (byte_idx)
      2'd0:    cur_byte = {DEV_ADDR, 1'b0};
      2'd1:    cur_byte = entry[15:8];
      default: cur_byte = entry[7:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_POWERUP;
      qcnt     <= 16'(QUARTER - 1);
      pcnt     <= '0;
      phase    <= '0;
      bit_idx  <= '0;
      byte_idx <= '0;
      reg_idx  <= '0;
      scl_low  <= 1'b0;
      sda_low  <= 1'b0;
      done     <= 1'b0;
      nack     <= 1'b0;
    end else begin
      qcnt <= tick ? 16'(QUARTER - 1) : qcnt - 1'b1;
      if (tick) begin
        phase <= phase + 1'b1;
        unique case (state)
          S_POWERUP: begin
            phase <= '0;
            if (pcnt >= 15'(POWERUP_CYCLES / QUARTER)) state <= S_START;
            else pcnt <= pcnt + 1'b1;
          end
          S_START: begin
            unique case (phase)
              2'd0: begin scl_low <= 1'b0; sda_low <= 1'b0; end
              2'd1: sda_low <= 1'b1;                 // SDA falls, SCL high
              2'd2: scl_low <= 1'b1;
              2'd3: begin state <= S_BIT; bit_idx <= '0; byte_idx <= '0; end
            endcase
          end
          S_BIT: begin
            unique case (phase)
              2'd0: begin
                scl_low <= 1'b1;
                sda_low <= (bit_idx == 4'd8) ? 1'b0 : !cur_byte[3'd7 - bit_idx[2:0]];
              end
              2'd1: scl_low <= 1'b0;
              2'd2: if (bit_idx == 4'd8 && sda_in) nack <= 1'b1;
              2'd3: begin
                scl_low <= 1'b1;
                if (bit_idx == 4'd8) begin
                  bit_idx <= '0;
                  if (byte_idx == 2'd2) state <= S_STOP;
                  else byte_idx <= byte_idx + 1'b1;
                end else begin
                  bit_idx <= bit_idx + 1'b1;
                end
              end
            endcase
          end
          S_STOP: begin
            unique case (phase)
              2'd0: begin scl_low <= 1'b1; sda_low <= 1'b1; end
              2'd1: scl_low <= 1'b0;
              2'd2: sda_low <= 1'b0;                 // SDA rises, SCL high
              2'd3: begin
                if (int'(reg_idx) == NUM_REGS - 1) state <= S_DONE;
                else begin
                  reg_idx <= reg_idx + 1'b1;
                  state   <= S_START;
                end
              end
            endcase
          end
          S_DONE: begin
            done  <= 1'b1;
            phase <= '0;
          end
          default: state <= S_DONE;
        endcase
      end
    end
  end
endmodule
