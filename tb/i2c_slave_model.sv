// i2c_slave_model: write-only I2C slave for simulation. Watches open-drain
// SCL/SDA (sampled on a fast system clock), detects START and STOP, shifts
// in bytes on rising SCL, pulls SDA low through the ninth clock of each byte
// to acknowledge, and counts starts, stops, bytes and SDA changes while SCL
// is high outside START/STOP (errors). The first byte of each transfer is
// compared with ADDR; its ACK is given only on a match.
module i2c_slave_model #(
  parameter logic [7:0] ADDR = 8'h54
) (
  input  logic clk,
  input  logic scl,
  input  logic sda,
  output logic sda_pull
);
  int n_start = 0, n_stop = 0, n_bytes = 0, errors = 0, bitc = 0, byte_in_xfer = 0;
  logic [7:0] sh = '0, last_byte = '0;
  bit prev_scl = 1, prev_sda = 1, in_xfer = 0, addr_ok = 0;

  initial sda_pull = 0;

  always @(posedge clk) begin
    if (scl && prev_scl && prev_sda && !sda) begin
      n_start++; in_xfer = 1; bitc = 0; byte_in_xfer = 0;
    end else if (scl && prev_scl && !prev_sda && sda) begin
      n_stop++; in_xfer = 0;
    end else if (scl && prev_scl && prev_sda != sda) begin
      errors++;
    end
    if (in_xfer && scl && !prev_scl) begin
      if (bitc < 8) sh = {sh[6:0], sda};
      bitc++;
      if (bitc == 8) begin
        n_bytes++; last_byte = sh;
        if (byte_in_xfer == 0) addr_ok = (sh == ADDR);
        byte_in_xfer++;
      end
    end
    if (in_xfer && !scl && prev_scl) begin
      sda_pull <= (bitc == 8) && addr_ok;
      if (bitc == 9) bitc = 0;
    end
    prev_scl = scl; prev_sda = sda;
  end
endmodule
