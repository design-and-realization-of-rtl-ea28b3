// tb_adv7391_i2c_config: self-checking test of the encoder set-up master.
//
// An I2C slave model on open-drain lines decodes START/STOP conditions and
// bytes sampled on rising SCL and acknowledges each byte. The test checks
// that every transfer is START, 54h, register, value, STOP, in table order,
// that SDA changes only while SCL is low except for START/STOP, that done
// rises after the last transfer with nack clear, and, with a second
// instance whose bus has no slave, that a missing acknowledge sets nack
// without stopping the sequence.
`timescale 1ns/1ps
module tb_adv7391_i2c_config;
  localparam logic [79:0] TABLE = {16'h1702, 16'h001C, 16'h0100, 16'h8010, 16'h82CB};
  logic clk = 0, rst_n = 0;
  logic scl_low, sda_low, done, nack;
  logic scl_low2, sda_low2, done2, nack2;
  logic slave_ack = 0;
  wire  scl = !scl_low;
  wire  sda = !(sda_low || slave_ack);
  int checks = 0, failures = 0;
  logic [7:0] bytes[$];
  int n_start = 0, n_stop = 0, bitc = 0;
  logic [7:0] sh;
  bit prev_scl = 1, prev_sda = 1, in_xfer = 0;

  always #18.518 clk = ~clk;

  adv7391_i2c_config #(.QUARTER(4), .POWERUP_CYCLES(100)) dut (
    .clk, .rst_n, .scl_low, .sda_low, .sda_in(sda), .done, .nack);
  adv7391_i2c_config #(.QUARTER(4), .POWERUP_CYCLES(100)) dut_noslave (
    .clk, .rst_n, .scl_low(scl_low2), .sda_low(sda_low2), .sda_in(!sda_low2), .done(done2), .nack(nack2));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // slave model, sampling the bus every system clock
  always @(posedge clk) begin
    if (scl && prev_scl && prev_sda && !sda) begin n_start++; in_xfer = 1; bitc = 0; end
    else if (scl && prev_scl && !prev_sda && sda) begin n_stop++; in_xfer = 0; end
    else if (scl && prev_scl && prev_sda != sda)
      check(0, "SDA changed while SCL high");
    if (in_xfer && scl && !prev_scl) begin
      if (bitc < 8) sh = {sh[6:0], sda};
      bitc++;
      if (bitc == 8) bytes.push_back(sh);
    end
    if (in_xfer && !scl && prev_scl) begin
      slave_ack <= (bitc == 8);          // drive ACK through the ninth clock
      if (bitc == 9) bitc = 0;
    end
    prev_scl = scl; prev_sda = sda;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done && done2);
    repeat (10) @(posedge clk);
    check(n_start == 5 && n_stop == 5, $sformatf("%0d starts, %0d stops", n_start, n_stop));
    check(bytes.size() == 15, $sformatf("%0d bytes", bytes.size()));
    for (int i = 0; i < 5 && bytes.size() == 15; i++) begin
      logic [15:0] e;
      e = TABLE[(4 - i) * 16 +: 16];
      check(bytes[3*i] == 8'h54, $sformatf("address byte %h", bytes[3*i]));
      check(bytes[3*i+1] == e[15:8], $sformatf("register %h expected %h", bytes[3*i+1], e[15:8]));
      check(bytes[3*i+2] == e[7:0], $sformatf("value %h expected %h", bytes[3*i+2], e[7:0]));
    end
    check(!nack, "acknowledged transfers");
    check(nack2, "missing acknowledge flagged");
    check(scl && sda, "bus released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
