// tb_input_buffer_ctrl: self-checking test of the ADC capture and packing.
//
// The testbench plays the timing generator (715-pixel rows, rows counted
// 0..520, rows >= 512 blank) and the sensor/ADC: the 12-bit sample at pixel
// counter value c of row r is pix(r, c - DATA_START + 1) in the upper 8
// bits plus noise in the low 4 bits, the one-clock offset being the capture
// register. It checks that each data row produces exactly 320 FIFO words,
// each holding columns 2k (low byte) and 2k+1 (high byte), that wr_req
// comes exactly at pixel counter 645 with the row number, that blank rows
// and rows started before en give neither words nor requests.
`timescale 1ns/1ps
module tb_input_buffer_ctrl;
  localparam int PERIOD = 715, DS = 4;
  logic clk = 0, rst_n = 0, en = 0;
  logic [11:0] adc_data;
  logic row_start, data_row;
  logic [9:0] pix_cnt = 0, row_cnt = 0;
  logic fifo_wr, fifo_full = 0, wr_req, overflow;
  logic [15:0] fifo_wdata;
  logic [9:0] wr_row;
  int checks = 0, failures = 0;
  int words_in_row = 0, reqs = 0, rows_done = 0;
  bit row_valid = 0;

  always #44.444 clk = ~clk;

  input_buffer_ctrl dut (.*);

  function automatic logic [7:0] pix(input int r, input int c);
    return 8'((r * 37 + c * 11 + (c >> 3)) & 8'hFF);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL row %0d px %0d: %s", row_cnt, pix_cnt, msg); end
  endtask

  assign row_start = (pix_cnt == 0);
  assign data_row  = (row_cnt < 512);
  // sample presented to the ADC pins during pixel counter value pix_cnt;
  // it is registered inside the DUT and belongs to column pix_cnt + 1 - DS
  assign adc_data  = {pix(int'(row_cnt), int'(pix_cnt) + 1 - DS), 4'($urandom)};

  always @(posedge clk) if (rst_n) begin
    if (pix_cnt == PERIOD - 1) begin
      pix_cnt <= 0;
      row_cnt <= (row_cnt == 520) ? 0 : row_cnt + 1;
    end else pix_cnt <= pix_cnt + 1;
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (row_start) begin
      if (row_valid) begin
        check(words_in_row == 320, $sformatf("words in row %0d", words_in_row));
        rows_done++;
      end else
        check(words_in_row == 0, "no words for an invalid row");
      words_in_row = 0;
      row_valid = en && data_row;
    end
    if (fifo_wr) begin
      int k;
      k = words_in_row;
      check(row_valid, "word in an invalid row");
      check(fifo_wdata == {pix(int'(row_cnt), 2*k+1), pix(int'(row_cnt), 2*k)},
            $sformatf("word %0d = %h", k, fifo_wdata));
      words_in_row++;
    end
    if (wr_req) begin
      reqs++;
      check(row_valid, "request for an invalid row");
      check(pix_cnt == 646, $sformatf("request seen at pixel %0d", pix_cnt));  // registered: 645 + 1
      check(wr_row == row_cnt, "request row number");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // two rows without en: nothing may happen
    repeat (PERIOD * 2 + 100) @(posedge clk);
    check(reqs == 0, "no requests before en");
    en = 1;
    // run through the end of a frame (blank rows 512..520) and into the next
    wait (row_cnt == 505);
    wait (row_cnt == 3);
    @(posedge clk);
    check(rows_done >= 10, $sformatf("rows captured %0d", rows_done));
    check(!overflow, "no overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
