// tb_timing_generator: self-checking test of the FPA row/frame timing.
//
// Phase 1 sends a line request every 715 pixel clocks (one BT.656 line at
// 11.25 MHz) and checks that every row then lasts exactly 715 clocks, that
// LSYNC is high for the first LSYNC_WIDTH clocks of each row, that rows
// count 0..ROWS_PER_FRAME-1 and wrap, and that FSYNC marks row 0 only.
// Phase 2 stops the requests and checks that rows then last LSYNC_MAX clocks.
// Phase 3 checks that a request during LSYNC is ignored and one after it is
// not.
`timescale 1ns/1ps
module tb_timing_generator;
  localparam int ROWS = 521, MAXP = 768, W = 4, PERIOD = 715;
  logic clk = 0, rst_n = 0, line_req, gen_req = 0, man_req = 0;
  logic lsync, fsync, row_start, data_row, truncated, timed_out;
  logic [9:0] pix_cnt, row_cnt;
  int checks = 0, failures = 0;
  int cyc = 0, last_start = -1, n_rows = 0, n_trunc = 0, n_to = 0, n_frames = 0;
  bit  reqs_on = 1;
  int  expect_len = PERIOD;
  int  prev_row = -1;

  always #44.444 clk = ~clk;

  assign line_req = gen_req || man_req;
  timing_generator dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // request generator: a one-cycle pulse every PERIOD clocks
  always @(posedge clk) begin
    cyc <= cyc + 1;
    gen_req <= reqs_on && rst_n && (cyc % PERIOD == PERIOD - 1);
  end

  always @(posedge clk) if (rst_n) begin
    check(lsync == (pix_cnt < W), "LSYNC width");
    check(fsync == (lsync && row_cnt == 0), "FSYNC only on row 0");
    check(data_row == (row_cnt < 512), "data_row");
    if (truncated) n_trunc++;
    if (timed_out) n_to++;
    if (row_start) begin
      check(pix_cnt == 0, "row starts at pixel 0");
      if (last_start >= 0 && n_rows > 1)
        check(cyc - last_start == expect_len,
              $sformatf("row length %0d expected %0d", cyc - last_start, expect_len));
      if (prev_row >= 0)
        check(int'(row_cnt) == (prev_row + 1) % ROWS, $sformatf("row %0d after %0d", row_cnt, prev_row));
      if (row_cnt == 0) n_frames++;
      prev_row = row_cnt;
      last_start = cyc;
      n_rows++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a little over one frame with requests
    repeat (PERIOD * (ROWS + 5)) @(posedge clk);
    check(n_frames >= 2, "row counter wrapped");
    check(n_trunc >= ROWS, "rows ended by requests");
    check(n_to == 0, "no timeouts while requests run");
    // free running
    reqs_on = 0;
    repeat (PERIOD + 10) @(posedge clk);
    n_rows = 1; expect_len = MAXP;
    repeat (MAXP * 5) @(posedge clk);
    check(n_to >= 4, $sformatf("free-running rows: %0d", n_to));
    // a request during LSYNC (pixel 2 of a row) must be ignored
    wait (row_start);
    @(negedge clk); @(negedge clk); @(negedge clk);
    check(pix_cnt == 2 && lsync, "at pixel 2 of a row");
    man_req = 1; @(negedge clk); man_req = 0;
    check(pix_cnt == 3 && !truncated, "request during LSYNC ignored");
    repeat (20) @(negedge clk);
    man_req = 1; @(negedge clk); man_req = 0;
    check(pix_cnt == 0 && row_start, "request after LSYNC starts a row");
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
