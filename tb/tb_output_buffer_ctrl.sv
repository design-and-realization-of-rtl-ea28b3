// tb_output_buffer_ctrl: self-checking test of the line-to-row mapping and
// the luminance feed.
//
// The testbench drives line numbers and byte positions like the BT.656
// generator (1716 bytes per line, Y requests on odd active bytes) and plays
// the SDRAM side: on every rd_req it loads the output FIFO model with 320
// words encoding the requested row. It checks that line_req comes once per
// line, that rd_req comes only on active lines with row 32 + 2k (field 1,
// line 22 + k) or 33 + 2k (field 2, line 285 + k), that pixels 0..39 and
// 680..719 are black and the others carry the requested row's bytes in
// order, that the FIFO is emptied exactly by each line, and that lines
// before en show black.
`timescale 1ns/1ps
module tb_output_buffer_ctrl;
  logic clk = 0, rst_n = 0, en = 0;
  logic line_start, y_req;
  logic [9:0] line = 1, y_idx;
  logic [10:0] hcnt = 0;
  logic [7:0] y_data;
  logic [15:0] fifo_rdata;
  logic fifo_empty, fifo_rd;
  logic line_req, rd_req, underflow;
  logic [9:0] rd_row;
  int checks = 0, failures = 0;
  logic [15:0] fifo[$];
  int n_lreq = 0, n_rreq = 0, n_black_lines = 0, n_pix = 0;
  int cur_row = -1;

  always #18.518 clk = ~clk;

  output_buffer_ctrl dut (.*);

  function automatic logic [7:0] pix(input int r, input int c);
    return 8'((r * 5 + c) & 8'hFF);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL line %0d hcnt %0d: %s", line, hcnt, msg); end
  endtask

  function automatic bit active(input int l);
    return (l >= 22 && l <= 261) || (l >= 285 && l <= 524);
  endfunction

  assign line_start = (hcnt == 0);
  assign y_req      = active(int'(line)) && hcnt >= 276 && ((hcnt - 276) % 2 == 1);
  assign y_idx      = 10'((hcnt - 276) >> 1);
  assign fifo_empty = (fifo.size() == 0);
  assign fifo_rdata = fifo_empty ? 16'h0 : fifo[0];

  always @(posedge clk) if (rst_n) begin
    if (hcnt == 1715) begin
      hcnt <= 0;
      line <= (line == 525) ? 1 : line + 1;
    end else hcnt <= hcnt + 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (line_req) begin
      n_lreq++;
      check(hcnt == 1, "line_req one clock after line start");
    end
    if (rd_req) begin
      int exp_row;
      n_rreq++;
      check(active(int'(line)), "rd_req only on active lines");
      exp_row = (line <= 261) ? 32 + 2 * (int'(line) - 22) : 33 + 2 * (int'(line) - 285);
      check(int'(rd_row) == exp_row, $sformatf("row %0d expected %0d", rd_row, exp_row));
      check(fifo.size() == 0, "FIFO empty when a new row is fetched");
      cur_row = int'(rd_row);
      push_pending = 1;
    end
    if (line_start && active(int'(line)) && !en) n_black_lines++;
    if (y_req) begin
      int i;
      i = int'(y_idx);
      if (i < 40 || i >= 680 || !en || cur_row < 0)
        check(y_data == 8'h10, $sformatf("black expected at pixel %0d, got %h", i, y_data));
      else begin
        check(y_data == pix(cur_row, i - 40), $sformatf("pixel %0d = %h expected %h", i, y_data, pix(cur_row, i - 40)));
        n_pix++;
      end
      if (fifo_rd) pop_pending = 1;
    end else
      check(!fifo_rd, "no pop outside Y requests");
  end

  // FIFO model updates at the falling edge, away from the DUT's sampling edge
  bit push_pending = 0, pop_pending = 0;
  always @(negedge clk) begin
    if (pop_pending) void'(fifo.pop_front());
    if (push_pending)
      for (int k = 0; k < 320; k++) fifo.push_back({pix(cur_row, 2*k+1), pix(cur_row, 2*k)});
    pop_pending = 0; push_pending = 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first field without en: black active lines, no reads
    wait (line == 30);
    check(n_rreq == 0, "no reads before en");
    wait (line == 262);
    en = 1;
    // field 2 and field 1 of the next frame
    wait (line == 300);
    wait (line == 262);
    wait (line == 263);
    check(n_rreq == 480, $sformatf("reads %0d", n_rreq));
    check(n_lreq >= 525, $sformatf("line requests %0d", n_lreq));
    check(n_black_lines > 0, "black lines before en");
    check(n_pix == 480 * 640, $sformatf("pixels %0d", n_pix));
    check(!underflow, "no underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #80ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
