// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// Writes a random stream at 11.25 MHz-like speed on one clock and reads it
// at an unrelated faster clock with random stalls, then the reverse speed
// ratio; every word read is compared with a scoreboard queue. Also checks
// that full rises after DEPTH writes with the reader stopped, that the
// reader then sees DEPTH words, and that empty is set after the FIFO is drained.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int DEPTH = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en, rnd = 0;
  logic [15:0] wdata = 0, rdata;
  logic wfull, rempty;
  logic [$clog2(DEPTH):0] wlevel, rlevel;
  int checks = 0, failures = 0;
  real wper = 44.4, rper = 4.63;
  logic [15:0] q[$];

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  async_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reader: pops with random stalls and checks against the queue
  bit reader_on = 0;
  always @(posedge rclk) begin
    if (reader_on && !rempty && rd_en) begin
      check(q.size() > 0, "read with empty scoreboard");
      if (q.size() > 0) begin
        logic [15:0] e;
        e = q.pop_front();
        check(rdata == e, $sformatf("data %h expected %h", rdata, e));
      end
    end
    rnd <= ($urandom_range(3) != 0);
  end
  assign rd_en = reader_on && rnd && !rempty;

  task automatic write_burst(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge wclk);
      while (wfull) @(negedge wclk);
      wr_en = 1; wdata = 16'($urandom);
      @(posedge wclk);
      q.push_back(wdata);
      #1 wr_en = 0;
    end
  endtask

  initial begin
    #200 wrst_n = 1; rrst_n = 1;
    // phase 1: slow writer, fast reader
    reader_on = 1;
    write_burst(300);
    repeat (50) @(posedge wclk);
    check(q.size() == 0, "phase 1 drained");
    check(rempty, "empty after drain");
    // phase 2: reader stopped, fill to full
    reader_on = 0;
    repeat (10) @(posedge rclk);
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wclk); wr_en = 1; wdata = 16'(1000 + i);
      @(posedge wclk); if (!wfull) q.push_back(wdata);
    end
    #1 wr_en = 0;
    check(wfull, "full after DEPTH writes");
    check(wlevel == DEPTH, "write level at full");
    check(q.size() == DEPTH, $sformatf("accepted %0d words", q.size()));
    repeat (5) @(posedge rclk);
    check(rlevel == DEPTH, "reader sees DEPTH words");
    reader_on = 1;
    repeat (200) @(posedge rclk);
    check(q.size() == 0 && rempty, "drained after full");
    // phase 3: fast writer, slow reader
    reader_on = 0;
    wper = 4.63; rper = 44.4;
    repeat (4) @(posedge wclk);
    reader_on = 1;
    write_burst(200);
    repeat (2000) @(posedge rclk);
    check(q.size() == 0, "phase 3 drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
