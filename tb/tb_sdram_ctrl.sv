// tb_sdram_ctrl: self-checking test of the SDRAM controller against the
// behavioural SDRAM model.
//
// Checks that ready rises only after the 100 us power-up wait and the init
// sequence, with no protocol error reported by the model at any time; that
// a requested row write waits until the input FIFO holds a whole row; that
// rows written through the input FIFO come back word for word through the
// output FIFO when read (two rows, so the row address matters); that a read
// delivers its 320 words within T_RCD + CAS latency + 320 + a small margin
// of clocks after the request; and that auto-refreshes are issued at the
// REF_INTERVAL rate.
`timescale 1ns/1ps
module tb_sdram_ctrl;
  localparam int WORDS = 320, REF_INT = 800;
  logic clk = 0, rst_n = 0;
  logic ready, wr_req = 0, rd_req = 0;
  logic [9:0] wr_row = 0, rd_row = 0;
  logic [15:0] in_data, out_data;
  logic [9:0] in_level, out_level;
  logic in_rd, out_wr;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba, sd_dqm;
  logic [12:0] sd_addr;
  logic [15:0] sd_dq_o, sd_dq_i;
  logic ev_refresh, ev_write, ev_read;
  int checks = 0, failures = 0, cyc = 0;
  logic [15:0] inq[$], outq[$];

  always #4.63 clk = ~clk;
  always @(posedge clk) cyc++;

  sdram_ctrl dut (.*);
  sdram_model mem (.clk(clk), .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
                   .we_n(sd_we_n), .ba(sd_ba), .addr(sd_addr), .dqm(sd_dqm),
                   .dq_in(sd_dq_o), .dq_oe(sd_dq_oe), .dq_out(sd_dq_i));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic logic [15:0] word(input int r, input int k);
    return 16'((r * 1031 + k * 77) ^ (k << 9));
  endfunction

  // input FIFO model (show-ahead), updated at the falling edge
  bit pop_pending = 0;
  assign in_data  = (inq.size() > 0) ? inq[0] : 16'h0;
  assign in_level = 10'(inq.size());
  assign out_level = 10'(outq.size());
  always @(posedge clk) begin
    if (in_rd) begin
      check(inq.size() > 0, "pop from empty input FIFO");
      pop_pending = 1;
    end
    if (out_wr) outq.push_back(out_data);
  end
  always @(negedge clk) begin
    if (pop_pending) void'(inq.pop_front());
    pop_pending = 0;
  end

  task automatic pulse_wr(input int r);
    @(negedge clk); wr_row = 10'(r); wr_req = 1;
    @(negedge clk); wr_req = 0;
  endtask
  task automatic pulse_rd(input int r);
    @(negedge clk); rd_row = 10'(r); rd_req = 1;
    @(negedge clk); rd_req = 0;
  endtask

  task automatic fill_row(input int r, input int n);
    @(negedge clk);
    for (int k = 0; k < n; k++) inq.push_back(word(r, k));
  endtask

  task automatic read_and_check(input int r);
    int t0;
    outq.delete();
    t0 = cyc;
    pulse_rd(r);
    while (outq.size() < WORDS && cyc - t0 < 2000) @(posedge clk);
    check(outq.size() == WORDS, $sformatf("row %0d: %0d words read", r, outq.size()));
    check(cyc - t0 <= WORDS + 3 + 3 + 3 + 20, $sformatf("read took %0d clocks", cyc - t0));
    for (int k = 0; k < WORDS && k < outq.size(); k++)
      check(outq[k] == word(r, k), $sformatf("row %0d word %0d = %h expected %h", r, k, outq[k], word(r, k)));
    repeat (20) @(posedge clk);
    check(outq.size() == WORDS, "no extra words");
  endtask

  initial begin
    int t_ready, ref0, c0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready);
    t_ready = cyc;
    check(t_ready >= 10800, $sformatf("ready after %0d clocks", t_ready));
    check(mem.mode_set && mem.page && mem.cl == 3, "mode register: page burst, CL 3");
    check(mem.n_refresh >= 8, "init refreshes");
    // write request arrives while only half a row is in the FIFO: must wait
    fill_row(5, 160);
    pulse_wr(5);
    repeat (400) @(posedge clk);
    check(mem.n_write == 0, "write waits for a whole row");
    fill_row(5, 0);
    for (int k = 160; k < WORDS; k++) inq.push_back(word(5, k));
    repeat (500) @(posedge clk);
    check(mem.n_write == 1 && inq.size() == 0, "row 5 written");
    check(mem.n_words_w == WORDS, $sformatf("burst length %0d", mem.n_words_w));
    fill_row(7, WORDS);
    pulse_wr(7);
    repeat (500) @(posedge clk);
    check(mem.n_write == 2, "row 7 written");
    read_and_check(5);
    read_and_check(7);
    // refresh rate
    ref0 = mem.n_refresh; c0 = cyc;
    repeat (REF_INT * 20) @(posedge clk);
    check(mem.n_refresh - ref0 >= 19 && mem.n_refresh - ref0 <= 21,
          $sformatf("%0d refreshes in %0d clocks", mem.n_refresh - ref0, cyc - c0));
    check(mem.errors == 0, $sformatf("SDRAM protocol errors: %0d", mem.errors));
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
