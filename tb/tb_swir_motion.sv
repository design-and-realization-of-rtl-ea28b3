// tb_swir_motion: moving-scene test of the whole chain at full size, with
// the top's parameters untouched.
//
// The sensor model shows a scene that changes with every sensor frame
// (pixel value 7*row + 3*col + 16*frame). Because sensor rows are locked to
// video lines and every row is read at the start of its line, the line must
// show the newest copy of its row that has been stored: the copy from the
// last sensor frame whose capture of that row ended before the line began.
// The testbench tracks, from LSYNC/FSYNC and the rows the design actually
// captured, which frame that is, and compares every luminance byte of every
// active line from the second video frame on with the value of that frame.
// It also checks that the copy shown is never more than one sensor frame old
// (no stale rows, i.e. no motion blur from lost writes), that every pixel of
// a line comes from the same frame, and counts lines whose content changed
// from one video frame to the next (the scene is seen to move).
`timescale 1ps/1ps
module tb_swir_motion;
  localparam int STEP = 16;
  logic clk_pix = 0, clk_sdram = 0, clk_enc = 0, rst_n = 0;
  logic fpa_lsync, fpa_fsync;
  logic [11:0] adc_data;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba, sd_dqm;
  logic [12:0] sd_addr;
  logic [15:0] sd_dq_o, sd_dq_i;
  logic [7:0] enc_data;
  logic enc_scl_low, enc_sda_low, enc_sda_in, sda_pull;
  logic sdram_ready, enc_cfg_done, enc_cfg_nack, in_fifo_overflow, out_fifo_underflow;
  int checks = 0, failures = 0;

  always #44444 clk_pix = ~clk_pix;      // 11.25 MHz
  always #4630  clk_sdram = ~clk_sdram;  // 108 MHz
  always #18519 clk_enc = ~clk_enc;      // 27 MHz

  swir_top dut (.*);

  fpa_adc_model #(.STEP(STEP)) fpa (.clk(clk_pix), .lsync(fpa_lsync), .fsync(fpa_fsync), .adc_data(adc_data));
  sdram_model mem (.clk(clk_sdram), .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
                   .we_n(sd_we_n), .ba(sd_ba), .addr(sd_addr), .dqm(sd_dqm),
                   .dq_in(sd_dq_o), .dq_oe(sd_dq_oe), .dq_out(sd_dq_i));
  i2c_slave_model i2c (.clk(clk_enc), .scl(!enc_scl_low), .sda(enc_sda_in), .sda_pull(sda_pull));
  assign enc_sda_in = !(enc_sda_low || sda_pull);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---------------- which sensor frame each stored row comes from ----------
  int done_frame[512];
  int cur_row = -1, cur_frame = -1;
  bit cur_captured = 0;
  initial foreach (done_frame[i]) done_frame[i] = -1;
  always @(posedge clk_pix) if (dut.rst_pix_n && dut.u_tg.row_start) begin
    // the row that just ended was stored if it was captured
    if (cur_row >= 0 && cur_row < 512 && cur_captured) done_frame[cur_row] = cur_frame;
    cur_row = int'(dut.u_tg.row_cnt);
    if (cur_row == 0) cur_frame++;
    cur_captured = dut.sdram_ready;   // capture decision of the row starting now
  end

  // ---------------- video side ----------------
  int pos = 0, ln = 1, vframe = 0, exp_f = -1, row = 0;
  int shown[526];
  bit started = 0;
  int n_y = 0, n_changed = 0, n_same = 0;
  initial foreach (shown[i]) shown[i] = -1;

  function automatic logic [7:0] ypix(input int r, input int c, input int f);
    logic [7:0] y;
    y = 8'((7 * r + 3 * c + STEP * f) & 8'hFF);
    if (y == 8'h00) return 8'h01;
    if (y == 8'hFF) return 8'hFE;
    return y;
  endfunction

  function automatic bit active(input int l);
    return (l >= 22 && l <= 261) || (l >= 285 && l <= 524);
  endfunction

  always @(posedge clk_enc) begin
    if (!started && enc_data == 8'hFF) started = 1;
    if (started) begin
      if (pos == 276 && active(ln)) begin
        row = (ln <= 261) ? 32 + 2 * (ln - 22) : 33 + 2 * (ln - 285);
        exp_f = done_frame[row];
        if (vframe >= 1) begin
          check(exp_f >= 0 && cur_frame - exp_f <= 1,
                $sformatf("line %0d shows row %0d of frame %0d while the sensor is in frame %0d", ln, row, exp_f, cur_frame));
          if (shown[ln] >= 0) begin
            if (shown[ln] != exp_f) n_changed++; else n_same++;
          end
        end
        shown[ln] = exp_f;
      end
      if (vframe >= 1 && active(ln) && pos > 276 && (pos - 276) % 2 == 1) begin
        int i;
        i = (pos - 276) / 2;
        if (i >= 40 && i < 680) begin
          check(enc_data == ypix(row, i - 40, exp_f),
                $sformatf("line %0d pixel %0d: %h expected %h (row %0d frame %0d)", ln, i, enc_data, ypix(row, i - 40, exp_f), row, exp_f));
          n_y++;
        end
      end
      pos++;
      if (pos == 1716) begin
        pos = 0;
        if (ln == 525) begin ln = 1; vframe++; end
        else ln++;
      end
    end
  end

  initial begin
    #1000000 rst_n = 1;
    wait (vframe == 3);
    repeat (100) @(posedge clk_enc);
    $display("sensor frames %0d; luminance bytes checked %0d; lines changed between video frames %0d, unchanged %0d",
             cur_frame + 1, n_y, n_changed, n_same);
    check(n_y == 2 * 480 * 640, $sformatf("luminance bytes checked %0d", n_y));
    check(n_changed > 0, "scene changes reach the display");
    check(!in_fifo_overflow && !out_fifo_underflow, "no FIFO errors");
    check(mem.errors == 0, $sformatf("SDRAM protocol errors %0d", mem.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #120ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
