// tb_swir_top: end-to-end test of the whole acquisition chain at full size
// (640 x 512 sensor, 525-line video, 108 MHz SDRAM), with the top's
// parameters untouched.
//
// Clocks: 11.25 MHz pixel, 108 MHz SDRAM, 27 MHz encoder. The sensor/ADC,
// the SDRAM and the encoder's I2C port are behavioural models. The 27 MHz
// clock starts 200 us late, so the sensor timing first runs on its own and
// then locks to the video lines.
//
// The BT.656 output is followed from its first byte (line 1, byte 0). Every
// byte of every line is compared with a reference built here: timing codes
// with F/V/H and protection bits, blanking fill, fixed chroma. Luminance is
// compared from the second video frame on, when every displayed sensor row
// has been stored at least once: line 22 + k must show sensor row 32 + 2k,
// line 285 + k row 33 + 2k, columns centred with 40 black pixels each side,
// 00h/FFh limited to 01h/FEh.
//
// Mechanisms that must each happen at least once: sensor rows ended by the
// line request (LSYNC truncation), free-running rows before the video side
// starts, SDRAM row writes, row reads and refreshes, a sensor frame wrap
// (521 rows) and a video frame wrap (525 lines), both field changes, the
// blanking changes, the luminance clamp, the encoder set-up over I2C. Also
// checks that sensor rows last 715 pixel clocks once locked, that a read
// request never waits behind a write burst, that no FIFO
// over- or underflow and no SDRAM protocol error occurs.
`timescale 1ps/1ps
module tb_swir_top;
  logic clk_pix = 0, clk_sdram = 0, clk_enc = 0, rst_n = 0;
  bit   enc_on = 0;
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
  always #18519 if (enc_on) clk_enc = ~clk_enc; else clk_enc = 0;  // 27 MHz

  swir_top dut (.*);

  fpa_adc_model fpa (.clk(clk_pix), .lsync(fpa_lsync), .fsync(fpa_fsync), .adc_data(adc_data));
  sdram_model mem (.clk(clk_sdram), .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
                   .we_n(sd_we_n), .ba(sd_ba), .addr(sd_addr), .dqm(sd_dqm),
                   .dq_in(sd_dq_o), .dq_oe(sd_dq_oe), .dq_out(sd_dq_i));
  i2c_slave_model i2c (.clk(clk_enc), .scl(!enc_scl_low), .sda(enc_sda_in), .sda_pull(sda_pull));
  assign enc_sda_in = !(enc_sda_low || sda_pull);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic logic [7:0] pix(input int r, input int c);
    return 8'((7 * r + 3 * c) & 8'hFF);
  endfunction

  // ---------------- BT.656 reference and checker ----------------
  function automatic logic [7:0] ref_byte(input int l, input int p, input bit check_y);
    bit f, v, h;
    logic [7:0] xy, y;
    int row, i;
    f = (l <= 3) || (l >= 266);
    v = (l <= 21) || (l >= 262 && l <= 284) || (l == 525);
    h = (p < 4);
    xy = {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h};
    if (p == 0 || p == 272) return 8'hFF;
    if (p == 1 || p == 2 || p == 273 || p == 274) return 8'h00;
    if (p == 3 || p == 275) return xy;
    if (p < 276 || v) return (p % 2 == 0) ? 8'h80 : 8'h10;
    if ((p - 276) % 2 == 0) return 8'h80;
    i = (p - 276) / 2;
    if (i < 40 || i >= 680) return 8'h10;
    row = (l <= 261) ? 32 + 2 * (l - 22) : 33 + 2 * (l - 285);
    y = pix(row, i - 40);
    if (y == 8'h00) return 8'h01;
    if (y == 8'hFF) return 8'hFE;
    return y;
  endfunction

  int pos = 0, ln = 1, frame = 0;
  bit started = 0;
  int n_clamp = 0, n_fchg = 0, n_vchg = 0, n_vframes = 0, n_ybytes = 0;
  bit prevF = 1, prevV = 1;
  always @(posedge clk_enc) begin
    if (!started && enc_data == 8'hFF) started = 1;
    if (started) begin
      logic [7:0] e;
      bit is_y;
      is_y = (pos > 276) && ((pos - 276) % 2 == 1);
      e = ref_byte(ln, pos, frame >= 1);
      if (!is_y || frame >= 1) begin
        check(enc_data == e, $sformatf("frame %0d line %0d byte %0d: %h expected %h", frame, ln, pos, enc_data, e));
        if (is_y && (e == 8'h01 || e == 8'hFE) && enc_data == e) n_clamp++;
        if (is_y && !((ln <= 21) || (ln >= 262 && ln <= 284) || (ln == 525))) n_ybytes++;
      end
      if (pos == 3) begin
        if (enc_data[6] != prevF) n_fchg++;
        if (enc_data[5] != prevV) n_vchg++;
        prevF = enc_data[6]; prevV = enc_data[5];
      end
      pos++;
      if (pos == 1716) begin
        pos = 0;
        if (ln == 525) begin ln = 1; frame++; n_vframes++; end
        else ln++;
      end
    end
  end

  // ---------------- sensor timing monitor ----------------
  int n_trunc = 0, n_timeout = 0, n_fpa_frames = 0, last_row_start = -1, pcyc = 0, n_locked_rows = 0;
  always @(posedge clk_pix) begin
    pcyc++;
    if (dut.u_tg.truncated) n_trunc++;
    if (dut.u_tg.timed_out) n_timeout++;
    if (dut.u_tg.row_start && dut.rst_pix_n) begin
      if (dut.u_tg.row_cnt == 0) n_fpa_frames++;
      // once the line requests run, every row is one video line long
      if ((frame >= 1 || ln > 4) && last_row_start >= 0) begin
        check(pcyc - last_row_start inside {715, 716}, $sformatf("row length %0d", pcyc - last_row_start));
        n_locked_rows++;
      end
      last_row_start = pcyc;
    end
  end

  // Reads and writes must never compete for the SDRAM (the point of locking
  // sensor rows to video lines): a read request must never be waiting while
  // a write burst runs.
  int n_ref = 0, n_wr = 0, n_rd = 0, n_conflict = 0;
  always @(posedge clk_sdram) begin
    if (dut.u_sdc.rd_pend && dut.u_sdc.state == dut.u_sdc.S_WR_BURST) n_conflict++;
    if (dut.u_sdc.ev_refresh) n_ref++;
    if (dut.u_sdc.ev_write) n_wr++;
    if (dut.u_sdc.ev_read) n_rd++;
  end

  initial begin
    #1000000 rst_n = 1;
    #200000000 enc_on = 1;                   // video clock starts after 200 us
    wait (frame == 2);
    repeat (100) @(posedge clk_enc);
    $display("video frames %0d, sensor frames %0d, rows locked %0d, truncations %0d, free-running rows %0d",
             n_vframes, n_fpa_frames, n_locked_rows, n_trunc, n_timeout);
    $display("SDRAM writes %0d, reads %0d, refreshes %0d; clamps %0d; field changes %0d; blanking changes %0d",
             n_wr, n_rd, n_ref, n_clamp, n_fchg, n_vchg);
    check(n_trunc > 0, "LSYNC truncated by line requests");
    check(n_timeout > 0, "free-running rows before video starts");
    check(n_fpa_frames >= 2, "sensor frame wrap");
    check(n_vframes >= 2, "video frame wrap");
    check(n_wr >= 512, $sformatf("SDRAM row writes %0d", n_wr));
    check(n_rd >= 960, $sformatf("SDRAM row reads %0d", n_rd));
    check(n_ref > 0, "SDRAM refreshes");
    check(n_conflict == 0, $sformatf("read requests waiting on a write burst: %0d clocks", n_conflict));
    check(n_clamp > 0, "luminance clamp");
    check(n_fchg >= 4, "field changes");
    check(n_vchg >= 8, "blanking changes");
    check(n_ybytes == 480 * 720, $sformatf("luminance bytes checked %0d", n_ybytes));
    check(enc_cfg_done && !enc_cfg_nack, "encoder configured");
    check(i2c.n_bytes == 15 && i2c.errors == 0, $sformatf("I2C bytes %0d errors %0d", i2c.n_bytes, i2c.errors));
    check(!in_fifo_overflow, "no input FIFO overflow");
    check(!out_fifo_underflow, "no output FIFO underflow");
    check(mem.errors == 0, $sformatf("SDRAM protocol errors %0d", mem.errors));
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
