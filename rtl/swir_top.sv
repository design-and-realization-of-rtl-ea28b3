// swir_top: FPGA logic of a 640 x 480 short-wave infrared camera that reads
// a 640 x 512 InGaAs focal plane array through a 12-bit ADC, buffers the
// image in one SDR SDRAM and sends it as 525-line BT.656 to an ADV7391
// encoder for NTSC display.
//
// Three clock domains, all from the board PLL:
//   clk_pix   11.25 MHz  sensor master clock and ADC sample clock
//   clk_sdram 108 MHz    SDRAM and its controller
//   clk_enc   27 MHz     BT.656 byte clock to the encoder
// Data path: ADC -> input_buffer_ctrl -> input FIFO (pix -> sdram) ->
// sdram_ctrl -> SDRAM -> sdram_ctrl -> output FIFO (sdram -> enc) ->
// output_buffer_ctrl -> ccir656_encoder -> encoder pins.
//
// The key to using a single SDRAM without motion blur is that reads and
// writes never compete: at the first byte of each video line the output
// side issues the line's read request, and the same request, carried into
// the pixel domain, starts the next sensor row (LSYNC). Each sensor row is
// therefore one video line long (715 pixels at 11.25 MHz = 1716 bytes at
// 27 MHz = 63.56 us); its row is written to the SDRAM from the 646th pixel
// on, in the second half of the line, while the read happens at the start.
// The sensor frame has 521 rows, the video frame 525 lines, so the two
// frames slide past each other and the SDRAM holds the latest value of every
// row. The ADV7391 is set up over I2C by adv7391_i2c_config.
//
// The SDRAM data bus is split into sd_dq_o/sd_dq_oe/sd_dq_i; the tristate
// pad and the clock outputs to the sensor, ADC, SDRAM and encoder are
// assumed to be in the I/O ring, driven straight from the PLL.
// sd_ba is always 0: the frame buffer occupies bank 0 only.
module swir_top (
  input  logic        clk_pix,
  input  logic        clk_sdram,
  input  logic        clk_enc,
  input  logic        rst_n,

  // focal plane array and ADC
  output logic        fpa_lsync,
  output logic        fpa_fsync,
  input  logic [11:0] adc_data,

  // SDRAM
  output logic        sd_cke,
  output logic        sd_cs_n,
  output logic        sd_ras_n,
  output logic        sd_cas_n,
  output logic        sd_we_n,
  output logic [1:0]  sd_ba,
  output logic [12:0] sd_addr,
  output logic [1:0]  sd_dqm,
  output logic [15:0] sd_dq_o,
  output logic        sd_dq_oe,
  input  logic [15:0] sd_dq_i,

  // video encoder
  output logic [7:0]  enc_data,
  output logic        enc_scl_low,
  output logic        enc_sda_low,
  input  logic        enc_sda_in,

  // status
  output logic        sdram_ready,
  output logic        enc_cfg_done,
  output logic        enc_cfg_nack,
  output logic        in_fifo_overflow,
  output logic        out_fifo_underflow
);
  localparam int unsigned FIFO_DEPTH = 512;
  localparam int unsigned LW         = $clog2(FIFO_DEPTH) + 1;

  // ---------------- resets ----------------
  logic rst_pix_n, rst_sd_n, rst_enc_n;
  reset_sync u_rs_pix (.clk(clk_pix),   .rst_n_in(rst_n), .rst_n_out(rst_pix_n));
  reset_sync u_rs_sd  (.clk(clk_sdram), .rst_n_in(rst_n), .rst_n_out(rst_sd_n));
  reset_sync u_rs_enc (.clk(clk_enc),   .rst_n_in(rst_n), .rst_n_out(rst_enc_n));

  // ---------------- pixel domain ----------------
  logic       line_req_enc, line_req_pix;
  logic       row_start, data_row;
  logic [9:0] pix_cnt, row_cnt;
  logic       tg_truncated, tg_timed_out;
  logic       ready_pix;

  pulse_sync u_ps_line (
    .src_clk(clk_enc), .src_rst_n(rst_enc_n), .src_pulse(line_req_enc),
    .dst_clk(clk_pix), .dst_rst_n(rst_pix_n), .dst_pulse(line_req_pix));

  timing_generator u_tg (
    .clk(clk_pix), .rst_n(rst_pix_n), .line_req(line_req_pix),
    .lsync(fpa_lsync), .fsync(fpa_fsync), .row_start(row_start),
    .pix_cnt(pix_cnt), .row_cnt(row_cnt), .data_row(data_row),
    .truncated(tg_truncated), .timed_out(tg_timed_out));

  bit_sync u_bs_ready_pix (.clk(clk_pix), .rst_n(rst_pix_n), .d(sdram_ready), .q(ready_pix));

  logic        in_wr, in_full;
  logic [15:0] in_wdata;
  logic        wr_req_pix, wr_req_sd;
  logic [9:0]  wr_row;
  logic [LW-1:0] in_wlevel;

  input_buffer_ctrl u_ibc (
    .clk(clk_pix), .rst_n(rst_pix_n), .en(ready_pix), .adc_data(adc_data),
    .row_start(row_start), .pix_cnt(pix_cnt), .row_cnt(row_cnt), .data_row(data_row),
    .fifo_wr(in_wr), .fifo_wdata(in_wdata), .fifo_full(in_full),
    .wr_req(wr_req_pix), .wr_row(wr_row), .overflow(in_fifo_overflow));

  // ---------------- input FIFO ----------------
  logic [15:0]   in_rdata;
  logic          in_rd, in_empty;
  logic [LW-1:0] in_rlevel;

  async_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .wclk(clk_pix), .wrst_n(rst_pix_n), .wr_en(in_wr), .wdata(in_wdata),
    .wfull(in_full), .wlevel(in_wlevel),
    .rclk(clk_sdram), .rrst_n(rst_sd_n), .rd_en(in_rd), .rdata(in_rdata),
    .rempty(in_empty), .rlevel(in_rlevel));

  pulse_sync u_ps_wr (
    .src_clk(clk_pix), .src_rst_n(rst_pix_n), .src_pulse(wr_req_pix),
    .dst_clk(clk_sdram), .dst_rst_n(rst_sd_n), .dst_pulse(wr_req_sd));

  // ---------------- SDRAM domain ----------------
  logic          rd_req_enc, rd_req_sd;
  logic [9:0]    rd_row;
  logic          out_wr, out_full;
  logic [15:0]   out_wdata;
  logic [LW-1:0] out_wlevel;
  logic          ev_refresh, ev_write, ev_read;

  pulse_sync u_ps_rd (
    .src_clk(clk_enc), .src_rst_n(rst_enc_n), .src_pulse(rd_req_enc),
    .dst_clk(clk_sdram), .dst_rst_n(rst_sd_n), .dst_pulse(rd_req_sd));

  sdram_ctrl #(.FIFO_DEPTH(FIFO_DEPTH)) u_sdc (
    .clk(clk_sdram), .rst_n(rst_sd_n), .ready(sdram_ready),
    .wr_req(wr_req_sd), .wr_row(wr_row), .rd_req(rd_req_sd), .rd_row(rd_row),
    .in_data(in_rdata), .in_level(in_rlevel), .in_rd(in_rd),
    .out_wr(out_wr), .out_data(out_wdata), .out_level(out_wlevel),
    .sd_cke(sd_cke), .sd_cs_n(sd_cs_n), .sd_ras_n(sd_ras_n), .sd_cas_n(sd_cas_n),
    .sd_we_n(sd_we_n), .sd_ba(sd_ba), .sd_addr(sd_addr), .sd_dqm(sd_dqm),
    .sd_dq_o(sd_dq_o), .sd_dq_oe(sd_dq_oe), .sd_dq_i(sd_dq_i),
    .ev_refresh(ev_refresh), .ev_write(ev_write), .ev_read(ev_read));

  // ---------------- output FIFO ----------------
  logic [15:0]   out_rdata;
  logic          out_rd, out_empty;
  logic [LW-1:0] out_rlevel;

  async_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .wclk(clk_sdram), .wrst_n(rst_sd_n), .wr_en(out_wr), .wdata(out_wdata),
    .wfull(out_full), .wlevel(out_wlevel),
    .rclk(clk_enc), .rrst_n(rst_enc_n), .rd_en(out_rd), .rdata(out_rdata),
    .rempty(out_empty), .rlevel(out_rlevel));

  // ---------------- encoder domain ----------------
  logic        ready_enc;
  logic        line_start, field, vblank, y_req;
  logic [9:0]  line, y_idx;
  logic [10:0] hcnt;
  logic [7:0]  y_data;

  bit_sync u_bs_ready_enc (.clk(clk_enc), .rst_n(rst_enc_n), .d(sdram_ready), .q(ready_enc));

  output_buffer_ctrl u_obc (
    .clk(clk_enc), .rst_n(rst_enc_n), .en(ready_enc),
    .line_start(line_start), .line(line), .y_req(y_req), .y_idx(y_idx), .y_data(y_data),
    .fifo_rdata(out_rdata), .fifo_empty(out_empty), .fifo_rd(out_rd),
    .line_req(line_req_enc), .rd_req(rd_req_enc), .rd_row(rd_row),
    .underflow(out_fifo_underflow));

  ccir656_encoder u_enc (
    .clk(clk_enc), .rst_n(rst_enc_n), .dout(enc_data),
    .line_start(line_start), .line(line), .hcnt(hcnt), .field(field), .vblank(vblank),
    .y_req(y_req), .y_idx(y_idx), .y_data(y_data));

  adv7391_i2c_config u_i2c (
    .clk(clk_enc), .rst_n(rst_enc_n),
    .scl_low(enc_scl_low), .sda_low(enc_sda_low), .sda_in(enc_sda_in),
    .done(enc_cfg_done), .nack(enc_cfg_nack));
endmodule
