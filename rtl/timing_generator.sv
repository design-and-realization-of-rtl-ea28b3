// timing_generator: FPA row and frame timing, in the pixel-clock domain.
//
// The sensor is read row by row. Each row starts with an LSYNC pulse and
// the pixel counter then counts sensor pixels from 0. A new row is started
// by the encoder's per-line read request (oSDRAM_read, already brought into
// this clock domain as line_req): the running row is cut short and LSYNC is
// issued again, so every sensor row is locked to one BT.656 line. At
// 11.25 MHz a 63.56 us video line is 715 pixels long. If no request comes
// within LSYNC_MAX pixels the row ends on its own (the free-running period
// of the original timing), which only happens while the video side is not
// running. A request that arrives while LSYNC is still high (the first
// LSYNC_WIDTH pixels of a row, possible only as the video side starts up)
// is ignored, so the sensor always sees separate LSYNC pulses. A sensor frame is ROWS_PER_FRAME rows: DATA_ROWS rows of pixels
// followed by blank rows; FSYNC is raised with the LSYNC of row 0. Sensor
// and video frames are not aligned: 521 rows against 525 lines, so the
// sensor frame rate is slightly higher than the video frame rate.
//
// Follows the document: LSYNC truncated by the read request, 715-pixel row
// at 11.25 MHz, 521 rows per frame (512 + 9 blank). Own choices: LSYNC and
// FSYNC pulse width, the free-running limit, ignoring requests during LSYNC, blank rows placed after the
// 512 data rows.
//
// Counters, row_start and the event pulses are registers; lsync, fsync and
// data_row are decoded from the counters. row_start is high in the first
// cycle of a row (pix_cnt == 0), together with lsync. A request takes effect
// on the next clock: the new row starts one clock after line_req.
module timing_generator #(
  parameter int unsigned ROWS_PER_FRAME = 521,
  parameter int unsigned DATA_ROWS      = 512,
  parameter int unsigned LSYNC_MAX      = 768,   // free-running row length
  parameter int unsigned LSYNC_WIDTH    = 4      // LSYNC high time, pixels
) (
  input  logic        clk,        // pixel clock (FPA master clock)
  input  logic        rst_n,
  input  logic        line_req,   // oSDRAM_read pulse, synchronised
  output logic        lsync,
  output logic        fsync,
  output logic        row_start,
  output logic [9:0]  pix_cnt,
  output logic [9:0]  row_cnt,
  output logic        data_row,   // current row carries pixels
  output logic        truncated,  // pulse: row ended by a read request
  output logic        timed_out   // pulse: row ended by LSYNC_MAX
);
  // A request is taken only after the LSYNC pulse of the current row has
  // ended, so two rows can never merge into one long LSYNC.
  logic accept, new_row;
  assign accept  = line_req && (pix_cnt >= 10'(LSYNC_WIDTH));
  assign new_row = accept || (pix_cnt == 10'(LSYNC_MAX - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_cnt   <= '0;
      row_cnt   <= '0;
      row_start <= 1'b1;
      truncated <= 1'b0;
      timed_out <= 1'b0;
    end else begin
      truncated <= accept;
      timed_out <= !accept && (pix_cnt == 10'(LSYNC_MAX - 1));
      row_start <= new_row;
      if (new_row) begin
        pix_cnt <= '0;
        row_cnt <= (row_cnt == 10'(ROWS_PER_FRAME - 1)) ? '0 : row_cnt + 1'b1;
      end else begin
        pix_cnt <= pix_cnt + 1'b1;
      end
    end
  end

  assign lsync    = (pix_cnt < 10'(LSYNC_WIDTH));
  assign fsync    = lsync && (row_cnt == '0);
  assign data_row = (row_cnt < 10'(DATA_ROWS));
endmodule
