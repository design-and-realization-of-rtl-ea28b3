// input_buffer_ctrl: takes sensor pixels from the ADC into the input FIFO and
// asks the SDRAM controller to store each finished row.
//
// The AD9224 delivers 12-bit samples; only the 8 most significant bits are
// kept. The pixel of column p of the current row is the registered sample
// seen when the row's pixel counter equals DATA_START + p (DATA_START covers
// the sensor output delay, the ADC pipeline and this capture register). Two
// neighbouring pixels are packed into one 16-bit word, even column in the
// low byte, and written to the input FIFO, so a 640-pixel row is 320 words.
// At pixel WR_TRIGGER of a row (the 646th pixel, counted from 1) the
// controller raises wr_req for one clock and holds the row number on wr_row
// until the next request; the SDRAM write burst then runs in the remaining
// part of the row, away from the read burst issued at the start of the
// video line.
//
// Rows are captured only when en (SDRAM ready) was high at the start of the
// row and the row is a data row, so the FIFO never holds a partial row.
// Follows the document: 8 MSBs, write triggered at the 646th pixel,
// 640-pixel rows, 16-bit SDRAM words. Own choices: DATA_START, byte order.
module input_buffer_ctrl #(
  parameter int unsigned COLS       = 640,
  parameter int unsigned DATA_START = 4,
  parameter int unsigned WR_TRIGGER = 645
) (
  input  logic        clk,        // pixel clock
  input  logic        rst_n,
  input  logic        en,         // SDRAM initialised (synchronised)
  input  logic [11:0] adc_data,
  input  logic        row_start,
  input  logic [9:0]  pix_cnt,
  input  logic [9:0]  row_cnt,
  input  logic        data_row,
  // input FIFO write port
  output logic        fifo_wr,
  output logic [15:0] fifo_wdata,
  input  logic        fifo_full,
  // request to the SDRAM controller
  output logic        wr_req,
  output logic [9:0]  wr_row,
  output logic        overflow    // sticky: a word met a full FIFO
);
  logic [7:0] pix_q, low_q;
  logic       row_ok;
  logic [9:0] col;
  logic       in_window;

  assign col       = pix_cnt - 10'(DATA_START);
  assign in_window = row_ok && (pix_cnt >= 10'(DATA_START)) && (pix_cnt < 10'(DATA_START + COLS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_q      <= '0;
      low_q      <= '0;
      row_ok     <= 1'b0;
      fifo_wr    <= 1'b0;
      fifo_wdata <= '0;
      wr_req     <= 1'b0;
      wr_row     <= '0;
      overflow   <= 1'b0;
    end else begin
      pix_q   <= adc_data[11:4];
      fifo_wr <= 1'b0;
      wr_req  <= 1'b0;
      if (row_start) row_ok <= en && data_row;
      if (in_window) begin
        if (!col[0]) low_q <= pix_q;
        else begin
          fifo_wr    <= 1'b1;
          fifo_wdata <= {pix_q, low_q};
        end
      end
      if (fifo_wr && fifo_full) overflow <= 1'b1;
      if (row_ok && pix_cnt == 10'(WR_TRIGGER)) begin
        wr_req <= 1'b1;
        wr_row <= row_cnt;
      end
    end
  end

  initial begin
    assert (DATA_START + COLS <= WR_TRIGGER)
      else $fatal(1, "input_buffer_ctrl: row must be complete before the write trigger");
  end
endmodule
