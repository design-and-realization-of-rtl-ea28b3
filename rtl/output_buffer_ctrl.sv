// output_buffer_ctrl: feeds luminance from the output FIFO to the BT.656
// generator and requests one sensor row from the SDRAM per active line.
//
// At the first byte of every video line (line_start) it sends line_req, the
// per-line read request that also restarts the sensor row in the timing
// generator. If the line is an active one and the SDRAM is ready, it also
// sends rd_req with the sensor row to fetch; the row arrives in the output
// FIFO long before the active part of the line begins. Line mapping: each
// field shows 240 of the sensor field's 256 rows, skipping the first 16.
// Field 1 (lines 22..261) shows the even-numbered sensor rows 32, 34 .. 510,
// field 2 (lines 285..524) the odd rows 33, 35 .. 511, so the video frame
// shows sensor rows 32..511, a 640 x 480 image.
//
// The 640 sensor columns are centred in the 720-pixel line: pixels 0..39 and
// 680..719 are black (10h). For the others the low then the high byte of the
// FIFO head word is returned on y_data and the word is popped after its high
// byte. A line whose row was not requested shows black, and an empty FIFO
// (sticky underflow flag) also gives black.
//
// Follows the document: read request at the start of each encoded line,
// field line numbers, 16 skipped lines per field. Own choices: which sensor
// rows form each field, horizontal centring, byte order, black fill.
module output_buffer_ctrl
  import swir_pkg::*;
#(
  parameter int unsigned COLS      = 640,
  parameter int unsigned H_OFFSET  = 40,
  parameter int unsigned SKIP_ROWS = 16    // per field
) (
  input  logic        clk,          // 27 MHz
  input  logic        rst_n,
  input  logic        en,           // SDRAM ready (synchronised)
  input  logic        line_start,
  input  logic [9:0]  line,
  input  logic        y_req,
  input  logic [9:0]  y_idx,
  output logic [7:0]  y_data,
  // output FIFO, read side (show-ahead)
  input  logic [15:0] fifo_rdata,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  // requests
  output logic        line_req,     // oSDRAM_read: every line
  output logic        rd_req,       // fetch rd_row for this line
  output logic [9:0]  rd_row,
  output logic        underflow
);
  logic       has_data;        // this line's row was requested
  logic [9:0] j;
  logic       in_image;

  function automatic logic [9:0] row_of_line(input logic [9:0] ln);
    if (ln >= 10'(F1_FIRST_ACTIVE) && ln <= 10'(F1_LAST_ACTIVE))
      return 10'(2 * SKIP_ROWS) + ((ln - 10'(F1_FIRST_ACTIVE)) << 1);
    else
      return 10'(2 * SKIP_ROWS) + ((ln - 10'(F2_FIRST_ACTIVE)) << 1) + 10'd1;
  endfunction

  logic line_active;
  assign line_active = !vblank_of(int'(line));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_req  <= 1'b0;
      rd_req    <= 1'b0;
      rd_row    <= '0;
      has_data  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      line_req <= line_start;
      rd_req   <= 1'b0;
      if (line_start) begin
        has_data <= en && line_active;
        if (en && line_active) begin
          rd_req <= 1'b1;
          rd_row <= row_of_line(line);
        end
      end
      if (y_req && in_image && has_data && fifo_empty) underflow <= 1'b1;
    end
  end

  assign j        = y_idx - 10'(H_OFFSET);
  assign in_image = (y_idx >= 10'(H_OFFSET)) && (y_idx < 10'(H_OFFSET + COLS));

  always_comb begin
    y_data  = Y_BLACK;
    fifo_rd = 1'b0;
    if (y_req && in_image && has_data && !fifo_empty) begin
      y_data  = j[0] ? fifo_rdata[15:8] : fifo_rdata[7:0];
      fifo_rd = j[0];
    end
  end
endmodule
