// fpa_adc_model: behavioural stand-in for the 640 x 512 focal plane array
// and its 12-bit ADC, for simulation only.
//
// Follows LSYNC and FSYNC from the timing generator on the pixel clock: FSYNC
// restarts the row count at 0, every other rising LSYNC advances it. Within a
// row the pixel of column c is presented on the ADC output LATENCY clocks
// after the LSYNC rising edge plus c, as pix(row, c) in the upper 8 bits and
// a fixed pattern in the low 4 bits (which the design must drop). The image
// is a test pattern: value (7*row + 3*col + STEP*frame) mod 256, which
// includes 00h and FFh. With STEP = 0 the scene is still; otherwise it
// changes with every sensor frame (frame counts FSYNCs, starting at 0), so a
// displayed row shows which sensor frame it came from.
module fpa_adc_model #(
  parameter int LATENCY = 3,
  parameter int STEP    = 0
) (
  input  logic        clk,
  input  logic        lsync,
  input  logic        fsync,
  output logic [11:0] adc_data
);
  int m = 0, row = 0, frame = -1;
  bit prev_lsync = 0;

  function automatic logic [7:0] pix(input int r, input int c);
    return 8'((7 * r + 3 * c + STEP * (frame < 0 ? 0 : frame)) & 8'hFF);
  endfunction

  always @(posedge clk) begin
    if (lsync && !prev_lsync) begin
      m = 1;
      if (fsync) frame++;
      row = fsync ? 0 : row + 1;
    end else m++;
    prev_lsync = lsync;
    adc_data <= {pix(row, m - LATENCY), 4'hA};
  end
endmodule
