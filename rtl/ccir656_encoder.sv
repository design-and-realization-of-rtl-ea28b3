// ccir656_encoder: BT.656 (CCIR656) 525-line byte stream for the video
// encoder chip, in the 27 MHz domain.
//
// A frame is 525 lines of 1716 bytes. Every line starts with the end-of-
// active-video code EAV (FFh 00h 00h XY, H = 1), then 268 bytes of blanking
// fill (80h, 10h repeated), then the start-of-active-video code SAV
// (FFh 00h 00h XY, H = 0) and 1440 bytes of video: Cb Y Cr Y ... for 720
// pixels. XY = {1, F, V, H, V^H, F^H, F^V, F^V^H}. F is 0 on lines 4..265
// (field 1) and 1 elsewhere; V is 0 only on the active lines 22..261 and
// 285..524. The image is grey-scale, so Cb and Cr are fixed at 80h. On
// blanked lines the video part carries the 80h/10h fill as well.
//
// Luminance comes from the output buffer controller: during a cycle in which
// the next byte is the Y of pixel y_idx, y_req is high and y_data is
// sampled. Y values 00h and FFh are reserved for timing codes and are
// limited to 01h and FEh. line_start is high in the first cycle of each line
// (hcnt == 0) with line holding the new line number; dout is registered and
// so lags the counters by one clock.
//
// Follows the document: line and field layout, EAV/SAV and protection bits,
// fixed chroma, 276-byte horizontal blanking. Own choices: the order 80h
// then 10h of the fill, the Y clamp, counters starting at line 1 after reset.
module ccir656_encoder
  import swir_pkg::*;
(
  input  logic        clk,          // 27 MHz
  input  logic        rst_n,
  output logic [7:0]  dout,         // to the encoder's pixel port
  output logic        line_start,
  output logic [9:0]  line,         // 1..525
  output logic [10:0] hcnt,         // 0..1715
  output logic        field,        // F
  output logic        vblank,       // V
  output logic        y_req,
  output logic [9:0]  y_idx,        // 0..719
  input  logic [7:0]  y_data
);
  logic [10:0] s;        // offset into the active part
  logic        active;   // current byte lies in the active part
  logic [7:0]  nxt;
  logic [7:0]  xy_eav, xy_sav;

  assign field      = field_of(int'(line));
  assign vblank     = vblank_of(int'(line));
  assign xy_eav     = xy_word(field, vblank, 1'b1);
  assign xy_sav     = xy_word(field, vblank, 1'b0);
  assign line_start = (hcnt == '0);
  assign s          = hcnt - 11'(HBLANK_WORDS);
  assign active     = (hcnt >= 11'(HBLANK_WORDS));
  assign y_req      = active && !vblank && s[0];
  assign y_idx      = s[10:1];

  always_comb begin
    unique case (hcnt)
      11'd0, 11'd272:   nxt = 8'hFF;
      11'd1, 11'd273,
      11'd2, 11'd274:   nxt = 8'h00;
      11'd3:            nxt = xy_eav;
      11'd275:          nxt = xy_sav;
      default: begin
        if (!active || vblank) begin
          nxt = hcnt[0] ? FILL_Y : FILL_C;
        end else if (!s[0]) begin
          nxt = CHROMA_FIXED;
        end else begin
          nxt = (y_data == 8'h00) ? 8'h01 :
                (y_data == 8'hFF) ? 8'hFE : y_data;
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt <= '0;
      line <= 10'd1;
      dout <= 8'h10;
    end else begin
      dout <= nxt;
      if (hcnt == 11'(LINE_WORDS - 1)) begin
        hcnt <= '0;
        line <= (line == 10'(FRAME_LINES)) ? 10'd1 : line + 1'b1;
      end else begin
        hcnt <= hcnt + 1'b1;
      end
    end
  end
endmodule
