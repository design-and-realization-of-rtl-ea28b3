// async_fifo: dual-clock FIFO used as the data input buffer (pixel clock ->
// SDRAM clock) and the data output buffer (SDRAM clock -> encoder clock).
//
// Classic design with Gray-coded read and write pointers, each passed to the
// other clock domain through a two-flop synchroniser. Full and empty are
// therefore conservative: a write becomes visible to the reader two to three
// read clocks later and vice versa. The read port is show-ahead: rdata is the
// word at the head of the FIFO whenever rempty is low, and rd_en pops it.
// Writes while full and reads while empty are ignored (and flagged by
// assertions). DEPTH must be a power of two. The depth of 512 words holds
// one whole sensor row (320 words of two pixels) with room to spare; the
// depth and width are this design's choice.
module async_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 512
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic [$clog2(DEPTH):0] wlevel,   // words in FIFO, seen from the write side

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty,
  output logic [$clog2(DEPTH):0] rlevel    // words in FIFO, seen from the read side
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic do_wr;
  assign do_wr = wr_en && !wfull;

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  logic [AW:0] rbin_w;
  assign rbin_w = gray2bin(rgray_w2);
  assign wlevel = wbin - rbin_w;
  assign wfull  = (wlevel == (AW+1)'(DEPTH));

  // ---------------- read domain ----------------
  logic do_rd;
  assign do_rd = rd_en && !rempty;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  logic [AW:0] wbin_r;
  assign wbin_r = gray2bin(wgray_r2);
  assign rlevel = wbin_r - rbin;
  assign rempty = (rlevel == '0);
  assign rdata  = mem[rbin[AW-1:0]];

  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) !(wr_en && wfull))
    else $error("async_fifo: write while full");
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(rd_en && rempty))
    else $error("async_fifo: read while empty");
endmodule
