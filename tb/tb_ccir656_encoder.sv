// tb_ccir656_encoder: self-checking test of the BT.656 byte stream.
//
// Runs a little over one 525-line frame (900,900 bytes) and compares every
// output byte with a reference built here from the line layout: EAV at
// bytes 0..3, fill 80h/10h at 4..271, SAV at 272..275, then Cb Y Cr Y.
// The reference status word is written out bit by bit from the
// protection-bit table (P3 = V^H, P2 = F^H, P1 = F^V, P0 = F^V^H) and
// F/V come from the field and blanking line ranges. Luminance is supplied
// as a function of pixel index and line that includes 00h and FFh, to
// check the clamp. Also counts field changes, blanking changes and clamps,
// and checks that line_start repeats every 1716 bytes.
`timescale 1ns/1ps
module tb_ccir656_encoder;
  logic clk = 0, rst_n = 0;
  logic [7:0] dout, y_data;
  logic line_start, field, vblank, y_req;
  logic [9:0] line, y_idx;
  logic [10:0] hcnt;
  int checks = 0, failures = 0;
  int pos = 0, ln = 1, n_bytes = 0, n_clamp = 0, n_fchg = 0, n_vchg = 0, last_ls = -1, cyc = 0;
  bit prevF = 1, prevV = 1;

  always #18.518 clk = ~clk;

  ccir656_encoder dut (.*);

  function automatic logic [7:0] ysrc(input int l, input int i);
    return 8'((i * 3 + l) & 8'hFF);
  endfunction
  assign y_data = ysrc(int'(line), int'(y_idx));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL line %0d pos %0d: %s", ln, pos, msg); end
  endtask

  function automatic logic [7:0] ref_byte(input int l, input int p);
    bit f, v, h;
    logic [7:0] xy, y;
    f = (l <= 3) || (l >= 266);
    v = (l <= 21) || (l >= 262 && l <= 284) || (l == 525);
    h = (p < 4);
    xy[7] = 1; xy[6] = f; xy[5] = v; xy[4] = h;
    xy[3] = v ^ h; xy[2] = f ^ h; xy[1] = f ^ v; xy[0] = f ^ v ^ h;
    if (p == 0 || p == 272) return 8'hFF;
    if (p == 1 || p == 2 || p == 273 || p == 274) return 8'h00;
    if (p == 3 || p == 275) return xy;
    if (p < 276 || v) return (p % 2 == 0) ? 8'h80 : 8'h10;
    if ((p - 276) % 2 == 0) return 8'h80;
    y = ysrc(l, (p - 276) / 2);
    if (y == 8'h00) return 8'h01;
    if (y == 8'hFF) return 8'hFE;
    return y;
  endfunction

  // dout lags the counters by one clock: the first byte after reset is
  // line 1, position 0.
  bit started = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (line_start) begin
      if (last_ls >= 0) check(cyc - last_ls == 1716, "line length");
      last_ls = cyc;
    end
    if (started) begin
      logic [7:0] e;
      e = ref_byte(ln, pos);
      check(dout == e, $sformatf("byte %h expected %h", dout, e));
      if (pos > 276 && (pos - 276) % 2 == 1) begin
        logic [7:0] raw;
        bit vv;
        raw = ysrc(ln, (pos - 276) / 2);
        vv = (ln <= 21) || (ln >= 262 && ln <= 284) || (ln == 525);
        if (!vv && (raw == 8'h00 || raw == 8'hFF)) n_clamp++;
      end
      if (pos == 3) begin
        if (dout[6] != prevF) n_fchg++;
        if (dout[5] != prevV) n_vchg++;
        prevF = dout[6]; prevV = dout[5];
      end
      n_bytes++;
      pos++;
      if (pos == 1716) begin pos = 0; ln = (ln == 525) ? 1 : ln + 1; end
    end
    started = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (525 * 1716 + 4000) @(posedge clk);
    check(n_bytes > 525 * 1716, "whole frame checked");
    check(n_fchg == 2, $sformatf("field changes %0d", n_fchg));
    check(n_vchg >= 4, $sformatf("blanking changes %0d", n_vchg));
    check(n_clamp > 0, "clamp exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
