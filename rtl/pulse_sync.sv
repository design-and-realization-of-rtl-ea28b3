// pulse_sync: carries a single-cycle pulse from one clock domain to another.
//
// The source pulse flips a toggle flop; the toggle crosses into the
// destination domain through a two-flop synchroniser and an edge detector
// turns each change back into one destination-clock pulse, two to three
// destination clocks after the source pulse. Pulses must be spaced by at
// least three destination clocks plus one source clock, which holds for all
// uses here (one pulse per video line).
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic tgl;
  logic [2:0] sync;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     tgl <= 1'b0;
    else if (src_pulse) tgl <= ~tgl;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) sync <= '0;
    else            sync <= {sync[1:0], tgl};
  end

  assign dst_pulse = sync[2] ^ sync[1];
endmodule
