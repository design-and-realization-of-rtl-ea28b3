// bit_sync: two-flop synchroniser for a slowly changing level signal
// (here the SDRAM ready flag) entering another clock domain. The output
// follows the input two to three destination clocks later and is 0 in reset.
module bit_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {q, meta} <= '0;
    else        {q, meta} <= {meta, d};
  end
endmodule
