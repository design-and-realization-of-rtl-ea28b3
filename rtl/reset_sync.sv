// reset_sync: turns the board reset into a reset for one clock domain,
// asserted asynchronously and released synchronously two clocks after the
// board reset goes away, so every flop of the domain leaves reset on the
// same edge.
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) {rst_n_out, meta} <= '0;
    else           {rst_n_out, meta} <= {meta, 1'b1};
  end
endmodule
