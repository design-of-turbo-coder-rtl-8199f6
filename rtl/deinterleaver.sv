// deinterleaver: inverse of the pseudo-random block interleaver.
//
// A block in interleaved order, captured from `din` on a clock edge with
// `load` high, is written back to natural order: input element j (0-based)
// goes to output position PERM[j]-1. Passing a block through `interleaver`
// and then this module with the same table returns the original block.
//
// Timing: `dout` and `out_valid` change one clock after `load`; `out_valid`
// stays high until reset. `clear` (synchronous, takes priority over load)
// empties the buffer to zeros, so that the decoder can use it as an all-zero
// a-priori input before the first iteration. Reset is asynchronous, active
// low.
//
// The table follows the design description; the buffer, the clear input
// and building the inverse as a scatter over the same table are this
// implementation's own.
module deinterleaver #(
  parameter int unsigned K = turbo_pkg::K,
  parameter int unsigned W = 1,
  parameter int unsigned PERM [K] = turbo_pkg::PERM
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         load,
  input  logic [W-1:0] din  [K],
  output logic         out_valid,
  output logic [W-1:0] dout [K]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < K; i++) dout[i] <= '0;
    end else if (clear) begin
      out_valid <= 1'b0;
      for (int i = 0; i < K; i++) dout[i] <= '0;
    end else if (load) begin
      out_valid <= 1'b1;
      for (int j = 0; j < K; j++) dout[PERM[j] - 1] <= din[j];
    end
  end

endmodule
