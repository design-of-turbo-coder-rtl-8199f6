// interleaver: pseudo-random block interleaver over K elements of W bits.
//
// A block presented on `din` is captured on a clock edge with `load` high
// and held, scrambled, on `dout`: element j of the output (0-based) is
// element PERM[j]-1 of the input, i.e. the table lists, for each output
// position, the 1-based input position it is taken from. With the default
// table 4 1 2 7 8 3 5 6 the block x1..x8 leaves as x4 x1 x2 x7 x8 x3 x5 x6.
// The register is the block buffer; the permutation is the fixed write
// addressing into it.
//
// Timing: `dout` and `out_valid` change one clock after `load`; `out_valid`
// stays high until the next reset. Reset (asynchronous, active low) clears
// the buffer.
//
// The same module scrambles single bits in the encoder (W = 1) and soft
// values in the decoder (W = soft-value width). The 8-entry table and the
// direction of the mapping follow the design description; the buffer,
// load strobe and element width are this implementation's own.
module interleaver #(
  parameter int unsigned K = turbo_pkg::K,
  parameter int unsigned W = 1,
  parameter int unsigned PERM [K] = turbo_pkg::PERM
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] din  [K],
  output logic         out_valid,
  output logic [W-1:0] dout [K]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int j = 0; j < K; j++) dout[j] <= '0;
    end else if (load) begin
      out_valid <= 1'b1;
      for (int j = 0; j < K; j++) dout[j] <= din[PERM[j] - 1];
    end
  end

  // The table must be a permutation of 1..K.
  initial begin
    for (int a = 0; a < K; a++) begin
      assert (PERM[a] >= 1 && PERM[a] <= K)
        else $error("interleaver: PERM[%0d]=%0d out of range", a, PERM[a]);
      for (int b = a + 1; b < K; b++)
        assert (PERM[a] != PERM[b])
          else $error("interleaver: PERM repeats %0d", PERM[a]);
    end
  end

endmodule
