// channel: transmission channel between the turbo encoder and the decoder.
//
// Every code bit is BPSK-mapped to a soft value (log-likelihood ratio) of
// +AMP for a 0 and -AMP for a 1, in units of 0.25. Bits selected by err_mask
// are flipped before mapping, which models hard transmission errors; the
// signed noise of each bit is then added and the sum saturated to LLR_W
// bits. llr[i] belongs to code[i]. Purely combinational.
//
// Deliberately injected errors are how the design's error correction is
// demonstrated; the BPSK mapping, amplitude, noise input and saturation are
// this design's own choices.
module channel
#(
  parameter int unsigned NBITS = turbo_pkg::NCODE,
  parameter int unsigned LLR_W = turbo_pkg::LLR_W,
  parameter int unsigned AMP   = turbo_pkg::AMP
) (
  input  logic [NBITS-1:0]        code,
  input  logic [NBITS-1:0]        err_mask,
  input  logic signed [LLR_W-1:0] noise [NBITS],
  output logic signed [LLR_W-1:0] llr   [NBITS]
);

  localparam int MAXV =  (1 << (LLR_W - 1)) - 1;
  localparam int MINV = -(1 << (LLR_W - 1));

  always_comb begin
    for (int i = 0; i < NBITS; i++) begin
      int v;
      v = ((code[i] ^ err_mask[i]) ? -int'(AMP) : int'(AMP)) + int'(noise[i]);
      if (v > MAXV)      v = MAXV;
      else if (v < MINV) v = MINV;
      llr[i] = LLR_W'(v);
    end
  end

endmodule
