// top_turbo_encoder_decoder: complete turbo coder, encoder -> channel ->
// decoder, with an error flag per component decoder.
//
// On `start` the K-bit input_data is captured and turbo encoded into a
// 3K-bit word enc_data = {input_data, parity1, parity2}. The word passes
// through the channel model, which flips the bits selected by err_mask,
// maps them to BPSK soft values and adds `noise`. The decoder samples the
// channel output K+3 edges after the edge that samples start, so err_mask
// and noise must be held until then. The decoder runs N_ITER iterations
// and reports
//   dec_data1  decisions of SISO decoder 1 (natural order: the decoded word)
//   dec_data2  decisions of SISO decoder 2 (interleaved order)
//   error_s1   dec_data1 differs from the captured input_data
//   error_s2   dec_data2 differs from the interleaved input_data
// all updated together with the one-cycle `done` pulse.
//
// Timing: done follows the edge that samples start by
// (K+1) + 2 + N_ITER*2*(2K+2) + 1 cycles (encoder, decoder launch, decoding,
// flag register): 156 cycles for K = 8, N_ITER = 4. `busy` is high from
// the cycle after start until done; a start while busy is ignored.
//
// The chain encoder / channel / decoder and the output names follow the
// design description; comparing the decisions against the transmitted word
// to form the error flags, and the noise input, are this design's own.
module top_turbo_encoder_decoder
#(
  parameter int unsigned K      = turbo_pkg::K,
  parameter int unsigned N_ITER = turbo_pkg::N_ITER
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [K-1:0]            input_data,
  input  logic [3*K-1:0]          err_mask,
  input  logic signed [turbo_pkg::LLR_W-1:0] noise [3*K],
  output logic [3*K-1:0]          enc_data,
  output logic                    busy,
  output logic                    done,
  output logic [K-1:0]            dec_data1,
  output logic [K-1:0]            dec_data2,
  output logic                    error_s1,
  output logic                    error_s2
);

  logic              enc_busy, enc_done, dec_busy, dec_done, dec_go;
  logic [K-1:0]      ref_data, ref_int;
  logic [K-1:0]      d1, d2;
  logic [0:0]        ref_blk [K];
  logic [0:0]        ref_blk_int [K];
  logic signed [turbo_pkg::LLR_W-1:0] rx [3*K];

  turbo_encoder #(.K(K)) u_enc (
    .clk, .rst_n, .start(start && !busy), .data_in(input_data),
    .busy(enc_busy), .done(enc_done), .data_out(enc_data)
  );

  channel #(.NBITS(3*K)) u_chan (
    .code(enc_data), .err_mask, .noise, .llr(rx)
  );

  turbo_decoder #(.K(K), .N_ITER(N_ITER)) u_dec (
    .clk, .rst_n, .start(dec_go), .llr_in(rx),
    .busy(dec_busy), .done(dec_done), .dec_data1(d1), .dec_data2(d2)
  );

  // Reference word in SISO 2's order, for error_s2, captured with start.
  logic ref_valid;

  always_comb begin
    for (int t = 0; t < K; t++) ref_blk[t] = input_data[K-1-t];
    for (int t = 0; t < K; t++) ref_int[K-1-t] = ref_blk_int[t];
  end

  interleaver #(.K(K), .W(1)) u_ref_int (
    .clk, .rst_n, .load(start && !busy), .din(ref_blk),
    .out_valid(ref_valid), .dout(ref_blk_int)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      dec_go    <= 1'b0;
      ref_data  <= '0;
      dec_data1 <= '0;
      dec_data2 <= '0;
      error_s1  <= 1'b0;
      error_s2  <= 1'b0;
    end else begin
      done   <= 1'b0;
      dec_go <= enc_done;
      if (start && !busy) begin
        busy     <= 1'b1;
        ref_data <= input_data;
      end
      if (dec_done) begin
        dec_data1 <= d1;
        dec_data2 <= d2;
        error_s1  <= (d1 != ref_data);
        error_s2  <= (d2 != ref_int);
        done      <= 1'b1;
        busy      <= 1'b0;
      end
    end
  end

  // The encoder and the decoder work on one frame at a time, in turn.
  assert property (@(posedge clk) disable iff (!rst_n) !(enc_busy && dec_busy));
  assert property (@(posedge clk) disable iff (!rst_n) dec_done |-> ref_valid);

endmodule
