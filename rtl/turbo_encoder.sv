// turbo_encoder: rate-1/3 parallel concatenated convolutional encoder.
//
// A K-bit word is loaded on `start`, into a shift register and, scrambled,
// into the interleaver's block buffer. Both are then fed, one bit per clock
// and starting with the most significant bit, into two identical RSC
// encoders: RSC 1 sees the natural order, RSC 2 the interleaved order. The data assembler collects the systematic
// bit and the two parity bits of every step and, after K steps, presents
//   data_out = {data_in, parity1, parity2}      (3K bits, bit 3K-1 first)
// No tail bits are sent: both RSCs start every block in state 0 and end
// wherever the data leaves them.
//
// Timing: `done` pulses K+1 clock edges after the edge that samples
// `start` (the K shift cycles overlap the RSC output register; one more for
// the assembler); `busy` is high from the cycle after `start` until `done`.
// A `start` while busy is ignored. data_out holds its value until the next
// block is complete.
//
// The structure (two RSCs, one interleaver, data assembler, 8 in, 24 out)
// follows the design description; the bit-serial schedule and the
// start/done handshake are this design's own.
module turbo_encoder
#(
  parameter int unsigned K = turbo_pkg::K,
  parameter int unsigned PERM [K] = turbo_pkg::PERM
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [K-1:0]   data_in,
  output logic           busy,
  output logic           done,
  output logic [3*K-1:0] data_out
);

  localparam int unsigned CW = $clog2(K + 1);
  localparam int unsigned XW = $clog2(K);

  // Word -> block in transmission order -> interleaver buffer.
  logic [0:0]    blk_nat [K];
  logic [0:0]    blk_int [K];
  logic          int_valid;
  logic          load;

  assign load = start && !busy;

  always_comb begin
    for (int t = 0; t < K; t++) blk_nat[t] = data_in[K-1-t];
  end

  interleaver #(.K(K), .W(1), .PERM(PERM)) u_intl (
    .clk, .rst_n, .load,
    .din      (blk_nat),
    .out_valid(int_valid),
    .dout     (blk_int)
  );

  logic [K-1:0]  sh_nat;
  logic [XW-1:0] idx;        // trellis step of the bit being fed
  logic [CW-1:0] left;       // bits still to feed
  logic          first;      // next bit is the first of the block
  logic          feed;

  assign feed = (left != '0);
  assign idx  = XW'(CW'(K) - left);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_nat <= '0;
      left   <= '0;
      first  <= 1'b0;
      busy   <= 1'b0;
    end else begin
      if (load) begin
        sh_nat <= data_in;
        left   <= CW'(K);
        first  <= 1'b1;
        busy   <= 1'b1;
      end else begin
        if (feed) begin
          sh_nat <= sh_nat << 1;
          left   <= left - 1'b1;
          first  <= 1'b0;
        end
        if (done) busy <= 1'b0;
      end
    end
  end

  logic       v1, v2, s1, s2, p1, p2;
  logic [turbo_pkg::M-1:0] st1, st2;

  rsc_encoder u_rsc1 (
    .clk, .rst_n, .clear(first), .in_valid(feed), .in_bit(sh_nat[K-1]),
    .out_valid(v1), .out_sys(s1), .out_par(p1), .state(st1)
  );

  rsc_encoder u_rsc2 (
    .clk, .rst_n, .clear(first), .in_valid(feed), .in_bit(blk_int[idx]),
    .out_valid(v2), .out_sys(s2), .out_par(p2), .state(st2)
  );

  // RSC 1 and RSC 2 run in lock step, and RSC 2 only reads a loaded buffer.
  assert property (@(posedge clk) disable iff (!rst_n) v1 == v2);
  assert property (@(posedge clk) disable iff (!rst_n) feed |-> int_valid);

  logic first_out;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) first_out <= 1'b0;
    else        first_out <= first & feed;
  end

  data_assembler #(.K(K)) u_asm (
    .clk, .rst_n, .clear(first_out), .in_valid(v1),
    .sys_bit(s1), .par1_bit(p1), .par2_bit(p2),
    .out_valid(done), .data_out
  );

endmodule
