// turbo_decoder: iterative decoder for the rate-1/3 turbo code.
//
// Two SISO (MAP) decoders exchange extrinsic information. One turbo
// iteration is a pass of SISO 1 followed by a pass of SISO 2:
//   SISO 1: systematic Ls, parity Lp1, a priori = deinterleave(Lext2)
//           (the deinterleaver buffer is cleared to zero with `start`, so
//           the first iteration runs without a priori information)
//   SISO 2: systematic interleave(Ls), parity Lp2,
//           a priori = interleave(Lext1)
// After N_ITER iterations the hard decisions of both decoders are
// presented: dec_data1 in natural order (the decoded word) and dec_data2 in
// SISO 2's own, interleaved order.
//
// Interface: llr_in[i] is the received soft value of code bit i of the
// encoder output word {systematic, parity1, parity2}; so the systematic
// value of trellis step t is llr_in[3K-1-t], parity 1 is llr_in[2K-1-t],
// parity 2 is llr_in[K-1-t]. llr_in is sampled with `start` (ignored while
// busy). Positive soft values favour a 0.
//
// Timing: each SISO pass takes 2K+2 cycles (start pulse, 2K trellis steps,
// hand-over); `done` pulses N_ITER*2*(2K+2) cycles after the clock edge that
// samples `start` (144 for K = 8, N_ITER = 4), and the outputs hold until
// the next `done`.
//
// The two SISO decoders, two interleavers and one deinterleaver and the
// order of the passes follow the design description; the iteration count
// and the control sequence are this design's own.
module turbo_decoder
#(
  parameter int unsigned K        = turbo_pkg::K,
  parameter int unsigned PERM [K] = turbo_pkg::PERM,
  parameter int unsigned N_ITER   = turbo_pkg::N_ITER,
  parameter int unsigned LLR_W    = turbo_pkg::LLR_W,
  parameter int unsigned EXT_W    = turbo_pkg::EXT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [LLR_W-1:0] llr_in [3*K],
  output logic                    busy,
  output logic                    done,
  output logic [K-1:0]            dec_data1,
  output logic [K-1:0]            dec_data2
);

  localparam int unsigned IW = $clog2(N_ITER + 1);

  typedef enum logic [1:0] {D_IDLE, D_SISO1, D_SISO2} dstate_t;
  dstate_t st;

  logic signed [LLR_W-1:0] ys [K];
  logic signed [LLR_W-1:0] yp1 [K];
  logic signed [LLR_W-1:0] yp2 [K];
  logic [IW-1:0]           iter;
  logic                    go1, go2;

  // Soft values and extrinsic information between the decoders.
  logic [LLR_W-1:0] ys_nat [K], ys_int [K];
  logic [EXT_W-1:0] ext1 [K], ext1_int [K];
  logic [EXT_W-1:0] ext2 [K], ext2_nat [K];
  logic signed [EXT_W-1:0] apr1 [K];
  logic signed [EXT_W-1:0] apr2 [K];
  logic signed [LLR_W-1:0] ys2 [K];
  logic signed [EXT_W-1:0] app1 [K], app2 [K], lext1 [K], lext2 [K];
  logic [K-1:0]            hard1, hard2;
  logic                    busy1, busy2, done1, done2;

  always_comb begin
    for (int t = 0; t < K; t++) begin
      ys_nat[t] = llr_in[3*K-1-t];
      ext1[t]   = lext1[t];
      ext2[t]   = lext2[t];
      ys2[t]    = ys_int[t];
      apr2[t]   = ext1_int[t];
      apr1[t]   = ext2_nat[t];
    end
  end

  // Buffers between the decoders: the systematic values are interleaved
  // once per block; extrinsic blocks are captured as each SISO finishes, one
  // edge before the other SISO samples them.
  logic v_sys, v_ext1, v_ext2, load_sys;

  assign load_sys = (st == D_IDLE) && start;

  interleaver #(.K(K), .W(LLR_W), .PERM(PERM)) u_int_sys (
    .clk, .rst_n, .load(load_sys), .din(ys_nat), .out_valid(v_sys), .dout(ys_int)
  );

  interleaver #(.K(K), .W(EXT_W), .PERM(PERM)) u_int_ext (
    .clk, .rst_n, .load(done1), .din(ext1), .out_valid(v_ext1), .dout(ext1_int)
  );

  deinterleaver #(.K(K), .W(EXT_W), .PERM(PERM)) u_deint_ext (
    .clk, .rst_n, .clear(load_sys), .load(done2), .din(ext2),
    .out_valid(v_ext2), .dout(ext2_nat)
  );

  siso_decoder #(.K(K), .LLR_W(LLR_W), .EXT_W(EXT_W)) u_siso1 (
    .clk, .rst_n, .start(go1), .l_sys(ys), .l_par(yp1), .l_apr(apr1),
    .busy(busy1), .done(done1), .l_app(app1), .l_ext(lext1), .hard(hard1)
  );

  siso_decoder #(.K(K), .LLR_W(LLR_W), .EXT_W(EXT_W)) u_siso2 (
    .clk, .rst_n, .start(go2), .l_sys(ys2), .l_par(yp2), .l_apr(apr2),
    .busy(busy2), .done(done2), .l_app(app2), .l_ext(lext2), .hard(hard2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= D_IDLE;
      iter       <= '0;
      go1        <= 1'b0;
      go2        <= 1'b0;
      done       <= 1'b0;
      dec_data1  <= '0;
      dec_data2  <= '0;
      for (int t = 0; t < K; t++) begin
        ys[t]  <= '0;
        yp1[t] <= '0;
        yp2[t] <= '0;
      end
    end else begin
      go1  <= 1'b0;
      go2  <= 1'b0;
      done <= 1'b0;
      unique case (st)
        D_IDLE: begin
          if (start) begin
            for (int t = 0; t < K; t++) begin
              ys[t]  <= llr_in[3*K-1-t];
              yp1[t] <= llr_in[2*K-1-t];
              yp2[t] <= llr_in[K-1-t];
            end
            iter       <= '0;
                  go1        <= 1'b1;
            st         <= D_SISO1;
          end
        end
        D_SISO1: begin
          if (done1) begin
            go2 <= 1'b1;
            st  <= D_SISO2;
          end
        end
        D_SISO2: begin
          if (done2) begin
            if (iter == IW'(N_ITER - 1)) begin
              dec_data1 <= hard1;
              dec_data2 <= hard2;
              done      <= 1'b1;
              st        <= D_IDLE;
            end else begin
              iter <= iter + 1'b1;
              go1  <= 1'b1;
              st   <= D_SISO1;
            end
          end
        end
        default: st <= D_IDLE;
      endcase
    end
  end

  assign busy = (st != D_IDLE);

  // The two component decoders never run at the same time, and each starts
  // only on loaded buffers.
  assert property (@(posedge clk) disable iff (!rst_n) !(busy1 && busy2));
  assert property (@(posedge clk) disable iff (!rst_n) go2 |-> (v_sys && v_ext1));
  assert property (@(posedge clk) disable iff (!rst_n) (go1 && iter != '0) |-> v_ext2);

endmodule
