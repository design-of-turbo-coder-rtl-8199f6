// siso_decoder: soft-in soft-out MAP decoder for one RSC constituent code.
//
// Implements the BCJR (MAP) algorithm in the logarithmic domain. For every
// trellis step t and transition s -> s' driven by input u with parity p,
// the branch metric is
//     gamma_t(s,u) = [u==0]*(Lsys_t + Lapr_t) + [p==0]*Lpar_t
// (the log of the branch probability up to a per-step constant). The
// forward metrics alpha_{t+1}(s') and backward metrics beta_t(s) are
// max*-sums over the two transitions entering or leaving each state, where
// max*(a,b) = max(a,b) + ln(1+exp(-|a-b|)) with the correction term on a
// three-entry grid; this is the exact MAP recursion up to that rounding.
// The a-posteriori LLR of bit t is
//     Lapp_t = max*_{u=0}(alpha_t + gamma_t + beta_{t+1})
//            - max*_{u=1}(alpha_t + gamma_t + beta_{t+1})
// and the extrinsic LLR passed to the other decoder is
// Lext_t = Lapp_t - Lsys_t - Lapr_t. Hard decision: bit = (Lapp_t < 0).
// alpha_0 is 0 for state 0 and -infinity elsewhere (the encoder starts in
// state 0); beta_K is 0 everywhere (the trellis is not terminated). State
// metrics are renormalised every step by subtracting the metric of state 0.
//
// Architecture: one trellis step per clock. On `start` the input LLRs are
// registered; K forward cycles fill an alpha memory of (K+1) x 2^M metrics;
// K backward cycles then compute beta and emit Lapp/Lext/hard for step
// K-1 down to 0. `done` pulses 2K cycles after `start` is sampled; outputs
// hold until the next `done`. `start` while busy is ignored.
//
// The MAP algorithm and its forward/backward/branch metric decomposition
// follow the design description; the log-domain arithmetic, widths,
// normalisation and the serial schedule are this design's own.
module siso_decoder
#(
  parameter int unsigned  K       = turbo_pkg::K,
  parameter int unsigned  M       = turbo_pkg::M,
  parameter logic [M-1:0] FB_TAPS = turbo_pkg::FB_TAPS,
  parameter logic [M:0]   FF_TAPS = turbo_pkg::FF_TAPS,
  parameter int unsigned  LLR_W   = turbo_pkg::LLR_W,
  parameter int unsigned  EXT_W   = turbo_pkg::EXT_W,
  parameter int unsigned  MET_W   = turbo_pkg::MET_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [LLR_W-1:0] l_sys [K],
  input  logic signed [LLR_W-1:0] l_par [K],
  input  logic signed [EXT_W-1:0] l_apr [K],
  output logic                    busy,
  output logic                    done,
  output logic signed [EXT_W-1:0] l_app [K],
  output logic signed [EXT_W-1:0] l_ext [K],
  output logic [K-1:0]            hard
);

  localparam int unsigned NS = 1 << M;
  localparam int unsigned TW = $clog2(K + 1);   // step counter 0..K
  localparam int unsigned XW = $clog2(K);       // index into K-entry arrays

  typedef logic signed [MET_W-1:0] metric_t;
  typedef metric_t                 mvec_t [NS];

  localparam metric_t NEG_INF = metric_t'(-(1 <<< (MET_W - 3)));
  localparam metric_t EXT_HI  = metric_t'((1 <<< (EXT_W - 1)) - 1);
  localparam metric_t EXT_LO  = metric_t'(-(1 <<< (EXT_W - 1)));

  // ---------------------------------------------------------------- trellis
  function automatic int unsigned next_of(int unsigned s, int unsigned u);
    logic [M-1:0] st;
    logic         a;
    st = M'(s);
    a  = 1'(u) ^ (^(st & FB_TAPS));
    return int'(M'({st, a}));
  endfunction

  function automatic logic par_of(int unsigned s, int unsigned u);
    logic [M-1:0] st;
    logic         a;
    st = M'(s);
    a  = 1'(u) ^ (^(st & FB_TAPS));
    return (FF_TAPS[0] & a) ^ (^(st & FF_TAPS[M:1]));
  endfunction

  // max*(a,b) on the 0.25 grid: correction round(4*ln(1+exp(-d/4))).
  function automatic metric_t mstar(metric_t a, metric_t b);
    metric_t mx, d;
    int      c;
    if (a > b) begin mx = a; d = a - b; end
    else       begin mx = b; d = b - a; end
    if (d == 0)     c = 3;
    else if (d < 4) c = 2;
    else if (d < 9) c = 1;
    else            c = 0;
    return mx + metric_t'(c);
  endfunction

  function automatic metric_t sat_ext(metric_t v);
    if (v > EXT_HI)      return EXT_HI;
    else if (v < EXT_LO) return EXT_LO;
    else                 return v;
  endfunction

  // ---------------------------------------------------------------- storage
  typedef enum logic [1:0] {S_IDLE, S_FWD, S_BWD} phase_t;
  phase_t phase;

  logic signed [LLR_W-1:0] r_sys [K];
  logic signed [LLR_W-1:0] r_par [K];
  logic signed [EXT_W-1:0] r_apr [K];
  mvec_t                   alpha_mem [K+1];
  mvec_t                   beta;
  logic [TW-1:0]           t;
  logic [XW-1:0]           tx;

  assign tx = XW'(t);

  // ---------------------------------------------------------------- step logic
  metric_t g_u0, g_p0;            // [u==0] and [p==0] parts of gamma at step t
  metric_t gam [NS][2];
  mvec_t   alpha_t, alpha_n, beta_n, beta_nrm, alpha_nrm;
  metric_t llr0, llr1, lapp, lext;

  always_comb begin
    g_u0 = metric_t'(r_sys[tx]) + metric_t'(r_apr[tx]);
    g_p0 = metric_t'(r_par[tx]);
    for (int s = 0; s < NS; s++)
      for (int u = 0; u < 2; u++)
        gam[s][u] = ((u == 0) ? g_u0 : metric_t'(0)) +
                    (par_of(s, u) ? metric_t'(0) : g_p0);

    alpha_t = alpha_mem[t];

    // forward: alpha_{t+1}(s') = max* alpha_t(s) + gamma_t(s,u)
    for (int s = 0; s < NS; s++) alpha_n[s] = NEG_INF;
    for (int s = 0; s < NS; s++)
      for (int u = 0; u < 2; u++)
        alpha_n[next_of(s, u)] = mstar(alpha_n[next_of(s, u)],
                                       alpha_t[s] + gam[s][u]);
    for (int s = 0; s < NS; s++) alpha_nrm[s] = alpha_n[s] - alpha_n[0];

    // backward: beta_t(s) = max* gamma_t(s,u) + beta_{t+1}(s')
    for (int s = 0; s < NS; s++) begin
      beta_n[s] = mstar(gam[s][0] + beta[next_of(s, 0)],
                        gam[s][1] + beta[next_of(s, 1)]);
    end
    for (int s = 0; s < NS; s++) beta_nrm[s] = beta_n[s] - beta_n[0];

    // a-posteriori LLR of step t
    llr0 = NEG_INF;
    llr1 = NEG_INF;
    for (int s = 0; s < NS; s++) begin
      llr0 = mstar(llr0, alpha_t[s] + gam[s][0] + beta[next_of(s, 0)]);
      llr1 = mstar(llr1, alpha_t[s] + gam[s][1] + beta[next_of(s, 1)]);
    end
    lapp = llr0 - llr1;
    lext = lapp - metric_t'(r_sys[tx]) - metric_t'(r_apr[tx]);
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= S_IDLE;
      t     <= '0;
      done  <= 1'b0;
      hard  <= '0;
      for (int i = 0; i < K; i++) begin
        r_sys[i] <= '0;
        r_par[i] <= '0;
        r_apr[i] <= '0;
        l_app[i] <= '0;
        l_ext[i] <= '0;
      end
      for (int i = 0; i <= K; i++)
        for (int s = 0; s < NS; s++) alpha_mem[i][s] <= '0;
      for (int s = 0; s < NS; s++) beta[s] <= '0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        S_IDLE: begin
          if (start) begin
            for (int i = 0; i < K; i++) begin
              r_sys[i] <= l_sys[i];
              r_par[i] <= l_par[i];
              r_apr[i] <= l_apr[i];
            end
            for (int s = 0; s < NS; s++)
              alpha_mem[0][s] <= (s == 0) ? metric_t'(0) : NEG_INF;
            t     <= '0;
            phase <= S_FWD;
          end
        end
        S_FWD: begin
          alpha_mem[t + 1'b1] <= alpha_nrm;
          if (t == TW'(K - 1)) begin
            for (int s = 0; s < NS; s++) beta[s] <= '0;
            phase <= S_BWD;
          end else begin
            t <= t + 1'b1;
          end
        end
        S_BWD: begin
          l_app[tx] <= EXT_W'(sat_ext(lapp));
          l_ext[tx] <= EXT_W'(sat_ext(lext));
          hard[XW'(K - 1) - tx] <= lapp[MET_W-1];
          beta <= beta_nrm;
          if (t == '0) begin
            phase <= S_IDLE;
            done  <= 1'b1;
          end else begin
            t <= t - 1'b1;
          end
        end
        default: phase <= S_IDLE;
      endcase
    end
  end

  assign busy = (phase != S_IDLE);

endmodule
