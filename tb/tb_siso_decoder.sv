// tb_siso_decoder: checks the SISO decoder against an exact MAP reference.
//
// The reference enumerates all 256 input sequences of the 8-step trellis
// (starting in state 0, open end), gives each the log-weight
//   sum_t [u_t==0]*(Ls_t+La_t) + [p_t==0]*Lp_t         (real arithmetic)
// and forms LLR_t = ln(sum over u_t=0 of exp) - ln(sum over u_t=1 of exp).
// The decoder's a-posteriori output (LSB = 0.25) must lie within 0.75 of
// the reference, its extrinsic output within 0.75 of LLR_t - Ls_t - La_t,
// and its hard decision must agree wherever |LLR_t| > 0.75. Outputs beyond
// the saturation limit are only checked for sign. Also checks the 2K cycle
// latency. Parity uses p_k = u_k ^ p_{k-2}.
module tb_siso_decoder;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [5:0] l_sys [8], l_par [8];
  logic signed [7:0] l_apr [8];
  logic busy, done;
  logic signed [7:0] l_app [8], l_ext [8];
  logic [7:0] hard;

  siso_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ref_llr [8];

  task automatic reference();
    real s0 [8], s1 [8];
    for (int t = 0; t < 8; t++) begin s0[t] = 0.0; s1[t] = 0.0; end
    for (int v = 0; v < 256; v++) begin
      real w = 0.0;
      logic p1 = 0, p2 = 0, u, p;
      for (int t = 0; t < 8; t++) begin
        u = 1'(v >> t);
        p = u ^ p2;
        p2 = p1; p1 = p;
        if (!u) w += (real'(l_sys[t]) + real'(l_apr[t])) / 4.0;
        if (!p) w += real'(l_par[t]) / 4.0;
      end
      for (int t = 0; t < 8; t++) begin
        if (v[t]) s1[t] += $exp(w);
        else      s0[t] += $exp(w);
      end
    end
    for (int t = 0; t < 8; t++) ref_llr[t] = $ln(s0[t]) - $ln(s1[t]);
  endtask

  task automatic near(string what, int t, real got, real expv);
    checks++;
    if (expv > 31.0 || expv < -31.0) begin
      if ((got > 0.0) !== (expv > 0.0)) failures++;
    end else if (got - expv > 0.75 || expv - got > 0.75) begin
      failures++;
      if (failures < 20) $display("%s[%0d]: got %f expected %f", what, t, got, expv);
    end
  endtask

  task automatic run(input int amp, input int noise, input int apr_range);
    int cyc = 0;
    for (int t = 0; t < 8; t++) begin
      int v;
      v = (($urandom_range(0, 1) == 1) ? amp : -amp) + $urandom_range(0, 2 * noise) - noise;
      if (v > 31) v = 31; if (v < -32) v = -32;
      l_sys[t] = 6'(v);
      v = (($urandom_range(0, 1) == 1) ? amp : -amp) + $urandom_range(0, 2 * noise) - noise;
      if (v > 31) v = 31; if (v < -32) v = -32;
      l_par[t] = 6'(v);
      l_apr[t] = 8'($urandom_range(0, 2 * apr_range) - apr_range);
    end
    reference();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc !== 16) begin
      failures++;
      $display("latency %0d, expected 16", cyc);
    end
    for (int t = 0; t < 8; t++) begin
      near("l_app", t, real'(l_app[t]) / 4.0, ref_llr[t]);
      near("l_ext", t, real'(l_ext[t]) / 4.0,
           ref_llr[t] - (real'(l_sys[t]) + real'(l_apr[t])) / 4.0);
      if (ref_llr[t] > 0.75 || ref_llr[t] < -0.75) begin
        checks++;
        if (hard[7-t] !== (ref_llr[t] < 0.0)) failures++;
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 8; t++) begin l_sys[t] = 0; l_par[t] = 0; l_apr[t] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) run(8, 0, 0);     // clean channel, no a priori
    for (int n = 0; n < 200; n++) run(8, 12, 0);    // noisy channel
    for (int n = 0; n < 200; n++) run(6, 10, 24);   // noisy, with a priori
    for (int n = 0; n < 100; n++) run(2, 4, 6);     // weak signals
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
