// tb_turbo_decoder: end-to-end check of the iterative decoder.
//
// Words are encoded by a reference model in this testbench (systematic,
// parity p_k = u_k ^ p_{k-2} of the natural order, same parity of the order
// 4 1 2 7 8 3 5 6), mapped to soft values +8 (bit 0) / -8 (bit 1) and
// decoded. Checked:
//   * error-free words: dec_data1 equals the word, dec_data2 the
//     interleaved word;
//   * every single flipped code bit (all 24 positions) of every one of the
//     256 words is corrected;
//   * noisy soft values with one flipped bit are still corrected when the
//     noise is mild;
//   * latency N_ITER*2*(2K+2) = 144 cycles and the busy flag.
// Two-bit error patterns are decoded too and the number corrected is
// reported; they are beyond what the code is guaranteed to fix.
module tb_turbo_decoder;
  int checks = 0, failures = 0;
  int two_ok = 0, two_tot = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [5:0] llr_in [24];
  logic busy, done;
  logic [7:0] dec_data1, dec_data2;

  turbo_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] parity(input logic [7:0] w);
    logic [7:0] p;
    logic p1 = 0, p2 = 0;
    for (int k = 0; k < 8; k++) begin
      p[7-k] = w[7-k] ^ p2;
      p2 = p1; p1 = p[7-k];
    end
    return p;
  endfunction

  function automatic logic [7:0] intl(input logic [7:0] w);
    int unsigned src [8] = '{4, 1, 2, 7, 8, 3, 5, 6};
    logic [7:0] wi;
    for (int j = 0; j < 8; j++) wi[7-j] = w[8 - src[j]];
    return wi;
  endfunction

  function automatic logic [23:0] ref_enc(input logic [7:0] w);
    return {w, parity(w), parity(intl(w))};
  endfunction

  // Decode word w sent with the given error mask and noise amplitude;
  // returns 1 when both outputs are right.
  task automatic frame(input logic [7:0] w, input logic [23:0] emask,
                       input int noise, input bit must, output bit ok);
    logic [23:0] c;
    int cyc = 0;
    c = ref_enc(w) ^ emask;
    for (int i = 0; i < 24; i++) begin
      int v;
      v = (c[i] ? -8 : 8) + ((noise > 0) ? ($urandom_range(0, 2 * noise) - noise) : 0);
      llr_in[i] = 6'(v);
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    checks++; if (!busy) failures++;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc !== 144) begin
      failures++;
      $display("latency %0d, expected 144", cyc);
    end
    ok = (dec_data1 == w) && (dec_data2 == intl(w));
    if (must) begin
      checks++;
      if (!ok) begin
        failures++;
        $display("word %b mask %h: dec1 %b dec2 %b (expected %b)", w, emask,
                 dec_data1, dec_data2, intl(w));
      end
    end
  endtask

  initial begin
    bit ok;
    for (int i = 0; i < 24; i++) llr_in[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) frame(8'($urandom), '0, 0, 1, ok);
    for (int v = 0; v < 256; v++)
      for (int b = 0; b < 24; b++) frame(8'(v), 24'(1) << b, 0, 1, ok);
    for (int n = 0; n < 40; n++)
      frame(8'($urandom), 24'(1) << $urandom_range(0, 23), 3, 1, ok);
    for (int n = 0; n < 60; n++) begin
      int a, b;
      a = $urandom_range(0, 23);
      b = (a + 1 + $urandom_range(0, 22)) % 24;
      frame(8'($urandom), (24'(1) << a) | (24'(1) << b), 0, 0, ok);
      two_tot++;
      if (ok) two_ok++;
    end
    $display("two-bit error patterns corrected: %0d of %0d", two_ok, two_tot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
