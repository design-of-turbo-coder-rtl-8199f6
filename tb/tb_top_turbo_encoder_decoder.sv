// tb_top_turbo_encoder_decoder: end-to-end test of the turbo coder at its
// default size (8-bit words, 4 iterations).
//
// Every frame: a random word is encoded, sent through the channel with a
// chosen error mask and noise, decoded, and the outputs are checked:
//   * enc_data against a reference encoder written here (systematic word,
//     parity p_k = u_k ^ p_{k-2} of the natural order and of the order
//     4 1 2 7 8 3 5 6);
//   * error_s1 == (dec_data1 !== word), error_s2 == (dec_data2 !=
//     interleaved word);
//   * clean frames and frames with one flipped bit, with or without mild
//     noise, must decode correctly with both flags low;
//   * the 156-cycle frame latency; a start while busy must be ignored;
//   * the example word 11111000 must encode to
//     11111000 11001010 11010010, and the consecutive words 01011011 to
//     01100011 must decode without error, clean and with a flipped bit.
// Mechanisms counted, each of which must occur at least once: clean frame
// decoded, injected error corrected, noisy frame corrected, start ignored
// while busy, error flag raised (heavy error patterns the code cannot fix).
module tb_top_turbo_encoder_decoder;
  int checks = 0, failures = 0;
  int n_clean = 0, n_corrected = 0, n_noisy = 0, n_ignored = 0, n_flagged = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] input_data = 0;
  logic [23:0] err_mask = 0;
  logic signed [5:0] noise [24];
  logic [23:0] enc_data;
  logic busy, done, error_s1, error_s2;
  logic [7:0] dec_data1, dec_data2;

  top_turbo_encoder_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
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

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (word %b mask %h)", what, input_data, err_mask);
    end
  endtask

  // kind: 0 clean, 1 one error, 2 one error + noise, 3 heavy errors
  task automatic frame(input int kind, input bit poke, input int fixed = -1);
    logic [7:0] w;
    int cyc = 0;
    bit good;
    w = (fixed < 0) ? 8'($urandom) : 8'(fixed);
    case (kind)
      0, 2: err_mask = '0;
      default: err_mask = 24'(1) << $urandom_range(0, 23);
    endcase
    if (kind == 2) err_mask = 24'(1) << $urandom_range(0, 23);
    if (kind == 3) begin
      err_mask = '0;
      for (int e = 0; e < 5; e++) err_mask[$urandom_range(0, 23)] = 1'b1;
    end
    for (int i = 0; i < 24; i++)
      noise[i] = (kind == 2) ? 6'($urandom_range(0, 6) - 3) : '0;
    @(negedge clk);
    input_data = w; start = 1;
    @(negedge clk);
    start = 0;
    if (poke) begin
      input_data = ~w; start = 1;
      @(negedge clk);
      start = 0;
      cyc++;
    end
    while (!done && cyc < 2000) begin
      @(negedge clk);
      cyc++;
      if (cyc == 5) input_data = 8'($urandom);   // input may change after start
    end
    chk("latency 156", cyc == 156);
    if (cyc !== 156) $display("latency %0d", cyc);
    chk("enc_data", enc_data === {w, parity(w), parity(intl(w))});
    chk("error_s1 flag", error_s1 === (dec_data1 !== w));
    chk("error_s2 flag", error_s2 === (dec_data2 !== intl(w)));
    good = (dec_data1 == w) && (dec_data2 == intl(w)) && !error_s1 && !error_s2;
    if (kind !== 3) chk("decoded word", good);
    if (good && kind == 0) n_clean++;
    if (good && kind == 1) n_corrected++;
    if (good && kind == 2) n_noisy++;
    if (poke && dec_data1 == w) n_ignored++;
    if (error_s1 || error_s2) n_flagged++;
    @(negedge clk);
    chk("idle after done", !busy);
  endtask

  initial begin
    for (int i = 0; i < 24; i++) noise[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the 8-bit example word 11111000, then the run of consecutive words
    // 01011011 .. 01100011, clean and with one flipped bit each
    frame(0, 0, 'b11111000);
    chk("example codeword", enc_data === 24'b111110001100101011010010);
    for (int v = 'b01011011; v <= 'b01100011; v++) frame(0, 0, v);
    for (int v = 'b01011011; v <= 'b01100011; v++) frame(1, 0, v);
    for (int n = 0; n < 10; n++) frame(0, n == 3);
    for (int n = 0; n < 30; n++) frame(1, n == 7);
    for (int n = 0; n < 20; n++) frame(2, 0);
    for (int n = 0; n < 40 && n_flagged == 0; n++) frame(3, 0);
    for (int n = 0; n < 10; n++) frame(3, 0);
    $display("clean frames %0d, single errors corrected %0d, noisy frames corrected %0d, starts ignored while busy %0d, frames flagged %0d",
             n_clean, n_corrected, n_noisy, n_ignored, n_flagged);
    chk("mechanism: clean frame", n_clean > 0);
    chk("mechanism: injected error corrected", n_corrected > 0);
    chk("mechanism: noisy frame corrected", n_noisy > 0);
    chk("mechanism: start ignored while busy", n_ignored > 0);
    chk("mechanism: error flag raised", n_flagged > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
