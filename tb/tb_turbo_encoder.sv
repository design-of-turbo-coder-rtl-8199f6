// tb_turbo_encoder: checks the turbo encoder.
//
// Reference: systematic word, then the parity of the natural-order bits,
// then the parity of the bits in the order 4 1 2 7 8 3 5 6, each parity
// from the recurrence p_k = u_k ^ p_{k-2}. Checks the printed example
// 11111000 -> 11111000 11001010 11010010, all 256 words, the K+1 cycle
// latency, `busy`, and that a start while busy is ignored.
module tb_turbo_encoder;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] data_in = 0;
  logic busy, done;
  logic [23:0] data_out;

  turbo_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  function automatic logic [23:0] ref_enc(input logic [7:0] w);
    int unsigned src [8] = '{4, 1, 2, 7, 8, 3, 5, 6};
    logic [7:0] wi;
    for (int j = 0; j < 8; j++) wi[7-j] = w[8 - src[j]];
    return {w, parity(w), parity(wi)};
  endfunction

  task automatic encode(input logic [7:0] w, input bit poke);
    int cyc = 0;
    @(negedge clk);
    data_in = w; start = 1;
    @(negedge clk);
    start = 0;
    checks++; if (!busy) failures++;
    if (poke) begin data_in = ~w; start = 1; end
    while (!done && cyc < 100) begin
      @(negedge clk);
      start = 0;
      cyc++;
    end
    // cyc = cycles from the edge that samples start to done
    checks++;
    if (cyc !== 9) begin
      failures++;
      $display("latency %0d, expected 9", cyc);
    end
    checks++;
    if (data_out !== ref_enc(w)) begin
      failures++;
      $display("word %b: got %b expected %b", w, data_out, ref_enc(w));
    end
    @(negedge clk);
    checks++; if (busy || done) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // printed example
    checks++;
    if (ref_enc(8'b11111000) !== 24'b111110001100101011010010) begin
      failures++;
      $display("reference model disagrees with the printed example");
    end
    encode(8'b11111000, 0);
    for (int v = 0; v < 256; v++) encode(8'(v), v % 5 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
