// tb_interleaver: checks the block interleaver against hand-written tables.
//
// * Default instance (K=8, W=1, table 4 1 2 7 8 3 5 6): all 256 blocks.
// * W=8 instance: random soft-value blocks.
// * K=6 instance with the six-entry table 3 4 5 1 6 2: the worked example
//   1 1 0 0 1 1 -> 0 0 1 1 1 1.
// Also checks the one-cycle load latency, out_valid, and that the buffer
// holds its block while `load` is low. Expected outputs come from the tables
// written out below, not from the module's parameters.
module tb_interleaver;
  int checks = 0, failures = 0;

  localparam int unsigned SRC8 [8] = '{4, 1, 2, 7, 8, 3, 5, 6};
  localparam int unsigned SRC6 [6] = '{3, 4, 5, 1, 6, 2};

  logic clk = 0, rst_n = 0, load = 0;
  logic [0:0] b_in [8], b_out [8];
  logic [7:0] w_in [8], w_out [8];
  logic [0:0] s_in [6], s_out [6];
  logic v_b, v_w, v_s;

  interleaver dut_bit (.clk, .rst_n, .load, .din(b_in), .out_valid(v_b), .dout(b_out));
  interleaver #(.W(8)) dut_wide (.clk, .rst_n, .load, .din(w_in), .out_valid(v_w), .dout(w_out));
  interleaver #(.K(6), .W(1), .PERM(SRC6)) dut_six (.clk, .rst_n, .load, .din(s_in), .out_valid(v_s), .dout(s_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held [8];
    for (int i = 0; i < 8; i++) begin b_in[i] = 0; w_in[i] = 0; end
    for (int i = 0; i < 6; i++) s_in[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (v_b || v_w || v_s) failures++;
    for (int v = 0; v < 256; v++) begin
      for (int i = 0; i < 8; i++) begin
        b_in[i] = 1'(v >> i);
        w_in[i] = 8'($urandom);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      checks++; if (!v_b || !v_w) failures++;
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (b_out[j] !== b_in[SRC8[j] - 1]) begin
          failures++;
          if (failures < 10) $display("bit block %0d: out[%0d]=%0d", v, j, b_out[j]);
        end
        checks++;
        if (w_out[j] !== w_in[SRC8[j] - 1]) failures++;
      end
      // change the input without load: output must hold
      for (int j = 0; j < 8; j++) held[j] = w_out[j];
      for (int i = 0; i < 8; i++) w_in[i] = 8'($urandom);
      @(negedge clk);
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (w_out[j] !== held[j]) failures++;
      end
    end
    // worked example with six elements
    s_in = '{1, 1, 0, 0, 1, 1};
    load = 1;
    @(negedge clk);
    load = 0;
    for (int j = 0; j < 6; j++) begin
      automatic logic [0:0] expv [6] = '{0, 0, 1, 1, 1, 1};
      checks++;
      if (s_out[j] !== expv[j]) begin
        failures++;
        $display("six-element example: out[%0d]=%0d expected %0d", j, s_out[j], expv[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
