// tb_deinterleaver: checks the deinterleaver against the inverse table
// 2 3 6 1 7 8 4 5 (output position i takes input position INV[i]), checks
// that interleaver followed by deinterleaver is the identity, and checks
// the one-cycle load latency, holding while load is low, and `clear`.
module tb_deinterleaver;
  int checks = 0, failures = 0;

  localparam int unsigned INV [8] = '{2, 3, 6, 1, 7, 8, 4, 5};

  logic clk = 0, rst_n = 0, load = 0, clear = 0, load2 = 0;
  logic [5:0] d_in [8], d_out [8], r_int [8], r_back [8];
  logic v_d, v_i, v_b;

  deinterleaver #(.W(6)) dut (.clk, .rst_n, .clear, .load, .din(d_in), .out_valid(v_d), .dout(d_out));
  interleaver   #(.W(6)) u_int (.clk, .rst_n, .load, .din(d_in), .out_valid(v_i), .dout(r_int));
  deinterleaver #(.W(6)) dut_rt (.clk, .rst_n, .clear(1'b0), .load(load2), .din(r_int), .out_valid(v_b), .dout(r_back));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] keep [8];
    for (int i = 0; i < 8; i++) d_in[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 8; i++) d_in[i] = 6'($urandom);
      for (int i = 0; i < 8; i++) keep[i] = d_in[i];
      load = 1;
      @(negedge clk);
      load = 0; load2 = 1;
      checks++; if (!v_d) failures++;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (d_out[i] !== d_in[INV[i] - 1]) begin
          failures++;
          if (failures < 10) $display("out[%0d]=%0d expected %0d", i, d_out[i], d_in[INV[i] - 1]);
        end
      end
      for (int i = 0; i < 8; i++) d_in[i] = 6'($urandom);   // no load: must hold
      @(negedge clk);
      load2 = 0;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (r_back[i] !== keep[i]) failures++;
        checks++;
        if (d_out[i] !== keep[INV[i] - 1]) failures++;
      end
      if (n % 50 == 7) begin
        clear = 1; load = 1;           // clear wins over load
        @(negedge clk);
        clear = 0; load = 0;
        checks++; if (v_d) failures++;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (d_out[i] !== 0) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
