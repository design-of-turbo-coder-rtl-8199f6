// tb_rsc_encoder: checks the RSC encoder against the recurrence of its
// transfer function 1/(1+D^2): parity p_k = u_k ^ p_{k-2}, with p_{-1} =
// p_{-2} = 0 at the start of every block. Also checks the register sequence
// 00 -> 10 -> 01 -> 00 for the inputs 1 0 1 (printed as [newest, older]),
// the one-cycle output latency, and idle cycles inside a block.
module tb_rsc_encoder;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_bit = 0;
  logic out_valid, out_sys, out_par;
  logic [1:0] state;

  rsc_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int expv);
    checks++;
    if (got !== expv) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, expv);
    end
  endtask

  // Feed one bit; check the registered outputs in the next cycle.
  task automatic send(input logic u, input logic clr, input logic exp_p);
    @(negedge clk);
    in_valid = 1; in_bit = u; clear = clr;
    @(negedge clk);
    in_valid = 0; clear = 0;
    check("out_valid", int'(out_valid), 1);
    check("out_sys", int'(out_sys), int'(u));
    check("out_par", int'(out_par), int'(exp_p));
  endtask

  initial begin
    automatic logic [1:0] exp_states [4] = '{2'b00, 2'b01, 2'b10, 2'b00}; // {older, newest}
    automatic logic u3 [3] = '{1, 0, 1};
    logic p1, p2, p, u;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("state after reset", int'(state), 0);
    // register contents for 1 0 1
    p1 = 0; p2 = 0;
    for (int k = 0; k < 3; k++) begin
      p = u3[k] ^ p2;
      send(u3[k], k == 0, p);
      check($sformatf("state after step %0d", k), int'(state), int'(exp_states[k + 1]));
      p2 = p1; p1 = p;
    end
    // random blocks, with gaps between bits
    for (int blk = 0; blk < 60; blk++) begin
      automatic int len = 1 + $urandom_range(0, 11);
      p1 = 0; p2 = 0;
      for (int k = 0; k < len; k++) begin
        u = 1'($urandom);
        p = u ^ p2;
        send(u, k == 0, p);
        p2 = p1; p1 = p;
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          check("out_valid idle", int'(out_valid), 0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
