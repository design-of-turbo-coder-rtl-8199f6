// tb_data_assembler: streams random bit triples, with idle cycles, into the
// assembler and checks each 24-bit word {sys, par1, par2} (first bit most
// significant), that out_valid pulses for exactly one cycle right after the
// 8th triple, and that `clear` restarts a partly filled word.
module tb_data_assembler;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic sys_bit = 0, par1_bit = 0, par2_bit = 0;
  logic out_valid;
  logic [23:0] data_out;

  data_assembler #(.K(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input logic s, p1, p2, input logic clr);
    @(negedge clk);
    in_valid = 1; sys_bit = s; par1_bit = p1; par2_bit = p2; clear = clr;
    @(negedge clk);
    in_valid = 0; clear = 0;
  endtask

  initial begin
    logic [7:0] s, a, b;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 100; w++) begin
      s = 8'($urandom); a = 8'($urandom); b = 8'($urandom);
      // sometimes start with junk, then restart with clear
      if (w % 7 == 3) begin
        for (int k = 0; k < 3; k++) begin
          push(1'($urandom), 1'($urandom), 1'($urandom), 1'b0);
          checks++; if (out_valid) failures++;
        end
      end
      for (int k = 0; k < 8; k++) begin
        push(s[7-k], a[7-k], b[7-k], k == 0);
        checks++;
        if (out_valid !== (k == 7)) begin
          failures++;
          $display("word %0d triple %0d: out_valid=%0d", w, k, out_valid);
        end
        if ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          checks++; if (out_valid) failures++;
        end
      end
      checks++;
      if (data_out !== {s, a, b}) begin
        failures++;
        $display("word %0d: got %h expected %h", w, data_out, {s, a, b});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
