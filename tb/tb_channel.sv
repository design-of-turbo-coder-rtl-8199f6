// tb_channel: checks the channel model: a clean 0 maps to +8, a clean 1 to
// -8, err_mask flips a bit, noise is added and the result saturates to
// -32 .. +31.
module tb_channel;
  int checks = 0, failures = 0;

  logic [23:0] code, err_mask;
  logic signed [5:0] noise [24], llr [24];

  channel dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      code = 24'($urandom);
      err_mask = (n < 100) ? '0 : 24'($urandom);
      for (int i = 0; i < 24; i++) noise[i] = (n < 50) ? '0 : 6'($urandom);
      #1;
      for (int i = 0; i < 24; i++) begin
        int e;
        e = ((code[i] !== err_mask[i]) ? -8 : 8) + int'(noise[i]);
        if (e > 31) e = 31;
        if (e < -32) e = -32;
        checks++;
        if (int'(llr[i]) !== e) begin
          failures++;
          if (failures < 10) $display("bit %0d: llr %0d expected %0d", i, llr[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
