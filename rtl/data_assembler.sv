// data_assembler: serial-to-parallel packer of the turbo encoder output.
//
// Each cycle with in_valid high it shifts one systematic bit and the two
// parity bits into three K-bit registers, the first bit of the block ending
// up in the most significant position. When the K-th triple has arrived it
// presents data_out = {systematic[K], parity1[K], parity2[K]} and pulses
// out_valid for one cycle; data_out then holds until the next word is
// complete. `clear` restarts the bit count (a triple presented with clear
// counts as the first of the new word).
//
// Timing: out_valid rises on the clock edge that captures the K-th triple.
// The concatenation order follows the design description's encoder example;
// the handshake is this design's own.
module data_assembler #(
  parameter int unsigned K = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           in_valid,
  input  logic           sys_bit,
  input  logic           par1_bit,
  input  logic           par2_bit,
  output logic           out_valid,
  output logic [3*K-1:0] data_out
);

  localparam int unsigned CW = $clog2(K + 1);

  logic [K-1:0]  sh_sys, sh_p1, sh_p2;
  logic [CW-1:0] count, base;

  assign base = clear ? '0 : count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_sys    <= '0;
      sh_p1     <= '0;
      sh_p2     <= '0;
      count     <= '0;
      out_valid <= 1'b0;
      data_out  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        sh_sys <= {sh_sys[K-2:0], sys_bit};
        sh_p1  <= {sh_p1[K-2:0],  par1_bit};
        sh_p2  <= {sh_p2[K-2:0],  par2_bit};
        if (base == CW'(K - 1)) begin
          count     <= '0;
          out_valid <= 1'b1;
          data_out  <= {sh_sys[K-2:0], sys_bit, sh_p1[K-2:0], par1_bit,
                        sh_p2[K-2:0], par2_bit};
        end else begin
          count <= base + 1'b1;
        end
      end else if (clear) begin
        count <= '0;
      end
    end
  end

endmodule
