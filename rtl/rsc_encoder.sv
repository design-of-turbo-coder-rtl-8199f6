// rsc_encoder: rate-1/2 recursive systematic convolutional encoder.
//
// One information bit enters per clock while in_valid is high. The encoder
// forms the register input a = u ^ (taps FB_TAPS of the state), emits the
// systematic bit u and the parity bit p = FF_TAPS applied to {state, a}, and
// shifts a into an M-bit shift register (bit 0 newest). With the defaults
// (M = 2, feedback 1+D^2, parity = a) the state runs 00 -> 10 -> 01 -> 00 for
// the input 1 0 1, as in the design description's encoder example.
//
// Timing: out_sys/out_par/out_valid are registered, one cycle after the
// input. `clear` returns the register to state 0 for the next block; a clear
// together with in_valid encodes that bit from state 0. Reset is
// asynchronous, active low.
//
// The two-register recursive structure follows the design description; the
// tap values are fitted to its printed 24-bit encoder example, and the
// handshake and reset are this design's own.
module rsc_encoder
#(
  parameter int unsigned    M       = turbo_pkg::M,
  parameter logic [M-1:0]   FB_TAPS = turbo_pkg::FB_TAPS,
  parameter logic [M:0]     FF_TAPS = turbo_pkg::FF_TAPS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic         out_valid,
  output logic         out_sys,
  output logic         out_par,
  output logic [M-1:0] state
);

  logic [M-1:0] cur;
  logic         a;

  always_comb begin
    cur = clear ? '0 : state;
    a   = in_bit ^ (^(cur & FB_TAPS));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      out_valid <= 1'b0;
      out_sys   <= 1'b0;
      out_par   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sys <= in_bit;
        out_par <= (FF_TAPS[0] & a) ^ (^(cur & FF_TAPS[M:1]));
        state   <= (M'({cur, a}));
      end else if (clear) begin
        state <= '0;
      end
    end
  end

endmodule
