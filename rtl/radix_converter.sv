// radix_converter: serial, successive-approximation style conversion of a
// radix-2 code D2 into the radix-r code Dr that the relaxation DAC needs.
//
// How it works (the published algorithm): a working register starts at D2
// and the bit index at M-1.  In each cycle the register is compared with the
// weight w[i] = r^i*G of the current bit.  If it is below the weight, bit i
// of Dr is 0 and the register is kept; otherwise bit i is 1 and the weight
// is subtracted.  The index then steps down until bit 0 is resolved.  The
// weights come from radix_weight_gen and carry W_FRAC fractional bits; D2
// enters as an integer with zero fraction.
//
// Interface: start pulses with d2 valid (a start while busy restarts the
// conversion).  dr holds the result of the last finished conversion and
// changes only on the cycle done is raised.  The weights must not change
// while busy.  Holding dr in its own output register, so that a new
// conversion can run while the previous code is being shifted out, is this
// design's own choice.
// Timing: one bit per cycle; done is high in the (M+1)th cycle after the
// cycle in which start was high.
module radix_converter
  import rbdc_pkg::*;
#(
  parameter int unsigned M      = M_BITS_DEF,
  parameter int unsigned W_FRAC = W_FRAC_DEF,
  localparam int unsigned WW    = M + W_FRAC,
  localparam int unsigned IW    = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [M-1:0]         d2,    // radix-2 input code
  input  logic [M-1:0][WW-1:0] w,     // weights r^i*G
  output logic                 busy,
  output logic                 done,
  output logic [M-1:0]         dr     // radix-r code
);
  logic [WW-1:0] rem;     // D2 minus the weights of the bits set so far
  logic [M-1:0]  bits;    // bits resolved so far
  logic [IW-1:0] i;
  logic          bit_i;   // 1 when the current weight fits
  logic [M-1:0]  bits_next;

  assign bit_i = !(rem < w[i]);

  always_comb begin
    bits_next    = bits;
    bits_next[i] = bit_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rem  <= '0;
      bits <= '0;
      i    <= '0;
      dr   <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        rem  <= {d2, {W_FRAC{1'b0}}};
        bits <= '0;
        i    <= IW'(M - 1);
      end else if (busy) begin
        bits <= bits_next;
        if (bit_i) rem <= rem - w[i];
        if (i == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
          dr   <= bits_next;
        end else begin
          i <= i - 1'b1;
        end
      end
    end
  end
endmodule
