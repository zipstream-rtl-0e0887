// zs_barrel_shifter: flushes the already decoded bits from the window.
//
// The 32-bit window {REG A, REG B} is shifted left by `shift` (REG C, the
// number of decoded bits of REG A) and the MAX_CODE most significant bits are
// returned: the next undecoded bits, first bit in the MSB. Only MAX_CODE bits
// are produced because no code word is longer. Combinational.
module zs_barrel_shifter
  import zs_pkg::*;
(
  input  logic [WIN_W-1:0]    window,
  input  logic [SHIFT_W-1:0]  shift,
  output logic [MAX_CODE-1:0] bits
);

  logic [WIN_W-1:0] shifted;

  always_comb begin
    shifted = window << shift;
    bits    = shifted[WIN_W-1 -: MAX_CODE];
  end

endmodule
