// rinv_rom: reciprocal through a small ROM after a precision range change.
//
// Combinational. The unsigned input v is first range-normalised: a leading-one
// detector finds k with 2^k <= v < 2^(k+1), and the M bits after the leading
// one form the ROM index f, so v ~ 2^k (1 + f/2^M). The ROM holds
//     R[f] = round(2^(16+M) / (2^M + f)),   f = 0 .. 2^M-1,
// i.e. 2^16 / (1 + f/2^M), a 17-bit value between 2^15 and 2^16. The result is
//     1/v ~ mant * 2^-(16 + exp),   mant = R[f], exp = k.
// Reducing the input to M bits is what lets the reciprocal fit in a ROM; the
// source states that idea for its RINV function, while the table size, the
// rounding and this output form are this design's choices. v = 0 is treated as
// v = 1. The table is computed at elaboration by a constant function.
module rinv_rom #(
  parameter int unsigned VW = 20,   // width of v
  parameter int unsigned M  = 8,    // ROM index bits (2^M entries)
  localparam int unsigned EW = $clog2(VW)
) (
  input  logic [VW-1:0] v,
  output logic [16:0]   mant,
  output logic [EW-1:0] exp
);

  localparam int unsigned SIZE = 2 ** M;

  typedef logic [16:0] rom_t [SIZE];

  function automatic rom_t gen_rom();
    rom_t r;
    longint unsigned num, den;
    for (int f = 0; f < SIZE; f++) begin
      den  = longint'(SIZE) + longint'(f);
      num  = (longint'(1) << (16 + M));
      r[f] = 17'((num + den / 2) / den);
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_rom();

  logic [VW-1:0] vv;
  logic [EW-1:0] k;
  logic [VW+M-1:0] shifted;
  logic [M-1:0]  f;

  always_comb begin
    vv = (v == '0) ? VW'(1) : v;
    k  = '0;
    for (int i = 0; i < VW; i++) begin
      if (vv[i]) k = EW'(i);
    end
    // bring the bits below the leading one to the top M positions
    shifted = (VW+M)'(vv) << (M + VW - 1 - int'(k));
    f       = shifted[VW+M-2 -: M];
  end

  assign mant = ROM[f];
  assign exp  = k;

endmodule
