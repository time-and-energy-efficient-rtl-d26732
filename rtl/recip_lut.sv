// Reciprocal lookup table of one LU processing element.
//
// Division is done as a multiplication by a reciprocal taken from a table,
// Inv(idx) = Round(2^RECIP_M / idx), with a 1024 x 16-bit table as the design
// specifies. The table is indexed by the magnitude of the divisor (a Q8.8 word)
// shifted right by RECIP_SHIFT bits, so index units are 1/4 and divisors up to
// 256 in magnitude are covered; how the 16-bit divisor maps onto the 10-bit
// index is this design's choice. The sign of the divisor is applied to the
// looked-up value, giving a signed reciprocal. Index 0 (|u| < 1/4) and index 1
// saturate to the largest positive word, 32767.
//
// Interface: u (divisor word) in, recip (signed reciprocal, scaled by
// 2^(RECIP_M + RECIP_SHIFT - FRAC) relative to a Q8.8 value) out.
// Timing: combinational (a ROM read, as a distributed-RAM table would be).
module recip_lut
  import lu_pkg::*;
(
  input  word_t u,
  output word_t recip
);

  typedef logic [RECIP_DEPTH-1:0][W-1:0] rom_t;

  function automatic rom_t gen_rom();
    rom_t r;
    for (int i = 0; i < RECIP_DEPTH; i++) begin
      int v;
      if (i == 0) v = (1 << RECIP_M);
      else        v = ((1 << RECIP_M) + i / 2) / i;
      if (v > 32767) v = 32767;
      r[i] = W'(v);
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_rom();

  logic [W-1:0]          mag;
  logic [RECIP_AW-1:0]   idx;
  word_t                 inv;

  always_comb begin
    mag   = u[W-1] ? W'(-u) : W'(u);
    idx   = RECIP_AW'(mag >> RECIP_SHIFT);
    inv   = word_t'(ROM[idx]);
    recip = u[W-1] ? -inv : inv;
  end

endmodule
