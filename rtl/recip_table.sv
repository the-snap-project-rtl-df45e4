// Initial reciprocal approximation table for Newton-Raphson division.
//
// Indexed by the 8 fraction bits of the divisor that follow the hidden one,
// it returns 8 bits T with the approximation x0 = (256 + T) / 512 of 1/b, in
// the range (0.5, 1]. Entry i is the reciprocal of the midpoint of its
// interval, rounded to nearest:
//   T[i] = round(2^18 / (513 + 2i)) - 256
// (256 entries of 8 bits, the customary 2-Kbit table). The relative error is
// below 2^-8, so three Newton-Raphson iterations exceed 64 bits of precision.
// The table contents are computed at elaboration. Combinational read.
module recip_table (
  input  logic [7:0] idx,
  output logic [7:0] x0
);
  typedef logic [7:0] rom_t [256];

  function automatic rom_t build_rom();
    rom_t r;
    for (int i = 0; i < 256; i++) begin
      int den;
      den  = 513 + 2 * i;
      r[i] = 8'(((2 * 262144 + den) / (2 * den)) - 256);
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign x0 = ROM[idx];

endmodule
