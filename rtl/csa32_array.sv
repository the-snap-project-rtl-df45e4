// Partial product reduction array built from (3,2) counters.
//
// NR rows of W bits are reduced level by level: every group of three rows
// enters a row of full adders ((3,2) counters) and leaves as a sum row and a
// carry row shifted one place left; rows that do not fill a group pass to the
// next level unchanged. This repeats until two rows remain, whose sum modulo
// 2^W equals the sum of the inputs. The level structure is computed from NR
// at elaboration. Physical placement and wiring-track-aware ordering of the
// counters, which decide speed in a custom layout, have no RTL counterpart;
// the logic function is the same. Combinational.
module csa32_array #(
  parameter int W  = 128,
  parameter int NR = 23      // at least 3
) (
  input  logic [W-1:0] rows [NR],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  function automatic int rows_after(int lvl);
    int n = NR;
    for (int l = 0; l < lvl; l++) n = (n / 3) * 2 + (n % 3);
    return n;
  endfunction

  function automatic int num_levels();
    int n = NR, l = 0;
    while (n > 2) begin n = (n / 3) * 2 + (n % 3); l++; end
    return l;
  endfunction

  localparam int LEVELS = num_levels();

  // Each level owns its rows; level l reads the rows of level l-1.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int NIN  = rows_after(l);
    localparam int NOUT = rows_after(l + 1);
    localparam int NG   = NIN / 3;
    logic [W-1:0] in_r  [NIN];
    logic [W-1:0] out_r [NOUT];
    for (genvar r = 0; r < NIN; r++) begin : g_src
      if (l == 0) begin : g_first
        assign in_r[r] = rows[r];
      end else begin : g_next
        assign in_r[r] = g_lvl[l-1].out_r[r];
      end
    end
    for (genvar g = 0; g < NG; g++) begin : g_csa
      logic [W-1:0] a, b, c;
      assign a = in_r[3*g];
      assign b = in_r[3*g+1];
      assign c = in_r[3*g+2];
      assign out_r[2*g]   = a ^ b ^ c;
      assign out_r[2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
    end
    for (genvar r = 3 * NG; r < NIN; r++) begin : g_pass
      assign out_r[2*NG + r - 3*NG] = in_r[r];
    end
  end

  assign sum   = g_lvl[LEVELS-1].out_r[0];
  assign carry = g_lvl[LEVELS-1].out_r[1];

endmodule
