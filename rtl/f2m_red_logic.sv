// f2m_red_logic: hardcoded reduction logic for the binary field with
// f(z) = z^191 + z^9 + 1 and W = 16. A product T of two field elements has 24 words; its
// part above bit 190, H = T >> 191, folds back as H + z^9 H because z^191 = z^9 + 1. The
// shifts by 1 (191 = 11*16 + 15) and by 9 bits are not multiples of the word size, so this
// block does them with wires and XOR gates, one result word per use:
//   H[j]    = {T[12+j][14:0], T[11+j][15]}
//   R[j]    = T[j] ^ H[j] ^ (H[j] << 9) ^ (H[j-1] >> 7)   (last term absent for j = 0)
// H << 9 reaches up to bit 198; those bits G (= T bits 373..380 = T[23][12:5]) fold again as
// G + z^9 G into words 0 and 1. g_out gives G from the two top product words, and is_top
// clears bit 15 of word 11 (bit 191). Combinational. Inputs: t_hi = T[12+j],
// t_mid = T[11+j], t_lo = T[10+j], t_low = T[j], g = G, and the word position flags. The
// word-serial order (any j order works) is the user's; the split into these terms is this
// implementation's reading of the fast reduction the source design describes.
// Bit 15 of t_hi is not read: the product of two elements of degree <= 190 has degree
// <= 380, so T[23] bits 13..15 are always zero; bits 13 and 14 pass through H[11] harmlessly.
module f2m_red_logic
  import ecc_pkg::*;
(
  input  logic [W-1:0] t_hi,
  input  logic [W-1:0] t_mid,
  input  logic [W-1:0] t_lo,
  input  logic [W-1:0] t_low,
  input  logic [7:0]   g,
  input  logic         is_first,   // j == 0
  input  logic         is_second,  // j == 1
  input  logic         is_top,     // j == M-1
  output logic [W-1:0] r,
  output logic [7:0]   g_out
);

  logic [W-1:0] h, h_prev, fold, gterm;

  always_comb begin
    h      = {t_hi[W-2:0], t_mid[W-1]};
    h_prev = {t_mid[W-2:0], t_lo[W-1]};
    fold   = h ^ (h << B_K) ^ (is_first ? '0 : (h_prev >> (W - B_K)));
    gterm  = is_first  ? (W'(g) ^ (W'(g) << B_K)) :
             is_second ? (W'(g) >> (W - B_K))      : '0;
    r      = t_low ^ fold ^ gterm;
    if (is_top) r[W-1] = 1'b0;
    g_out  = t_hi[12:5];
  end

endmodule
