// des_key_schedule: derives the sixteen 48-bit round subkeys from a 64-bit key.
//
// PC-1 drops the eight parity bits and reorders the other 56 into two 28-bit
// halves C and D. Before round n both halves are rotated left by the amount
// in the DES rotation table (1 or 2, 28 places over all 16 rounds), and
// PC-2 picks 48 of the 56 bits as subkey K[n].
// When decrypting the subkeys are handed out in reverse order (K[16] to the
// first round, K[1] to the last), which is the only difference between
// encryption and decryption in DES.
//
// Interface: key (64 bits, parity bits ignored) and encrypt in; subkeys[n-1]
// is the subkey the n-th round applies, for the direction selected.
// Timing: purely combinational; apart from the order multiplexer it is wiring.
// Forming all sixteen subkeys at once, rather than one per clock, is this
// implementation's choice and matches the unrolled rounds of des_core.
module des_key_schedule
  import des_pkg::*;
(
  input  block_t                  key,
  input  logic                    encrypt,
  output subkey_t [ROUNDS-1:0]    subkeys
);

  cd_t     [ROUNDS:0]   cd;
  subkey_t [ROUNDS-1:0] k_fwd;

  // Rotate each 28-bit half left by n places.
  function automatic cd_t rotate_halves(cd_t v, int unsigned n);
    logic [27:0] c, d;
    c = v[55:28];
    d = v[27:0];
    for (int unsigned j = 0; j < n; j++) begin
      c = {c[26:0], c[27]};
      d = {d[26:0], d[27]};
    end
    return {c, d};
  endfunction

  assign cd[0] = apply_pc1(key);

  for (genvar n = 0; n < ROUNDS; n++) begin : g_sub
    assign cd[n+1] = rotate_halves(cd[n], int'(SHIFT_T[n]));
    assign k_fwd[n] = apply_pc2(cd[n+1]);
    assign subkeys[n] = encrypt ? k_fwd[n] : k_fwd[ROUNDS-1-n];
  end

endmodule
