// des_round: one round of the DES Feistel network.
//
// The right half R is expanded from 32 to 48 bits (table E), XORed with the
// round's 48-bit subkey and cut into eight 6-bit groups, each addressing its
// own S-box. The eight 4-bit S-box outputs, concatenated in order S1..S8, are
// permuted by table P and XORed into the left half L. The new left half is
// the old right half and the new right half is L XOR f(R, K), the DES Feistel
// scheme. Encryption and decryption use the same round; only the order of
// the subkeys differs.
//
// Interface: l_in/r_in and subkey in, l_out/r_out out.
// Timing: purely combinational. l_out is r_in by construction (the Feistel
// half swap), so half of the outputs are plain wires.
module des_round
  import des_pkg::*;
(
  input  logic [31:0] l_in,
  input  logic [31:0] r_in,
  input  subkey_t     subkey,
  output logic [31:0] l_out,
  output logic [31:0] r_out
);

  logic [47:0] expanded;
  logic [47:0] mixed;
  logic [31:0] sbox_out;
  logic [31:0] f_out;

  assign expanded = apply_e(r_in);

  assign mixed = expanded ^ subkey;

  for (genvar s = 0; s < 8; s++) begin : g_sbox
    des_sbox #(.INDEX(s + 1)) u_sbox (
      .addr(mixed[47-6*s -: 6]),
      .dout(sbox_out[31-4*s -: 4])
    );
  end

  assign f_out = apply_p(sbox_out);

  assign l_out = r_in;
  assign r_out = l_in ^ f_out;

endmodule
