// des_core: single DES block cipher, 16 rounds unrolled, one block per clock.
//
// The 64-bit input block passes the initial permutation IP, is split into
// 32-bit halves L0 and R0 and goes through sixteen des_round instances in a
// row, each fed its subkey by des_key_schedule. After round 16 the halves are
// swapped back (R16 L16) and the inverse permutation IP^-1 gives the result.
// encrypt = 1 encrypts, encrypt = 0 decrypts with the same hardware by
// reversing the subkey order.
//
// Interface: clk, rst (synchronous, active high), enable, encrypt, key,
// data_in in; data_out and valid out.
// Timing: the 16 rounds are combinational. On a rising clock edge with enable
// high the result for the data_in, key and encrypt present at that edge is
// stored in data_out and valid goes high for one cycle, so the latency is one
// cycle and a new block can be accepted every cycle. With enable low data_out
// holds its value. Reset clears data_out and valid.
// The unrolled 16-round structure, the enable, encrypt/decrypt and reset
// inputs follow the original chip; the single output register, the synchronous
// reset and the valid output are choices of this implementation.
module des_core
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   enable,
  input  logic   encrypt,
  input  block_t key,
  input  block_t data_in,
  output block_t data_out,
  output logic   valid
);

  subkey_t [ROUNDS-1:0] subkeys;
  block_t               permuted;
  logic [31:0]          l [ROUNDS+1];
  logic [31:0]          r [ROUNDS+1];
  block_t               result;

  des_key_schedule u_keys (.key(key), .encrypt(encrypt), .subkeys(subkeys));

  assign permuted = apply_ip(data_in);

  assign l[0] = permuted[63:32];
  assign r[0] = permuted[31:0];

  for (genvar n = 0; n < ROUNDS; n++) begin : g_round
    des_round u_round (
      .l_in  (l[n]),
      .r_in  (r[n]),
      .subkey(subkeys[n]),
      .l_out (l[n+1]),
      .r_out (r[n+1])
    );
  end

  assign result = apply_fp({r[ROUNDS], l[ROUNDS]});

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= enable;
      if (enable) data_out <= result;
    end
  end

endmodule
