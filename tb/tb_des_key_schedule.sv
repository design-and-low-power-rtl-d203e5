// tb_des_key_schedule: self-checking test of the DES subkey generator.
//
// For three keys the sixteen subkeys are compared with values from an
// independent software model (the first key is the textbook example whose
// K1 is 1B02EFFC7072 and K16 CB3D8B0E17F5). With encrypt = 0 the same
// subkeys must come out in reverse order.
module tb_des_key_schedule;
  import des_pkg::*;

  localparam block_t KEYS [3] = '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h9C5065D22D209719};
  localparam subkey_t EXP [3][16] = '{
    '{48'h1B02EFFC7072, 48'h79AED9DBC9E5, 48'h55FC8A42CF99, 48'h72ADD6DB351D, 48'h7CEC07EB53A8,
      48'h63A53E507B2F, 48'hEC84B7F618BC, 48'hF78A3AC13BFB, 48'hE0DBEBEDE781, 48'hB1F347BA464F,
      48'h215FD3DED386, 48'h7571F59467E9, 48'h97C5D1FABA41, 48'h5F43B7F2E73A, 48'hBF918D3D3F0A,
      48'hCB3D8B0E17F5},
    '{48'h0B02679B49A5, 48'h69A659256A26, 48'h45D48AB428D2, 48'h7289D2A58257, 48'h3CE80317A6C2,
      48'h23251E3C8545, 48'h6C04950AE4C6, 48'h5788386CE581, 48'hC0C9E926B839, 48'h91E307631D72,
      48'h211F830D893A, 48'h7130E5455C54, 48'h91C4D04980FC, 48'h5443B681DC8D, 48'hB691050A16B5,
      48'hCA3D03B87032},
    '{48'h982712DC8A03, 48'h734A0621817C, 48'h28B1A0C19C86, 48'h90047F4C06BD, 48'hE542101B58CD,
      48'h069BA402D1B1, 48'h9A3053832D25, 48'h2D4668EA0B90, 48'h25B19897A062, 48'h1604E3A48F44,
      48'hFB481018A6D6, 48'h0CA38C7DC481, 48'h12141F0A644B, 48'h6D0860AEF104, 48'h82E8ACA047E2,
      48'h8484C7477950}};

  int checks = 0, failures = 0;

  block_t               key;
  logic                 encrypt;
  subkey_t [ROUNDS-1:0] subkeys;

  des_key_schedule u_dut (.key, .encrypt, .subkeys);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) begin
      for (int dir = 0; dir < 2; dir++) begin
        key     = KEYS[k];
        encrypt = (dir == 0);
        #1;
        for (int n = 0; n < 16; n++) begin
          subkey_t want;
          want = encrypt ? EXP[k][n] : EXP[k][15-n];
          checks++;
          if (subkeys[n] != want) begin
            failures++;
            $display("FAIL: key %0d encrypt %0b round %0d got %h want %h",
                     k, encrypt, n + 1, subkeys[n], want);
          end
        end
      end
    end
    // Parity bits do not matter: flipping them leaves every subkey unchanged.
    key = KEYS[0] ^ 64'h0101010101010101;
    encrypt = 1'b1;
    #1;
    for (int n = 0; n < 16; n++) begin
      checks++;
      if (subkeys[n] != EXP[0][n]) begin
        failures++;
        $display("FAIL: parity bits change subkey %0d", n + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
