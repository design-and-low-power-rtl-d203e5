// tb_des_round: self-checking test of one DES Feistel round.
//
// Applies reference vectors (L, R, K) -> (L', R') computed by an independent
// software DES model, plus the first round of the well-known worked example
// (key 133457799BBCDFF1, message 0123456789ABCDEF): L0 = CC00CCFF,
// R0 = F0AAF0AA, K1 = 1B02EFFC7072 gives R1 = EF4A6544.
module tb_des_round;
  import des_pkg::*;

  typedef struct packed {
    logic [31:0] l;
    logic [31:0] r;
    logic [47:0] k;
    logic [31:0] l_exp;
    logic [31:0] r_exp;
  } vec_t;

  localparam vec_t VECS [13] = '{
    '{32'hCC00CCFF, 32'hF0AAF0AA, 48'h1B02EFFC7072, 32'hF0AAF0AA, 32'hEF4A6544},
    '{32'h2D209719, 32'h9C5065D2, 48'h9D4070203F2E, 32'h9C5065D2, 32'hBDBFFB0A},
    '{32'hAFD74C37, 32'h2A9B5FAD, 48'hF2B5B0CDA2A5, 32'h2A9B5FAD, 32'h46290424},
    '{32'hBEFB88FE, 32'h48C849D7, 48'h6413C0CD4E3E, 32'h48C849D7, 32'h10504E79},
    '{32'h3F9D05FC, 32'h577C06BE, 48'hF5E941D33661, 32'h577C06BE, 32'h3029DFA1},
    '{32'h0715CF41, 32'h177DC4CC, 48'hDDC2B0EF082B, 32'h177DC4CC, 32'hAA6CD8AA},
    '{32'h358F2AAC, 32'hA421952B, 48'h9E47426FE6D1, 32'hA421952B, 32'h95A6DDDC},
    '{32'hF6DD3015, 32'hA7ECFE30, 48'hBD91A4AEE33A, 32'hA7ECFE30, 32'hEB92502D},
    '{32'h97544EB5, 32'h245B82FC, 48'h11C4A7F7362A, 32'h245B82FC, 32'h6CE1C1B5},
    '{32'h990D406C, 32'h1163FD17, 48'h6421B1E60B4F, 32'h1163FD17, 32'hBD6E7521},
    '{32'h4DCC67F8, 32'h13F3FEC6, 48'hBAC6105E7420, 32'h13F3FEC6, 32'h82BE4011},
    '{32'h11211EC7, 32'h8922398D, 48'h12CD03B8B7A0, 32'h8922398D, 32'hF73960F5},
    '{32'h5C8B5376, 32'h13115908, 48'h8EAB246952EC, 32'h13115908, 32'h8A4E9DDC}};

  int checks = 0, failures = 0;

  logic [31:0] l_in, r_in, l_out, r_out;
  subkey_t     subkey;

  des_round u_dut (.l_in, .r_in, .subkey, .l_out, .r_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 13; i++) begin
      l_in   = VECS[i].l;
      r_in   = VECS[i].r;
      subkey = VECS[i].k;
      #1;
      checks++;
      if (l_out != VECS[i].l_exp || r_out != VECS[i].r_exp) begin
        failures++;
        $display("FAIL: vector %0d got %h %h want %h %h", i, l_out, r_out,
                 VECS[i].l_exp, VECS[i].r_exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
