// tb_des_core: self-checking test of the single-DES core.
//
// Known answers come from an independent DES implementation (OpenSSL) and
// include the two "Now is the time" blocks with key 0123456789ABCDEF.
// Each vector is encrypted and the ciphertext decrypted back. The test also
// checks the one-cycle latency, back-to-back blocks (one per clock), that
// data_out holds while enable is low, and that reset clears the outputs.
module tb_des_core;
  import des_pkg::*;

  typedef struct packed {
    block_t key;
    block_t pt;
    block_t ct;
  } vec_t;

  localparam int NV = 15;
  localparam vec_t VECS [NV] = '{
    '{64'h0123456789ABCDEF, 64'h4E6F772069732074, 64'h3FA40E8A984D4815},
    '{64'h0123456789ABCDEF, 64'h68652074696D6520, 64'h6A271787AB8883F9},
    '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h9C5065D22D209719, 64'h9D40C48270203F2E, 64'hC003FBCFE4F14FD9},
    '{64'h2A9B5FADAFD74C37, 64'hF2B52893B0CDA2A5, 64'hBC7C7E7236E358E3},
    '{64'h48C849D7BEFB88FE, 64'h64131DFFC0CD4E3E, 64'hCE504FC01F8D622D},
    '{64'h577C06BE3F9D05FC, 64'hF5E955E641D33661, 64'hEBFE7ADDA8043D8C},
    '{64'h177DC4CC0715CF41, 64'hDDC2075DB0EF082B, 64'hE0CA16582B5FD633},
    '{64'hA421952B358F2AAC, 64'h9E47BFC1426FE6D1, 64'h6BD2E6BDF48DA083},
    '{64'hA7ECFE30F6DD3015, 64'hBD914615A4AEE33A, 64'h0CB1829BD7B481EA},
    '{64'h245B82FC97544EB5, 64'h11C4BBC2A7F7362A, 64'h09698EEB11B1A1D3},
    '{64'h1163FD17990D406C, 64'h64212293B1E60B4F, 64'hF5C76DFAB35F199B},
    '{64'h13F3FEC64DCC67F8, 64'hBAC6F344105E7420, 64'hED5CC370D4694BDC},
    '{64'h8922398D11211EC7, 64'h12CD8D4E03B8B7A0, 64'h4EA431BB7BAE6CB4},
    '{64'h131159085C8B5376, 64'h8EAB2767246952EC, 64'h0CF757FD30015857}};

  int checks = 0, failures = 0;

  logic   clk = 1'b0;
  logic   rst, enable, encrypt, valid;
  block_t key, data_in, data_out;

  des_core u_dut (.clk, .rst, .enable, .encrypt, .key, .data_in, .data_out, .valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; enable = 1'b0; encrypt = 1'b1; key = '0; data_in = '0;
    repeat (2) @(posedge clk);
    #1;
    check(valid == 1'b0 && data_out == '0, "reset clears outputs");
    rst = 1'b0;

    // One block at a time: result and valid exactly one cycle after enable.
    for (int i = 0; i < NV; i++) begin
      for (int dir = 0; dir < 2; dir++) begin
        key     = VECS[i].key;
        encrypt = (dir == 0);
        data_in = encrypt ? VECS[i].pt : VECS[i].ct;
        enable  = 1'b1;
        @(posedge clk);
        #1;
        enable  = 1'b0;
        check(valid == 1'b1, $sformatf("valid one cycle after enable, vector %0d", i));
        check(data_out == (encrypt ? VECS[i].ct : VECS[i].pt),
              $sformatf("vector %0d %s: got %h", i, encrypt ? "encrypt" : "decrypt", data_out));
        @(posedge clk);
        #1;
        check(valid == 1'b0, "valid lasts one cycle");
        check(data_out == (encrypt ? VECS[i].ct : VECS[i].pt), "data_out holds with enable low");
      end
    end

    // Back to back: a new block every clock, alternating direction.
    enable = 1'b1;
    for (int i = 0; i < NV; i++) begin
      key     = VECS[i].key;
      encrypt = i[0];
      data_in = encrypt ? VECS[i].pt : VECS[i].ct;
      @(posedge clk);
      #1;
      check(valid && data_out == (encrypt ? VECS[i].ct : VECS[i].pt),
            $sformatf("back-to-back block %0d", i));
    end
    enable = 1'b0;

    // Reset while a result is held.
    rst = 1'b1;
    @(posedge clk);
    #1;
    check(valid == 1'b0 && data_out == '0, "reset after operation");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
