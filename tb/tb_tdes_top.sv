// tb_tdes_top: end-to-end test of the Triple-DES top at its default size.
//
// Expected values come from an independent Triple-DES implementation
// (OpenSSL, keying option 1: three independent keys, EDE). The stimulus:
//  * the two "Now is the time" blocks with key1 = key2 = key3 = 0123456789ABCDEF,
//    which must give the single-DES ciphertexts (backward compatibility);
//  * a 24-digit payment record (5-digit customer number, 15-digit card
//    number, 4-digit expiry) as three 8-character ASCII blocks, encrypted and
//    decrypted with the three keys 0123456789ABCDEF / 23456789ABCDEF01 /
//    456789ABCDEF0123, together with the published example block
//    "The qufck" 5468652071756663 -> A826FD8CE53B855F;
//  * ten random key sets, each block encrypted and its ciphertext decrypted.
// A scoreboard checks every output, its order and that it appears exactly
// three clocks after the block was taken. The test counts how often each
// mechanism happened: encryption, decryption, a direction change between
// blocks in flight, back-to-back blocks, a pause (enable low) with blocks in
// flight, and a reset that drops blocks in flight; each must happen.
module tb_tdes_top;
  import des_pkg::*;

  typedef struct packed {
    block_t k1;
    block_t k2;
    block_t k3;
    block_t pt;
    block_t ct;
  } vec_t;

  localparam vec_t RVECS [10] = '{
    '{64'h9C5065D22D209719, 64'h9D40C48270203F2E, 64'h2A9B5FADAFD74C37, 64'hF2B52893B0CDA2A5, 64'h4E4CE01C332D86C3},
    '{64'h48C849D7BEFB88FE, 64'h64131DFFC0CD4E3E, 64'h577C06BE3F9D05FC, 64'hF5E955E641D33661, 64'h07B88C12F1D908A6},
    '{64'h177DC4CC0715CF41, 64'hDDC2075DB0EF082B, 64'hA421952B358F2AAC, 64'h9E47BFC1426FE6D1, 64'hDB980D2643143627},
    '{64'hA7ECFE30F6DD3015, 64'hBD914615A4AEE33A, 64'h245B82FC97544EB5, 64'h11C4BBC2A7F7362A, 64'h45C33AB5D8A7B3FE},
    '{64'h1163FD17990D406C, 64'h64212293B1E60B4F, 64'h13F3FEC64DCC67F8, 64'hBAC6F344105E7420, 64'hF855A667FBA03526},
    '{64'h8922398D11211EC7, 64'h12CD8D4E03B8B7A0, 64'h131159085C8B5376, 64'h8EAB2767246952EC, 64'h493886D6F833D899},
    '{64'hB8F22DFF1CE4910F, 64'hA5FD8B037E62AA44, 64'h82A159ADF833F72E, 64'hE0B700ACB0028946, 64'hDB954C8B7C9F7F5B},
    '{64'hEBB3AC654601196B, 64'h73352920C4F9B13A, 64'hE65F99A62D8A4CDF, 64'h4143A87F199F6C54, 64'h09F0353FC14AD73D},
    '{64'h6510672B4D9C350F, 64'hB25F9AD768B07F17, 64'h2C5808CCB0845F7B, 64'hFD430DCC71E6CBA5, 64'hD759ED6BEEE5BC46},
    '{64'hE0C8E114BA72B566, 64'hDC7EA8171847B6A3, 64'h75EBFC87EEABD1DE, 64'h529BEFFF57A3FE88, 64'h1523804764B744B9}};

  // Payment record "12345" "376066666655555" "1205" as ASCII, and "The qufck".
  localparam block_t REC_PT [4] = '{64'h3132333435333736, 64'h3036363636363635,
                                    64'h3535353531323035, 64'h5468652071756663};
  localparam block_t REC_CT [4] = '{64'h4E01A3952B553F50, 64'hA8F4A0EE1C906695,
                                    64'hCD721060748D59A5, 64'hA826FD8CE53B855F};
  localparam block_t REC_K1 = 64'h0123456789ABCDEF;
  localparam block_t REC_K2 = 64'h23456789ABCDEF01;
  localparam block_t REC_K3 = 64'h456789ABCDEF0123;

  localparam int LATENCY = 3;

  int checks = 0, failures = 0;
  int n_encrypt = 0, n_decrypt = 0, n_dir_change = 0, n_back_to_back = 0;
  int n_pause = 0, n_reset_drop = 0, n_single_des = 0;

  logic   clk = 1'b0;
  logic   rst, enable, encrypt, out_valid;
  block_t key1, key2, key3, data_in, data_out;

  tdes_top u_dut (.clk, .rst, .enable, .encrypt, .key1, .key2, .key3,
                  .data_in, .data_out, .out_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- scoreboard
  typedef struct {
    block_t expected;
    int     taken_at;
  } pending_t;

  pending_t    pending [$];
  int          cycle = 0;
  block_t      expect_next;
  logic        last_taken, last_dir;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst) begin
      if (pending.size() > 0) n_reset_drop++;
      pending.delete();
      last_taken <= 1'b0;
    end else begin
      if (out_valid) begin
        if (pending.size() == 0) begin
          check(1'b0, "output with no block in flight");
        end else begin
          pending_t p;
          p = pending.pop_front();
          check(data_out == p.expected,
                $sformatf("data_out %h, expected %h", data_out, p.expected));
          // Taken at edge t, registered by edges t, t+1, t+2, sampled here at t+3.
          check(cycle - p.taken_at == LATENCY,
                $sformatf("latency %0d cycles, expected %0d", cycle - p.taken_at, LATENCY));
        end
      end
      if (enable) begin
        pending.push_back('{expected: expect_next, taken_at: cycle});
        if (encrypt) n_encrypt++; else n_decrypt++;
        if (last_taken) begin
          n_back_to_back++;
          if (last_dir != encrypt) n_dir_change++;
        end
        if (!last_taken && pending.size() > 1) n_pause++;
        if (key1 == key2 && key2 == key3) n_single_des++;
      end
      last_taken <= enable;
      last_dir   <= encrypt;
    end
  end

  // ------------------------------------------------------------------- driver
  // Present one block for one clock; the caller decides on gaps.
  task automatic put(input logic dir, input block_t din, input block_t expected);
    enable      = 1'b1;
    encrypt     = dir;
    data_in     = din;
    expect_next = expected;
    @(posedge clk);
    #1;
    enable = 1'b0;
  endtask

  task automatic idle(input int n);
    enable = 1'b0;
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic drain();
    idle(LATENCY + 2);
    check(pending.size() == 0, "all blocks came out");
  endtask

  task automatic set_keys(input block_t a, input block_t b, input block_t c);
    key1 = a; key2 = b; key3 = c;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; enable = 1'b0; encrypt = 1'b1; data_in = '0; expect_next = '0;
    last_taken = 1'b0; last_dir = 1'b1;
    set_keys('0, '0, '0);
    repeat (3) @(posedge clk);
    #1;
    check(out_valid == 1'b0 && data_out == '0, "reset clears outputs");
    rst = 1'b0;

    // 1. Single-DES compatibility: "Now is the time" with one key three times.
    set_keys(64'h0123456789ABCDEF, 64'h0123456789ABCDEF, 64'h0123456789ABCDEF);
    put(1'b1, 64'h4E6F772069732074, 64'h3FA40E8A984D4815);
    put(1'b1, 64'h68652074696D6520, 64'h6A271787AB8883F9);
    put(1'b0, 64'h3FA40E8A984D4815, 64'h4E6F772069732074);
    put(1'b0, 64'h6A271787AB8883F9, 64'h68652074696D6520);
    drain();

    // 2. Payment record: encrypt all blocks back to back, then decrypt them
    //    with a pause, then interleave directions every clock.
    set_keys(REC_K1, REC_K2, REC_K3);
    for (int i = 0; i < 4; i++) put(1'b1, REC_PT[i], REC_CT[i]);
    drain();
    put(1'b0, REC_CT[0], REC_PT[0]);
    put(1'b0, REC_CT[1], REC_PT[1]);
    idle(1);
    put(1'b0, REC_CT[2], REC_PT[2]);
    put(1'b0, REC_CT[3], REC_PT[3]);
    drain();
    for (int i = 0; i < 4; i++) begin
      put(1'b1, REC_PT[i], REC_CT[i]);
      put(1'b0, REC_CT[i], REC_PT[i]);
    end
    drain();

    // 3. Random key sets.
    for (int i = 0; i < 10; i++) begin
      set_keys(RVECS[i].k1, RVECS[i].k2, RVECS[i].k3);
      put(1'b1, RVECS[i].pt, RVECS[i].ct);
      if (i % 2 == 1) idle(1);
      put(1'b0, RVECS[i].ct, RVECS[i].pt);
      drain();
    end

    // 4. Reset with blocks in flight: they are dropped, nothing comes out,
    //    and the next block is processed normally.
    set_keys(REC_K1, REC_K2, REC_K3);
    put(1'b1, REC_PT[0], REC_CT[0]);
    put(1'b1, REC_PT[1], REC_CT[1]);
    rst = 1'b1;
    @(posedge clk);
    #1;
    rst = 1'b0;
    check(out_valid == 1'b0, "reset drops blocks in flight");
    idle(LATENCY + 1);
    check(out_valid == 1'b0, "no output after reset");
    put(1'b1, REC_PT[2], REC_CT[2]);
    drain();

    check(n_encrypt > 0,      "mechanism: encryption");
    check(n_decrypt > 0,      "mechanism: decryption");
    check(n_single_des > 0,   "mechanism: single-DES compatible keys");
    check(n_back_to_back > 0, "mechanism: back-to-back blocks");
    check(n_dir_change > 0,   "mechanism: direction change in flight");
    check(n_pause > 0,        "mechanism: pause with blocks in flight");
    check(n_reset_drop > 0,   "mechanism: reset with blocks in flight");
    $display("encrypt=%0d decrypt=%0d single_des=%0d back_to_back=%0d dir_change=%0d pause=%0d reset_drop=%0d",
             n_encrypt, n_decrypt, n_single_des, n_back_to_back, n_dir_change, n_pause, n_reset_drop);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
