// tb_des_tables: self-checking test of the six fixed DES bit tables
// (IP, IP^-1, E, P, PC-1, PC-2), applied through the des_pkg functions.
//
// Each table is checked against a description that does not use the table
// itself: IP by its closed-form row/column rule, IP^-1 as the inverse of IP,
// E by its rule (each 6-bit group is 4 consecutive input bits with one
// neighbour on each side, wrapping), P as a bijection, PC-1 and PC-2 by the
// bits they drop and as injective selections, plus single entries stated in
// the DES description (e.g. key bit 30 lands in bit 41 after PC-1).
module tb_des_tables;
  import des_pkg::*;

  int checks = 0, failures = 0;

  logic [63:0] ip_in, ip_out, fp_out, pc1_in;
  logic [31:0] e_in, p_in, p_out;
  logic [47:0] e_out, pc2_out;
  logic [55:0] pc1_out, pc2_in;

  assign ip_out  = apply_ip(ip_in);
  assign fp_out  = apply_fp(ip_out);
  assign e_out   = apply_e(e_in);
  assign p_out   = apply_p(p_in);
  assign pc1_out = apply_pc1(pc1_in);
  assign pc2_out = apply_pc2(pc2_in);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Standard bit b (1-based from the left) of an n-bit vector as a one-hot.
  function automatic logic [63:0] bit1(int n, int b);
    return 64'(1) << (n - b);
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] seen;
    int src;
    ip_in = '0; e_in = '0; p_in = '0; pc1_in = '0; pc2_in = '0;
    #1;

    // IP: output bit n (0-based) comes from input bit
    // (row<4 ? 2*row+2 : 2*row-7) + 8*(7-col), row = n/8, col = n%8.
    for (int n = 0; n < 64; n++) begin
      automatic int row = n / 8;
      automatic int col = n % 8;
      src = ((row < 4) ? 2 * row + 2 : 2 * (row - 4) + 1) + 8 * (7 - col);
      ip_in = bit1(64, src);
      #1;
      check(ip_out == bit1(64, n + 1), $sformatf("IP output bit %0d", n + 1));
      check(fp_out == ip_in, $sformatf("IP^-1(IP(x)) single bit %0d", src));
    end
    for (int t = 0; t < 100; t++) begin
      ip_in = {$urandom, $urandom};
      #1;
      check(fp_out == ip_in, "IP^-1(IP(x)) == x");
    end

    // E: group g takes input bits 4g .. 4g+5 (1-based, cyclic over 32).
    for (int t = 0; t < 50; t++) begin
      e_in = $urandom;
      #1;
      for (int n = 0; n < 48; n++) begin
        src = ((4 * (n / 6) + (n % 6) - 1 + 32) % 32) + 1;
        check(e_out[47-n] == e_in[32-src], $sformatf("E output bit %0d", n + 1));
      end
    end

    // P: a bijection; output bit 1 is input bit 16, output bit 32 is input bit 25.
    seen = '0;
    for (int b = 1; b <= 32; b++) begin
      p_in = 32'(bit1(32, b));
      #1;
      check($countones(p_out) == 1, $sformatf("P one-hot for input bit %0d", b));
      seen[31:0] |= p_out;
      if (b == 16) check(p_out == 32'(bit1(32, 1)), "P input bit 16 -> output bit 1");
      if (b == 25) check(p_out == 32'(bit1(32, 32)), "P input bit 25 -> output bit 32");
    end
    check(seen[31:0] == '1, "P reaches every output bit");

    // PC-1: parity bits 8, 16, ..., 64 are dropped; the rest map one-to-one.
    seen = '0;
    for (int b = 1; b <= 64; b++) begin
      pc1_in = bit1(64, b);
      #1;
      if (b % 8 == 0) begin
        check(pc1_out == '0, $sformatf("PC-1 drops parity bit %0d", b));
      end else begin
        check($countones(pc1_out) == 1, $sformatf("PC-1 one-hot for key bit %0d", b));
        seen[55:0] |= pc1_out;
      end
      if (b == 30) check(pc1_out == 56'(bit1(56, 41)), "PC-1 key bit 30 -> bit 41");
      if (b == 57) check(pc1_out == 56'(bit1(56, 1)), "PC-1 key bit 57 -> bit 1");
      if (b == 4)  check(pc1_out == 56'(bit1(56, 56)), "PC-1 key bit 4 -> bit 56");
    end
    check(seen[55:0] == '1, "PC-1 reaches every output bit");

    // PC-2: bits 9, 18, 22, 25, 35, 38, 43, 54 are dropped; the rest map one-to-one.
    seen = '0;
    for (int b = 1; b <= 56; b++) begin
      pc2_in = 56'(bit1(56, b));
      #1;
      if (b inside {9, 18, 22, 25, 35, 38, 43, 54}) begin
        check(pc2_out == '0, $sformatf("PC-2 drops bit %0d", b));
      end else begin
        check($countones(pc2_out) == 1, $sformatf("PC-2 one-hot for bit %0d", b));
        seen[47:0] |= pc2_out;
      end
      if (b == 14) check(pc2_out == 48'(bit1(48, 1)), "PC-2 bit 14 -> bit 1");
      if (b == 32) check(pc2_out == 48'(bit1(48, 48)), "PC-2 bit 32 -> bit 48");
    end
    check(seen[47:0] == '1, "PC-2 reaches every output bit");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
