// tb_des_sbox: self-checking test of the eight DES S-boxes.
//
// Every row of every S-box must be a permutation of 0..15 (a defining
// property of the DES S-boxes). Row selection by the outer bits and column
// selection by the inner bits are checked with entries from the published
// tables, including the textbook example S1(011011) = 0101.
module tb_des_sbox;
  int checks = 0, failures = 0;

  logic [5:0] addr;
  logic [3:0] dout [8];

  for (genvar s = 0; s < 8; s++) begin : g_dut
    des_sbox #(.INDEX(s + 1)) u_dut (.addr(addr), .dout(dout[s]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Value of S-box s (1..8) for a row and column.
  task automatic expect_entry(input int s, input int row, input int col, input int val);
    addr = {row[1], col[3:0], row[0]};
    #1;
    check(dout[s-1] == 4'(val),
          $sformatf("S%0d row %0d col %0d: got %0d want %0d", s, row, col, dout[s-1], val));
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0;
    #1;
    for (int s = 0; s < 8; s++) begin
      for (int row = 0; row < 4; row++) begin
        logic [15:0] seen;
        seen = '0;
        for (int col = 0; col < 16; col++) begin
          addr = {row[1], col[3:0], row[0]};
          #1;
          seen[dout[s]] = 1'b1;
        end
        check(seen == 16'hFFFF, $sformatf("S%0d row %0d is a permutation", s + 1, row));
      end
    end

    addr = 6'b011011;
    #1;
    check(dout[0] == 4'b0101, "S1(011011) = 0101");

    expect_entry(1, 0, 0, 14);  expect_entry(1, 0, 15, 7);
    expect_entry(1, 3, 0, 15);  expect_entry(1, 2, 8, 15);
    expect_entry(2, 0, 0, 15);  expect_entry(2, 3, 15, 9);
    expect_entry(3, 0, 0, 10);  expect_entry(3, 1, 0, 13);
    expect_entry(4, 0, 0, 7);   expect_entry(4, 3, 15, 14);
    expect_entry(5, 0, 0, 2);   expect_entry(5, 1, 0, 14);
    expect_entry(6, 0, 0, 12);  expect_entry(6, 3, 15, 13);
    expect_entry(7, 0, 0, 4);   expect_entry(7, 2, 0, 1);
    expect_entry(8, 0, 0, 13);  expect_entry(8, 3, 15, 11);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
