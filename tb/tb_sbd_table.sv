// tb_sbd_table -- checks the code-size functions of sbd_pkg against the
// published figures:
//   * the number of check bits needed for k = 16, 32, 64, 128, 256 data bits
//     and byte lengths b = 3..16 (70 entries of the comparison table);
//   * the maximum number of data bytes of the three example codes:
//     K = 14 for b=4 r=8 (C1), K = 22 for b=3 r=8 (C2), K = 7 for b=8 r=12 (C3);
//   * the construction chosen for each (b, r) range.
module tb_sbd_table;
  import sbd_pkg::*;

  int checks = 0, failures = 0;

  // expected check bits, row b = 3..16, columns k = 16, 32, 64, 128, 256
  localparam int EXP_R [14][5] = '{
    '{ 6,  8,  8,  9, 10}, '{ 8,  8,  9, 10, 11}, '{ 9,  9, 10, 10, 12},
    '{ 9, 10, 11, 12, 12}, '{10, 11, 12, 13, 14}, '{11, 12, 13, 14, 15},
    '{12, 13, 14, 14, 15}, '{13, 14, 14, 15, 16}, '{14, 14, 15, 16, 17},
    '{15, 15, 16, 17, 18}, '{16, 16, 17, 18, 19}, '{17, 17, 18, 19, 20},
    '{18, 18, 19, 20, 21}, '{18, 19, 20, 21, 22}
  };
  localparam int KS [5] = '{16, 32, 64, 128, 256};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int b = 3; b <= 16; b++)
      for (int i = 0; i < 5; i++)
        expect_int($sformatf("check bits b=%0d k=%0d", b, KS[i]), min_check_bits(b, KS[i]), EXP_R[b-3][i]);
    expect_int("K max b=4 r=8",  kmax(4, 8),  14);
    expect_int("K max b=3 r=8",  kmax(3, 8),  22);
    expect_int("K max b=8 r=12", kmax(8, 12), 7);
    expect_int("construction b=4 r=8",  int'(construction(4, 8)),  int'(CONS_C1));
    expect_int("construction b=3 r=8",  int'(construction(3, 8)),  int'(CONS_C2));
    expect_int("construction b=8 r=12", int'(construction(8, 12)), int'(CONS_C3));
    expect_int("construction b=8 r=9",  int'(construction(8, 9)),  int'(CONS_NONE));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
