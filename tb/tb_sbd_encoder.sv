// tb_sbd_encoder -- self-checking test of the check-bit generator.
//
// 1. Default instance (B=4, R=8, K=14): check bits of unit vectors and of
//    random data words are compared with the published 8 x 64 matrix of the
//    full-length construction-C1 code (sbd_ref_pkg).
// 2. Shortened and other-construction instances, measured by sbd_code_probe:
//    odd, distinct columns, byte structure, and the row weights the document
//    reports for the 32-bit examples (13 ones per row for B=4 R=8; 17 in the
//    densest row for B=8 R=12), plus the C2 example (B=3 R=8 K=22) and the
//    64-data-bit C2 code (B=4 R=9 K=16) of the document's table.
module tb_sbd_encoder;
  import sbd_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [55:0] data;
  logic [7:0]  check;

  sbd_encoder dut (.data(data), .check(check));

  logic start = 1'b0;
  int   pc [5], pf [5];
  logic pd [5];

  sbd_code_probe #(.B(4), .R(8),  .K(8),  .EXP_MAXROW(13)) p0 (.start(start), .checks(pc[0]), .failures(pf[0]), .done(pd[0]));
  sbd_code_probe #(.B(8), .R(12), .K(4),  .EXP_MAXROW(17)) p1 (.start(start), .checks(pc[1]), .failures(pf[1]), .done(pd[1]));
  sbd_code_probe #(.B(3), .R(8),  .K(22), .EXP_MAXROW(0))  p2 (.start(start), .checks(pc[2]), .failures(pf[2]), .done(pd[2]));
  sbd_code_probe #(.B(4), .R(9),  .K(16), .EXP_MAXROW(0))  p3 (.start(start), .checks(pc[3]), .failures(pf[3]), .done(pd[3]));
  sbd_code_probe #(.B(8), .R(12), .K(7),  .EXP_MAXROW(0))  p4 (.start(start), .checks(pc[4]), .failures(pf[4]), .done(pd[4]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    // unit vectors: each check output is one column of the published matrix
    for (int c = 0; c < 56; c++) begin
      data = '0; data[c] = 1'b1; #1;
      for (int i = 0; i < 8; i++) exp[i] = h1(i, c);
      checks++;
      if (check !== exp) begin
        failures++; $display("column %0d: got %b expected %b", c, check, exp);
      end
    end
    // random words
    for (int n = 0; n < 2000; n++) begin
      data = 56'({$urandom, $urandom}); #1;
      exp = h1_check(data);
      checks++;
      if (check !== exp) begin
        failures++; $display("data %h: got %b expected %b", data, check, exp);
      end
    end
    start = 1'b1;
    wait (pd[0] && pd[1] && pd[2] && pd[3] && pd[4]);
    for (int p = 0; p < 5; p++) begin
      checks += pc[p]; failures += pf[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
