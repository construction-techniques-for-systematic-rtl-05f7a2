// tb_sbd_decoder -- end-to-end test of the read-path decoder for codes of every
// construction, full-length and shortened.  Each sbd_roundtrip_probe encodes
// random words, injects every single-bit error, every odd and even multi-bit
// error inside one byte and every double-bit error, and checks correction or
// detection; it then sweeps all 2^R syndromes and checks that every
// correction is an odd fix inside one byte that yields a codeword.
//   C1: B=4 R=8  K=14 (full, 56 data bits) and K=8 (32 data bits)
//   C2: B=3 R=8  K=22 (full, 66 data bits); B=4 R=9 K=16 (64 data bits);
//       B=3 R=10 K=30 (90 data bits, a middle check region wider than a byte)
//   C3: B=8 R=12 K=7 (full, 56 data bits) and K=4 (32 data bits), both with
//       the [H; I] blocks; B=8 R=12 K=7 with [I; H] blocks; B=5 R=8 K=3
// Check-byte widths: C1 two B-bit bytes; C2 B, R-2B, B bits; C3 R-B then B
// bits ([H; I]) or B then R-B bits ([I; H]).
// Full-length C1 codes must claim every odd syndrome (no odd syndrome left
// uncorrected); shortened codes must leave some (reported as uncorrectable).
module tb_sbd_decoder;
  localparam int NP = 10;

  int checks = 0, failures = 0;

  logic start = 1'b0;
  int   pc [NP], pf [NP], pu [NP];
  logic pd [NP];

  sbd_roundtrip_probe #(.B(4), .R(8),  .K(14), .CB0(4), .CB1(4), .CB2(0)) p0 (.start(start), .checks(pc[0]), .failures(pf[0]), .odd_ue(pu[0]), .done(pd[0]));
  sbd_roundtrip_probe #(.B(4), .R(8),  .K(8),  .CB0(4), .CB1(4), .CB2(0)) p1 (.start(start), .checks(pc[1]), .failures(pf[1]), .odd_ue(pu[1]), .done(pd[1]));
  sbd_roundtrip_probe #(.B(3), .R(8),  .K(22), .CB0(3), .CB1(2), .CB2(3)) p2 (.start(start), .checks(pc[2]), .failures(pf[2]), .odd_ue(pu[2]), .done(pd[2]));
  sbd_roundtrip_probe #(.B(4), .R(9),  .K(16), .CB0(4), .CB1(1), .CB2(4)) p3 (.start(start), .checks(pc[3]), .failures(pf[3]), .odd_ue(pu[3]), .done(pd[3]));
  sbd_roundtrip_probe #(.B(8), .R(12), .K(7),  .CB0(4), .CB1(8), .CB2(0)) p4 (.start(start), .checks(pc[4]), .failures(pf[4]), .odd_ue(pu[4]), .done(pd[4]));
  sbd_roundtrip_probe #(.B(8), .R(12), .K(4),  .CB0(4), .CB1(8), .CB2(0)) p5 (.start(start), .checks(pc[5]), .failures(pf[5]), .odd_ue(pu[5]), .done(pd[5]));
  sbd_roundtrip_probe #(.B(8), .R(12), .K(7),  .CB0(8), .CB1(4), .CB2(0), .C3_I_ABOVE(1'b1))
                                                                          p6 (.start(start), .checks(pc[6]), .failures(pf[6]), .odd_ue(pu[6]), .done(pd[6]));
  sbd_roundtrip_probe #(.B(3), .R(10), .K(30), .CB0(3), .CB1(4), .CB2(3)) p7 (.start(start), .checks(pc[7]), .failures(pf[7]), .odd_ue(pu[7]), .done(pd[7]));
  sbd_roundtrip_probe #(.B(5), .R(8),  .K(3),  .CB0(3), .CB1(5), .CB2(0)) p8 (.start(start), .checks(pc[8]), .failures(pf[8]), .odd_ue(pu[8]), .done(pd[8]));
  sbd_roundtrip_probe #(.B(3), .R(6),  .K(6),  .CB0(3), .CB1(3), .CB2(0)) p9 (.start(start), .checks(pc[9]), .failures(pf[9]), .odd_ue(pu[9]), .done(pd[9]));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    #1 start = 1'b1;
    do begin
      #1;
      all_done = 1'b1;
      for (int p = 0; p < NP; p++) all_done &= pd[p];
    end while (!all_done);
    for (int p = 0; p < NP; p++) begin
      $display("code %0d: %0d checks, %0d failures, %0d odd syndromes left uncorrected", p, pc[p], pf[p], pu[p]);
      checks += pc[p]; failures += pf[p];
    end
    // full-length C1 codes: every odd syndrome belongs to some byte
    checks += 2;
    if (pu[0] != 0) begin failures++; $display("full C1 code B=4 left odd syndromes unclaimed"); end
    if (pu[9] != 0) begin failures++; $display("full C1 code B=3 left odd syndromes unclaimed"); end
    // shortened codes: some odd syndromes are reported uncorrectable
    checks += 2;
    if (pu[1] == 0) begin failures++; $display("shortened C1 code never reported an odd syndrome uncorrectable"); end
    if (pu[5] == 0) begin failures++; $display("shortened C3 code never reported an odd syndrome uncorrectable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
