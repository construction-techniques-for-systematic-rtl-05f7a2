// tb_sbd_examples -- runs the complete ECC unit (sbd_ecc_codec plus a
// behavioural byte-organized memory) for each published code configuration:
//   Example 1, full (b=4, r=8, 56 data bits) and shortened to 32 data bits;
//   Example 2 (b=3, r=8, 66 data bits, construction C2);
//   Example 3 (b=8, r=12, 32 data bits, construction C3) and its full length
//   (56 data bits);
//   a 64-data-bit code with b=4 (r=9, construction C2).
// Each instance streams reads with injected chip errors of every class and
// checks correction, detection and the reported chip; see sbd_codec_stream.
module tb_sbd_examples;
  localparam int NP = 6;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  int   pc [NP], pf [NP];
  logic pd [NP];

  sbd_codec_stream #(.B(4), .R(8),  .K(14), .CB0(4), .CB1(4), .CB2(0)) s0 (.clk, .start, .checks(pc[0]), .failures(pf[0]), .done(pd[0]));
  sbd_codec_stream #(.B(4), .R(8),  .K(8),  .CB0(4), .CB1(4), .CB2(0)) s1 (.clk, .start, .checks(pc[1]), .failures(pf[1]), .done(pd[1]));
  sbd_codec_stream #(.B(3), .R(8),  .K(22), .CB0(3), .CB1(2), .CB2(3)) s2 (.clk, .start, .checks(pc[2]), .failures(pf[2]), .done(pd[2]));
  sbd_codec_stream #(.B(8), .R(12), .K(4),  .CB0(4), .CB1(8), .CB2(0)) s3 (.clk, .start, .checks(pc[3]), .failures(pf[3]), .done(pd[3]));
  sbd_codec_stream #(.B(8), .R(12), .K(7),  .CB0(4), .CB1(8), .CB2(0)) s4 (.clk, .start, .checks(pc[4]), .failures(pf[4]), .done(pd[4]));
  sbd_codec_stream #(.B(4), .R(9),  .K(16), .CB0(4), .CB1(1), .CB2(4)) s5 (.clk, .start, .checks(pc[5]), .failures(pf[5]), .done(pd[5]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (2) @(posedge clk);
    start = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int p = 0; p < NP; p++) all_done &= pd[p];
    end while (!all_done);
    for (int p = 0; p < NP; p++) begin
      $display("configuration %0d: %0d checks, %0d failures", p, pc[p], pf[p]);
      checks += pc[p]; failures += pf[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
