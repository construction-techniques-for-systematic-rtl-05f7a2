// tb_sbd_syndrome_decoder -- self-checking test of the syndrome decoder at the
// default code (B=4, R=8, K=14).
//
// Error patterns are built by the testbench, their syndromes computed from
// the published matrix (sbd_ref_pkg) and fed to the decoder:
//   * every odd-weight pattern inside one byte (16 bytes: 14 data, 2 check)
//     must come back as exactly that pattern, with ST_CE_SINGLE for one bit
//     and ST_CE_BYTE for three, and with the right byte index;
//   * every double-bit error and every even-weight pattern inside one byte
//     must give ST_UE with nothing corrected;
//   * the zero syndrome gives ST_CLEAN.
module tb_sbd_syndrome_decoder;
  import sbd_ref_pkg::*;
  import sbd_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  syndrome;
  logic [55:0] data_err;
  logic [7:0]  check_err;
  status_e     status;
  logic [3:0]  err_byte;

  sbd_syndrome_decoder dut (
    .syndrome(syndrome), .data_err(data_err), .check_err(check_err),
    .status(status), .err_byte(err_byte)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ok(logic [63:0] e, status_e st, int byte_idx);
    syndrome = h1_syndrome(e); #1;
    checks++;
    if ({check_err, data_err} !== e || status !== st || int'(err_byte) != byte_idx) begin
      failures++;
      $display("pattern %h: got mask %h status %s byte %0d, expected status %s byte %0d",
               e, {check_err, data_err}, status.name(), err_byte, st.name(), byte_idx);
    end
  endtask

  task automatic expect_ue(logic [63:0] e);
    syndrome = h1_syndrome(e); #1;
    checks++;
    if (status !== ST_UE || {check_err, data_err} !== '0) begin
      failures++;
      $display("pattern %h: got status %s mask %h, expected ST_UE", e, status.name(), {check_err, data_err});
    end
  endtask

  initial begin
    logic [63:0] e;
    int w;
    syndrome = '0; #1;
    checks++;
    if (status !== ST_CLEAN || {check_err, data_err} !== '0) begin
      failures++; $display("zero syndrome not clean");
    end
    // odd and even patterns inside each 4-bit byte (bytes 14, 15 are the check bytes)
    for (int j = 0; j < 16; j++)
      for (int m = 1; m < 16; m++) begin
        e = 64'(m) << (4 * j);
        w = $countones(m);
        if (w % 2 == 1) expect_ok(e, (w == 1) ? ST_CE_SINGLE : ST_CE_BYTE, j);
        else            expect_ue(e);
      end
    // all double-bit errors
    for (int a = 0; a < 64; a++)
      for (int b = a + 1; b < 64; b++) begin
        e = '0; e[a] = 1'b1; e[b] = 1'b1;
        expect_ue(e);
      end
    // full-length code: every odd syndrome is claimed by a byte, every even
    // nonzero syndrome is uncorrectable
    for (int s = 1; s < 256; s++) begin
      syndrome = 8'(s); #1;
      checks++;
      if (($countones(s) % 2 == 1) == (status == ST_UE)) begin
        failures++; $display("syndrome %b: status %s", syndrome, status.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
