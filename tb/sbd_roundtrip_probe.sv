// sbd_roundtrip_probe -- testbench helper: encodes random data with
// sbd_encoder, corrupts the codeword and decodes it with sbd_decoder.
//
// The byte layout is given independently of the RTL: data byte j is data
// bits j*B..j*B+B-1; the check bits form check bytes of widths CB0, CB1, CB2
// (CB2 = 0 when there are only two), starting at check bit 0.
// For each of NWORDS random words it applies
//   * no error                          -> ST_CLEAN, data unchanged
//   * every odd pattern inside a byte   -> corrected, ST_CE_SINGLE / ST_CE_BYTE,
//                                          right byte index
//   * every even pattern inside a byte  -> ST_UE
// and for the first word every double-bit error -> ST_UE.
// When R <= SWEEP_MAX_R it then applies every one of the 2^R syndromes (data
// zero, check bits = syndrome): even nonzero ones must give ST_UE; an odd one
// that is corrected must turn the word into a codeword by flipping an odd
// number of bits inside a single byte, with the matching status and index.
// Odd syndromes left uncorrected (possible only in shortened codes) are
// counted in odd_ue.
module sbd_roundtrip_probe #(
  parameter int unsigned B      = 4,
  parameter int unsigned R      = 8,
  parameter int unsigned K      = 14,
  parameter int unsigned CB0    = 4,
  parameter int unsigned CB1    = 4,
  parameter int unsigned CB2    = 0,
  parameter int unsigned NWORDS = 4,
  parameter bit          C3_I_ABOVE = 1'b0,
  parameter int unsigned SWEEP_MAX_R = 12
) (
  input  logic start,
  output int   checks,
  output int   failures,
  output int   odd_ue,
  output logic done
);
  import sbd_pkg::*;

  localparam int unsigned KB  = B * K;
  localparam int unsigned N   = KB + R;
  localparam int unsigned NCB = (CB2 > 0) ? 3 : 2;
  localparam int unsigned BW  = $clog2(K + NCB);

  logic [KB-1:0] data, rx_data, out_data;
  logic [R-1:0]  check, rx_check, out_check, syndrome;
  status_e       status;
  logic [BW-1:0] err_byte;

  sbd_encoder #(.B(B), .R(R), .K(K), .C3_I_ABOVE(C3_I_ABOVE)) u_enc (.data(data), .check(check));
  sbd_decoder #(.B(B), .R(R), .K(K), .C3_I_ABOVE(C3_I_ABOVE)) u_dec (
    .data_in(rx_data), .check_in(rx_check), .data_out(out_data), .check_out(out_check),
    .syndrome(syndrome), .status(status), .err_byte(err_byte)
  );

  // first codeword bit and width of byte j (data bytes, then check bytes)
  function automatic int byte_lo(int j);
    if (j < K)       return j * B;
    if (j == K)      return KB;
    if (j == K + 1)  return KB + CB0;
    return KB + CB0 + CB1;
  endfunction
  function automatic int byte_w(int j);
    if (j < K)       return B;
    if (j == K)      return CB0;
    if (j == K + 1)  return CB1;
    return CB2;
  endfunction

  task automatic apply(logic [N-1:0] e, bit correctable, status_e st, int bidx);
    logic [N-1:0] word;
    word = {check, data} ^ e;
    rx_data = word[KB-1:0]; rx_check = word[N-1:KB];
    #1;
    checks++;
    if (correctable) begin
      if ({out_check, out_data} !== {check, data} || status !== st ||
          (st != ST_CLEAN && int'(err_byte) != bidx)) begin
        failures++;
        $display("B%0d R%0d K%0d: error %h -> status %s byte %0d, expected %s byte %0d",
                 B, R, K, e, status.name(), err_byte, st.name(), bidx);
      end
    end else if (status !== ST_UE) begin
      failures++;
      $display("B%0d R%0d K%0d: error %h -> status %s, expected ST_UE", B, R, K, e, status.name());
    end
  endtask

  initial begin
    logic [N-1:0] e;
    int w;
    checks = 0; failures = 0; odd_ue = 0; done = 1'b0;
    data = '0; rx_data = '0; rx_check = '0;
    wait (start);
    if (CB0 + CB1 + CB2 != R || num_check_bytes(B, R) != NCB) begin
      failures++; $display("B%0d R%0d: check byte layout mismatch", B, R);
    end
    for (int n = 0; n < NWORDS; n++) begin
      for (int i = 0; i < KB; i++) data[i] = 1'($urandom);
      #1;
      apply('0, 1'b1, ST_CLEAN, 0);
      for (int j = 0; j < K + NCB; j++)
        for (int m = 1; m < (1 << byte_w(j)); m++) begin
          e = N'(m) << byte_lo(j);
          w = $countones(m);
          apply(e, w % 2 == 1, (w == 1) ? ST_CE_SINGLE : ST_CE_BYTE, j);
        end
      if (n == 0)
        for (int a = 0; a < N; a++)
          for (int b2 = a + 1; b2 < N; b2++) begin
            e = '0; e[a] = 1'b1; e[b2] = 1'b1;
            apply(e, 1'b0, ST_UE, 0);
          end
    end
    if (R <= SWEEP_MAX_R) sweep();
    done = 1'b1;
  end

  task automatic sweep();
    logic [N-1:0] fix;
    int           nbytes, hitb, wt;
    for (int sv = 1; sv < (1 << R); sv++) begin
      rx_data = '0; rx_check = R'(sv);
      #1;
      checks++;
      if ($countones(sv) % 2 == 0) begin
        if (status !== ST_UE) begin
          failures++; $display("B%0d R%0d K%0d: even syndrome %b -> %s", B, R, K, rx_check, status.name());
        end
      end else if (status === ST_UE) begin
        odd_ue++;
      end else begin
        fix = {out_check ^ rx_check, out_data ^ rx_data};
        wt  = $countones(fix);
        nbytes = 0; hitb = 0;
        for (int j = 0; j < K + NCB; j++)
          if (((fix >> byte_lo(j)) & ((N'(1) << byte_w(j)) - 1)) != '0) begin
            nbytes++; hitb = j;
          end
        data = out_data;
        #1;
        if (check !== out_check || nbytes != 1 || wt % 2 != 1 || int'(err_byte) != hitb ||
            status !== ((wt == 1) ? ST_CE_SINGLE : ST_CE_BYTE)) begin
          failures++;
          $display("B%0d R%0d K%0d: syndrome %b corrected by %h (%s, byte %0d) is not a single-byte odd fix",
                   B, R, K, rx_check, fix, status.name(), err_byte);
        end
      end
    end
  endtask
endmodule
