// sbd_syndrome_decoder -- turns a syndrome into an error pattern and a verdict.
//
// The correctable set E1 of the code is every error pattern with an odd
// number of wrong bits inside a single byte (data byte or check byte); a
// single-bit error is the one-bit case.  For data byte j with identity rows
// OFF..OFF+B-1 and byte column h_j, an odd pattern e in that byte gives
//     S = h_j  |  (e placed on rows OFF..OFF+B-1),
// so the byte matches when S has odd weight and S with its identity rows
// cleared equals h_j; the error pattern is then read directly from the
// identity rows of S.  An odd pattern inside check byte c gives S = e on the
// rows of that check byte and zero elsewhere.  The constructions make all of
// these syndromes distinct, so at most one byte matches.
//
// Every even-weight nonzero syndrome (double errors, even number of wrong
// bits in one byte) is flagged uncorrectable.  An odd syndrome that matches
// no byte is also flagged uncorrectable; this happens in shortened codes and
// in C2 and C3 codes, whose byte columns do not reach every odd syndrome
// (a full-length C1 code claims them all).  Errors with wrong bits in several
// bytes and an odd total of three or more may be miscorrected; the code makes
// no promise about them.
//
// Interface: syndrome in; data_err / check_err are the bit masks to XOR onto
// the received data and check bits; status is the verdict; err_byte is the
// index of the corrected byte (data bytes 0..K-1, then check bytes K, K+1, ...),
// valid when status is ST_CE_SINGLE or ST_CE_BYTE.  Purely combinational.
//
// The decoding rule is this design's reading of the document's syndrome
// weight tables; the document proves the syndromes distinct but does not
// give a decoder circuit.
// Parameters B, R, K, BALANCED and C3_I_ABOVE are those of sbd_encoder.
module sbd_syndrome_decoder #(
  parameter int unsigned B          = 4,
  parameter int unsigned R          = 8,
  parameter int unsigned K          = 14,
  parameter bit          BALANCED   = 1'b1,
  parameter bit          C3_I_ABOVE = 1'b0,
  localparam int unsigned NCB       = sbd_pkg::num_check_bytes(B, R),
  localparam int unsigned BW        = $clog2(K + NCB)
) (
  input  logic [R-1:0]            syndrome,
  output logic [B*K-1:0]          data_err,
  output logic [R-1:0]            check_err,
  output sbd_pkg::status_e        status,
  output logic [BW-1:0]           err_byte
);
  import sbd_pkg::*;

  localparam sel_t SEL = select_bytes(B, R, K, BALANCED, C3_I_ABOVE);

  logic         s_odd;
  logic [K-1:0] d_hit;
  logic [NCB-1:0] c_hit;

  assign s_odd = ^syndrome;

  for (genvar j = 0; j < K; j++) begin : g_dbyte
    localparam cand_t        C     = candidate(B, R, int'(SEL[j]), C3_I_ABOVE);
    localparam int unsigned  OFF   = ioff(B, R, C.i_top);
    localparam logic [R-1:0] HCOL  = C.h[R-1:0];
    localparam logic [R-1:0] IMASK = ((R)'((1 << B) - 1)) << OFF;
    assign d_hit[j]          = s_odd && ((syndrome & ~IMASK) == HCOL);
    assign data_err[j*B +: B] = d_hit[j] ? syndrome[OFF +: B] : '0;
  end

  for (genvar c = 0; c < NCB; c++) begin : g_cbyte
    localparam rvec_t        CFULL = check_byte_mask(B, R, c, C3_I_ABOVE);
    localparam logic [R-1:0] CMASK = CFULL[R-1:0];
    assign c_hit[c] = s_odd && ((syndrome & ~CMASK) == '0);
  end

  always_comb begin
    check_err = '0;
    for (int c = 0; c < NCB; c++)
      if (c_hit[c]) check_err = syndrome;
  end

  always_comb begin
    err_byte = '0;
    for (int j = 0; j < K; j++)
      if (d_hit[j]) err_byte = BW'(j);
    for (int c = 0; c < NCB; c++)
      if (c_hit[c]) err_byte = BW'(K + c);
  end

  always_comb begin
    if (syndrome == '0)
      status = ST_CLEAN;
    else if (!(|d_hit) && !(|c_hit))
      status = ST_UE;
    else if ($countones(syndrome) == 1 || $countones(data_err) == 1)
      status = ST_CE_SINGLE;
    else
      status = ST_CE_BYTE;
  end

  // The constructions guarantee that at most one byte claims a syndrome.
  always_comb
    assert ($onehot0({d_hit, c_hit}))
      else $error("sbd_syndrome_decoder: syndrome %b claimed by several bytes", syndrome);

endmodule
