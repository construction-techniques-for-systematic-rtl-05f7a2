// sbd_encoder -- check-bit generator of a systematic odd-weight-column
// SEC-DED-SBD code with odd-per-byte error correction.
//
// Check bit i is the XOR of the data bits that have a one in row i of the
// parity-check matrix (H = [B_1 ... B_K I_R], built by sbd_pkg with
// construction C1, C2 or C3 chosen from B and R).  Because every column of the
// even-weight part of a byte block is the same vector h_j, the contribution of
// data byte j to the check bits is
//     (parity of byte j) * h_j   XOR   (byte j placed on its identity rows),
// which is how the XOR network is written here; it is the same function as
// one parity tree per row of H.
//
// Interface: data[j*B + t] is bit t of data byte j; check[i] is check bit i
// (row i of H).  Purely combinational.
//
// Defaults follow the document's first example code: B = 4, R = 8, K = 14
// (56 data bits, 64-bit codeword, construction C1).  BALANCED selects the
// row-balanced choice of bytes when K is below the construction's maximum
// (this design's own greedy rule for the document's "fewest ones per row"
// criterion); BALANCED = 0 takes the first K bytes.  C3_I_ABOVE applies to
// construction C3 only: 0 gives the [H; I] byte blocks of the document's C3
// example, 1 the equally valid [I; H] form.
module sbd_encoder #(
  parameter int unsigned B          = 4,
  parameter int unsigned R          = 8,
  parameter int unsigned K          = 14,
  parameter bit          BALANCED   = 1'b1,
  parameter bit          C3_I_ABOVE = 1'b0
) (
  input  logic [B*K-1:0] data,
  output logic [R-1:0]   check
);
  import sbd_pkg::*;

  localparam sel_t SEL = select_bytes(B, R, K, BALANCED, C3_I_ABOVE);

  if (construction(B, R) == CONS_NONE || K < 1 || K > kmax(B, R) || R > MAX_R)
  begin : g_bad_params
    $error("sbd_encoder: no code with B=%0d R=%0d K=%0d", B, R, K);
  end

  logic [R-1:0] contrib [K];

  for (genvar j = 0; j < K; j++) begin : g_byte
    localparam cand_t       C    = candidate(B, R, int'(SEL[j]), C3_I_ABOVE);
    localparam int unsigned OFF  = ioff(B, R, C.i_top);
    localparam logic [R-1:0] HCOL = C.h[R-1:0];
    logic [B-1:0] byte_d;
    assign byte_d = data[j*B +: B];
    always_comb begin
      contrib[j]           = {R{^byte_d}} & HCOL;
      contrib[j][OFF +: B] = byte_d;
    end
  end

  always_comb begin
    check = '0;
    for (int j = 0; j < K; j++) check ^= contrib[j];
  end

endmodule
