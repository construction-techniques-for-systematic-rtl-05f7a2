// sbd_syndrome_gen -- syndrome generator for the SEC-DED-SBD code of sbd_pkg.
//
// The syndrome of a word read from memory is S = H X'^T.  With H = [B I_R]
// this is the check bits recomputed from the received data bits, XORed with
// the received check bits, so the generator is one more instance of the
// check-bit generator (the same logic module serves both the write and the
// read direction).  A zero syndrome means no detectable error.
//
// Interface: data/check as in sbd_encoder; syndrome[i] belongs to row i of H.
// Purely combinational.  Parameters B, R, K, BALANCED and C3_I_ABOVE are
// those of sbd_encoder (defaults: the document's B = 4, R = 8, K = 14 example).
module sbd_syndrome_gen #(
  parameter int unsigned B          = 4,
  parameter int unsigned R          = 8,
  parameter int unsigned K          = 14,
  parameter bit          BALANCED   = 1'b1,
  parameter bit          C3_I_ABOVE = 1'b0
) (
  input  logic [B*K-1:0] data,
  input  logic [R-1:0]   check,
  output logic [R-1:0]   syndrome
);

  logic [R-1:0] recomputed;

  sbd_encoder #(.B(B), .R(R), .K(K), .BALANCED(BALANCED), .C3_I_ABOVE(C3_I_ABOVE)) u_enc (
    .data  (data),
    .check (recomputed)
  );

  assign syndrome = recomputed ^ check;

endmodule
