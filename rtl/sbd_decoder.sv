// sbd_decoder -- read-path checker and corrector for the SEC-DED-SBD code.
//
// A word read from memory (data bits plus check bits) goes through the
// syndrome generator, the syndrome decoder turns the syndrome into an error
// mask, and the mask is XORed onto the received bits.  Because the code is
// systematic the data bits are available unchanged at the input and are
// only XORed with the mask at the end, so data handling can proceed in
// parallel with checking.
//
// Outputs: corrected data and check bits, the syndrome, the verdict
// (sbd_pkg::status_e) and the index of the corrected byte (data bytes
// 0..K-1, then the check bytes).  On ST_UE the data are passed through
// uncorrected.  Purely combinational.  Defaults: the document's B = 4,
// R = 8, K = 14 example code.
// Parameters B, R, K, BALANCED and C3_I_ABOVE are those of sbd_encoder.
module sbd_decoder #(
  parameter int unsigned B          = 4,
  parameter int unsigned R          = 8,
  parameter int unsigned K          = 14,
  parameter bit          BALANCED   = 1'b1,
  parameter bit          C3_I_ABOVE = 1'b0,
  localparam int unsigned NCB       = sbd_pkg::num_check_bytes(B, R),
  localparam int unsigned BW        = $clog2(K + NCB)
) (
  input  logic [B*K-1:0]   data_in,
  input  logic [R-1:0]     check_in,
  output logic [B*K-1:0]   data_out,
  output logic [R-1:0]     check_out,
  output logic [R-1:0]     syndrome,
  output sbd_pkg::status_e status,
  output logic [BW-1:0]    err_byte
);

  logic [B*K-1:0] data_err;
  logic [R-1:0]   check_err;

  sbd_syndrome_gen #(.B(B), .R(R), .K(K), .BALANCED(BALANCED), .C3_I_ABOVE(C3_I_ABOVE)) u_syn (
    .data     (data_in),
    .check    (check_in),
    .syndrome (syndrome)
  );

  sbd_syndrome_decoder #(.B(B), .R(R), .K(K), .BALANCED(BALANCED), .C3_I_ABOVE(C3_I_ABOVE)) u_dec (
    .syndrome  (syndrome),
    .data_err  (data_err),
    .check_err (check_err),
    .status    (status),
    .err_byte  (err_byte)
  );

  assign data_out  = data_in  ^ data_err;
  assign check_out = check_in ^ check_err;

endmodule
