// sbd_ecc_codec -- memory ECC unit for a byte-organized (B bits per chip)
// main memory, protected by a systematic odd-weight-column SEC-DED-SBD code
// that also corrects any odd number of wrong bits inside one byte.
//
// Write path: wr_data (K bytes of B bits) is encoded and presented to the
// memory as mem_wr_data (the data bits, unchanged) plus mem_wr_check (R check
// bits), one register stage after wr_valid.
// Read path: a word returned by the memory (mem_rd_data, mem_rd_check with
// mem_rd_valid) is checked and corrected; one register stage later rd_valid
// rises with the corrected data, the syndrome, the verdict and the index of
// the corrected byte (data bytes 0..K-1, then check bytes).
//
// Timing: both paths accept one word per cycle and have a latency of one
// clock (the register at the output).  Valids are cleared by the active-low
// synchronous reset; data registers are not reset.
//
// The code (constructions C1/C2/C3, byte layout) follows the document; the
// one-cycle registered wrapper, the valid signals and the status encoding are
// this design's own choices.  Defaults: the document's first example code,
// B = 4, R = 8, K = 14 (56 data bits, 64-bit codeword, construction C1).
// Parameters B, R, K, BALANCED and C3_I_ABOVE are those of sbd_encoder.
module sbd_ecc_codec #(
  parameter int unsigned B          = 4,
  parameter int unsigned R          = 8,
  parameter int unsigned K          = 14,
  parameter bit          BALANCED   = 1'b1,
  parameter bit          C3_I_ABOVE = 1'b0,
  localparam int unsigned NCB       = sbd_pkg::num_check_bytes(B, R),
  localparam int unsigned BW        = $clog2(K + NCB)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // write path
  input  logic                 wr_valid,
  input  logic [B*K-1:0]       wr_data,
  output logic                 mem_wr_valid,
  output logic [B*K-1:0]       mem_wr_data,
  output logic [R-1:0]         mem_wr_check,
  // read path
  input  logic                 mem_rd_valid,
  input  logic [B*K-1:0]       mem_rd_data,
  input  logic [R-1:0]         mem_rd_check,
  output logic                 rd_valid,
  output logic [B*K-1:0]       rd_data,
  output logic [R-1:0]         rd_check,
  output logic [R-1:0]         rd_syndrome,
  output sbd_pkg::status_e     rd_status,
  output logic [BW-1:0]        rd_err_byte
);

  logic [R-1:0]         enc_check;
  logic [B*K-1:0]       dec_data;
  logic [R-1:0]         dec_check;
  logic [R-1:0]         dec_syndrome;
  sbd_pkg::status_e     dec_status;
  logic [BW-1:0]        dec_err_byte;

  sbd_encoder #(.B(B), .R(R), .K(K), .BALANCED(BALANCED), .C3_I_ABOVE(C3_I_ABOVE)) u_encoder (
    .data  (wr_data),
    .check (enc_check)
  );

  sbd_decoder #(.B(B), .R(R), .K(K), .BALANCED(BALANCED), .C3_I_ABOVE(C3_I_ABOVE)) u_decoder (
    .data_in   (mem_rd_data),
    .check_in  (mem_rd_check),
    .data_out  (dec_data),
    .check_out (dec_check),
    .syndrome  (dec_syndrome),
    .status    (dec_status),
    .err_byte  (dec_err_byte)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem_wr_valid <= 1'b0;
      rd_valid     <= 1'b0;
    end else begin
      mem_wr_valid <= wr_valid;
      rd_valid     <= mem_rd_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      mem_wr_data  <= wr_data;
      mem_wr_check <= enc_check;
    end
    if (mem_rd_valid) begin
      rd_data     <= dec_data;
      rd_check    <= dec_check;
      rd_syndrome <= dec_syndrome;
      rd_status   <= dec_status;
      rd_err_byte <= dec_err_byte;
    end
  end

endmodule
