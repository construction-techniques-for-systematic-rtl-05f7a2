// sbd_byte_memory -- behavioural model of a byte-organized main memory (not
// synthesizable design content; used by the testbenches only).
//
// Each word holds W bits, stored in chips of a few bits each; a failed chip
// or cell is modelled by fault_mask, XORed onto every word read while
// fault_en is high (a transient read error pattern).  One write and one read
// per cycle; read data appear one clock after rd_en.
module sbd_byte_memory #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0] wr_word,
  input  logic         rd_en,
  input  logic [AW-1:0] rd_addr,
  input  logic         fault_en,
  input  logic [W-1:0] fault_mask,
  output logic         rd_valid,
  output logic [W-1:0] rd_word
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    rd_valid = 1'b0;
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_word;
    rd_valid <= rd_en;
    if (rd_en) rd_word <= mem[rd_addr] ^ (fault_en ? fault_mask : '0);
  end
endmodule
