// sbd_codec_stream -- testbench helper: runs one sbd_ecc_codec instance with a
// behavioural byte-organized memory behind it, for any code size.
//
// After start it writes NWORDS random words, then streams NREADS reads, one per
// clock, each with a random chip-level error injected by the memory:
//   0 clean, 1 one bit of a data chip, 2 one bit of a check chip,
//   3 an odd number (>= 3) of bits of a data chip,
//   4 an odd number (>= 3) of bits of a check chip (only chips of >= 3 bits),
//   5 an even number of bits of one chip, 6 two bits in different chips.
// Classes 0-4 must be corrected (data, status, chip index), 5-6 flagged
// ST_UE.  The chip layout (CB0, CB1, CB2 check-chip widths) is given by the
// instantiating testbench.  Every class must occur at least once.
module sbd_codec_stream #(
  parameter int unsigned B      = 4,
  parameter int unsigned R      = 8,
  parameter int unsigned K      = 14,
  parameter int unsigned CB0    = 4,
  parameter int unsigned CB1    = 4,
  parameter int unsigned CB2    = 0,
  parameter bit          C3_I_ABOVE = 1'b0,
  parameter int unsigned NWORDS = 32,
  parameter int unsigned NREADS = 280
) (
  input  logic clk,
  input  logic start,
  output int   checks,
  output int   failures,
  output logic done
);
  import sbd_pkg::*;

  localparam int unsigned KB    = B * K;
  localparam int unsigned N     = KB + R;
  localparam int unsigned NCB   = (CB2 > 0) ? 3 : 2;
  localparam int unsigned BW    = $clog2(K + NCB);
  localparam int unsigned AW    = $clog2(NWORDS);
  localparam int          NSCEN = 7;

  logic          rst_n = 1'b0;
  logic          wr_valid = 1'b0;
  logic [KB-1:0] wr_data = '0;
  logic          mem_wr_valid, mem_rd_valid, rd_valid;
  logic [KB-1:0] mem_wr_data, mem_rd_data, rd_data;
  logic [R-1:0]  mem_wr_check, mem_rd_check, rd_check, rd_syndrome;
  status_e       rd_status;
  logic [BW-1:0] rd_err_byte;

  sbd_ecc_codec #(.B(B), .R(R), .K(K), .C3_I_ABOVE(C3_I_ABOVE)) dut (
    .clk, .rst_n,
    .wr_valid, .wr_data, .mem_wr_valid, .mem_wr_data, .mem_wr_check,
    .mem_rd_valid, .mem_rd_data, .mem_rd_check,
    .rd_valid, .rd_data, .rd_check, .rd_syndrome, .rd_status, .rd_err_byte
  );

  logic [AW-1:0] wr_addr_q = '0, rd_addr = '0;
  logic          rd_en = 1'b0, fault_en = 1'b0;
  logic [N-1:0]  fault_mask = '0, rd_word;

  sbd_byte_memory #(.W(N), .DEPTH(NWORDS)) u_mem (
    .clk, .wr_en(mem_wr_valid), .wr_addr(wr_addr_q), .wr_word({mem_wr_check, mem_wr_data}),
    .rd_en, .rd_addr, .fault_en, .fault_mask,
    .rd_valid(mem_rd_valid), .rd_word
  );
  assign mem_rd_data  = rd_word[KB-1:0];
  assign mem_rd_check = rd_word[N-1:KB];

  function automatic int chip_lo(int j);
    if (j < K)      return j * B;
    if (j == K)     return KB;
    if (j == K + 1) return KB + CB0;
    return KB + CB0 + CB1;
  endfunction
  function automatic int chip_w(int j);
    if (j < K)      return B;
    if (j == K)     return CB0;
    if (j == K + 1) return CB1;
    return CB2;
  endfunction
  // random pattern of w bits set among the first n
  function automatic logic [N-1:0] pattern(int n, int w);
    logic [N-1:0] p;
    int           i;
    p = '0;
    while ($countones(p) < w) begin
      i = $urandom_range(n - 1);
      p[i] = 1'b1;
    end
    return p;
  endfunction
  // odd weight >= 3 that fits in n bits
  function automatic int odd3(int n);
    int w;
    w = 3 + 2 * $urandom_range((n - 3) / 2);
    return w;
  endfunction

  typedef struct {
    logic [KB-1:0] data;
    bit            correctable;
    status_e       st;
    int            chip;
    int            scen;
  } exp_t;
  exp_t        q[$];
  logic [KB-1:0] golden [NWORDS];
  int          seen [NSCEN];

  always @(posedge clk) begin
    if (rst_n && rd_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("B%0d R%0d K%0d: unexpected rd_valid", B, R, K);
      end else begin
        e = q.pop_front();
        seen[e.scen]++;
        if (e.correctable ? (rd_data !== e.data || rd_status !== e.st ||
                             (e.st != ST_CLEAN && int'(rd_err_byte) != e.chip))
                          : (rd_status !== ST_UE)) begin
          failures++;
          $display("B%0d R%0d K%0d class %0d: status %s chip %0d, expected %s chip %0d", B, R, K,
                   e.scen, rd_status.name(), rd_err_byte, e.correctable ? e.st.name() : "ST_UE", e.chip);
        end
      end
    end
  end

  initial begin
    exp_t         e;
    int           scen, chip, c2, wdt;
    logic [N-1:0] m;
    int           big_check [$];
    checks = 0; failures = 0; done = 1'b0;
    for (int s = 0; s < NSCEN; s++) seen[s] = 0;
    for (int j = K; j < K + NCB; j++) if (chip_w(j) >= 3) big_check.push_back(j);
    wait (start);
    @(posedge clk); rst_n <= 1'b1;
    @(posedge clk);
    for (int a = 0; a < NWORDS; a++) begin
      for (int i = 0; i < KB; i++) golden[a][i] = 1'($urandom);
      wr_valid <= 1'b1; wr_data <= golden[a];
      @(posedge clk);
      wr_addr_q <= AW'(a);
    end
    wr_valid <= 1'b0;
    @(posedge clk);
    for (int n = 0; n < NREADS; n++) begin
      scen = n % NSCEN;
      if (scen == 4 && big_check.size() == 0) scen = 3;
      e.correctable = 1'b1; e.st = ST_CE_SINGLE; chip = 0; m = '0;
      case (scen)
        0: e.st = ST_CLEAN;
        1: begin chip = $urandom_range(K - 1);         m = pattern(B, 1) << chip_lo(chip); end
        2: begin chip = K + $urandom_range(NCB - 1);   m = pattern(chip_w(chip), 1) << chip_lo(chip); end
        3: begin chip = $urandom_range(K - 1);         m = pattern(B, odd3(B)) << chip_lo(chip); e.st = ST_CE_BYTE; end
        4: begin
             chip = big_check[$urandom_range(big_check.size() - 1)];
             m = pattern(chip_w(chip), odd3(chip_w(chip))) << chip_lo(chip); e.st = ST_CE_BYTE;
           end
        5: begin
             do chip = $urandom_range(K + NCB - 1); while (chip_w(chip) < 2);
             wdt = 2 * (1 + $urandom_range(chip_w(chip) / 2 - 1));
             m = pattern(chip_w(chip), wdt) << chip_lo(chip); e.correctable = 1'b0;
           end
        default: begin
             chip = $urandom_range(K + NCB - 1);
             do c2 = $urandom_range(K + NCB - 1); while (c2 == chip);
             m = (pattern(chip_w(chip), 1) << chip_lo(chip)) | (pattern(chip_w(c2), 1) << chip_lo(c2));
             e.correctable = 1'b0;
           end
      endcase
      e.data = golden[n % NWORDS]; e.chip = chip; e.scen = scen;
      rd_en <= 1'b1; rd_addr <= AW'(n % NWORDS);
      fault_en <= (m != '0); fault_mask <= m;
      q.push_back(e);
      @(posedge clk);
    end
    rd_en <= 1'b0; fault_en <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("B%0d R%0d K%0d: reads lost", B, R, K); end
    for (int s = 0; s < NSCEN; s++) begin
      checks++;
      if (seen[s] == 0 && !(s == 4 && big_check.size() == 0)) begin
        failures++; $display("B%0d R%0d K%0d: error class %0d never exercised", B, R, K, s);
      end
    end
    done = 1'b1;
  end
endmodule
