// tb_sbd_ecc_codec -- end-to-end test of the ECC unit at its default size
// (B=4 bits per chip, R=8 check bits, K=14 data bytes: the 64-bit codeword of
// construction C1), with a behavioural byte-organized memory behind it.
//
// Phase 1 writes random data to every memory address through the write path
// and checks the check bits against the published matrix (sbd_ref_pkg) and
// the one-cycle write latency.
// Phase 2 reads every address back, one read per cycle, while the memory
// injects a chip-level error pattern chosen per read:
//   clean, single data bit, single check bit, three bits of one data chip,
//   three bits of one check chip, two bits of one chip, all four bits of one
//   chip (whole-chip failure), two bits in different chips.
// Odd patterns inside a chip must come back corrected with the right status
// and chip index; even ones and double errors must be flagged ST_UE.  The
// read latency (one cycle for the codec) is checked, and each of the eight
// error classes must have occurred at least once.
module tb_sbd_ecc_codec;
  import sbd_pkg::*;
  import sbd_ref_pkg::*;

  localparam int DEPTH = 64;
  localparam int NSCEN = 8;

  int checks = 0, failures = 0;
  int cycle = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // codec ports
  logic        wr_valid = 1'b0;
  logic [55:0] wr_data;
  logic        mem_wr_valid;
  logic [55:0] mem_wr_data;
  logic [7:0]  mem_wr_check;
  logic        mem_rd_valid;
  logic [55:0] mem_rd_data;
  logic [7:0]  mem_rd_check;
  logic        rd_valid;
  logic [55:0] rd_data;
  logic [7:0]  rd_check, rd_syndrome;
  status_e     rd_status;
  logic [3:0]  rd_err_byte;

  sbd_ecc_codec dut (
    .clk, .rst_n,
    .wr_valid, .wr_data, .mem_wr_valid, .mem_wr_data, .mem_wr_check,
    .mem_rd_valid, .mem_rd_data, .mem_rd_check,
    .rd_valid, .rd_data, .rd_check, .rd_syndrome, .rd_status, .rd_err_byte
  );

  // memory: the write address follows the codec's write register
  logic [5:0]  wr_addr_q, rd_addr;
  logic        rd_en = 1'b0, fault_en = 1'b0;
  logic [63:0] fault_mask = '0, rd_word;

  sbd_byte_memory #(.W(64), .DEPTH(DEPTH)) u_mem (
    .clk, .wr_en(mem_wr_valid), .wr_addr(wr_addr_q), .wr_word({mem_wr_check, mem_wr_data}),
    .rd_en, .rd_addr, .fault_en, .fault_mask,
    .rd_valid(mem_rd_valid), .rd_word
  );
  assign mem_rd_data  = rd_word[55:0];
  assign mem_rd_check = rd_word[63:56];

  logic [55:0] golden [DEPTH];
  int          seen [NSCEN];
  string       scen_name [NSCEN] = '{"clean", "single data bit", "single check bit",
                                     "3 bits of a data chip", "3 bits of a check chip",
                                     "2 bits of one chip", "whole-chip failure",
                                     "double error across chips"};

  // expected result of each issued read, in issue order
  typedef struct {
    logic [55:0] data;
    bit          correctable;
    status_e     st;
    int          chip;
    int          scen;
  } exp_t;
  exp_t q[$];
  int   mem_cycle_q[$];   // cycle at which the memory presented each word

  always @(posedge clk)
    if (rst_n && mem_rd_valid) mem_cycle_q.push_back(cycle);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random bits of one 4-bit chip with the given weight
  function automatic logic [3:0] chip_pattern(int w);
    logic [3:0] p;
    do p = 4'($urandom); while ($countones(p) != w);
    return p;
  endfunction

  // compare every read result with the queue
  always @(posedge clk) begin
    if (rst_n && rd_valid) begin
      exp_t e;
      if (q.size() == 0) begin
        failures++; $display("unexpected rd_valid");
      end else begin
        e = q.pop_front();
        checks++;
        // the codec answers one clock after the memory word arrives
        if (mem_cycle_q.size() == 0 || cycle != mem_cycle_q.pop_front() + 1) begin
          failures++; $display("codec read latency is not one cycle");
        end
        checks++;
        if (e.correctable) begin
          if (rd_data !== e.data || rd_status !== e.st || (e.st != ST_CLEAN && int'(rd_err_byte) != e.chip)) begin
            failures++;
            $display("%s: data %h status %s chip %0d, expected %h %s chip %0d", scen_name[e.scen],
                     rd_data, rd_status.name(), rd_err_byte, e.data, e.st.name(), e.chip);
          end
        end else if (rd_status !== ST_UE) begin
          failures++; $display("%s: status %s, expected ST_UE", scen_name[e.scen], rd_status.name());
        end
        seen[e.scen]++;
      end
    end
  end

  initial begin
    exp_t        e;
    int          scen, chip, a, b;
    logic [63:0] m;
    for (int s = 0; s < NSCEN; s++) seen[s] = 0;
    wr_data = '0; rd_addr = '0; wr_addr_q = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // ---- phase 1: writes ----
    for (int addr = 0; addr < DEPTH; addr++) begin
      golden[addr] = 56'({$urandom, $urandom});
      wr_valid  <= 1'b1;
      wr_data   <= golden[addr];
      @(posedge clk);
      wr_addr_q <= 6'(addr);
      #1;
      checks++;
      if (!mem_wr_valid || mem_wr_data !== golden[addr] || mem_wr_check !== h1_check(golden[addr])) begin
        failures++;
        $display("write %0d: valid %b data %h check %b, expected check %b", addr, mem_wr_valid,
                 mem_wr_data, mem_wr_check, h1_check(golden[addr]));
      end
    end
    wr_valid <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (mem_wr_valid) begin
      failures++; $display("mem_wr_valid stuck high");
    end
    // ---- phase 2: reads with injected chip errors, one per cycle ----
    for (int n = 0; n < 4 * DEPTH; n++) begin
      scen = n % NSCEN;
      m = '0; chip = 0;
      e.correctable = 1'b1; e.st = ST_CE_SINGLE;
      case (scen)
        0: e.st = ST_CLEAN;
        1: begin chip = $urandom_range(13); m[4*chip +: 4] = chip_pattern(1); end
        2: begin chip = 14 + $urandom_range(1); m[4*chip +: 4] = chip_pattern(1); end
        3: begin chip = $urandom_range(13); m[4*chip +: 4] = chip_pattern(3); e.st = ST_CE_BYTE; end
        4: begin chip = 14 + $urandom_range(1); m[4*chip +: 4] = chip_pattern(3); e.st = ST_CE_BYTE; end
        5: begin chip = $urandom_range(15); m[4*chip +: 4] = chip_pattern(2); e.correctable = 1'b0; end
        6: begin chip = $urandom_range(15); m[4*chip +: 4] = 4'hf; e.correctable = 1'b0; end
        default: begin
          a = $urandom_range(63);
          do b = $urandom_range(63); while (b / 4 == a / 4);
          m[a] = 1'b1; m[b] = 1'b1; e.correctable = 1'b0;
        end
      endcase
      rd_en      <= 1'b1;
      rd_addr    <= 6'(n % DEPTH);
      fault_en   <= (m != '0);
      fault_mask <= m;
      e.data = golden[n % DEPTH];
      e.chip = chip;
      e.scen = scen;
      q.push_back(e);
      @(posedge clk);
    end
    rd_en <= 1'b0; fault_en <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++; $display("%0d reads never answered", q.size());
    end
    for (int s = 0; s < NSCEN; s++) begin
      $display("%-28s occurred %0d times", scen_name[s], seen[s]);
      checks++;
      if (seen[s] == 0) begin
        failures++; $display("error class '%s' never exercised", scen_name[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
