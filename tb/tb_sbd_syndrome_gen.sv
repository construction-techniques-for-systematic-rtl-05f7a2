// tb_sbd_syndrome_gen -- self-checking test of the syndrome generator at the
// default code (B=4, R=8, K=14).  Random 64-bit words (valid codewords and
// words with random error patterns) are fed in; the expected syndrome is
// computed from the published parity-check matrix in sbd_ref_pkg.
module tb_sbd_syndrome_gen;
  import sbd_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [55:0] data;
  logic [7:0]  check;
  logic [7:0]  syndrome;

  sbd_syndrome_gen dut (.data(data), .check(check), .syndrome(syndrome));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] word, err;
    logic [7:0]  exp;
    for (int n = 0; n < 3000; n++) begin
      data  = 56'({$urandom, $urandom});
      check = h1_check(data);
      word  = {check, data};
      // a third of the words are clean, the rest carry 1..64 random flips
      err = '0;
      if (n % 3 != 0) err = {$urandom, $urandom} & {$urandom, $urandom};
      if (n % 3 == 1) begin err = '0; err[$urandom_range(63)] = 1'b1; end
      word  = word ^ err;
      data  = word[55:0];
      check = word[63:56];
      #1;
      exp = h1_syndrome(word);
      checks++;
      if (syndrome !== exp) begin
        failures++; $display("word %h: syndrome %b expected %b", word, syndrome, exp);
      end
      if (err == '0) begin
        checks++;
        if (syndrome !== '0) begin
          failures++; $display("codeword %h: nonzero syndrome %b", word, syndrome);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
