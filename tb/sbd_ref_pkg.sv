// sbd_ref_pkg -- reference data for the testbenches.
//
// H1_ROWS is the parity-check matrix of the (64, 56) code with B = 4 bits per
// byte and R = 8 check bits (construction C1 at its full length, K = 14 data
// bytes), written out row by row as published.  Each row literal lists the
// 64 columns left to right: data bytes 1..14 (4 columns each), then check
// byte 1 (rows 1-4) and check byte 2 (rows 5-8).  Column c of the matrix is
// bit 63-c of the literal; data bit t of byte j is column 4*j + t, check bit
// i is column 56 + i.  It is used as an independent model of the encoder,
// the syndrome generator and the decoder.
package sbd_ref_pkg;

  localparam logic [63:0] H1_ROWS [8] = '{
    64'b1111_1111_1111_0000_0000_0000_1111_1000_1000_1000_1000_1000_1000_1000_1000_0000,
    64'b1111_0000_0000_1111_1111_0000_1111_0100_0100_0100_0100_0100_0100_0100_0100_0000,
    64'b0000_1111_0000_1111_0000_1111_1111_0010_0010_0010_0010_0010_0010_0010_0010_0000,
    64'b0000_0000_1111_0000_1111_1111_1111_0001_0001_0001_0001_0001_0001_0001_0001_0000,
    64'b1000_1000_1000_1000_1000_1000_1000_1111_1111_1111_0000_0000_0000_1111_0000_1000,
    64'b0100_0100_0100_0100_0100_0100_0100_1111_0000_0000_1111_1111_0000_1111_0000_0100,
    64'b0010_0010_0010_0010_0010_0010_0010_0000_1111_0000_1111_0000_1111_1111_0000_0010,
    64'b0001_0001_0001_0001_0001_0001_0001_0000_0000_1111_0000_1111_1111_1111_0000_0001
  };

  // Entry (row i, column c) of the published matrix.
  function automatic bit h1(int i, int c);
    return H1_ROWS[i][63 - c];
  endfunction

  // Syndrome of a 64-bit word laid out as {check[7:0], data[55:0]}
  // (column c of the matrix is bit c of the word).
  function automatic logic [7:0] h1_syndrome(logic [63:0] word);
    logic [7:0] s;
    s = '0;
    for (int i = 0; i < 8; i++)
      for (int c = 0; c < 64; c++)
        if (h1(i, c)) s[i] ^= word[c];
    return s;
  endfunction

  // Check bits of 56 data bits under the published matrix.
  function automatic logic [7:0] h1_check(logic [55:0] data);
    return h1_syndrome({8'h00, data});
  endfunction

endpackage
