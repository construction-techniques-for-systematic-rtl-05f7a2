// sbd_code_probe -- testbench helper: measures the parity-check matrix that an
// sbd_encoder instance implements and checks the properties the code must have.
//
// After start rises it drives every unit data vector through the encoder to
// read out each data column of H, then checks that
//   * every column (data and check) has odd weight and all are distinct,
//   * within each data byte the columns differ only in one identity row and
//     share the same even-weight remainder (the byte structure of the code),
//   * the largest row weight of H (check column included) equals EXP_MAXROW
//     when EXP_MAXROW > 0.
// checks / failures count the comparisons; done rises when finished.
module sbd_code_probe #(
  parameter int unsigned B          = 4,
  parameter int unsigned R          = 8,
  parameter int unsigned K          = 14,
  parameter int unsigned EXP_MAXROW = 0
) (
  input  logic start,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned N = B * K + R;

  logic [B*K-1:0] data;
  logic [R-1:0]   check;
  logic [R-1:0]   col [N];

  sbd_encoder #(.B(B), .R(R), .K(K)) u_enc (.data(data), .check(check));

  function automatic int ones(logic [R-1:0] v);
    int n = 0;
    for (int i = 0; i < R; i++) n += int'(v[i]);
    return n;
  endfunction

  initial begin
    int maxrow, rw, dup;
    logic [R-1:0] rest0, diff;
    checks = 0; failures = 0; done = 1'b0; data = '0;
    wait (start);
    for (int c = 0; c < B * K; c++) begin
      data = '0; data[c] = 1'b1; #1;
      col[c] = check;
    end
    for (int i = 0; i < R; i++) col[B*K + i] = R'(1) << i;
    // odd weight
    for (int c = 0; c < N; c++) begin
      checks++;
      if (ones(col[c]) % 2 != 1) begin
        failures++; $display("probe B%0d R%0d K%0d: column %0d has even weight", B, R, K, c);
      end
    end
    // distinct
    dup = 0;
    for (int a = 0; a < N; a++)
      for (int b2 = a + 1; b2 < N; b2++)
        if (col[a] == col[b2]) dup++;
    checks++;
    if (dup != 0) begin
      failures++; $display("probe B%0d R%0d K%0d: %0d equal column pairs", B, R, K, dup);
    end
    // byte structure: columns of a byte = common even part + distinct unit rows
    for (int j = 0; j < K; j++) begin
      rest0 = '1;
      for (int t = 0; t < B; t++) rest0 &= col[j*B + t];
      for (int t = 0; t < B; t++) begin
        diff = col[j*B + t] ^ rest0;
        checks++;
        if (ones(diff) != 1 || ones(rest0) % 2 != 0 || ones(rest0) < 2) begin
          failures++; $display("probe B%0d R%0d K%0d: byte %0d bit %0d breaks the byte structure", B, R, K, j, t);
        end
      end
    end
    // row weights
    maxrow = 0;
    for (int i = 0; i < R; i++) begin
      rw = 0;
      for (int c = 0; c < N; c++) rw += int'(col[c][i]);
      if (rw > maxrow) maxrow = rw;
    end
    if (EXP_MAXROW > 0) begin
      checks++;
      if (maxrow != EXP_MAXROW) begin
        failures++; $display("probe B%0d R%0d K%0d: max row weight %0d, expected %0d", B, R, K, maxrow, EXP_MAXROW);
      end
    end
    $display("probe B%0d R%0d K%0d: max ones per row %0d", B, R, K, maxrow);
    done = 1'b1;
  end
endmodule
