// tb_cw_layout: checks the codeword-to-page layout for every bit of both
// codewords: first half of a codeword in the lower page, second half in the
// upper page of the same cells, bits j and j+N/2 in one cell, and every
// (page, cell) used exactly once across the two codewords.
module tb_cw_layout;
  localparam int N = 96;
  localparam int AW = $clog2(N);

  logic          cw_sel, upper;
  logic [AW-1:0] idx, col;
  int checks = 0, failures = 0;
  int used [2][N];
  int cell_of [2][N];

  cw_layout #(.N(N)) dut (.cw_sel, .idx, .upper, .col);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int j = 0; j < N; j++) begin
        cw_sel = s[0]; idx = AW'(j);
        #1;
        checks++;
        if (upper != (j >= N / 2) || int'(col) != s * (N / 2) + (j % (N / 2))) begin
          failures++;
          $display("mismatch sel=%0d j=%0d -> upper=%0d col=%0d", s, j, upper, col);
        end
        used[upper][col]++;
        cell_of[s][j] = int'(col);
      end
    for (int p = 0; p < 2; p++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (used[p][c] != 1) failures++;
      end
    for (int s = 0; s < 2; s++)
      for (int j = 0; j < N / 2; j++) begin
        checks++;
        if (cell_of[s][j] != cell_of[s][j + N / 2]) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
