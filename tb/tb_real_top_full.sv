// tb_real_top_full: one complete write and read of a codeword through the top
// at its default size (regular quasi-cyclic code, 4 x 36 blocks of 512:
// N = 18432, K = 16384 information bits = one 2 KB page, M = 2048).
//
// That code has no [P | I] form (an array of permutation blocks is rank
// deficient), so the test writes the all-zero page, whose check bits are zero
// for any P, and leaves P unloaded.  The stored codeword is checked against H
// (built in the testbench from the block shifts b*c mod 512), then 1 % of the
// cells suffer the dominant retention error 00 -> 01 and are read with low
// reliability.  The decoder must stop early with success, return 2048 zero
// bytes, and take N + iters*(N*5+1) cycles.
module tb_real_top_full;
  import real_pkg::*;
  localparam int MB = 4, NB = 36, Z = 512, WC = 6, NMAX = 100;
  localparam int N = NB * Z, M = MB * Z, K = N - M, KB = K / 8;
  localparam int AW = $clog2(N), IW = $clog2(NMAX + 1);

  logic clk = 0, rst_n = 0;
  logic p_we;
  logic [$clog2(K)-1:0] p_addr;
  logic [M-1:0] p_row;
  logic wr_valid, wr_ready, wr_cw_sel;
  logic [7:0] wr_data;
  logic prog_valid, prog_upper, prog_bit;
  logic [AW-1:0] prog_col;
  logic rd_start, rd_cw_sel, flash_req, flash_upper;
  logic [AW-1:0] flash_col;
  logic signed [WC-1:0] flash_llr;
  logic dec_done, dec_success, ej_valid, dec_descending;
  logic [IW-1:0] dec_iters;
  ej_case_e ej_case;
  logic out_valid, out_ready;
  logic [7:0] out_data;

  real_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit lower_pg [N], upper_pg [N];
  bit rl_pg [N], ru_pg [N];
  int rel_l [N], rel_u [N];
  int n_prog = 0;
  always @(posedge clk)
    if (rst_n && prog_valid) begin
      n_prog++;
      if (prog_upper) upper_pg[prog_col] = prog_bit;
      else            lower_pg[prog_col] = prog_bit;
    end
  always_comb begin
    int mag;
    bit v;
    v   = flash_upper ? ru_pg[flash_col] : rl_pg[flash_col];
    mag = flash_upper ? rel_u[flash_col] : rel_l[flash_col];
    flash_llr = WC'(v ? -mag : mag);
  end

  int cyc = 0;
  always @(posedge clk) cyc++;
  int ejseen [7];
  always @(posedge clk) if (ej_valid) ejseen[int'(ej_case)]++;

  initial begin
    int t0, t1, nb, flips, nonzero;
    bit hbad;
    p_we = 0; p_addr = 0; p_row = 0; wr_valid = 0; wr_data = 0; wr_cw_sel = 0;
    rd_start = 0; rd_cw_sel = 0; out_ready = 0;
    for (int c = 0; c < N; c++) begin lower_pg[c] = 1; upper_pg[c] = 1; end  // erased
    repeat (3) @(posedge clk);
    rst_n = 1;
    // write one all-zero page as codeword a
    for (int i = 0; i < KB; i++) begin
      @(negedge clk); wr_valid = 1; wr_data = 8'h00;
      @(posedge clk);
      while (!wr_ready) @(posedge clk);
    end
    @(negedge clk) wr_valid = 0;
    while (n_prog < N) @(posedge clk);
    // codeword a occupies cells 0..N/2-1; it must satisfy H
    hbad = 0;
    for (int b = 0; b < MB; b++)
      for (int t = 0; t < Z; t++) begin
        bit s;
        s = 0;
        for (int c = 0; c < NB; c++) begin
          int j, col;
          j   = c * Z + (t + (b * c) % Z) % Z;
          col = j % (N / 2);
          s ^= (j < N / 2) ? lower_pg[col] : upper_pg[col];
        end
        if (s) hbad = 1;
      end
    checks++;
    if (hbad) begin failures++; $display("stored codeword violates H"); end
    // retention: 1 % of the cells go 00 -> 01
    flips = 0;
    for (int c = 0; c < N; c++) begin
      rl_pg[c] = lower_pg[c]; ru_pg[c] = upper_pg[c];
      rel_l[c] = $urandom_range(6, 24); rel_u[c] = $urandom_range(6, 24);
      if (c < N / 2 && $urandom_range(0, 99) < 1 && !lower_pg[c] && !upper_pg[c]) begin
        ru_pg[c] = 1; rel_u[c] = $urandom_range(1, 6); flips++;
      end
    end
    // read it back
    @(negedge clk); rd_start = 1; rd_cw_sel = 0;
    @(negedge clk); rd_start = 0;
    t0 = cyc;
    while (!dec_done) @(posedge clk);
    t1 = cyc;
    $display("%0d retention errors, success=%0d after %0d iterations, %0d cycles",
             flips, dec_success, dec_iters, t1 - t0);
    checks += 3;
    if (!dec_success) failures++;
    if (flips == 0) failures++;
    if (t1 - t0 != N + int'(dec_iters) * (N * (MB + 1) + 1)) begin failures++; $display("wrong decode time"); end
    nb = 0; nonzero = 0;
    out_ready = 1;
    while (nb < KB) begin
      @(posedge clk);
      if (out_valid) begin if (out_data != 0) nonzero++; nb++; end
    end
    checks++;
    if (nonzero != 0) begin failures++; $display("%0d non-zero bytes read", nonzero); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
