// tb_real_top: end-to-end test of the flash-controller LDPC path at reduced
// size (dual-diagonal quasi-cyclic code, MB=4, NB=12, Z=16: N=192, K=128).
//
// The testbench computes the encoder's P matrix itself (row i = check bits of
// the unit information word e_i, by back-substitution over H), writes two
// codewords (a and b) of random bytes into a behavioural MLC page pair through
// the program port, and checks that each stored codeword satisfies H, holds
// the written bytes and that bit j and bit j+N/2 share a cell.  Retention
// errors are then injected cell by cell with the transitions of the document
// (00->01, 01->10, 01->11, 10->11, written lower-page bit first); a misread
// bit is answered with a low-reliability LLR.  Each codeword is read back, and
// the bytes must match whenever the decoder reports success.  The decode time
// must be N + iters*(N*(MB+1)+1) cycles.  Rounds go from mild to severe
// damage so that early stops, NMAX give-ups, descending passes and all six
// E_j cases are seen; a mechanism that never happens counts as a failure.
module tb_real_top;
  import real_pkg::*;
  localparam code_e CODE = CODE_DUALDIAG;
  localparam int MB = 4, NB = 12, Z = 16, WC = 6, W = 8, NMAX = 16;
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

  real_top #(.CODE(CODE), .MB(MB), .NB(NB), .Z(Z), .WC(WC), .W(W), .NMAX(NMAX)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ H and encoder reference
  bit H [M][N];
  initial
    for (int b = 0; b < MB; b++)
      for (int c = 0; c < NB; c++)
        if (blk_present(CODE, MB, NB, b, c))
          for (int t = 0; t < Z; t++)
            H[b * Z + t][c * Z + (t + int'(blk_shift(CODE, MB, NB, Z, b, c))) % Z] = 1;

  function automatic logic [M-1:0] parity_of(logic [K-1:0] info);
    logic [M-1:0] p;
    p = '0;
    for (int b = 0; b < MB; b++)
      for (int t = 0; t < Z; t++) begin
        bit s;
        s = 0;
        for (int j = 0; j < K; j++) if (H[b * Z + t][j]) s ^= info[j];
        if (b > 0) s ^= p[(b - 1) * Z + t];
        p[b * Z + t] = s;
      end
    return p;
  endfunction

  // ------------------------------------------------ behavioural page pair
  bit lower_pg [N], upper_pg [N];     // stored bits
  bit rl_pg [N], ru_pg [N];           // bits as they read after retention
  int rel_l [N], rel_u [N];           // reliability of each read bit
  always @(posedge clk)
    if (rst_n && prog_valid) begin
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

  // ------------------------------------------------ observation counters
  int ejseen [7];
  int n_desc = 0, n_succ = 0, n_fail = 0, n_flips = 0, n_prog = 0, n_wfull = 0;
  always @(posedge clk) begin
    if (ej_valid) ejseen[int'(ej_case)]++;
    if (dec_descending && !dec_done) n_desc++;
    if (rst_n && prog_valid) n_prog++;
    if (wr_valid && !wr_ready) n_wfull++;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  logic [K-1:0] info_w [2];

  task automatic write_cw(bit sel);
    logic [K-1:0] info;
    for (int i = 0; i < KB; i++) info[8 * i +: 8] = 8'($urandom);
    info_w[sel] = info;
    wr_cw_sel = sel;
    for (int i = 0; i < KB; i++) begin
      @(negedge clk);
      wr_valid = 1; wr_data = info[8 * i +: 8];
      @(posedge clk);
      while (!wr_ready) @(posedge clk);
    end
    @(negedge clk) wr_valid = 0;
    repeat (K + M + 20) @(posedge clk);
  endtask

  task automatic check_stored(bit sel);
    bit cwb [N];
    bit ok_h, ok_i;
    logic [M-1:0] par;
    for (int j = 0; j < N; j++) begin
      int col;
      col = sel * (N / 2) + (j % (N / 2));
      cwb[j] = (j < N / 2) ? lower_pg[col] : upper_pg[col];
    end
    ok_h = 1;
    for (int i = 0; i < M; i++) begin
      bit s;
      s = 0;
      for (int j = 0; j < N; j++) if (H[i][j]) s ^= cwb[j];
      if (s) ok_h = 0;
    end
    ok_i = 1;
    for (int j = 0; j < K; j++) if (cwb[j] != info_w[sel][j]) ok_i = 0;
    par = parity_of(info_w[sel]);
    for (int j = 0; j < M; j++) if (cwb[K + j] != par[j]) ok_i = 0;
    checks += 2;
    if (!ok_h) begin failures++; $display("codeword %0d violates H", sel); end
    if (!ok_i) begin failures++; $display("codeword %0d stored wrongly", sel); end
  endtask

  // Retention: each cell loses charge with probability pct %.
  task automatic age(int pct);
    for (int c = 0; c < N; c++) begin
      bit l, u;
      l = lower_pg[c]; u = upper_pg[c];
      if ($urandom_range(0, 99) < pct) begin
        int r;
        r = $urandom_range(0, 96);
        if (l == 0 && u == 0)      u = 1;                     // 00 -> 01
        else if (l == 0 && u == 1) begin
          if (r < 90) begin l = 1; u = 0; end                 // 01 -> 10
          else        begin l = 1; u = 1; end                 // 01 -> 11
        end else if (l == 1 && u == 0) u = 1;                 // 10 -> 11
      end
      rl_pg[c] = l; ru_pg[c] = u;
      rel_l[c] = (l != lower_pg[c]) ? $urandom_range(1, 6) : $urandom_range(6, 24);
      rel_u[c] = (u != upper_pg[c]) ? $urandom_range(1, 6) : $urandom_range(6, 24);
      n_flips += (l != lower_pg[c]) + (u != upper_pg[c]);
    end
  endtask

  task automatic read_cw(bit sel);
    int t0, t1, nb;
    logic [K-1:0] got;
    @(negedge clk); rd_start = 1; rd_cw_sel = sel;
    @(negedge clk); rd_start = 0;
    t0 = cyc;
    while (!dec_done) @(posedge clk);
    t1 = cyc;
    checks++;
    if (t1 - t0 != N + int'(dec_iters) * (N * (MB + 1) + 1)) begin
      failures++;
      $display("decode took %0d cycles, expected %0d", t1 - t0, N + int'(dec_iters) * (N * (MB + 1) + 1));
    end
    nb = 0;
    out_ready = 1;
    while (nb < KB) begin
      @(posedge clk);
      if (out_valid) begin got[8 * nb +: 8] = out_data; nb++; end
    end
    @(negedge clk) out_ready = 0;
    if (dec_success) begin
      n_succ++;
      checks++;
      if (got != info_w[sel]) begin failures++; $display("read data wrong for codeword %0d", sel); end
    end else n_fail++;
    $display("codeword %0d: success=%0d iterations=%0d", sel, dec_success, dec_iters);
  endtask

  initial begin
    p_we = 0; p_addr = 0; p_row = 0; wr_valid = 0; wr_data = 0; wr_cw_sel = 0;
    rd_start = 0; rd_cw_sel = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // P row i = check bits of the unit information word e_i
    for (int i = 0; i < K; i++) begin
      logic [K-1:0] e;
      e = '0; e[i] = 1'b1;
      @(negedge clk); p_we = 1; p_addr = i[$clog2(K)-1:0]; p_row = parity_of(e);
    end
    @(negedge clk) p_we = 0;
    for (int round = 0; round < 8; round++) begin
      int pct;
      pct = (round < 3) ? 3 : (round < 6 ? 10 : 45);
      write_cw(0);
      write_cw(1);
      check_stored(0);
      check_stored(1);
      age(pct);
      $display("round %0d: %0d%% of cells aged", round, pct);
      read_cw(0);
      read_cw(1);
    end
    checks += 6 + 5;
    for (int c = 1; c <= 6; c++) if (ejseen[c] == 0) begin failures++; $display("E_j case %0d never used", c); end
    if (n_succ == 0) failures++;
    if (n_fail == 0) failures++;
    if (n_desc == 0) failures++;
    if (n_flips == 0) failures++;
    if (n_prog != 16 * N) failures++;
    $display("early stops %0d, NMAX give-ups %0d, descending cycles %0d, retention bit flips %0d",
             n_succ, n_fail, n_desc, n_flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
