// tb_real_decoder: self-checking test of the REAL decoder on a small
// dual-diagonal quasi-cyclic code (MB=4, NB=12, Z=16, N=192).
//
// The testbench encodes random information words by back-substitution,
// builds channel LLRs with random reliability and a chosen fraction of sign
// errors, and decodes them.  A reference model written over the explicit H
// matrix (shuffled min-sum, alpha = 0.75, E_j from the partner bit of the
// same cell, alternating bit order, stop on zero syndrome or NMAX) predicts
// the decided word, the success flag and the iteration count, which must match
// the decoder exactly.  The cycle count must be N + iters*(N*(MB+1)+1)
// from the first LLR to done.  Frames range from clean to hopeless so that
// early stops, descending iterations and NMAX give-ups all occur.
module tb_real_decoder;
  import real_pkg::*;
  localparam code_e CODE = CODE_DUALDIAG;
  localparam int MB = 4, NB = 12, Z = 16, WC = 6, W = 8, NMAX = 12;
  localparam int N = NB * Z, M = MB * Z, K = N - M;
  localparam int IW = $clog2(NMAX + 1);
  localparam int VMAX = 2 ** (W - 1) - 1;

  logic clk = 0, rst_n = 0;
  logic start, in_valid, in_ready, busy, done, success, ej_valid, descending;
  logic signed [WC-1:0] in_llr;
  logic [IW-1:0] iters;
  logic [N-1:0] dec_bits;
  ej_case_e ej_case;
  int checks = 0, failures = 0;

  real_decoder #(.CODE(CODE), .MB(MB), .NB(NB), .Z(Z), .WC(WC), .W(W), .NMAX(NMAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ explicit H
  bit H [M][N];
  initial begin
    for (int b = 0; b < MB; b++)
      for (int c = 0; c < NB; c++)
        if (blk_present(CODE, MB, NB, b, c))
          for (int t = 0; t < Z; t++)
            H[b * Z + t][c * Z + (t + int'(blk_shift(CODE, MB, NB, Z, b, c))) % Z] = 1;
  end

  function automatic bit syndrome_zero(bit v [N]);
    for (int i = 0; i < M; i++) begin
      bit s = 0;
      for (int j = 0; j < N; j++) if (H[i][j]) s ^= v[j];
      if (s) return 0;
    end
    return 1;
  endfunction

  function automatic int sat(int x);
    return x > VMAX ? VMAX : (x < -VMAX ? -VMAX : x);
  endfunction

  // ------------------------------------------------ reference decoder
  int  rP [N];
  int  rV [M][N];
  bit  rhd [N];
  int  r_iters;
  bit  r_succ;

  task automatic ref_decode();
    for (int j = 0; j < N; j++) begin
      rhd[j] = (rP[j] <= 0);
      for (int i = 0; i < M; i++) if (H[i][j]) rV[i][j] = sat(rP[j]);
    end
    r_succ = 0;
    for (int l = 1; l <= NMAX; l++) begin
      for (int s = 0; s < N; s++) begin
        int j = (l % 2 == 1) ? s : N - 1 - s;
        int C [M];
        int tot, e, pc, pt;
        bit up, hdc;
        tot = rP[j];
        for (int i = 0; i < M; i++) if (H[i][j]) begin
          int mn = 1 << 30, sg = 1, cnt = 0;
          for (int k = 0; k < N; k++) if (H[i][k] && k != j) begin
            int a = rV[i][k] < 0 ? -rV[i][k] : rV[i][k];
            if (a < mn) mn = a;
            if (rV[i][k] < 0) sg = -sg;
            cnt++;
          end
          C[i] = cnt == 0 ? 0 : sg * ((3 * mn) / 4);
          tot += C[i];
        end
        up = (j >= N / 2);
        pt = up ? j - N / 2 : j + N / 2;
        pc = rP[pt];
        hdc = rhd[pt];
        if ((pc <= 0) != hdc) e = up ? -1 : 3;
        else if (!hdc)        e = 3;
        else                  e = up ? -1 : ((3 * rP[j]) >>> 2);
        tot += e;
        for (int i = 0; i < M; i++) if (H[i][j]) rV[i][j] = sat(tot - C[i]);
        rhd[j] = (tot <= 0);
      end
      r_iters = l;
      if (syndrome_zero(rhd)) begin
        r_succ = 1;
        break;
      end
    end
  endtask

  // ------------------------------------------------ encoder model
  bit cw [N];
  task automatic make_codeword();
    bit p [Z];
    for (int j = 0; j < K; j++) cw[j] = $urandom_range(0, 1);
    for (int b = 0; b < MB; b++)
      for (int t = 0; t < Z; t++) begin
        bit s = 0;
        for (int j = 0; j < K; j++) if (H[b * Z + t][j]) s ^= cw[j];
        if (b > 0) s ^= cw[K + (b - 1) * Z + t];
        cw[K + b * Z + t] = s;
      end
  endtask

  // ------------------------------------------------ stimulus
  int llr [N];
  int cyc = 0;
  always @(posedge clk) cyc++;
  int n_succ = 0, n_fail = 0, n_desc = 0, n_multi = 0;
  int ejseen [7];
  always @(posedge clk) if (ej_valid) ejseen[int'(ej_case)]++;
  always @(posedge clk) if (busy && descending) n_desc++;

  initial begin
    int t0, t1, pct;
    start = 0; in_valid = 0; in_llr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      make_codeword();
      checks++;
      if (!syndrome_zero(cw)) failures++;
      pct = (f < 10) ? 2 : (f < 30 ? 6 : 30);
      for (int j = 0; j < N; j++) begin
        int mag, v;
        mag = $urandom_range(4, 24);
        v   = cw[j] ? -mag : mag;
        // a misread cell sits near a read threshold: low reliability
        if ($urandom_range(0, 99) < pct) v = cw[j] ? $urandom_range(1, 8) : -$urandom_range(1, 8);
        if (f == 0) v = cw[j] ? -10 : 10;
        llr[j] = v;
        rP[j] = v;
      end
      ref_decode();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int j = 0; j < N; j++) begin
        in_valid = 1; in_llr = WC'(llr[j]);
        @(posedge clk);
        if (j == 0) t0 = cyc;
        #1;
        @(negedge clk);
      end
      in_valid = 0;
      while (!done) @(posedge clk);
      t1 = cyc;
      #1;
      checks += 4;
      if (success != r_succ) failures++;
      if (int'(iters) != r_iters) failures++;
      for (int j = 0; j < N; j++) if (dec_bits[j] != rhd[j]) begin failures++; break; end
      if (t1 - t0 != N + r_iters * (N * (MB + 1) + 1)) begin
        failures++;
        $display("frame %0d: %0d cycles, expected %0d", f, t1 - t0, N + r_iters * (N * (MB + 1) + 1));
      end
      if (r_succ) begin
        bit ok;
        ok = 1;
        for (int j = 0; j < N; j++) if (rhd[j] != cw[j]) ok = 0;
        if (f < 10) begin checks++; if (!ok) failures++; end
        n_succ++;
      end else n_fail++;
      if (r_iters > 1) n_multi++;
      $display("frame %0d errors %0d%%: success=%0d iters=%0d (model %0d/%0d)", f, pct, success, iters, r_succ, r_iters);
    end
    // every mechanism must have happened
    checks += 4 + 6;
    if (n_succ == 0) failures++;
    if (n_fail == 0) failures++;
    if (n_desc == 0) failures++;
    if (n_multi == 0) failures++;
    for (int c = 1; c <= 6; c++) if (ejseen[c] == 0) begin failures++; $display("E_j case %0d never used", c); end
    $display("early stops %0d, NMAX give-ups %0d, descending cycles %0d", n_succ, n_fail, n_desc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
