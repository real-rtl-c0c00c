// tb_real_snp_sweep: the decoder at its default size (4 x 36 blocks of 512,
// N = 18432, NMAX = 100) over the SP/SNP range 3.5 ... 4.4 dB used to
// evaluate the scheme, and at 5.0, 5.5 and 6.0 dB, over a simple MLC cell
// channel with retention drift.
//
// Codewords: in the default code every check row has exactly one member in
// each block column, so the union of an even number of whole block columns
// is a codeword.  Each frame sends a random such union, giving all four cell
// states.  Bits are sent as +1 (0) / -1 (1); SP/SNP is taken as Eb/N0 at rate
// 8/9, sigma^2 = 1 / (2 * 8/9 * 10^(SNP/10)), and the channel LLR
// 2y/sigma^2 is rounded to the 6-bit input (one LSB per LLR unit).
// Gaussian samples come from the Box-Muller transform of $urandom.
// Checks per frame: a successful decode returns the sent codeword; the decode
// time is N + iters*(N*5+1) cycles.  At the three highest SP/SNP points every
// frame must decode.  The average iteration count per point is printed.
module tb_real_snp_sweep;
  import real_pkg::*;
  localparam int MB = 4, NB = 36, Z = 512, WC = 6, NMAX = 100;
  localparam int N = NB * Z;
  localparam int FRAMES = 2;

  logic clk = 0, rst_n = 0;
  logic start, in_valid, in_ready, busy, done, success, ej_valid, descending;
  logic signed [WC-1:0] in_llr;
  logic [$clog2(NMAX + 1)-1:0] iters;
  logic [N-1:0] dec_bits;
  ej_case_e ej_case;

  real_decoder dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 32'h7fff_ffff))) / 2147483648.0;
    u2 = (real'($urandom_range(0, 32'h7fff_ffff))) / 2147483648.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  localparam real DRIFT = 0.05;

  // max-log LLR of (lower, upper) for read voltage v, nominal levels
  function automatic void cell_llr(real v, real s2, output real ll, output real lu);
    real d11, d10, d01, d00;
    d11 = (v + 3.0) ** 2; d10 = (v + 1.0) ** 2; d01 = (v - 1.0) ** 2; d00 = (v - 3.0) ** 2;
    // positive LLR means bit 0
    ll = ((d11 < d10 ? d11 : d10) - (d01 < d00 ? d01 : d00)) / (2.0 * s2);
    lu = ((d11 < d01 ? d11 : d01) - (d10 < d00 ? d10 : d00)) / (2.0 * s2);
  endfunction

  function automatic int q6(real l);
    return (l > 31.0) ? 31 : ((l < -31.0) ? -31 : int'(l));
  endfunction

  logic [NB-1:0] cols;
  logic [N-1:0]  sent;
  int            llr [N];

  initial begin
    int t0, t1, it_sum, ok_cnt, nerr;
    real snp, sigma2, v, ll, lu;
    int any_ok;
    any_ok = 0;
    start = 0; in_valid = 0; in_llr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 13; p++) begin
      snp = (p < 10) ? 3.5 + 0.1 * p : 5.0 + 0.5 * (p - 10);
      sigma2 = 1.0 / (2.0 * (8.0 / 9.0) * (10.0 ** (snp / 10.0)));
      it_sum = 0; ok_cnt = 0;
      for (int f = 0; f < FRAMES; f++) begin
        // random even set of whole block columns
        cols = NB'({$urandom, $urandom});
        if ($countones(cols) % 2 == 1) cols[0] = ~cols[0];
        for (int j = 0; j < N; j++) sent[j] = cols[j / Z];
        nerr = 0;
        for (int c = 0; c < N / 2; c++) begin
          int lvl;   // 0:11 1:10 2:01 3:00
          lvl = sent[c] ? (sent[c + N / 2] ? 0 : 1) : (sent[c + N / 2] ? 2 : 3);
          v = -3.0 + 2.0 * lvl - DRIFT * lvl + $sqrt(sigma2) * gauss();
          cell_llr(v, sigma2, ll, lu);
          llr[c] = q6(ll);
          llr[c + N / 2] = q6(lu);
        end
        for (int j = 0; j < N; j++) if ((llr[j] <= 0) != sent[j]) nerr++;
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        for (int j = 0; j < N; j++) begin
          in_valid = 1; in_llr = WC'(llr[j]);
          @(posedge clk);
          if (j == 0) t0 = cyc;
          @(negedge clk);
        end
        in_valid = 0;
        while (!done) @(posedge clk);
        t1 = cyc;
        checks++;
        if (t1 - t0 != N + int'(iters) * (N * (MB + 1) + 1)) failures++;
        if (success) begin
          checks++;
          if (dec_bits != sent) failures++;
          ok_cnt++;
          any_ok++;
        end
        it_sum += int'(iters);
        $display("SP/SNP %0.1f dB frame %0d: %0d raw bit errors, success=%0d, iterations=%0d",
                 snp, f, nerr, success, iters);
      end
      $display("SP/SNP %0.1f dB: average %0.1f iterations, %0d of %0d frames decoded",
               snp, real'(it_sum) / FRAMES, ok_cnt, FRAMES);
    end
    checks++;
    if (any_ok == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
