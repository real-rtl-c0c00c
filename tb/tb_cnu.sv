// tb_cnu: self-checking test of the check-node unit.  Random message rows,
// masks and excluded positions are applied; the expected message is worked
// out in the testbench as 0.75 * sign-product * minimum magnitude of the other
// present members (truncated, zero counted positive).
module tb_cnu;
  localparam int NB = 12;
  localparam int W  = 8;

  logic signed [W-1:0]  vals [NB];
  logic [NB-1:0]        mask;
  logic [$clog2(NB)-1:0] excl;
  logic signed [W-1:0]  c_msg;
  int checks = 0, failures = 0;

  cnu #(.NB(NB), .W(W)) dut (.vals, .mask, .excl, .c_msg);

  function automatic int expect_msg();
    int mn = 1 << 30, sgn = 1, cnt = 0;
    for (int k = 0; k < NB; k++) begin
      if (mask[k] && k != int'(excl)) begin
        int v = int'(vals[k]);
        int a = (v < 0) ? -v : v;
        if (a < mn) mn = a;
        if (v < 0) sgn = -sgn;
        cnt++;
      end
    end
    if (cnt == 0) return 0;
    return sgn * ((3 * mn) / 4);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < NB; k++) vals[k] = W'(int'($urandom_range(0, 254)) - 127);
      mask = (t % 7 == 0) ? NB'($urandom) : '1;
      if (t == 5) mask = '0;
      excl = $clog2(NB)'($urandom_range(0, NB - 1));
      #1;
      checks++;
      if (int'(c_msg) != expect_msg()) begin
        failures++;
        if (failures < 5) $display("mismatch t=%0d got %0d exp %0d", t, c_msg, expect_msg());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
