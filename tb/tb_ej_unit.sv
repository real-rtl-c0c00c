// tb_ej_unit: exhaustive self-checking test of the E_j unit over every page,
// channel LLR pair and partner decision.  The expected E_j and case number are
// derived in the testbench directly from the six observation cases.
module tb_ej_unit;
  import real_pkg::*;
  localparam int WC = 6;
  localparam int WE = 8;

  logic                 upper, hd_c;
  logic signed [WC-1:0] p_j, p_c;
  logic signed [WE-1:0] e_j;
  ej_case_e             ej_case;
  int checks = 0, failures = 0;
  int seen [7];

  ej_unit #(.WC(WC), .WE(WE)) dut (.upper, .p_j, .p_c, .hd_c, .e_j, .ej_case);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < 2; u++)
      for (int pj = -32; pj < 32; pj++)
        for (int pc = -32; pc < 32; pc++)
          for (int h = 0; h < 2; h++) begin
            int ecase, eval;
            bit pc_pos, hd_pos;
            upper = u[0]; p_j = WC'(pj); p_c = WC'(pc); hd_c = h[0];
            #1;
            pc_pos = (pc > 0);
            hd_pos = (h == 0);
            if (pc_pos != hd_pos) ecase = u ? 1 : 2;
            else if (pc_pos)      ecase = u ? 5 : 3;
            else                  ecase = u ? 6 : 4;
            case (ecase)
              1, 6:    eval = -1;
              2, 3, 5: eval = 3;
              default: eval = (3 * pj) >>> 2;
            endcase
            checks++;
            seen[ecase]++;
            if (int'(e_j) != eval || int'(ej_case) != ecase) begin
              failures++;
              if (failures < 5)
                $display("mismatch u=%0d pj=%0d pc=%0d hd=%0d: got %0d/%0d exp %0d/%0d",
                         u, pj, pc, h, e_j, ej_case, eval, ecase);
            end
          end
    for (int c = 1; c <= 6; c++) begin
      checks++;
      if (seen[c] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
