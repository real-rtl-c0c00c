// tb_ldpc_encoder: loads a random P matrix, encodes random information words
// and compares every output bit with the information bits followed by
// C = I * P^T worked out in the testbench.  Also checks that one codeword
// takes exactly K + M cycles and that in_ready stays low while the check bits
// are sent.
module tb_ldpc_encoder;
  localparam int K = 64, M = 32;
  logic clk = 0, rst_n = 0;
  logic p_we;
  logic [$clog2(K)-1:0] p_addr;
  logic [M-1:0] p_row;
  logic in_valid, in_ready, in_bit;
  logic out_valid, out_bit;
  logic [$clog2(K+M)-1:0] out_idx;
  logic [M-1:0] P [K];
  int checks = 0, failures = 0;

  ldpc_encoder #(.K(K), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [K-1:0] info;
  logic [M-1:0] par;
  logic [K+M-1:0] expw, gotw;
  int first_cycle, last_cycle, cyc = 0, nout;
  always @(posedge clk) cyc++;

  initial begin
    p_we = 0; p_addr = 0; p_row = 0; in_valid = 0; in_bit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < K; i++) begin
      P[i] = {$urandom, $urandom};
      @(negedge clk); p_we = 1; p_addr = i[$clog2(K)-1:0]; p_row = P[i];
    end
    @(negedge clk); p_we = 0;
    for (int w = 0; w < 20; w++) begin
      info = {$urandom, $urandom};
      if (w == 0) info = '0;
      par = '0;
      for (int i = 0; i < K; i++) if (info[i]) par ^= P[i];
      expw = {par, info};
      nout = 0;
      fork
        begin
          for (int i = 0; i < K; i++) begin
            @(negedge clk); in_valid = 1; in_bit = info[i];
            checks++;
            if (!in_ready) failures++;
          end
          @(negedge clk); in_valid = 0;
        end
        begin
          while (nout < K + M) begin
            @(posedge clk); #1;
            if (out_valid) begin
              if (nout == 0) first_cycle = cyc;
              last_cycle = cyc;
              checks++;
              if (int'(out_idx) != nout) failures++;
              gotw[nout] = out_bit;
              if (nout >= K && nout < K + M - 1) begin
                checks++;
                if (in_ready) failures++;
              end
              nout++;
            end
          end
        end
      join
      checks += 2;
      if (gotw != expw) begin
        failures++;
        $display("word %0d mismatch", w);
      end
      if (last_cycle - first_cycle + 1 != K + M) begin
        failures++;
        $display("word %0d took %0d cycles", w, last_cycle - first_cycle + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
