// real_decoder: retention-error-aware (REAL) LDPC decoder for MLC NAND flash.
//
// Algorithm (follows the document's decoding procedure):
//   1. every bit-to-check message V_{j,i} starts at the channel LLR P_j;
//   2/3. bit nodes are visited one at a time, ascending in odd iterations and
//      descending in even ones.  For bit j each connected check i forms
//      C_{i,j} = 0.75 * sign-product * min|V_{i,k}| over its other members
//      (cnu), then  V_{j,i} = P_j + E_j + sum_{k != i} C_{k,j}  is written
//      back.  Because messages are updated in place, bits already visited in
//      this iteration contribute their new value and the rest their old one,
//      which is the mixed (l)/(l+1) form of the document's step 2;
//   4. the hard decision is bit 1 when P_j + E_j + sum C_{i,j} <= 0;
//   5. decoding stops when v * H^T = 0 or after NMAX iterations.
// E_j (ej_unit) comes from the partner bit in the same MLC cell: bit j and bit
// j +/- N/2 (codeword layout: first half in the lower page, second half in the
// upper page).
//
// Architecture (this design's choice): the message memory vmem has one word
// per check row holding the NB messages of that row, one per block column of
// the quasi-cyclic H, so one read gives a whole row to the cnu.  The syndrome
// is a register of M bits kept equal to H * hd at all times: each time a hard
// decision flips, the bits of its checks toggle.  No C messages are stored.
//
// Interface: pulse start, then give the N channel LLRs in bit order on
// in_valid/in_llr while in_ready is high.  done rises when decoding ends;
// success tells whether the syndrome is zero, iters how many iterations ran,
// dec_bits the decided codeword.  ej_valid/ej_case report every E_j used.
// Timing: loading takes N cycles, each iteration N*(MB+1)+1 cycles (MB cycles
// reading check rows and one update cycle per bit, one cycle for the
// stopping test), plus one cycle from the last test to done.
// Memories (pmem, vmem, hd_q) are not reset: each word is written while
// loading before it is read.
// Fixed-point choices of this design: channel LLRs WC bits, messages W bits
// saturated to +/-(2^(W-1)-1), one LSB per LLR unit.  NMAX = 100 is the
// iteration ceiling the document's iteration-count results reach.
module real_decoder
  import real_pkg::*;
#(
  parameter code_e       CODE  = CODE_ARRAY,
  parameter int unsigned MB    = 4,     // block rows (column weight)
  parameter int unsigned NB    = 36,    // block columns (row weight)
  parameter int unsigned Z     = 512,   // circulant size, power of two
  parameter int unsigned WC    = 6,     // channel LLR width
  parameter int unsigned W     = 8,     // message width
  parameter int unsigned NMAX  = 100,   // maximum iterations
  parameter int          E_POS = 3,
  parameter int          E_NEG = -1,
  localparam int unsigned N    = NB * Z,
  localparam int unsigned M    = MB * Z,
  localparam int unsigned IW   = $clog2(NMAX + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [WC-1:0]  in_llr,
  output logic                  busy,
  output logic                  done,
  output logic                  success,
  output logic [IW-1:0]         iters,
  output logic [N-1:0]          dec_bits,
  output logic                  ej_valid,
  output ej_case_e              ej_case,
  output logic                  descending   // current iteration visits bits N-1..0
);

  localparam int unsigned AW = $clog2(N);
  localparam int unsigned RW = $clog2(M);
  localparam int unsigned CW = $clog2(NB);
  localparam int unsigned ZW = $clog2(Z);
  localparam int unsigned BW = (MB > 1) ? $clog2(MB) : 1;
  localparam int unsigned TW = W + 4;     // sum of P, E and MB messages
  localparam int signed   VMAX = 2 ** (W - 1) - 1;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RD, S_UPD, S_END, S_DONE} state_e;

  state_e               state_q;
  logic [AW-1:0]        j_q;          // current bit
  logic [BW-1:0]        b_q;          // current block row in S_RD
  logic [IW-1:0]        iter_q;
  logic                 desc_q;
  logic                 succ_q;

  logic signed [WC-1:0] pmem [N];
  logic signed [W-1:0]  vmem [M][NB];
  logic [N-1:0]         hd_q;
  logic [M-1:0]         syn_q;
  logic signed [W-1:0]  cmsg_q [MB];

  // ---------------------------------------------------------------- indices
  logic [CW-1:0]  jc;                 // block column of j
  logic [ZW-1:0]  ju;                 // offset of j in its block column
  logic [RW-1:0]  row   [MB];         // check row of j in each block row
  logic [MB-1:0]  has   ;             // block (b, jc) present

  assign jc = CW'(j_q / AW'(Z));
  assign ju = j_q[ZW-1:0];

  always_comb begin
    for (int b = 0; b < MB; b++) begin
      logic [ZW-1:0] s;
      has[b] = blk_present(CODE, MB, NB, b, int'(jc));
      s      = ZW'(blk_shift(CODE, MB, NB, Z, b, int'(jc)));
      row[b] = RW'(b * Z) + RW'(ZW'(ju - s));
    end
  end

  // Block columns present in each block row.
  logic [NB-1:0] rmask [MB];
  always_comb begin
    for (int b = 0; b < MB; b++)
      for (int c = 0; c < NB; c++)
        rmask[b][c] = blk_present(CODE, MB, NB, b, c);
  end

  // ---------------------------------------------------------------- check node
  logic signed [W-1:0] cnu_out;

  cnu #(.NB(NB), .W(W)) u_cnu (
    .vals  (vmem[row[b_q]]),
    .mask  (rmask[b_q]),
    .excl  (jc),
    .c_msg (cnu_out)
  );

  // ---------------------------------------------------------------- E_j
  logic                 j_upper;
  logic [AW-1:0]        partner;
  logic signed [W-1:0]  e_j;

  assign j_upper = (j_q >= AW'(N / 2));
  assign partner = j_upper ? j_q - AW'(N / 2) : j_q + AW'(N / 2);

  ej_unit #(.WC(WC), .WE(W), .E_POS(E_POS), .E_NEG(E_NEG)) u_ej (
    .upper   (j_upper),
    .p_j     (pmem[j_q]),
    .p_c     (pmem[partner]),
    .hd_c    (hd_q[partner]),
    .e_j     (e_j),
    .ej_case (ej_case)
  );
  assign ej_valid = (state_q == S_UPD);

  // ---------------------------------------------------------------- bit node
  logic signed [TW-1:0] total;
  logic signed [W-1:0]  vnew [MB];
  logic                 hd_new;

  function automatic logic signed [W-1:0] sat(logic signed [TW-1:0] x);
    if (x > TW'(VMAX))  return W'(VMAX);
    if (x < -TW'(VMAX)) return W'(-VMAX);
    return W'(x);
  endfunction

  always_comb begin
    total = TW'(pmem[j_q]) + TW'(e_j);
    for (int b = 0; b < MB; b++) total += TW'(cmsg_q[b]);
    for (int b = 0; b < MB; b++) vnew[b] = sat(total - TW'(cmsg_q[b]));
    hd_new = (total <= 0);
  end

  logic signed [W-1:0] in_ext;
  assign in_ext = sat(TW'(in_llr));

  // ---------------------------------------------------------------- control
  logic last_bit;
  assign last_bit = desc_q ? (j_q == '0) : (j_q == AW'(N - 1));

  assign in_ready   = (state_q == S_LOAD);
  assign busy       = (state_q != S_IDLE) && (state_q != S_DONE);
  assign done       = (state_q == S_DONE);
  assign success    = succ_q;
  assign iters      = iter_q;
  assign dec_bits   = hd_q;
  assign descending = desc_q;

  always_ff @(posedge clk) begin
    if (state_q == S_LOAD && in_valid) begin
      pmem[j_q] <= in_llr;
      hd_q[j_q] <= (in_llr <= 0);
      for (int b = 0; b < MB; b++)
        if (has[b]) vmem[row[b]][jc] <= in_ext;
    end
    if (state_q == S_RD) cmsg_q[b_q] <= has[b_q] ? cnu_out : '0;
    if (state_q == S_UPD) begin
      hd_q[j_q] <= hd_new;
      for (int b = 0; b < MB; b++)
        if (has[b]) vmem[row[b]][jc] <= vnew[b];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      j_q     <= '0;
      b_q     <= '0;
      iter_q  <= '0;
      desc_q  <= 1'b0;
      succ_q  <= 1'b0;
      syn_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: begin
          if (start) begin
            state_q <= S_LOAD;
            j_q     <= '0;
            iter_q  <= '0;
            desc_q  <= 1'b0;
            succ_q  <= 1'b0;
            syn_q   <= '0;
          end
        end
        S_LOAD: begin
          if (in_valid) begin
            if (in_llr <= 0)
              for (int b = 0; b < MB; b++)
                if (has[b]) syn_q[row[b]] <= ~syn_q[row[b]];
            if (j_q == AW'(N - 1)) begin
              state_q <= S_RD;
              j_q     <= '0;
              b_q     <= '0;
              iter_q  <= IW'(1);
            end else begin
              j_q <= j_q + 1'b1;
            end
          end
        end
        S_RD: begin
          if (b_q == BW'(MB - 1)) state_q <= S_UPD;
          else                    b_q     <= b_q + 1'b1;
        end
        S_UPD: begin
          if (hd_new != hd_q[j_q])
            for (int b = 0; b < MB; b++)
              if (has[b]) syn_q[row[b]] <= ~syn_q[row[b]];
          b_q <= '0;
          if (last_bit) state_q <= S_END;
          else begin
            state_q <= S_RD;
            j_q     <= desc_q ? j_q - 1'b1 : j_q + 1'b1;
          end
        end
        S_END: begin
          if (syn_q == '0) begin
            state_q <= S_DONE;
            succ_q  <= 1'b1;
          end else if (iter_q == IW'(NMAX)) begin
            state_q <= S_DONE;
          end else begin
            iter_q  <= iter_q + 1'b1;
            desc_q  <= ~desc_q;
            state_q <= S_RD;
            // the last bit visited becomes the first of the reversed order
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // LLRs are only taken while loading.
  a_load_only: assert property (@(posedge clk) disable iff (!rst_n)
                                (in_valid && in_ready) |-> state_q == S_LOAD);

endmodule
