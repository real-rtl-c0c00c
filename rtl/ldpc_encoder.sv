// ldpc_encoder: serial systematic LDPC encoder.
//
// With H brought by Gaussian elimination into [P | I], the check bits of the
// information vector I are C = I * P^T.  The encoder holds P^T column by
// column: row i of the P memory is the M-bit contribution of information bit
// i.  Information bits stream in one per cycle and are passed straight out as
// the first K codeword bits, while every 1 XORs its P row into the check
// register; after the K-th bit the M check bits stream out, one per cycle.
//
// Interface:
//   p_we/p_addr/p_row : load row p_addr of P (done once, offline elimination)
//   in_valid/in_ready/in_bit : information bits, K per codeword
//   out_valid/out_idx/out_bit : codeword bits 0..N-1, no back-pressure
// Timing: a codeword takes K + M cycles; in_ready is low while the check bits
// are sent.  The document gives the equation; the serial structure and the
// loadable P memory are this design's choice.
module ldpc_encoder #(
  parameter int unsigned K = 16384,  // information bits (2 KB)
  parameter int unsigned M = 2048    // check bits (rate 8/9)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       p_we,
  input  logic [$clog2(K)-1:0]       p_addr,
  input  logic [M-1:0]               p_row,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic                       in_bit,
  output logic                       out_valid,
  output logic [$clog2(K+M)-1:0]     out_idx,
  output logic                       out_bit
);

  localparam int unsigned NW = $clog2(K + M);

  logic [M-1:0]  pmem [K];
  logic [M-1:0]  par_q;
  logic [NW-1:0] cnt_q;       // next codeword bit index
  logic          info_phase;

  assign info_phase = (cnt_q < NW'(K));
  assign in_ready   = info_phase;

  always_ff @(posedge clk) begin
    if (p_we) pmem[p_addr] <= p_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_q     <= '0;
      cnt_q     <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (info_phase) begin
        if (in_valid) begin
          if (in_bit) par_q <= par_q ^ pmem[cnt_q[$clog2(K)-1:0]];
          out_valid <= 1'b1;
          out_idx   <= cnt_q;
          out_bit   <= in_bit;
          cnt_q     <= cnt_q + 1'b1;
        end
      end else begin
        out_valid <= 1'b1;
        out_idx   <= cnt_q;
        out_bit   <= par_q[0];
        par_q     <= par_q >> 1;
        cnt_q     <= (cnt_q == NW'(K + M - 1)) ? '0 : cnt_q + 1'b1;
      end
    end
  end

endmodule
