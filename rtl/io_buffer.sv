// io_buffer: I/O data buffer between the host and the LDPC codec.
//
// On a write the host's data waits here until the encoder takes it; on a read
// the decoded information bytes wait here until the host takes them.  It is a
// synchronous first-in first-out memory of DEPTH words (default one 2 KB
// page of bytes) with valid/ready handshakes on both sides.
//
// Timing: a word written in one cycle can be read from the next; a write and a
// read may happen in the same cycle.  The document only names the buffer;
// its organisation as a FIFO is this design's choice.
module io_buffer #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 2048
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [DW-1:0] wr_data,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [DW-1:0] rd_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wp_q, rp_q;
  logic [AW:0]   cnt_q;
  logic          do_wr, do_rd;

  assign wr_ready = (cnt_q != (AW+1)'(DEPTH));
  assign rd_valid = (cnt_q != '0);
  assign rd_data  = mem[rp_q];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp_q] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_wr) wp_q <= (wp_q == AW'(DEPTH - 1)) ? '0 : wp_q + 1'b1;
      if (do_rd) rp_q <= (rp_q == AW'(DEPTH - 1)) ? '0 : rp_q + 1'b1;
      cnt_q <= cnt_q + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // The buffer never loses or invents a word.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  cnt_q <= (AW+1)'(DEPTH));

endmodule
