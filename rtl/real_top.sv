// real_top: LDPC write and read paths of an MLC NAND flash controller using
// the REAL decoder.
//
// Write path: host bytes -> write I/O buffer -> bit serializer (LSB first) ->
// systematic encoder -> codeword layout -> program port of the flash array.
// Read path: read request -> codeword layout gives the (page, cell) of each
// codeword bit -> the flash array answers with a soft LLR -> REAL decoder ->
// information bits packed into bytes -> read I/O buffer -> host.
// This is the chain of the document's read/write figure; the flash array
// itself is outside, reached through the prog_* and flash_* ports.
//
// Interface and timing:
//   p_we/p_addr/p_row       load row p_addr of the encoder's P matrix.
//   wr_valid/wr_ready/wr_data, wr_cw_sel   K/8 bytes per codeword; each
//                           codeword bit leaves on prog_* one cycle after the
//                           encoder takes it (check bits follow the K-th).
//   rd_start, rd_cw_sel     start reading codeword a (0) or b (1) of the page
//                           pair; flash_req is high for N cycles, the array
//                           must answer flash_llr in the same cycle
//                           (combinationally) for flash_upper/flash_col.
//   dec_done/dec_success/dec_iters  decoder outcome; then K/8 bytes appear on
//                           out_valid/out_ready/out_data.
//   ej_valid/ej_case/dec_descending  observation of the decoder's E_j cases
//                           and bit-visit order.
// Byte packing, LSB-first serialization and the one-cycle flash answer are this
// design's choices.
module real_top
  import real_pkg::*;
#(
  parameter code_e       CODE = CODE_ARRAY,
  parameter int unsigned MB   = 4,
  parameter int unsigned NB   = 36,
  parameter int unsigned Z    = 512,
  parameter int unsigned WC   = 6,
  parameter int unsigned W    = 8,
  parameter int unsigned NMAX = 100,
  localparam int unsigned N   = NB * Z,
  localparam int unsigned M   = MB * Z,
  localparam int unsigned K   = N - M,
  localparam int unsigned AW  = $clog2(N),
  localparam int unsigned IW  = $clog2(NMAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // encoder P matrix
  input  logic                 p_we,
  input  logic [$clog2(K)-1:0] p_addr,
  input  logic [M-1:0]         p_row,
  // host write
  input  logic                 wr_valid,
  output logic                 wr_ready,
  input  logic [7:0]           wr_data,
  input  logic                 wr_cw_sel,
  // flash program port
  output logic                 prog_valid,
  output logic                 prog_upper,
  output logic [AW-1:0]        prog_col,
  output logic                 prog_bit,
  // read request and flash soft-read port
  input  logic                 rd_start,
  input  logic                 rd_cw_sel,
  output logic                 flash_req,
  output logic                 flash_upper,
  output logic [AW-1:0]        flash_col,
  input  logic signed [WC-1:0] flash_llr,
  // decoder status and observation
  output logic                 dec_done,
  output logic                 dec_success,
  output logic [IW-1:0]        dec_iters,
  output logic                 ej_valid,
  output ej_case_e             ej_case,
  output logic                 dec_descending,
  // host read
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [7:0]           out_data
);

  localparam int unsigned KB  = K / 8;
  localparam int unsigned PW  = $clog2(KB + 1);

  // ---------------------------------------------------------------- write path
  logic       wb_valid, wb_ready;
  logic [7:0] wb_data;

  io_buffer #(.DW(8), .DEPTH(KB)) u_wbuf (
    .clk, .rst_n,
    .wr_valid (wr_valid), .wr_ready (wr_ready), .wr_data (wr_data),
    .rd_valid (wb_valid), .rd_ready (wb_ready), .rd_data (wb_data)
  );

  logic [7:0] ser_q;
  logic [3:0] ser_n_q;      // bits left in ser_q
  logic       enc_ready;
  logic       enc_take;

  assign wb_ready = (ser_n_q == 4'd0);
  assign enc_take = (ser_n_q != 4'd0) && enc_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ser_q   <= '0;
      ser_n_q <= '0;
    end else if (wb_valid && wb_ready) begin
      ser_q   <= wb_data;
      ser_n_q <= 4'd8;
    end else if (enc_take) begin
      ser_q   <= ser_q >> 1;
      ser_n_q <= ser_n_q - 1'b1;
    end
  end

  logic                      enc_ov;
  logic [$clog2(K+M)-1:0]    enc_idx;
  logic                      enc_bit;

  ldpc_encoder #(.K(K), .M(M)) u_enc (
    .clk, .rst_n,
    .p_we, .p_addr, .p_row,
    .in_valid  (ser_n_q != 4'd0),
    .in_ready  (enc_ready),
    .in_bit    (ser_q[0]),
    .out_valid (enc_ov),
    .out_idx   (enc_idx),
    .out_bit   (enc_bit)
  );

  cw_layout #(.N(N)) u_wlayout (
    .cw_sel (wr_cw_sel),
    .idx    (AW'(enc_idx)),
    .upper  (prog_upper),
    .col    (prog_col)
  );
  assign prog_valid = enc_ov;
  assign prog_bit   = enc_bit;

  // ---------------------------------------------------------------- read path
  logic          sel_q;
  logic [AW-1:0] ld_q;
  logic          dec_in_ready;
  logic [N-1:0]  dec_bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= 1'b0;
      ld_q  <= '0;
    end else if (rd_start) begin
      sel_q <= rd_cw_sel;
      ld_q  <= '0;
    end else if (dec_in_ready) begin
      ld_q  <= ld_q + 1'b1;
    end
  end

  cw_layout #(.N(N)) u_rlayout (
    .cw_sel (sel_q),
    .idx    (ld_q),
    .upper  (flash_upper),
    .col    (flash_col)
  );
  assign flash_req = dec_in_ready;

  real_decoder #(.CODE(CODE), .MB(MB), .NB(NB), .Z(Z), .WC(WC), .W(W), .NMAX(NMAX)) u_dec (
    .clk, .rst_n,
    .start      (rd_start),
    .in_valid   (dec_in_ready),
    .in_ready   (dec_in_ready),
    .in_llr     (flash_llr),
    .busy       (),
    .done       (dec_done),
    .success    (dec_success),
    .iters      (dec_iters),
    .dec_bits   (dec_bits),
    .ej_valid   (ej_valid),
    .ej_case    (ej_case),
    .descending (dec_descending)
  );

  // Pack the K information bits into bytes for the read buffer.
  logic [PW-1:0] pk_q;        // bytes still to pack
  logic [PW-1:0] pb_q;        // next byte index
  logic          rb_ready;
  logic          pk_push;

  assign pk_push = (pk_q != '0) && rb_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pk_q <= '0;
      pb_q <= '0;
    end else if (rd_start) begin
      pk_q <= PW'(KB);
      pb_q <= '0;
    end else if (dec_done && pk_push) begin
      pk_q <= pk_q - 1'b1;
      pb_q <= pb_q + 1'b1;
    end
  end

  io_buffer #(.DW(8), .DEPTH(KB)) u_rbuf (
    .clk, .rst_n,
    .wr_valid (dec_done && pk_q != '0),
    .wr_ready (rb_ready),
    .wr_data  (dec_bits[8 * pb_q +: 8]),
    .rd_valid (out_valid), .rd_ready (out_ready), .rd_data (out_data)
  );

endmodule
