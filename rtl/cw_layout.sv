// cw_layout: codeword-to-page layout for MLC NAND flash.
//
// A page pair (lower page, upper page) of N cells holds two codewords a and b
// of N bits.  Conventionally a would fill the lower page and b the upper page,
// so the two bits of a cell would belong to different codewords.  Here each
// codeword is cut in the middle: its first half goes to the lower page and its
// second half to the upper page of the same N/2 cells, codeword a in cells
// 0..N/2-1 and codeword b in cells N/2..N-1.  Bit j and bit j+N/2 of a codeword
// therefore share one cell, which is what the decoder's E_j term relies on.
//
// Interface: cw_sel selects codeword a (0) or b (1), idx is the bit index in
// the codeword; upper and col give the page and the cell column.  The mapping
// follows the document's layout figure; putting codeword a in the low cells is
// this design's choice.  Purely combinational.
module cw_layout #(
  parameter int unsigned N = 18432   // codeword length, even
) (
  input  logic                   cw_sel,
  input  logic [$clog2(N)-1:0]   idx,
  output logic                   upper,
  output logic [$clog2(N)-1:0]   col
);

  localparam int unsigned HALF = N / 2;
  localparam int unsigned AW   = $clog2(N);

  logic [AW-1:0] in_half;

  always_comb begin
    upper   = (idx >= AW'(HALF));
    in_half = upper ? idx - AW'(HALF) : idx;
    col     = cw_sel ? in_half + AW'(HALF) : in_half;
  end

endmodule
