// cnu: check-node unit of the REAL min-sum decoder.
//
// For one check row and one bit node of that row it forms the check-to-bit
// message of the decoding procedure, step 2:
//     C = alpha * prod(sign V_k) * min |V_k|   over the row members k != excl
// where the V_k are the bit-to-check messages currently held for the row.  In
// the serial decoder the stored messages of bits already visited in this
// iteration are the new ones (l+1) and the rest the old ones (l), which is
// exactly the mixed old/new form of step 2.
//
// Interface: vals[k] is the message of the member in block column k, mask[k]
// marks which block columns the row has, excl is the block column of the bit
// being updated.  Purely combinational.
//
// Choices of this design: a zero message counts as positive; alpha = 0.75 is
// done as (3*min)>>2, truncating (the document gives alpha = 0.75 only for
// case 4 of E_j and leaves the check-node factor unnumbered); if the row has
// no other member the message is zero.
module cnu #(
  parameter int unsigned NB = 36,  // block columns = members per row
  parameter int unsigned W  = 8    // message width, two's complement
) (
  input  logic signed [W-1:0]      vals [NB],
  input  logic [NB-1:0]            mask,
  input  logic [$clog2(NB)-1:0]    excl,
  output logic signed [W-1:0]      c_msg
);

  logic [W-1:0]   min_mag;
  logic           neg;
  logic           any;
  logic [W-1:0]   scaled;   // 3*min/4 never exceeds W-1 bits of magnitude
  logic [W-1:0]   mag;

  always_comb begin
    min_mag = '1;
    neg     = 1'b0;
    any     = 1'b0;
    mag     = '0;
    for (int k = 0; k < NB; k++) begin
      mag = vals[k][W-1] ? W'(-vals[k]) : W'(vals[k]);
      if (mask[k] && (k != int'(excl))) begin
        if (mag < min_mag) min_mag = mag;
        neg ^= vals[k][W-1];
        any = 1'b1;
      end
    end
    scaled = W'(({2'b00, min_mag} * (W+2)'(3)) >> 2);
    if (!any)     c_msg = '0;
    else if (neg) c_msg = -$signed(scaled);
    else          c_msg = $signed(scaled);
  end

endmodule
