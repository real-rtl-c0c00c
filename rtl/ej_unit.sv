// ej_unit: extra decision information E_j of the REAL decoder.
//
// The two bits of an MLC cell sit in one codeword (lower-page half and
// upper-page half), so when bit node v_j is updated its partner v_c in the
// same cell is known.  Retention errors mostly move a cell towards fewer
// electrons (00->01, 01->10, 01->11, 10->11), so the partner's channel LLR P_c
// and its current hard decision HD_c say which way v_j probably leans:
//
//   v_j page | P_c vs HD_c          | E_j
//   upper    | disagree (case 1)    | E_NEG  (-1)
//   lower    | disagree (case 2)    | E_POS  (+3)
//   lower    | both say 0 (case 3)  | E_POS  (+3)
//   lower    | both say 1 (case 4)  | alpha*P_j, alpha = 0.75
//   upper    | both say 0 (case 5)  | E_POS  (+3)
//   upper    | both say 1 (case 6)  | E_NEG  (-1)
//
// The values follow the document.  P "says 0" when P > 0 (the decoder decides
// 1 for LLR <= 0); hd_c = 1 means the partner is currently decided as 1.
// alpha*P_j is (3*P_j) >>> 2, rounding towards minus infinity.  E_NEG and
// E_POS are in LLR least-significant bits, so with the default of one LSB per
// LLR unit they are exactly the document's -1 and 3.
// Purely combinational.
module ej_unit
  import real_pkg::*;
#(
  parameter int unsigned WC    = 6,   // channel LLR width
  parameter int unsigned WE    = 8,   // output width
  parameter int          E_POS = 3,
  parameter int          E_NEG = -1
) (
  input  logic                 upper,   // v_j is in the upper page
  input  logic signed [WC-1:0] p_j,     // channel LLR of v_j
  input  logic signed [WC-1:0] p_c,     // channel LLR of the partner bit
  input  logic                 hd_c,    // current hard decision of the partner
  output logic signed [WE-1:0] e_j,
  output ej_case_e             ej_case
);

  logic signed [WC+1:0] p3;
  logic                 pc_one;

  assign pc_one = (p_c <= 0);
  assign p3     = (WC+2)'(p_j) * (WC+2)'(3);

  always_comb begin
    if (pc_one != hd_c) ej_case = upper ? EJ_UP_DIFF : EJ_LO_DIFF;
    else if (!hd_c)     ej_case = upper ? EJ_UP_POS  : EJ_LO_POS;
    else                ej_case = upper ? EJ_UP_NEG  : EJ_LO_NEG;

    unique case (ej_case)
      EJ_LO_NEG:                      e_j = WE'(p3 >>> 2);
      EJ_LO_DIFF, EJ_LO_POS, EJ_UP_POS: e_j = WE'(E_POS);
      default:                        e_j = WE'(E_NEG);
    endcase
  end

endmodule
