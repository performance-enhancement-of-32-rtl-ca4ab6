// csa_pkg: types shared by the carry select adder family.
//
// fa_design_e selects which one-bit full adder cell the ripple carry adders
// are built from:
//   FA_HALF_ADDERS - "design 1": two half adders, the two half-adder carries
//                    ORed into the carry out.
//   FA_MINORITY    - "design 2": the complemented carry out is the minority
//                    function of the three inputs, and the sum is derived from
//                    it, S = abc + (a+b+c)Cout'.
// Design 2 is the default everywhere because it gave the smaller area and power
// of the two cells; design 1 stays selectable through the FA parameter.
package csa_pkg;

  typedef enum logic {
    FA_HALF_ADDERS = 1'b0,
    FA_MINORITY    = 1'b1
  } fa_design_e;

endpackage
