// tmr_pkg: types and functions shared by the triplex (triple-modular
// redundant) clockless pipeline blocks.
//
// A "triplet" is the three redundant copies of one simplex wire. Copies are
// numbered 0..2 in the code (1..3 in the prose of the comments); they carry no
// place value, so any permutation of a triplet is functionally equivalent.
//
// voter_e selects the restoring voter used after every C-element triplet:
// a combinational 2-of-3 majority gate, or the hazard-free majority voter
// (HFMV) that also masks single-event transients. Both are part of the
// architecture; the combinational gate is the default because it is the
// smaller fault target.
package tmr_pkg;

  typedef enum logic [0:0] {
    VOTER_MAJ  = 1'b0,  // combinational 2-of-3 majority gate
    VOTER_HFMV = 1'b1   // hazard-free majority voter
  } voter_e;

  // Bitwise 2-of-3 majority of three words.
  function automatic logic [63:0] maj3w(input logic [63:0] a, input logic [63:0] b,
                                        input logic [63:0] c);
    return (a & b) | (b & c) | (c & a);
  endfunction

endpackage
