// gf_pkg: types shared by the two systolic GF(2^m) multipliers and their
// exponentiators.
//
// Both arrays multiply in the standard basis, scanning the multiplier A from
// its most significant bit. Every iteration i of the bit-level algorithm
//   r_j^i = r_{m-1}^{i-1} f_j  ^  r_{j-1}^{i-1}  ^  a_{m-i} b_j
// is carried down the array, from the MSB cell to the LSB cell, by a control
// token (gf_tok_t) that moves one cell per clock. The token holds the
// multiplier bit a_{m-i}, the partial-sum MSB r_{m-1}^{i-1} once the MSB cell
// has produced it, and flags marking the first and last iteration. Results
// leave through a shift chain that runs the other way, from the LSB cell up
// to the MSB cell, so that they come out serially, MSB first.
package gf_pkg;

  // One iteration of one multiplication, as it travels down the array.
  typedef struct packed {
    logic valid;  // an iteration is present in this slot
    logic first;  // i == 1: the previous partial sum R^0 is zero
    logic last;   // i == m: the partial sum R^m is the product
    logic slot;   // interleave slot (Architecture-I: which of two products)
    logic a;      // multiplier bit a_{m-i}
    logic rmsb;   // r_{m-1}^{i-1}, filled in by the MSB cell
  } gf_tok_t;

  // One result bit in the serial output chain of Architecture-I.
  typedef struct packed {
    logic valid;  // a result bit is present
    logic slot;   // product it belongs to
    logic tail;   // this is bit 0, the last bit of the product
    logic d;      // the bit
  } gf_obit_t;

  // One result bit pair in the serial output chain of Architecture-II.
  typedef struct packed {
    logic       valid;  // a result pair is present
    logic       tail;   // pair from the LSB cell, the last of the product
    logic [1:0] d;      // {r_j, r_{j-1}} of the cell that captured it
  } gf_opair_t;

endpackage
