// Shared types for the constant-free stochastic circuits.
//
// A stochastic number (SN) is a bit-stream whose value is the fraction of 1s in it; every
// circuit here consumes and produces one bit of each SN per clock cycle. Complex SNs, used by
// the complex matrix multiplier, carry a real and an imaginary bit-stream side by side; both
// are bipolar (value = 2p - 1, where p is the probability of a 1).
package sc_pkg;

  // One cycle of a complex bipolar SN.
  typedef struct packed {
    logic re;
    logic im;
  } cbit_t;

endpackage
