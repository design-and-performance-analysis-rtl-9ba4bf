// mpm_pkg: constants shared by the multi-ported memory modules.
//
// Every BDX and HBDX memory in this design offers a fixed set of four read
// slots and one write port, and is divided into four address-interleaved
// banks plus one XOR (parity) bank. The four-bank division follows the
// worked examples of the BDX/HBDX scheme; the slot count follows from the
// four read ports of the 4R mode.
package mpm_pkg;

  // Read slots of a BDX (1W2R / 4R mode) or HBDX (1W4R) memory.
  localparam int unsigned RD_SLOTS = 4;

  // Data banks inside one BDX or HBDX memory (the XOR bank comes on top).
  localparam int unsigned NUM_SUBBANKS = 4;

  // Read slots usable while the memory is also being written (1W2R mode).
  localparam int unsigned RD_SLOTS_WRITE_MODE = 2;


endpackage
