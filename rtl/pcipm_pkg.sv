// pcipm_pkg: sizes and the code layout shared by the pre-coded image-plane
// matching (PCIPM) unit.
//
// An 8-bit pixel is re-coded into 27 redundant bits so that the distance
// between two pixels can be judged with exclusive-ORs and AND gates only.
// The 27-bit code is one top level of three bits (a thermometer code of the
// two most significant pixel bits) followed by six levels of four bits each.
// Level k (k = 6 down to 1) holds, from its most significant bit down:
// two auxiliary bits, the binary pixel bit a_k and the Gray bit g_(k-1).
// The bit numbering c26..c00 and the formulas of every bit follow the
// published codebook; the struct names are this design's own.
package pcipm_pkg;

  localparam int unsigned PIX_W    = 8;   // pixel bit depth K
  localparam int unsigned TOP_W    = 3;   // bits of the top level
  localparam int unsigned LEVELS   = 6;   // four-bit levels below the top
  localparam int unsigned LEVEL_W  = 4;   // bits per level
  localparam int unsigned CODE_W   = TOP_W + LEVELS * LEVEL_W;  // 27

  // One four-bit level. aux_hi/aux_lo are c(4k-1)/c(4k-2), a is c(4k-3)
  // (the pixel bit a_k) and g is c(4k-4) (the Gray bit g_(k-1)).
  typedef struct packed {
    logic aux_hi;
    logic aux_lo;
    logic a;
    logic g;
  } level_t;

  // The whole code, c26 in the most significant position.
  // lvl[k-1] is level k, so lvl[5] occupies c23..c20 and lvl[0] c03..c00.
  typedef struct packed {
    logic [TOP_W-1:0]   top;   // c26 c25 c24
    level_t [LEVELS-1:0] lvl;
  } pcipm_code_t;

endpackage
