// scope_pkg: sizes and types shared by the SCoPE SVM classification chain.
//
// SCoPE classifies one k-element input vector against m support vectors
// (SVs) with a chain of n processing elements (PEs). The defaults are the
// face-detection prototype: n = 100 PEs, k = 400 8-bit elements (a 20x20
// grayscale window), m = 818 SVs, so each PE holds ceil(m/n) = 9 SV slots.
// Widths of the chain word (25), the alpha coefficients (18), the kernel
// output (50) and the back-end accumulator (75) are the published ones.
//
// The 25-bit word that travels down the chain in the PROCESSING state packs,
// from the top: an unused bit, the accumulator-reset flag, the MAC enable,
// the "new address" (read strobe) for the SV memories, the 8-bit input vector
// element and the SV memory address. The order of the four single-bit fields
// at bits 24..21 is the published one; placing the element at bits 20..13 and
// giving the address the remaining 13 bits is this design's reading, since
// 9 SVs x 400 elements = 3600 words need at least 12 address bits.
package scope_pkg;

  // Chain and workload sizes
  localparam int unsigned N_PE      = 100;  // PEs in the chain (n)
  localparam int unsigned K_ELEM    = 400;  // elements per vector (k)
  localparam int unsigned M_SV      = 818;  // support vectors (m)

  // Data widths
  localparam int unsigned ELEM_W    = 8;    // input/SV element
  localparam int unsigned WORD_W    = 25;   // chain word and PE scalar
  localparam int unsigned SVA_W     = 13;   // SV address field of the word
  localparam int unsigned KERN_W    = 50;   // kernel output
  localparam int unsigned ALPHA_W   = 18;   // alpha*y coefficient
  localparam int unsigned ACC_W     = 75;   // back-end accumulator

  // Word carried between PEs in the PROCESSING state (25 bits).
  typedef struct packed {
    logic              unused;     // bit 24
    logic              acc_reset;  // bit 23: clear the PE accumulator
    logic              mac_en;     // bit 22: element is valid, accumulate
    logic              nd_sv;      // bit 21: new address for the SV memory
    logic [ELEM_W-1:0] elem;       // bits 20..13: input vector element
    logic [SVA_W-1:0]  sv_addr;    // bits 12..0: SV memory address
  } chain_word_t;

  // Operational state of a PE
  typedef enum logic [1:0] {
    PE_IDLE         = 2'd0,
    PE_PROCESSING   = 2'd1,
    PE_TRANSFERRING = 2'd2
  } pe_state_e;

  // Cycles per group of n SVs, formula (6) without the ceiling factor.
  function automatic int unsigned group_cycles(int unsigned n, int unsigned k);
    return n + k + (n + 2);
  endfunction

endpackage
