// cd_pkg: shared sizes and record layouts of the k-DOP collision-detection
// accelerator.
//
// Numbers format: every DOP coefficient a'_i and every mapping-vector entry
// P'_i is a signed two's-complement fixed-point number whose two top bits are
// sign and integer bit, so a W-bit value has W-2 fraction bits and covers
// [-2, 2). The document normalises all coefficients to [-1, 1] and proves all
// mapping-vector entries lie in [-1, 0]; the extra integer bit only makes +1
// and -1 exactly representable. The projected translation p' uses the same
// number of fraction bits as the coefficients (z = b) and three more integer
// bits, because L.T is not normalised to [-1, 1]. These formats are this
// design's choice; the widths (35 bits, 24-DOP) follow the document.
//
// Memory layout of one BV-tree node (64-bit words, word addresses):
//   word 0          : header, see node_hdr_t
//   words 1..NCW    : the K coefficients packed LSB first, coefficient i at
//                     bits [i*DW +: DW] of the concatenation {word NCW, ..., word 1}
// A triangle is TRI_WORDS consecutive words; its format belongs to the
// triangle unit and is not interpreted here. The layout is this design's own.
package cd_pkg;

  parameter int unsigned K_DEF      = 24;  // 24-DOPs
  parameter int unsigned DW_DEF     = 35;  // DOP coefficient width (b = DW-2)
  parameter int unsigned PW_DEF     = 35;  // mapping-vector entry width (c = PW-2)
  parameter int unsigned TW_DEF     = 38;  // projected translation p' width (z = DW-2)
  parameter int unsigned AW_DEF     = 25;  // word address: 256 MB / 8 bytes
  parameter int unsigned MUL_EXTRA_DEF = 2; // extra multiplier stages for 35-bit products
  parameter int unsigned N_AXES_DEF = 24;  // n, axes tested per DOP pair
  parameter int unsigned AXES_MAX_DEF = 64; // size of the axis table (N <= AXES_MAX)
  parameter int unsigned TRI_WORDS_DEF = 5; // words per triangle record
  parameter int unsigned SEQW       = 4;   // width of the pair sequence tag

  // Header word of a BV-tree node.
  typedef struct packed {
    logic        leaf;       // [63]    node is a leaf (holds one triangle)
    logic [12:0] rsvd;       // [62:50]
    logic [24:0] right;      // [49:25] right child address (inner node)
    logic [24:0] left;       // [24:0]  left child address, or triangle address of a leaf
  } node_hdr_t;

  // One entry of the BV stack: a pending DOP-pair test or a triangle-pair test.
  typedef struct packed {
    logic        is_tri;        // 1: triangle pair, addresses are triangle records
    logic [24:0] addr_a;
    logic [24:0] addr_b;
  } job_t;

  // Bookkeeping that travels with each axis test through PipeData.
  typedef struct packed {
    logic [SEQW-1:0] seq;    // which DOP pair this test belongs to
    logic            last;   // last axis test issued for this pair
    logic [24:0]     addr_a;
    logic [24:0]     addr_b;
    node_hdr_t       hdr_a;
    node_hdr_t       hdr_b;
  } pipe_tag_t;

  // Number of 64-bit words that hold K coefficients of DW bits.
  function automatic int unsigned coef_words(int unsigned k, int unsigned dw);
    return (k * dw + 63) / 64;
  endfunction

endpackage
