// Shared types and constants of the H.264 decoding pipeline.
//
// Syntax-element descriptors used by the syntax parser's microprogram, the
// coefficient modes of the residual transform unit, and the microinstruction
// layout. The descriptor names are those of the H.264 syntax tables
// (u(v), ue(v), se(v), te(v), me(v)); their binary codes are this design's own.
package h264_pkg;

  // Syntax-element descriptor, 3 bits in a parser microinstruction.
  typedef enum logic [2:0] {
    DESC_END   = 3'd0,  // end of microprogram
    DESC_U     = 3'd1,  // u(n): n-bit unsigned, n = 1..16
    DESC_UE    = 3'd2,  // ue(v): unsigned Exp-Golomb
    DESC_SE    = 3'd3,  // se(v): signed Exp-Golomb
    DESC_TE    = 3'd4,  // te(v): truncated Exp-Golomb, n = 1 means range 1
    DESC_ME    = 3'd5,  // me(v): mapped Exp-Golomb (coded_block_pattern)
    DESC_ALIGN = 3'd6   // skip to the next byte boundary (no value)
  } desc_e;

  // Parser microinstruction: descriptor, length / te range flag / me mode, destination.
  typedef struct packed {
    desc_e      desc;
    logic [4:0] n;     // u(n): n; te: 1 = range 1; me: 0 = intra, 1 = inter
    logic [4:0] dest;  // parameter register index
  } uinstr_t;

  localparam int UINSTR_W = $bits(uinstr_t);

  // Transform unit coefficient sets.
  typedef enum logic [1:0] {
    TMODE_FWD = 2'd0,  // forward core transform, entries 1, 2
    TMODE_INV = 2'd1,  // inverse core transform, entries 1, 1/2, final (x+32)>>6
    TMODE_HAD = 2'd2   // 4x4 Hadamard, entries 1
  } tmode_e;

endpackage
