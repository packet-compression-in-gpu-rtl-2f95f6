// dsm_pkg: sizes shared by the Data Segment Matching (DSM) packet
// compression blocks.
//
// A 128-byte cache block of 4-byte elements is remapped so that nibble j of
// every element sits in nibble group j, then optionally approximated (the
// lowest nibble groups zeroed) and compressed by two 64-byte DSM compressors
// working side by side. Each DSM splits its 64 bytes into eight 8-byte
// segments; a segment made of sixteen equal nibbles is sent as that single
// nibble, any other segment is sent raw.
//
// One DSM chunk is laid out LSB first as
//   bit 0            C   compression flag (1 = compressed)
//   bits 8:1         ES  one status bit per segment (1 = segment compressed)
//   bits 9 upward    ED  segment encodings in segment order, 4 or 64 bits each
// and, when C = 0, bits 512:1 carry the raw 64 bytes instead.
// The 128-byte block, the 8-byte segment, the 64-byte DSM width, the 8-entry
// approximation map and its 5-bit approximation number follow the thesis;
// the field order, the 32-bit address and the 32-byte flit are this design's
// own choices.
package dsm_pkg;

  localparam int unsigned NIB_BITS      = 4;
  localparam int unsigned BLOCK_BYTES   = 128;  // GPU cache block
  localparam int unsigned ELEM_BYTES    = 4;    // INT / single-precision FP
  localparam int unsigned DSM_BYTES     = 64;   // one DSM unit; two in parallel
  localparam int unsigned SEG_BYTES     = 8;    // compression resolution
  localparam int unsigned N_DSM         = BLOCK_BYTES / DSM_BYTES;
  localparam int unsigned N_SEG         = DSM_BYTES / SEG_BYTES;
  localparam int unsigned SEG_BITS      = SEG_BYTES * 8;
  localparam int unsigned DSM_BITS      = DSM_BYTES * 8;
  localparam int unsigned BLOCK_BITS    = BLOCK_BYTES * 8;
  // worst-case chunk: flag + raw data (a compressed chunk is always shorter)
  localparam int unsigned CHUNK_BITS    = 1 + DSM_BITS;
  localparam int unsigned PKT_BITS      = N_DSM * CHUNK_BITS;
  localparam int unsigned PKT_LEN_W     = $clog2(PKT_BITS + 1);

  localparam int unsigned MAP_ENTRIES   = 8;    // approximation memory map
  localparam int unsigned APX_BITS_W    = 5;    // approximation number width
  localparam int unsigned APX_GROUPS    = 5;    // 4..20 bits -> 1..5 nibble groups
  localparam int unsigned ADDR_W        = 32;

  localparam int unsigned FLIT_BITS     = 256;  // 32-byte flit

  // Bit length of one DSM chunk given its flag and number of CSN segments.
  function automatic int unsigned chunk_len(input logic c, input int unsigned n_csn);
    if (!c) return CHUNK_BITS;
    return 1 + N_SEG + n_csn * NIB_BITS + (N_SEG - n_csn) * SEG_BITS;
  endfunction

endpackage
