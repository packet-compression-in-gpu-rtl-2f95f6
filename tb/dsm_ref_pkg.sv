// dsm_ref_pkg: reference model and stimulus for the DSM testbenches.
//
// Written as plain behavioural loops over bits and nibbles, independent of
// the RTL's structure: remapping by index arithmetic, approximation by
// nibble-group clearing, compression by appending fields at a moving bit
// pointer. Also generates 128-byte test blocks that show the redundancy
// patterns a GPU reply carries (zeros, repeated values, narrow integers,
// similar values, single-precision floats, random data).
package dsm_ref_pkg;
  import dsm_pkg::*;

  typedef logic [BLOCK_BITS-1:0] block_t;
  typedef logic [DSM_BITS-1:0]   dsm_t;
  typedef logic [CHUNK_BITS-1:0] chunk_t;
  typedef logic [PKT_BITS-1:0]   pkt_t;

  localparam int unsigned NE = BLOCK_BYTES / ELEM_BYTES;
  localparam int unsigned NN = ELEM_BYTES * 2;

  function automatic block_t ref_remap(input block_t b);
    block_t r;
    for (int p = 0; p < NE * NN; p++) begin
      int e, j;
      e = p % NE;
      j = p / NE;
      r[p*4 +: 4] = b[(e*NN + j)*4 +: 4];
    end
    return r;
  endfunction

  function automatic block_t ref_unremap(input block_t r);
    block_t b;
    for (int e = 0; e < NE; e++)
      for (int j = 0; j < NN; j++)
        b[(e*NN + j)*4 +: 4] = r[(j*NE + e)*4 +: 4];
    return b;
  endfunction

  // zero the nibble groups that hold the lowest 'bits' bits of each element
  function automatic block_t ref_approx(input block_t r, input int bits);
    int g;
    g = bits / 4;
    if (g > APX_GROUPS) g = APX_GROUPS;
    for (int p = 0; p < g * NE; p++) r[p*4 +: 4] = 4'h0;
    return r;
  endfunction

  // approximation applied to original (not remapped) data: clear LSBs
  function automatic block_t ref_approx_elems(input block_t b, input int bits);
    int g;
    g = bits / 4;
    if (g > APX_GROUPS) g = APX_GROUPS;
    for (int e = 0; e < NE; e++)
      for (int k = 0; k < g * 4; k++) b[e*32 + k] = 1'b0;
    return b;
  endfunction

  function automatic bit is_csn(input logic [SEG_BITS-1:0] s);
    for (int k = 1; k < SEG_BITS / 4; k++)
      if (s[k*4 +: 4] != s[3:0]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic void ref_compress(input dsm_t d, input bit raw,
                                       output chunk_t c, output int len);
    int ptr, n;
    n = 0;
    for (int s = 0; s < N_SEG; s++) if (is_csn(d[s*SEG_BITS +: SEG_BITS])) n++;
    c = '0;
    if (raw || n == 0) begin
      c[0] = 1'b0;
      for (int k = 0; k < DSM_BITS; k++) c[1 + k] = d[k];
      len = 1 + DSM_BITS;
      return;
    end
    c[0] = 1'b1;
    ptr = 1 + N_SEG;
    for (int s = 0; s < N_SEG; s++) begin
      logic [SEG_BITS-1:0] seg;
      seg = d[s*SEG_BITS +: SEG_BITS];
      if (is_csn(seg)) begin
        c[1 + s] = 1'b1;
        for (int k = 0; k < 4; k++) c[ptr + k] = seg[k];
        ptr += 4;
      end else begin
        for (int k = 0; k < SEG_BITS; k++) c[ptr + k] = seg[k];
        ptr += SEG_BITS;
      end
    end
    len = ptr;
  endfunction

  // full MC-side model: remap, approximate, two chunks back to back
  function automatic void ref_packet(input block_t b, input int apx_bits, input bit read,
                                     output pkt_t p, output int len);
    block_t r;
    chunk_t c0, c1;
    int l0, l1;
    r = ref_remap(b);
    if (read) r = ref_approx(r, apx_bits);
    ref_compress(r[DSM_BITS-1:0], !read, c0, l0);
    ref_compress(r[BLOCK_BITS-1:DSM_BITS], !read, c1, l1);
    p = '0;
    for (int k = 0; k < l0; k++) p[k] = c0[k];
    for (int k = 0; k < l1; k++) p[l0 + k] = c1[k];
    len = l0 + l1;
  endfunction

  function automatic logic [31:0] rand_float(input logic [7:0] exp_base);
    logic [31:0] f;
    f[31]    = 1'b0;
    f[30:23] = exp_base + 8'($urandom_range(0, 1));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  // kind: 0 zeros, 1 repeated, 2 narrow, 3 similar, 4 float, 5 random, 6 mix
  function automatic block_t gen_block(input int kind);
    block_t b;
    logic [31:0] base;
    base = $urandom;
    for (int e = 0; e < NE; e++) begin
      logic [31:0] v;
      case (kind)
        0: v = 32'h0;
        1: v = base;
        2: v = 32'($urandom_range(0, 255));
        3: v = {base[31:8], 8'($urandom_range(0, 15))};
        4: v = rand_float(8'h7e);
        5: v = $urandom;
        default: v = ($urandom_range(0, 1) != 0) ? base : 32'($urandom_range(0, 15));
      endcase
      b[e*32 +: 32] = v;
    end
    return b;
  endfunction
endpackage
