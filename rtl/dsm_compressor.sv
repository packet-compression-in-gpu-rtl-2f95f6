// dsm_compressor: DSM Compressor Unit for one 64-byte (remapped) block.
//
// The block is cut into eight 8-byte segments, each checked by its own CSN
// detector. A CSN segment is encoded as its 4-bit nibble, any other segment
// as its raw 64 bits; the status bit ES[i] is 1 for a CSN segment. The
// variable-length encodings are packed in segment order by a tree of
// concatenators (pairs, then pairs of pairs, then the whole). The comp
// checker then picks the output: if at least one segment is a CSN, the chunk
// is {ED, ES, C=1}; otherwise (ES all zero) the raw block is sent as
// {data, C=0}. With eight 8-byte segments a single CSN already makes the
// compressed form shorter than the raw one, so this test is the same as
// "output the compressed form when it is smaller".
// in_raw forces the raw form (used for write replies, which travel
// uncompressed).
//
// Chunk layout, LSB first: bit 0 = C, bits 8:1 = ES (bit 1 = segment 0),
// ED from bit 9 with segment 0's encoding lowest. out_len is the chunk
// length in bits (513 when raw, 9 + 4n + 64(8-n) with n CSN segments).
//
// Pipeline: two stages, matching the thesis's 2-cycle compression latency,
// fully pipelined (one block per cycle).
//   stage 1: CSN detection and first concatenation level (registered)
//   stage 2: remaining concatenation, comp checker, output select (registered)
// Stages advance only when en is high.
//
// From the thesis: segment size, CSN encoding, ES/ED/C fields, the
// detector/concatenator/comp-checker structure and the 2-cycle latency.
// The thesis once says ES bits are all ones when nothing compresses, but
// its examples and the decompressor use 1 for a compressed segment; this
// design follows the examples. The bit order of the fields and the place of
// the pipeline register are this design's choices.
module dsm_compressor #(
  parameter int unsigned DSM_BYTES = dsm_pkg::DSM_BYTES,
  parameter int unsigned SEG_BYTES = dsm_pkg::SEG_BYTES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic                       in_valid,
  input  logic                       in_raw,
  input  logic [DSM_BYTES*8-1:0]     in_data,
  output logic                       out_valid,
  output logic [DSM_BYTES*8:0]       out_chunk,
  output logic [$clog2(DSM_BYTES*8+2)-1:0] out_len
);
  localparam int unsigned NS   = DSM_BYTES / SEG_BYTES;
  localparam int unsigned SB   = SEG_BYTES * 8;
  localparam int unsigned DB   = DSM_BYTES * 8;
  localparam int unsigned NP   = NS / 2;               // segment pairs
  localparam int unsigned LW   = $clog2(DB + 1);       // length of encoded data
  localparam int unsigned OLW  = $clog2(DB + 2);

  // ---- stage 1: CSN detection, pairwise concatenation ---------------------
  logic [NS-1:0]   es_d;
  logic [3:0]      code_d [NS];
  logic [SB-1:0]   enc_d  [NS];
  logic [LW-1:0]   len_d  [NS];
  logic [2*SB-1:0] pair_d [NP];
  logic [LW-1:0]   plen_d [NP];

  for (genvar s = 0; s < NS; s++) begin : g_det
    csn_detector #(.SEG_BITS(SB)) u_det (
      .seg (in_data[s*SB +: SB]),
      .csn (es_d[s]),
      .code(code_d[s])
    );
    assign enc_d[s] = es_d[s] ? SB'(code_d[s]) : in_data[s*SB +: SB];
    assign len_d[s] = es_d[s] ? LW'(4) : LW'(SB);
  end

  for (genvar p = 0; p < NP; p++) begin : g_pair
    var_concat #(.AW(SB), .BW(SB), .LW(LW)) u_cat (
      .a(enc_d[2*p]),   .a_len(len_d[2*p]),
      .b(enc_d[2*p+1]), .b_len(len_d[2*p+1]),
      .y(pair_d[p]),    .y_len(plen_d[p])
    );
  end

  logic            s1_valid, s1_raw;
  logic [NS-1:0]   s1_es;
  logic [DB-1:0]   s1_data;
  logic [2*SB-1:0] s1_pair [NP];
  logic [LW-1:0]   s1_plen [NP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_raw   <= 1'b0;
      s1_es    <= '0;
      s1_data  <= '0;
      for (int p = 0; p < NP; p++) begin
        s1_pair[p] <= '0;
        s1_plen[p] <= '0;
      end
    end else if (en) begin
      s1_valid <= in_valid;
      s1_raw   <= in_raw;
      s1_es    <= es_d;
      s1_data  <= in_data;
      for (int p = 0; p < NP; p++) begin
        s1_pair[p] <= pair_d[p];
        s1_plen[p] <= plen_d[p];
      end
    end
  end

  // ---- stage 2: merge the pairs, comp checker ------------------------------
  // Binary merge tree over NP pairs, stored level by level in one array:
  // node widths are padded to the full DB bits for a simple generate loop.
  localparam int unsigned NODES = 2 * NP - 1;
  logic [DB-1:0] node   [NODES];
  logic [LW-1:0] node_l [NODES];

  for (genvar p = 0; p < NP; p++) begin : g_leaf
    assign node[NP-1+p]   = DB'(s1_pair[p]);
    assign node_l[NP-1+p] = s1_plen[p];
  end
  for (genvar n = 0; n < NP - 1; n++) begin : g_merge
    logic [2*DB-1:0] y;
    var_concat #(.AW(DB), .BW(DB), .LW(LW)) u_cat (
      .a(node[2*n+1]), .a_len(node_l[2*n+1]),
      .b(node[2*n+2]), .b_len(node_l[2*n+2]),
      .y(y),           .y_len(node_l[n])
    );
    assign node[n] = y[DB-1:0];
  end

  logic          compress;
  logic [DB:0]   chunk_d;
  logic [OLW-1:0] len_o;

  always_comb begin
    compress = (|s1_es) && !s1_raw;   // comp checker
    if (compress) begin
      chunk_d = '0;
      chunk_d[0]       = 1'b1;
      chunk_d[NS:1]    = s1_es;
      chunk_d[DB:NS+1] = node[0][DB-NS-1:0];
      len_o = OLW'(1 + NS) + OLW'(node_l[0]);
    end else begin
      chunk_d = {s1_data, 1'b0};
      len_o   = OLW'(DB + 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_chunk <= '0;
      out_len   <= '0;
    end else if (en) begin
      out_valid <= s1_valid;
      out_chunk <= chunk_d;
      out_len   <= len_o;
    end
  end
endmodule
