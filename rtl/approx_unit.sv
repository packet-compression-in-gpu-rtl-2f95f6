// approx_unit: Data Approximation Unit.
//
// Holds an 8-entry approximation memory map. Each entry names an address
// range [start, end] (both inclusive) and a 5-bit approximation number: the
// count of mantissa LSBs the programmer allows to be dropped for data in
// that range. A zero number means the entry is unused. For every remapped
// block entering the unit, the block address is compared with all entries in
// parallel; the first matching entry (lowest index) decides the approximation.
// Its number is decoded into a 5-bit thermometer mask, one bit per nibble
// group (4 bits of every element): 12 bits gives 11100 (first three groups).
// The masked groups of the remapped block are then set to zero, which turns
// them into all-zero CSN segments for the compressor. Blocks with in_allow
// low (write replies) are never approximated.
//
// Pipeline: two stages, matching the thesis's 2-cycle latency.
//   stage 1: range compare, priority select, mask decode (registered)
//   stage 2: zeroing of the selected nibble groups (registered)
// Both stages move only when en is high (global stall of the compression
// pipeline). The map is written through map_we/map_idx/... at any time and
// is cleared by reset.
//
// From the thesis: 8 entries, start/end address, 5-bit approximation
// number, the thermometer decoding, zeroing of whole nibble groups.
// This design's choices: inclusive end address, lowest-index priority for
// overlapping ranges, numbers that are not multiples of 4 rounded down to
// whole nibbles, numbers above 20 treated as 20, and the 32-bit address.
module approx_unit #(
  parameter int unsigned BLOCK_BYTES = dsm_pkg::BLOCK_BYTES,
  parameter int unsigned ELEM_BYTES  = dsm_pkg::ELEM_BYTES,
  parameter int unsigned ENTRIES     = dsm_pkg::MAP_ENTRIES,
  parameter int unsigned ADDR_W      = dsm_pkg::ADDR_W,
  parameter int unsigned BITS_W      = dsm_pkg::APX_BITS_W,
  parameter int unsigned GROUPS      = dsm_pkg::APX_GROUPS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  // approximation memory map write port
  input  logic                        map_we,
  input  logic [$clog2(ENTRIES)-1:0]  map_idx,
  input  logic [ADDR_W-1:0]           map_start,
  input  logic [ADDR_W-1:0]           map_end,
  input  logic [BITS_W-1:0]           map_bits,
  // remapped block in
  input  logic                        in_valid,
  input  logic                        in_allow,  // 0: never approximate (write reply)
  input  logic [ADDR_W-1:0]           in_addr,
  input  logic [BLOCK_BYTES*8-1:0]    in_data,
  // (possibly) approximated block out, two cycles later
  output logic                        out_valid,
  output logic                        out_approx,
  output logic [BLOCK_BYTES*8-1:0]    out_data
);
  localparam int unsigned GBITS = BLOCK_BYTES / ELEM_BYTES * 4;  // bits per nibble group

  typedef struct packed {
    logic [ADDR_W-1:0] start_a;
    logic [ADDR_W-1:0] end_a;
    logic [BITS_W-1:0] bits;
  } map_entry_t;

  map_entry_t map_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) map_q[e] <= '0;
    end else if (map_we) begin
      map_q[map_idx] <= '{start_a: map_start, end_a: map_end, bits: map_bits};
    end
  end

  // ---- stage 1: compare and decode ---------------------------------------
  logic [BITS_W-1:0] sel_bits;
  logic              hit;
  logic [GROUPS-1:0] mask_d;

  always_comb begin
    sel_bits = '0;
    hit      = 1'b0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (map_q[e].bits != '0 && in_addr >= map_q[e].start_a && in_addr <= map_q[e].end_a) begin
        sel_bits = map_q[e].bits;
        hit      = 1'b1;
      end
    end
    for (int g = 0; g < GROUPS; g++) mask_d[g] = hit && in_allow && (int'(sel_bits) >= 4 * (g + 1));
  end

  logic                     s1_valid;
  logic [GROUPS-1:0]        s1_mask;
  logic [BLOCK_BYTES*8-1:0] s1_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_mask  <= '0;
      s1_data  <= '0;
    end else if (en) begin
      s1_valid <= in_valid;
      s1_mask  <= mask_d;
      s1_data  <= in_data;
    end
  end

  // ---- stage 2: zero the selected nibble groups ---------------------------
  logic [BLOCK_BYTES*8-1:0] zeroed;
  always_comb begin
    zeroed = s1_data;
    for (int g = 0; g < GROUPS; g++)
      if (s1_mask[g]) zeroed[g*GBITS +: GBITS] = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_approx <= 1'b0;
      out_data   <= '0;
    end else if (en) begin
      out_valid  <= s1_valid;
      out_approx <= |s1_mask;
      out_data   <= zeroed;
    end
  end
endmodule
