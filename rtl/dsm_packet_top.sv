// dsm_packet_top: DSM packet compression on the GPU reply network.
//
// Memory-controller side: a 128-byte read reply (from L2 or DRAM) is
// remapped, approximated when its address lies in a programmed approximable
// range, and compressed by two 64-byte DSM units (dsm_comp_path, 4 cycles).
// The packet waits in the compression buffer (comp_buffer) and is cut into
// flits by the network interface (flit_packetizer); the flits leave on the
// mc_flit_* ports towards the reply crossbar, which is outside this design.
// Write replies pass the same way but uncompressed.
// Streaming-multiprocessor side: flits from the crossbar enter on the
// sm_flit_* ports, are recombined into the packet (flit_depacketizer) and
// decompressed and reverse-remapped (dsm_decomp_path, 1 cycle), so the L1
// data cache only ever sees uncompressed data on sm_data.
//
// When the crossbar refuses flits (mc_flit_ready low), the packetizer holds
// its flit, the buffer fills, and once it is full the compression pipeline
// stops and mc_reply_ready drops: the memory controller stalls.
// The chain of units follows the thesis's platform; buffer depth, flit
// format and handshakes are this design's choices. A real GPU has several
// memory controllers and SMs, each with such an interface; this top holds one
// of each side.
module dsm_packet_top
  import dsm_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // approximation memory map (written by the host when it allocates memory)
  input  logic                          map_we,
  input  logic [$clog2(MAP_ENTRIES)-1:0] map_idx,
  input  logic [ADDR_W-1:0]             map_start,
  input  logic [ADDR_W-1:0]             map_end,
  input  logic [APX_BITS_W-1:0]         map_bits,
  // reply from L2 / memory controller
  input  logic                          mc_reply_valid,
  output logic                          mc_reply_ready,
  input  logic                          mc_reply_read,
  input  logic [ADDR_W-1:0]             mc_reply_addr,
  input  logic [BLOCK_BITS-1:0]         mc_reply_data,
  // flits into the reply crossbar
  output logic                          mc_flit_valid,
  input  logic                          mc_flit_ready,
  output logic [FLIT_BITS-1:0]          mc_flit_data,
  output logic                          mc_flit_head,
  output logic                          mc_flit_tail,
  // flits out of the reply crossbar
  input  logic                          sm_flit_valid,
  output logic                          sm_flit_ready,
  input  logic [FLIT_BITS-1:0]          sm_flit_data,
  input  logic                          sm_flit_head,
  input  logic                          sm_flit_tail,
  // decompressed block to the L1 data cache
  output logic                          sm_valid,
  output logic [BLOCK_BITS-1:0]         sm_data,
  output logic [$clog2((PKT_BITS+FLIT_BITS-1)/FLIT_BITS+1)-1:0] sm_nflits,
  // status: the packet now entering the buffer was approximated
  output logic                          mc_pkt_approx
);
  localparam int unsigned BW = PKT_BITS + PKT_LEN_W;

  logic                 cp_valid, cp_ready;
  logic [PKT_BITS-1:0]  cp_pkt;
  logic [PKT_LEN_W-1:0] cp_len;

  dsm_comp_path u_comp (
    .clk, .rst_n,
    .map_we, .map_idx, .map_start, .map_end, .map_bits,
    .in_valid (mc_reply_valid),
    .in_ready (mc_reply_ready),
    .in_read  (mc_reply_read),
    .in_addr  (mc_reply_addr),
    .in_data  (mc_reply_data),
    .out_valid(cp_valid),
    .out_ready(cp_ready),
    .out_pkt  (cp_pkt),
    .out_len  (cp_len),
    .out_approx(mc_pkt_approx)
  );

  logic          bf_valid, bf_ready;
  logic [BW-1:0] bf_data;
  logic [$clog2(BUF_DEPTH+1)-1:0] bf_count;

  comp_buffer #(.W(BW), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .in_valid (cp_valid),
    .in_ready (cp_ready),
    .in_data  ({cp_len, cp_pkt}),
    .out_valid(bf_valid),
    .out_ready(bf_ready),
    .out_data (bf_data),
    .count    (bf_count)
  );

  flit_packetizer #(.PKT_BITS(PKT_BITS), .FLIT_BITS(FLIT_BITS), .LEN_W(PKT_LEN_W)) u_pktz (
    .clk, .rst_n,
    .in_valid  (bf_valid),
    .in_ready  (bf_ready),
    .in_pkt    (bf_data[PKT_BITS-1:0]),
    .in_len    (bf_data[BW-1:PKT_BITS]),
    .flit_valid(mc_flit_valid),
    .flit_ready(mc_flit_ready),
    .flit_data (mc_flit_data),
    .flit_head (mc_flit_head),
    .flit_tail (mc_flit_tail)
  );

  logic                dp_valid;
  logic [PKT_BITS-1:0] dp_pkt;

  flit_depacketizer #(.PKT_BITS(PKT_BITS), .FLIT_BITS(FLIT_BITS)) u_dpkt (
    .clk, .rst_n,
    .flit_valid(sm_flit_valid),
    .flit_ready(sm_flit_ready),
    .flit_data (sm_flit_data),
    .flit_head (sm_flit_head),
    .flit_tail (sm_flit_tail),
    .out_valid (dp_valid),
    .out_pkt   (dp_pkt),
    .out_nflits(sm_nflits)
  );

  dsm_decomp_path u_decomp (
    .clk, .rst_n,
    .in_valid (dp_valid),
    .in_pkt   (dp_pkt),
    .out_valid(sm_valid),
    .out_data (sm_data)
  );
endmodule
