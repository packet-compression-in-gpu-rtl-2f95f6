// flit_packetizer: network-interface packetizer at the memory controller.
//
// Takes one compressed packet (up to PKT_BITS bits, of which in_len are
// used) and sends it as ceil(in_len / FLIT_BITS) flits, lowest bits first.
// The first flit is marked head, the last one tail (a one-flit packet is
// both). Unused bits of the last flit are zero. Compression thus shows up
// directly as fewer flits per reply.
//
// Handshakes: valid/ready on the packet input and on the flit output. A
// packet is captured when in_valid && in_ready; in_ready is high when the
// packetizer is idle or is handing over its last flit, so back-to-back
// packets leave no gap. A flit is taken when flit_valid && flit_ready; while
// flit_ready is low the current flit is held (network stall).
// The thesis only says that compressed data is converted into flits before
// injection; flit size, head/tail marking and handshake are this design's.
module flit_packetizer #(
  parameter int unsigned PKT_BITS  = dsm_pkg::PKT_BITS,
  parameter int unsigned FLIT_BITS = dsm_pkg::FLIT_BITS,
  parameter int unsigned LEN_W     = $clog2(PKT_BITS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [PKT_BITS-1:0]  in_pkt,
  input  logic [LEN_W-1:0]     in_len,
  output logic                 flit_valid,
  input  logic                 flit_ready,
  output logic [FLIT_BITS-1:0] flit_data,
  output logic                 flit_head,
  output logic                 flit_tail
);
  localparam int unsigned MAXF = (PKT_BITS + FLIT_BITS - 1) / FLIT_BITS;
  localparam int unsigned FW   = $clog2(MAXF + 1);

  logic [MAXF*FLIT_BITS-1:0] pkt_q;
  logic [FW-1:0]             nflit_q, idx_q;
  logic                      busy_q;
  logic                      last;

  assign last       = (idx_q == nflit_q - 1'b1);
  assign flit_valid = busy_q;
  assign flit_data  = pkt_q[idx_q*FLIT_BITS +: FLIT_BITS];
  assign flit_head  = (idx_q == '0);
  assign flit_tail  = last;
  assign in_ready   = !busy_q || (flit_ready && last);

  // flits needed for a packet of len bits (at least one)
  function automatic logic [FW-1:0] n_flits(input logic [LEN_W-1:0] len);
    int unsigned n;
    n = (int'(len) + FLIT_BITS - 1) / FLIT_BITS;
    return FW'((n == 0) ? 1 : n);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      idx_q   <= '0;
      nflit_q <= '0;
      pkt_q   <= '0;
    end else begin
      if (in_valid && in_ready) begin
        busy_q  <= 1'b1;
        idx_q   <= '0;
        nflit_q <= n_flits(in_len);
        // keep only the in_len used bits so padding goes out as zero
        pkt_q   <= (MAXF*FLIT_BITS)'(in_pkt) & ~({(MAXF*FLIT_BITS){1'b1}} << in_len);
      end else if (busy_q && flit_ready) begin
        if (last) busy_q <= 1'b0;
        else      idx_q  <= idx_q + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   flit_valid && !flit_ready |=> flit_valid && $stable(flit_data));
endmodule
