// flit_depacketizer: network-interface depacketizer at the streaming
// multiprocessor.
//
// Collects the flits of one reply packet, lowest bits first, into a packet
// register. A head flit starts a new packet (clearing the register); the
// tail flit completes it. One cycle after the tail flit is accepted the
// whole packet is presented on out_pkt with out_valid high for one cycle,
// together with the number of flits it arrived in.
//
// The flit input is always ready: the decompressor behind it takes one
// packet per cycle, and a packet needs at least one flit. The thesis only
// says that flits are recombined into the compressed packet before
// decompression; the framing is this design's and matches flit_packetizer.
module flit_depacketizer #(
  parameter int unsigned PKT_BITS  = dsm_pkg::PKT_BITS,
  parameter int unsigned FLIT_BITS = dsm_pkg::FLIT_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flit_valid,
  output logic                 flit_ready,
  input  logic [FLIT_BITS-1:0] flit_data,
  input  logic                 flit_head,
  input  logic                 flit_tail,
  output logic                 out_valid,
  output logic [PKT_BITS-1:0]  out_pkt,
  output logic [$clog2((PKT_BITS+FLIT_BITS-1)/FLIT_BITS+1)-1:0] out_nflits
);
  localparam int unsigned MAXF = (PKT_BITS + FLIT_BITS - 1) / FLIT_BITS;
  localparam int unsigned FW   = $clog2(MAXF + 1);

  logic [MAXF*FLIT_BITS-1:0] acc_q;
  logic [FW-1:0]             idx_q;
  logic [FW-1:0]             pos;

  assign flit_ready = 1'b1;
  assign pos        = flit_head ? '0 : idx_q;
  assign out_pkt    = acc_q[PKT_BITS-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q      <= '0;
      idx_q      <= '0;
      out_valid  <= 1'b0;
      out_nflits <= '0;
    end else begin
      out_valid <= 1'b0;
      if (flit_valid) begin
        if (flit_head) acc_q <= '0;
        acc_q[pos*FLIT_BITS +: FLIT_BITS] <= flit_data;
        idx_q <= pos + 1'b1;
        if (flit_tail) begin
          out_valid  <= 1'b1;
          out_nflits <= pos + 1'b1;
        end
      end
    end
  end

  // flits of a packet stay inside the packet register
  assert property (@(posedge clk) disable iff (!rst_n)
                   flit_valid |-> int'(pos) < MAXF);
endmodule
