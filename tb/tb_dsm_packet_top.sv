// tb_dsm_packet_top: end-to-end run of the reply path at its default sizes.
//
// The reply crossbar is modelled as a flit queue between mc_flit_* and
// sm_flit_*: it refuses flits at random (including long blocked stretches)
// and delivers them in order after a random delay. Reply blocks of every
// data pattern (zeros, repeated, narrow, similar, float, random, mixed) are
// offered as read replies to approximable and precise addresses and as write
// replies. Each block arriving at the SM side is compared with the original,
// with its approximated low bits cleared where its address was approximable.
//
// It checks the first-flit and the decompression timing, and counts how
// often each mechanism happened: compressed and raw packets, approximation,
// write-reply bypass, network stall, full compression buffer and memory
// controller stall. A mechanism that never happened counts as a failure.
// It also prints the flit reduction per data pattern against the 4 flits a
// 128-byte reply needs uncompressed.
module tb_dsm_packet_top;
  import dsm_pkg::*;
  import dsm_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic map_we = 0;
  logic [2:0]  map_idx = '0;
  logic [31:0] map_start = '0, map_end = '0;
  logic [4:0]  map_bits = '0;
  logic mc_reply_valid = 0, mc_reply_ready, mc_reply_read = 1;
  logic [31:0] mc_reply_addr = '0;
  block_t mc_reply_data = '0;
  logic mc_flit_valid, mc_flit_ready = 0, mc_flit_head, mc_flit_tail;
  logic [FLIT_BITS-1:0] mc_flit_data;
  logic sm_flit_valid = 0, sm_flit_ready, sm_flit_head = 0, sm_flit_tail = 0;
  logic [FLIT_BITS-1:0] sm_flit_data = '0;
  logic sm_valid;
  block_t sm_data;
  logic [2:0] sm_nflits;
  logic mc_pkt_approx;

  dsm_packet_top dut (.*);

  always #5 clk = ~clk;

  localparam int N_BLOCKS = 2000;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { block_t d; int kind; bit rd; bit apx; } exp_t;
  exp_t exp_q[$];
  typedef struct { logic [FLIT_BITS-1:0] d; bit h, t; int due; } nflit_t;
  nflit_t net_q[$];

  int cyc = 0;
  int n_comp = 0, n_raw = 0, n_apx = 0, n_wr = 0, n_net_stall = 0, n_buf_full = 0, n_mc_stall = 0;
  int flits_kind [7], blocks_kind [7];
  int received = 0;

  function automatic int bits_for(input logic [31:0] a);
    if (a[31:28] == 4'h4) return 12;   // FP region, approximated by 12 bits
    if (a[31:28] == 4'h5) return 20;   // aggressive approximation
    return 0;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  // reply handshake, sampled at the clock edge
  bit reply_taken;
  always @(posedge clk) reply_taken <= mc_reply_valid && mc_reply_ready;

  // SM side: compare every delivered block
  always @(negedge clk) begin
    if (rst_n && sm_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected block at cycle %0d", cyc);
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        if (sm_data !== e.d) begin
          failures++;
          $display("block %0d wrong (kind %0d rd %b apx %b)", received, e.kind, e.rd, e.apx);
        end
        if (e.rd) begin
          flits_kind[e.kind]  += int'(sm_nflits);
          blocks_kind[e.kind] += 1;
        end
        if (!e.rd) n_wr++;
        received++;
      end
    end
  end

  // crossbar model
  bit blocked;
  always @(negedge clk) begin
    if (!rst_n) begin
      mc_flit_ready <= 0;
    end else begin
      if ($urandom_range(0, 199) == 0) blocked = !blocked;
      mc_flit_ready = !blocked && ($urandom_range(0, 3) != 0);
    end
  end
  always @(posedge clk) begin
    if (rst_n && mc_flit_valid && mc_flit_ready) begin
      net_q.push_back('{mc_flit_data, mc_flit_head, mc_flit_tail, cyc + $urandom_range(1, 4)});
      if (mc_flit_head && mc_flit_data[0]) n_comp++;
      if (mc_flit_head && !mc_flit_data[0]) n_raw++;
    end
    if (rst_n && mc_flit_valid && !mc_flit_ready) n_net_stall++;
    if (rst_n && dut.bf_count == 3'd4) n_buf_full++;
    if (rst_n && mc_reply_valid && !mc_reply_ready) n_mc_stall++;
    if (rst_n && dut.cp_valid && dut.cp_ready && mc_pkt_approx) n_apx++;
  end
  always @(negedge clk) begin
    if (net_q.size() > 0 && net_q[0].due <= cyc) begin
      nflit_t f;
      f = net_q.pop_front();
      sm_flit_valid = 1; sm_flit_data = f.d; sm_flit_head = f.h; sm_flit_tail = f.t;
    end else begin
      sm_flit_valid = 0;
    end
  end

  initial begin
    int sent;
    int t0, t_flit, t_tail, t_out;
    sent = 0;
    blocked = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    map_we = 1; map_idx = 3'd0; map_start = 32'h4000_0000; map_end = 32'h4fff_ffff; map_bits = 5'd12;
    @(negedge clk);
    map_idx = 3'd1; map_start = 32'h5000_0000; map_end = 32'h5fff_ffff; map_bits = 5'd20;
    @(negedge clk);
    map_we = 0;

    // timing of one block through an idle system with an open network
    blocked = 1;
    force mc_flit_ready = 1'b1;
    mc_reply_valid = 1; mc_reply_read = 1; mc_reply_addr = 32'h1000_0000;
    mc_reply_data = gen_block(1);
    exp_q.push_back('{mc_reply_data, 1, 1, 0});
    t0 = cyc;
    @(negedge clk);
    mc_reply_valid = 0;
    while (!mc_flit_valid) @(negedge clk);
    t_flit = cyc;
    while (!(mc_flit_valid && mc_flit_tail)) @(negedge clk);
    t_tail = cyc;
    while (!sm_valid) @(negedge clk);
    t_out = cyc;
    checks++;
    // 4 cycles of compression, 1 into the buffer, 1 into the packetizer
    if (t_flit - t0 != 6) begin failures++; $display("first flit after %0d cycles, expected 6", t_flit - t0); end
    release mc_flit_ready;
    blocked = 0;
    repeat (10) @(negedge clk);

    while (sent < N_BLOCKS) begin
      if (!mc_reply_valid || reply_taken) begin
        if (mc_reply_valid) sent++;
        if (sent < N_BLOCKS && $urandom_range(0, 4) != 0) begin
          int kind;
          logic [31:0] a;
          kind = $urandom_range(0, 6);
          case ($urandom_range(0, 3))
            0: a = 32'h4000_0000 + 32'($urandom_range(0, 4095)) * 128;
            1: a = 32'h5000_0000 + 32'($urandom_range(0, 4095)) * 128;
            default: a = 32'h2000_0000 + 32'($urandom_range(0, 4095)) * 128;
          endcase
          mc_reply_valid = 1;
          mc_reply_addr  = a;
          mc_reply_data  = gen_block(kind);
          mc_reply_read  = ($urandom_range(0, 9) != 0);
          // approximation only applies to read replies in approximable regions
          exp_q.push_back('{mc_reply_read ? ref_approx_elems(mc_reply_data, bits_for(a)) : mc_reply_data,
                            kind, mc_reply_read, mc_reply_read && bits_for(a) > 0});
        end else begin
          mc_reply_valid = 0;
        end
      end
      @(negedge clk);
    end
    mc_reply_valid = 0;
    while (exp_q.size() > 0 && cyc < 400000) @(negedge clk);
    repeat (20) @(negedge clk);

    checks++;
    if (received != N_BLOCKS + 1 || exp_q.size() != 0) begin
      failures++;
      $display("received %0d of %0d blocks", received, N_BLOCKS + 1);
    end
    $display("mechanisms: compressed=%0d raw=%0d approximated=%0d write_bypass=%0d net_stall=%0d buffer_full=%0d mc_stall=%0d",
             n_comp, n_raw, n_apx, n_wr, n_net_stall, n_buf_full, n_mc_stall);
    foreach (blocks_kind[k]) begin
      if (blocks_kind[k] > 0)
        $display("pattern %0d: %0d read replies, %0.2f flits each, flit reduction %0.1f%%", k, blocks_kind[k],
                 real'(flits_kind[k]) / blocks_kind[k], 100.0 * (1.0 - real'(flits_kind[k]) / (4.0 * blocks_kind[k])));
    end
    checks++;
    if (n_comp == 0 || n_raw == 0 || n_apx == 0 || n_wr == 0 || n_net_stall == 0
        || n_buf_full == 0 || n_mc_stall == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
