// tb_dsm_small_example: the worked example of DSM at a reduced size.
//
// A 16-byte block of four single-precision values that share their top three
// nibbles (3, c, 6) is remapped, compressed with a 2-byte resolution (eight
// segments of four nibbles) and restored. Without approximation the three
// top nibble groups become CSN segments (codes 6, c, 3; ES = 00000111 read
// from segment 0 to segment 7). With 8 approximation bits the two lowest
// groups are zeroed as well (ES = 11000111). The chain is the same as in the
// full design: data_remap -> approx_unit -> dsm_compressor ->
// dsm_decompressor -> data_unremap, instantiated at 16 bytes.
module tb_dsm_small_example;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic map_we = 0;
  logic [2:0] map_idx = '0;
  logic [31:0] map_start = '0, map_end = '0;
  logic [4:0] map_bits = '0;
  logic [127:0] blk, remapped, apx_data, restored_r, restored;
  logic [31:0]  addr;
  logic in_valid = 0, apx_valid, apx_flag, c_valid, d_valid;
  logic [128:0] chunk;
  logic [7:0]   clen;

  data_remap #(.BLOCK_BYTES(16), .ELEM_BYTES(4)) u_remap (.din(blk), .dout(remapped));
  approx_unit #(.BLOCK_BYTES(16), .ELEM_BYTES(4)) u_apx (
    .clk, .rst_n, .en(1'b1), .map_we, .map_idx, .map_start, .map_end, .map_bits,
    .in_valid, .in_allow(1'b1), .in_addr(addr), .in_data(remapped),
    .out_valid(apx_valid), .out_approx(apx_flag), .out_data(apx_data));
  dsm_compressor #(.DSM_BYTES(16), .SEG_BYTES(2)) u_cmp (
    .clk, .rst_n, .en(1'b1), .in_valid(apx_valid), .in_raw(1'b0), .in_data(apx_data),
    .out_valid(c_valid), .out_chunk(chunk), .out_len(clen));
  dsm_decompressor #(.DSM_BYTES(16), .SEG_BYTES(2)) u_dec (
    .clk, .rst_n, .in_valid(c_valid), .in_chunk(chunk), .out_valid(d_valid), .out_data(restored_r));
  data_unremap #(.BLOCK_BYTES(16), .ELEM_BYTES(4)) u_unremap (.din(restored_r), .dout(restored));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ES printed from segment 0 to segment 7, as in the worked example
  function automatic string es_str(input logic [7:0] es);
    string s;
    s = "";
    for (int i = 0; i < 8; i++) s = {s, es[i] ? "1" : "0"};
    return s;
  endfunction

  task automatic run(input logic [31:0] a, input string exp_es, input int exp_len,
                     input logic [127:0] exp_out, input logic [11:0] exp_codes);
    int lat;
    addr = a; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!c_valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 4) begin failures++; $display("compression latency %0d, expected 4", lat); end
    checks++;
    if (chunk[0] !== 1'b1 || es_str(chunk[8:1]) != exp_es || int'(clen) != exp_len) begin
      failures++;
      $display("C=%b ES=%s len=%0d, expected ES=%s len=%0d", chunk[0], es_str(chunk[8:1]), clen, exp_es, exp_len);
    end
    // the last three encodings are the 4-bit codes 6, c, 3
    checks++;
    if (chunk[exp_len-1 -: 12] !== exp_codes) begin
      failures++;
      $display("codes %h, expected %h", chunk[exp_len-1 -: 12], exp_codes);
    end
    @(negedge clk);
    checks++;
    if (!d_valid || restored !== exp_out) begin
      failures++;
      $display("restored %h, expected %h", restored, exp_out);
    end
    $display("ES=%s, %0d of 129 bits", es_str(chunk[8:1]), clen);
  endtask

  initial begin
    blk = {32'h3c6e_0a17, 32'h3c68_9cf2, 32'h3c65_f3d9, 32'h3c61_a2b4};
    repeat (2) @(negedge clk);
    rst_n = 1;
    map_we = 1; map_idx = 3'd0; map_start = 32'h100; map_end = 32'h1ff; map_bits = 5'd8;
    @(negedge clk);
    map_we = 0;
    // precise address: 3 CSN segments, 9 + 3*4 + 5*16 bits
    run(32'h0, "00000111", 9 + 12 + 80, blk, 12'h3c6);
    // approximable address with 8 bits: 5 CSN segments, 9 + 5*4 + 3*16 bits
    run(32'h180, "11000111", 9 + 20 + 48, blk & {4{32'hffff_ff00}}, 12'h3c6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
