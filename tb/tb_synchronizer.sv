// tb_synchronizer: sends a byte stream with leading garbage, a Layer II
// header that must be rejected, a single-channel 128 kbit/s frame with
// padding and a stereo 64 kbit/s frame with a CRC word.  The testbench packs
// the side information itself from random field values and checks the parsed
// fields, the number and content of the main-data bytes written to the
// reservoir, their start address, the rejected-header count and the
// frame_valid/frame_done hand-off.  Frame lengths are computed here as
// floor(144000*bitrate/44100) + padding.
module tb_synchronizer;
  import mp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_ready, res_wr_en, frame_valid, frame_done, bad_header;
  logic [7:0] in_data, res_wr_data;
  logic [10:0] res_wr_ptr, main_start;
  side_info_t side_info;
  int checks = 0, failures = 0, n_bad = 0;

  synchronizer dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reservoir write model
  logic [7:0] got [$];
  always @(posedge clk) begin
    if (!rst_n) res_wr_ptr <= '0;
    else if (res_wr_en) begin
      res_wr_ptr <= res_wr_ptr + 1'b1;
      got.push_back(res_wr_data);
    end
    if (bad_header) n_bad++;
  end

  // ------------------------------------------------------------ stream builder
  logic [7:0] stream [$];
  logic       bitbuf [$];
  task automatic pb(input int v, input int n);
    for (int i = n - 1; i >= 0; i--) bitbuf.push_back(((v >> i) & 1) != 0);
  endtask
  task automatic flush_bits();
    while (bitbuf.size() % 8) bitbuf.push_back(1'b0);
    while (bitbuf.size()) begin
      logic [7:0] b;
      for (int i = 0; i < 8; i++) b[7 - i] = bitbuf.pop_front();
      stream.push_back(b);
    end
  endtask

  function automatic gr_info_t rand_gi();
    gr_info_t g;
    g = '0;
    g.part2_3_length = 12'($urandom);
    g.big_values = 9'($urandom % 289);
    g.global_gain = 8'($urandom);
    g.scalefac_compress = 4'($urandom);
    g.window_switching = 1'($urandom);
    if (g.window_switching) begin
      g.block_type = 2'(1 + $urandom % 3);
      g.mixed_block = 1'($urandom);
      g.table_select[0] = 5'($urandom); g.table_select[1] = 5'($urandom);
      for (int i = 0; i < 3; i++) g.subblock_gain[i] = 3'($urandom);
      g.region0_count = (g.block_type == 2 && !g.mixed_block) ? 4'd8 : 4'd7;
    end else begin
      for (int i = 0; i < 3; i++) g.table_select[i] = 5'($urandom);
      g.region0_count = 4'($urandom);
      g.region1_count = 3'($urandom);
    end
    g.preflag = 1'($urandom); g.scalefac_scale = 1'($urandom); g.count1table_select = 1'($urandom);
    return g;
  endfunction

  task automatic pack_gi(input gr_info_t g);
    pb(g.part2_3_length, 12); pb(g.big_values, 9); pb(g.global_gain, 8);
    pb(g.scalefac_compress, 4); pb(g.window_switching, 1);
    if (g.window_switching) begin
      pb(g.block_type, 2); pb(g.mixed_block, 1);
      pb(g.table_select[0], 5); pb(g.table_select[1], 5);
      for (int i = 0; i < 3; i++) pb(g.subblock_gain[i], 3);
    end else begin
      for (int i = 0; i < 3; i++) pb(g.table_select[i], 5);
      pb(g.region0_count, 4); pb(g.region1_count, 3);
    end
    pb(g.preflag, 1); pb(g.scalefac_scale, 1); pb(g.count1table_select, 1);
  endtask

  side_info_t exp_si [2];
  int exp_main_len [2];
  logic [7:0] exp_main [$];

  task automatic add_frame(input int f, input bit stereo, input bit crc, input int bri, input bit pad);
    int brs [15] = '{0, 32, 40, 48, 56, 64, 80, 96, 112, 128, 160, 192, 224, 256, 320};
    int flen, side;
    side_info_t s;
    flen = (144000 * brs[bri]) / 44100 + pad;
    side = stereo ? 32 : 17;
    pb(12'hFFF, 12); pb(1, 1); pb(1, 2); pb(crc ? 0 : 1, 1); pb(bri, 4); pb(0, 2);
    pb(pad, 1); pb(0, 1); pb(stereo ? 0 : 3, 2); pb(0, 2); pb(0, 1); pb(1, 1); pb(0, 2);
    if (crc) pb(16'hBEEF, 16);
    s = '0;
    s.stereo = stereo;
    s.mode = stereo ? 2'd0 : 2'd3;
    s.main_data_begin = 9'($urandom);
    s.scfsi = 4'($urandom);
    pb(s.main_data_begin, 9);
    pb(0, stereo ? 3 : 5);
    pb(s.scfsi, 4);
    if (stereo) pb(4'($urandom), 4);
    for (int g = 0; g < 2; g++) begin
      s.gr[g] = rand_gi();
      pack_gi(s.gr[g]);
      if (stereo) begin
        gr_info_t o;
        o = rand_gi();
        s.p23_other[g] = o.part2_3_length;
        pack_gi(o);
      end
    end
    flush_bits();
    exp_si[f] = s;
    exp_main_len[f] = flen - 4 - (crc ? 2 : 0) - side;
    for (int i = 0; i < exp_main_len[f]; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      stream.push_back(b);
      exp_main.push_back(b);
    end
  endtask

  initial begin
    int fr;
    rst_n = 0; in_valid = 0; in_data = 0; frame_done = 0;
    // garbage, then a Layer II header with a few bytes
    for (int i = 0; i < 5; i++) stream.push_back(8'h12 + 8'(i));
    stream.push_back(8'hFF); stream.push_back(8'hFD); stream.push_back(8'h90); stream.push_back(8'h00);
    for (int i = 0; i < 7; i++) stream.push_back(8'h55);
    add_frame(0, 1'b0, 1'b0, 9, 1'b1);
    add_frame(1, 1'b1, 1'b1, 5, 1'b0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    fr = 0;
    while (stream.size() || fr < 2) begin
      @(negedge clk);
      frame_done = 0;
      if (frame_valid) begin
        // compare the parsed side information
        checks++;
        if (side_info !== exp_si[fr]) begin
          failures++;
          $display("frame %0d side info mismatch\n got %h\n exp %h", fr, side_info, exp_si[fr]);
        end
        checks++;
        if (int'(main_start) != (fr == 0 ? 0 : exp_main_len[0])) begin
          failures++; $display("main_start %0d", main_start);
        end
        repeat (3) @(negedge clk);
        frame_done = 1;
        fr++;
        @(negedge clk);
        frame_done = 0;
      end
      in_valid = stream.size() != 0 && ($urandom % 8 != 0);
      in_data  = stream.size() ? stream[0] : 8'h00;
      @(posedge clk);
      if (in_valid && in_ready) void'(stream.pop_front());
    end
    checks++;
    if (got.size() != exp_main.size()) begin
      failures++; $display("main bytes %0d vs %0d", got.size(), exp_main.size());
    end
    for (int i = 0; i < got.size() && i < exp_main.size(); i++) begin
      checks++;
      if (got[i] !== exp_main[i]) failures++;
    end
    checks++;
    if (n_bad != 1) begin failures++; $display("rejected headers %0d", n_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
