// tb_mp3_decoder_top: end-to-end test of the decoding core with its default
// parameters (2048-byte reservoir, 1024-sample FIFO, I2S divider 544).
//
// The testbench loads Huffman code trees (table 1 of the standard, an 8-bit
// fixed-length stand-in for table 24 with 4 linbits, and the two count1
// tables) and a random synthesis window, then encodes its own MP3 stream:
// garbage bytes, a Layer II header that must be rejected, and three
// 44.1 kHz 48 kbit/s frames (the second one stereo: the core decodes its
// channel 0 and must skip channel 1's bits) whose six granules use block types normal,
// short, start, stop, normal and normal (the last frame carries no spectral
// data, so its output comes only from the overlap and filter history).  The
// second and third frames begin their main data in earlier frames' bytes
// (main_data_begin > 0).  A floating-point model (requantization, reorder,
// alias reduction, IMDCT with windows and overlap, frequency inversion and
// polyphase synthesis) predicts every PCM sample; each one entering the FIFO
// is compared with it (tolerance 64 LSB + 1 %), and the words the I2S
// receiver rebuilds from bclk/ws/sd are compared with what left the FIFO.
//
// Mechanisms counted, each must occur at least once: rejected header,
// linbits escape, count1 quadruples, short-block reorder, block-type switch,
// reservoir reuse across frames, a skipped stereo channel, FIFO full back-pressure on the filterbank,
// I2S underflow before the first sample, and six finished granules.
module tb_mp3_decoder_top;
  import mp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_ready, tbl_we, d_we;
  logic [7:0] in_data;
  logic [11:0] tbl_addr;
  logic [15:0] tbl_wdata;
  logic [8:0] d_addr;
  logic [19:0] d_wdata;
  logic i2s_bclk, i2s_ws, i2s_sd, pcm_valid, bad_header, underflow;
  logic [15:0] pcm_data, granules_done;
  logic [2:0] stage_code;
  logic init_busy, sample_tick;
  logic [10:0] fifo_level;
  logic [13:0] bit_pos;
  int checks = 0, failures = 0;

  mp3_decoder_top dut (.*);

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog: pcm %0d", n_pcm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real P = 3.14159265358979323846;
  localparam int NGR = 6;

  // ------------------------------------------------------------ mechanism counters
  int n_bad = 0, n_linbits = 0, n_quads = 0, n_short = 0, n_switch = 0;
  int n_stereo = 0, n_reuse = 0, n_full = 0, n_underflow = 0, n_pcm = 0, busy_cyc = 0;

  // ------------------------------------------------------------ Huffman trees
  logic [15:0] img [4096];
  int next_free;
  function automatic int alloc();
    int a;
    a = next_free;
    next_free += 2;
    img[a] = 0; img[a + 1] = 0;
    return a;
  endfunction
  task automatic add_code(input int t, input int code, input int len, input int val);
    int node;
    if (img[t] == 0) img[t] = 16'(alloc());
    node = int'(img[t]);
    for (int i = len - 1; i >= 0; i--) begin
      int b;
      b = (code >> i) & 1;
      if (i == 0) img[node + b] = 16'h8000 | 16'(val);
      else begin
        if (img[node + b] == 0) img[node + b] = 16'(alloc());
        node = int'(img[node + b]);
      end
    end
  endtask
  int c1_code [4] = '{1, 1, 1, 0};
  int c1_len  [4] = '{1, 3, 2, 3};
  int ca_code [16] = '{1, 5, 4, 5, 6, 5, 4, 4, 7, 3, 6, 0, 7, 2, 3, 1};
  int ca_len  [16] = '{1, 4, 4, 5, 4, 6, 5, 6, 4, 5, 5, 6, 5, 6, 6, 6};

  // ------------------------------------------------------------ encoder
  logic mbits [$];            // main data bits, all frames, in order
  int   isv [NGR][576];       // decoded order
  task automatic put(input int v, input int n);
    for (int i = n - 1; i >= 0; i--) mbits.push_back(((v >> i) & 1) != 0);
  endtask
  task automatic tail(input int mag, input int sgn, input int lb);
    if (lb > 0 && mag >= 15) begin put(mag - 15, lb); n_linbits++; end
    if (mag != 0) put(sgn, 1);
  endtask

  int lsfb [23] = '{0,4,8,12,16,20,24,30,36,44,52,62,74,90,110,134,162,196,238,288,342,418,576};
  int ssfb [14] = '{0,4,8,12,16,22,30,40,52,66,84,106,136,192};

  // fills gi's code fields and isv[g], appends the granule's bits
  task automatic enc_granule(input int g, inout gr_info_t gi, input int nquads, input int amp24);
    int p0, r1, r2;
    p0 = mbits.size();
    for (int i = 0; i < 576; i++) isv[g][i] = 0;
    if (gi.window_switching) begin
      r1 = 36; r2 = 576;
    end else begin
      r1 = lsfb[gi.region0_count + 1];
      r2 = lsfb[gi.region0_count + gi.region1_count + 2];
    end
    for (int i = 0; i < 2 * int'(gi.big_values); i += 2) begin
      int t, x, y, sx, sy;
      t = i < r1 ? gi.table_select[0] : (i < r2 ? gi.table_select[1] : gi.table_select[2]);
      sx = $urandom % 2; sy = $urandom % 2;
      if (t == 0) begin
        x = 0; y = 0;
      end else if (t == 1) begin
        x = $urandom % 2; y = $urandom % 2;
        put(c1_code[2 * x + y], c1_len[2 * x + y]);
        tail(x, sx, 0); tail(y, sy, 0);
      end else begin
        int mx, my;
        x = $urandom % amp24; y = $urandom % amp24;
        mx = x > 15 ? 15 : x; my = y > 15 ? 15 : y;
        put(mx * 16 + my, 8);
        tail(x, sx, 4); tail(y, sy, 4);
      end
      isv[g][i] = sx ? -x : x;
      isv[g][i + 1] = sy ? -y : y;
    end
    for (int k = 0; k < nquads; k++) begin
      int q, idx;
      idx = 2 * int'(gi.big_values) + 4 * k;
      q = $urandom % 16;
      if (gi.count1table_select == 0) put(ca_code[q], ca_len[q]);
      else put(15 - q, 4);
      for (int i = 0; i < 4; i++)
        if ((q >> (3 - i)) & 1) begin
          int s;
          s = $urandom % 2;
          put(s, 1);
          isv[g][idx + i] = s ? -1 : 1;
        end
      n_quads++;
    end
    gi.part2_3_length = 12'(mbits.size() - p0);
  endtask

  // ------------------------------------------------------------ floating-point model
  real prev [32][18];
  real vhist [1024];
  real dwin [512];
  real expq [$];
  real aa_c [8] = '{-0.6, -0.535, -0.33, -0.185, -0.095, -0.041, -0.0142, -0.0037};

  function automatic real win(input int bt, input int i);
    case (bt)
      1: begin
        if (i < 18) return $sin(P / 36.0 * (i + 0.5));
        if (i < 24) return 1.0;
        if (i < 30) return $sin(P / 12.0 * (i - 18 + 0.5));
        return 0.0;
      end
      3: begin
        if (i < 6) return 0.0;
        if (i < 12) return $sin(P / 12.0 * (i - 6 + 0.5));
        if (i < 18) return 1.0;
        return $sin(P / 36.0 * (i + 0.5));
      end
      default: return $sin(P / 36.0 * (i + 0.5));
    endcase
  endfunction

  task automatic model_granule(input int g, input gr_info_t gi);
    real xr [576];
    real x2 [576];
    real gain;
    bit sh;
    sh = gi.window_switching && gi.block_type == 2;
    gain = $pow(2.0, (real'(gi.global_gain) - 210.0) / 4.0);
    for (int i = 0; i < 576; i++) begin
      int a;
      a = isv[g][i] < 0 ? -isv[g][i] : isv[g][i];
      xr[i] = $pow(real'(a), 4.0 / 3.0) * gain;
      if (isv[g][i] < 0) xr[i] = -xr[i];
    end
    if (sh) begin
      // reorder: window-major within each band -> frequency-major
      for (int b = 0; b < 13; b++) begin
        int wd;
        wd = ssfb[b + 1] - ssfb[b];
        for (int w = 0; w < 3; w++)
          for (int j = 0; j < wd; j++)
            x2[3 * (ssfb[b] + j) + w] = xr[3 * ssfb[b] + w * wd + j];
      end
      xr = x2;
    end else begin
      for (int s = 1; s < 32; s++)
        for (int i = 0; i < 8; i++) begin
          real lo, hi, cs, ca;
          cs = 1.0 / $sqrt(1.0 + aa_c[i] * aa_c[i]);
          ca = aa_c[i] * cs;
          lo = xr[18 * s - 1 - i];
          hi = xr[18 * s + i];
          xr[18 * s - 1 - i] = lo * cs - hi * ca;
          xr[18 * s + i] = hi * cs + lo * ca;
        end
    end
    // IMDCT, window, overlap, frequency inversion
    for (int s = 0; s < 32; s++) begin
      real z [36];
      for (int i = 0; i < 36; i++) z[i] = 0.0;
      if (sh) begin
        for (int w = 0; w < 3; w++)
          for (int i = 0; i < 12; i++) begin
            real y;
            y = 0.0;
            for (int k = 0; k < 6; k++)
              y += xr[18 * s + 3 * k + w] * $cos(P / 24.0 * (2 * i + 7) * (2 * k + 1));
            z[6 + 6 * w + i] += y * $sin(P / 12.0 * (i + 0.5));
          end
      end else begin
        for (int i = 0; i < 36; i++) begin
          real y;
          y = 0.0;
          for (int k = 0; k < 18; k++)
            y += xr[18 * s + k] * $cos(P / 72.0 * (2 * i + 19) * (2 * k + 1));
          z[i] = y * win(gi.block_type, i);
        end
      end
      for (int i = 0; i < 18; i++) begin
        x2[18 * s + i] = z[i] + prev[s][i];
        if ((s % 2) == 1 && (i % 2) == 1) x2[18 * s + i] = -x2[18 * s + i];
        prev[s][i] = z[i + 18];
      end
    end
    // polyphase synthesis
    for (int t = 0; t < 18; t++) begin
      for (int i = 1023; i >= 64; i--) vhist[i] = vhist[i - 64];
      for (int i = 0; i < 64; i++) begin
        real v;
        v = 0.0;
        for (int k = 0; k < 32; k++)
          v += $cos((16 + i) * (2 * k + 1) * P / 64.0) * x2[18 * k + t];
        vhist[i] = v;
      end
      for (int j = 0; j < 32; j++) begin
        real s;
        s = 0.0;
        for (int m = 0; m < 8; m++) begin
          s += dwin[j + 64 * m] * vhist[128 * m + j];
          s += dwin[j + 64 * m + 32] * vhist[128 * m + 96 + j];
        end
        expq.push_back(s);
      end
    end
  endtask

  // ------------------------------------------------------------ stream
  logic [7:0] stream [$];
  logic hbits [$];
  task automatic hb(input int v, input int n);
    for (int i = n - 1; i >= 0; i--) hbits.push_back(((v >> i) & 1) != 0);
  endtask
  task automatic hflush();
    while (hbits.size()) begin
      logic [7:0] b;
      for (int i = 0; i < 8; i++) b[7 - i] = hbits.pop_front();
      stream.push_back(b);
    end
  endtask

  // ------------------------------------------------------------ monitors
  logic [15:0] popped [$];
  logic [15:0] got_l [$];
  logic prev_bclk, prev_ws;
  logic [15:0] sh;
  int nbits, prev_bt, prev_stage;
  always @(posedge clk) if (rst_n) begin
    if (bad_header) n_bad++;
    if (stage_code != 3'd0 && !(dut.fb_valid && !dut.fb_ready)) busy_cyc++;
    if (underflow) begin n_underflow++; popped.push_back(16'h0000); end
    if (dut.fifo_pop && dut.fifo_valid) popped.push_back(dut.fifo_data);
    if (dut.fb_valid && !dut.fb_ready) n_full++;
    if (pcm_valid) begin
      real e;
      int ei, d;
      e = expq.size() ? expq.pop_front() : 0.0;
      ei = int'($floor(e * 32768.0));
      if (ei > 32767) ei = 32767;
      if (ei < -32768) ei = -32768;
      d = int'($signed(pcm_data)) - ei;
      if (d < 0) d = -d;
      checks++;
      if (real'(d) > 64.0 + 0.01 * (ei < 0 ? -ei : ei)) begin
        failures++;
        if (failures < 12) $display("pcm %0d: %0d vs %0d", n_pcm, $signed(pcm_data), ei);
      end
      n_pcm++;
    end
    // I2S receiver (left words)
    prev_bclk <= i2s_bclk;
    if (i2s_bclk && !prev_bclk) begin
      prev_ws <= i2s_ws;
      if (i2s_ws != prev_ws) begin
        if (nbits == 15 && !prev_ws) got_l.push_back({sh[14:0], i2s_sd});
        nbits <= 0;
        sh <= '0;
      end else begin
        sh <= {sh[14:0], i2s_sd};
        nbits <= nbits + 1;
      end
    end
  end

  // ------------------------------------------------------------ test
  initial begin
    gr_info_t gis [NGR];
    int f_len [3] = '{156, 157, 156};
    bit f_st [3] = '{1'b0, 1'b1, 1'b0};
    gr_info_t gi1 [2];
    int f_pad [3] = '{0, 1, 0};
    int s_f, d_f, fbits_start;
    int mdb [3];
    int fdata_start [3];
    int main_len [3];
    int mstart;

    rst_n = 0; in_valid = 0; in_data = 0; tbl_we = 0; tbl_addr = 0; tbl_wdata = 0;
    d_we = 0; d_addr = 0; d_wdata = 0;
    prev_bclk = 0; prev_ws = 1; sh = 0; nbits = 0;
    for (int i = 0; i < 1024; i++) vhist[i] = 0.0;
    for (int s = 0; s < 32; s++) for (int i = 0; i < 18; i++) prev[s][i] = 0.0;

    // code trees
    for (int i = 0; i < 4096; i++) img[i] = 0;
    next_free = 64;
    for (int i = 0; i < 4; i++) add_code(1, c1_code[i], c1_len[i], ((i >> 1) << 4) | (i & 1));
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) add_code(24, x * 16 + y, 8, x * 16 + y);
    for (int q = 0; q < 16; q++) add_code(32, ca_code[q], ca_len[q], q);
    for (int q = 0; q < 16; q++) add_code(33, 15 - q, 4, q);

    // granule parameters: normal, short, start, stop, normal, normal (empty)
    for (int g = 0; g < NGR; g++) begin
      gis[g] = '0;
      gis[g].global_gain = 8'(170 + 2 * g);
      gis[g].count1table_select = 1'(g % 2);
    end
    gis[0].big_values = 60; gis[0].region0_count = 3; gis[0].region1_count = 2;
    gis[0].table_select[0] = 24; gis[0].table_select[1] = 1; gis[0].table_select[2] = 1;
    gis[1].window_switching = 1; gis[1].block_type = 2; gis[1].region0_count = 8;
    gis[1].big_values = 40; gis[1].table_select[0] = 24; gis[1].table_select[1] = 1;
    gis[2].window_switching = 1; gis[2].block_type = 1; gis[2].region0_count = 7;
    gis[2].big_values = 50; gis[2].table_select[0] = 1; gis[2].table_select[1] = 24;
    gis[3].window_switching = 1; gis[3].block_type = 3; gis[3].region0_count = 7;
    gis[3].big_values = 30; gis[3].table_select[0] = 24; gis[3].table_select[1] = 1;
    gis[4].big_values = 100; gis[4].region0_count = 5; gis[4].region1_count = 4;
    gis[4].table_select[0] = 1; gis[4].table_select[1] = 24; gis[4].table_select[2] = 1;
    // gis[5]: no data at all

    // encode main data, frame by frame; frame f's data starts at the first
    // byte boundary after frame f-1's data
    s_f = 0;
    for (int f = 0; f < 3; f++) begin
      main_len[f] = f_len[f] - 4 - (f_st[f] ? 32 : 17);
      while (mbits.size() % 8) mbits.push_back(1'b0);
      d_f = mbits.size() / 8;
      mdb[f] = s_f - d_f;
      if (mdb[f] > 0) n_reuse++;
      enc_granule(2 * f, gis[2 * f], 12 + 3 * f, 31);
      if (f_st[f]) begin
        // channel 1 of granule 0: random bits the decoder must skip
        gi1[0] = '0; gi1[0].part2_3_length = 12'(100 + $urandom % 100);
        for (int i = 0; i < int'(gi1[0].part2_3_length); i++) put($urandom % 2, 1);
        n_stereo++;
      end
      enc_granule(2 * f + 1, gis[2 * f + 1], (f == 2) ? 0 : 9, 31);
      if (f_st[f]) begin
        gi1[1] = '0; gi1[1].part2_3_length = 12'(50 + $urandom % 100);
        for (int i = 0; i < int'(gi1[1].part2_3_length); i++) put($urandom % 2, 1);
      end
      if (mdb[f] < 0 || mdb[f] > 511 || (mbits.size() + 7) / 8 > s_f + main_len[f])
        $display("encoder: frame %0d does not fit (%0d bits, %0d..%0d)", f, mbits.size(), s_f, s_f + main_len[f]);
      $display("frame %0d: mdb %0d p23 %0d %0d", f, mdb[f], gis[2*f].part2_3_length, gis[2*f+1].part2_3_length);
      s_f += main_len[f];
    end
    while (mbits.size() < 8 * s_f) mbits.push_back(1'b0);

    // stream: garbage, a Layer II header, three frames
    for (int i = 0; i < 6; i++) stream.push_back(8'h20 + 8'(i));
    stream.push_back(8'hFF); stream.push_back(8'hFC); stream.push_back(8'h90); stream.push_back(8'hC0);
    for (int i = 0; i < 5; i++) stream.push_back(8'h00);
    for (int f = 0; f < 3; f++) begin
      hb(12'hFFF, 12); hb(1, 1); hb(1, 2); hb(1, 1); hb(3, 4); hb(0, 2);
      hb(f_pad[f], 1); hb(0, 1); hb(f_st[f] ? 0 : 3, 2); hb(0, 2); hb(0, 1); hb(1, 1); hb(0, 2);
      hb(mdb[f], 9); hb(0, f_st[f] ? 3 : 5); hb(0, f_st[f] ? 8 : 4);
      for (int gc = 0; gc < (f_st[f] ? 4 : 2); gc++) begin
        gr_info_t gi;
        gi = f_st[f] ? ((gc % 2) ? gi1[gc / 2] : gis[2 * f + gc / 2]) : gis[2 * f + gc];
        hb(gi.part2_3_length, 12); hb(gi.big_values, 9); hb(gi.global_gain, 8);
        hb(gi.scalefac_compress, 4); hb(gi.window_switching, 1);
        if (gi.window_switching) begin
          hb(gi.block_type, 2); hb(gi.mixed_block, 1);
          hb(gi.table_select[0], 5); hb(gi.table_select[1], 5);
          for (int i = 0; i < 3; i++) hb(gi.subblock_gain[i], 3);
        end else begin
          for (int i = 0; i < 3; i++) hb(gi.table_select[i], 5);
          hb(gi.region0_count, 4); hb(gi.region1_count, 3);
        end
        hb(gi.preflag, 1); hb(gi.scalefac_scale, 1); hb(gi.count1table_select, 1);
      end
      hflush();
      for (int i = 0; i < main_len[f]; i++) begin
        logic [7:0] b;
        for (int k = 0; k < 8; k++) b[7 - k] = mbits.pop_front();
        stream.push_back(b);
      end
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    // load tables and window
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      tbl_we = 1; tbl_addr = 12'(i); tbl_wdata = img[i];
    end
    @(negedge clk); tbl_we = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      d_we = 1; d_addr = 9'(i);
      d_wdata = 20'(int'($urandom % 262144) - 131072);
      dwin[i] = real'(coef_t'(d_wdata)) / 262144.0;
    end
    @(negedge clk); d_we = 0;

    // model the six granules
    prev_bt = 0;
    for (int g = 0; g < NGR; g++) begin
      model_granule(g, gis[g]);
      if (gis[g].window_switching && gis[g].block_type == 2) n_short++;
      if (int'(gis[g].block_type) != prev_bt) n_switch++;
      prev_bt = gis[g].block_type;
    end

    // send the stream
    while (stream.size()) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_data = stream[0];
      @(posedge clk);
      if (in_valid && in_ready) void'(stream.pop_front());
    end
    @(negedge clk); in_valid = 0;

    while (n_pcm < NGR * 576) @(negedge clk);
    while (fifo_level != 0) @(negedge clk);
    repeat (3 * 544) @(negedge clk);

    // the I2S words equal the words taken from the FIFO (and zeros on underflow)
    checks++;
    if (got_l.size() + 3 < popped.size() || got_l.size() > popped.size()) begin
      failures++; $display("i2s words %0d, popped %0d", got_l.size(), popped.size());
    end
    for (int i = 0; i < got_l.size() && i < popped.size(); i++) begin
      checks++;
      if (got_l[i] !== popped[i]) begin
        failures++;
        if (failures < 20) $display("i2s word %0d: %h vs %h", i, got_l[i], popped[i]);
      end
    end

    // real-time budget: one granule lasts 576/44100 s = 313469 cycles at 24 MHz;
    // cycles in which the filterbank waits for room in the FIFO are not counted
    $display("decode cycles per granule (average) %0d", busy_cyc / NGR);
    checks++;
    if (busy_cyc / NGR > 313469) failures++;
    // mechanisms
    $display("stereo=%0d bad=%0d linbits=%0d quads=%0d short=%0d switch=%0d reuse=%0d full=%0d underflow=%0d granules=%0d pcm=%0d",
             n_stereo, n_bad, n_linbits, n_quads, n_short, n_switch, n_reuse, n_full, n_underflow, granules_done, n_pcm);
    checks += 10;
    if (n_bad != 1) failures++;
    if (n_linbits == 0) failures++;
    if (n_quads == 0) failures++;
    if (n_short == 0) failures++;
    if (n_switch < 2) failures++;
    if (n_reuse == 0) failures++;
    if (n_stereo == 0) failures++;
    if (n_full == 0) failures++;
    if (n_underflow == 0) failures++;
    if (granules_done != 16'(NGR) || expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
