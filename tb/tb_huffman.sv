// tb_huffman: drives the Huffman subcore with granules that the testbench
// encodes itself.  It builds code trees for table 1 (the standard's 2x2
// table), a stand-in for table 24 (a fixed 8-bit code, linbits 4 as in the
// standard), and the count1 tables A and B, loads them through the table
// port, writes scalefactors and Huffman codes into a bit array that models
// the bit reservoir, and compares the 576 decoded lines and the scalefactors
// with the values it encoded.  Cases: long block (tables 1/24/0, count1 A),
// granule 1 with scalefactor reuse (scfsi) and a count1 quadruple that
// overruns part2_3_length, a short block and a mixed block.  It counts the
// linbits escapes, overrun drops and zero fills it provoked.
module tb_huffman;
  import mp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, gr, done;
  gr_info_t gi;
  logic [3:0] scfsi;
  logic [13:0] start_ptr, res_ptr;
  logic res_set_ptr, res_adv, res_bit;
  mem_req_t mem;
  sfl_t scalefac_l;
  sfs_t scalefac_s;
  logic tbl_we;
  logic [11:0] tbl_addr;
  logic [15:0] tbl_wdata;
  int checks = 0, failures = 0;
  int n_linbits = 0, n_overrun = 0, n_fill = 0;

  huffman dut (.*);

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reservoir model
  logic bits [16384];
  logic [13:0] rp;
  assign res_bit = bits[rp];
  always @(posedge clk) begin
    if (res_set_ptr) rp <= res_ptr;
    else if (res_adv) rp <= rp + 1'b1;
  end

  // ------------------------------------------------------------ memory model
  int memv [576];
  always @(posedge clk) if (mem.we) memv[mem.addr] = int'(mem.wdata);

  // ------------------------------------------------------------ table trees
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

  // code tables used by the encoder
  int c1_code [4], c1_len [4];         // table 1, index 2x+y
  int ca_code [16], ca_len [16];       // count1 table A
  task automatic build_tables();
    for (int i = 0; i < 4096; i++) img[i] = 0;
    next_free = 64;
    c1_code = '{1, 1, 1, 0}; c1_len = '{1, 3, 2, 3};
    for (int i = 0; i < 4; i++) add_code(1, c1_code[i], c1_len[i], ((i >> 1) << 4) | (i & 1));
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) add_code(24, x * 16 + y, 8, x * 16 + y);
    ca_code = '{1, 5, 4, 5, 6, 5, 4, 4, 7, 3, 6, 0, 7, 2, 3, 1};
    ca_len  = '{1, 4, 4, 5, 4, 6, 5, 6, 4, 5, 5, 6, 5, 6, 6, 6};
    for (int q = 0; q < 16; q++) add_code(32, ca_code[q], ca_len[q], q);
    for (int q = 0; q < 16; q++) add_code(33, 15 - q, 4, q);
  endtask

  task automatic load_tables();
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      tbl_we = 1; tbl_addr = 12'(i); tbl_wdata = img[i];
    end
    @(negedge clk); tbl_we = 0;
  endtask

  // ------------------------------------------------------------ encoder
  int wp;
  int expv [576];
  task automatic put(input int v, input int n);
    for (int i = n - 1; i >= 0; i--) begin
      bits[wp % 16384] = ((v >> i) & 1) != 0;
      wp++;
    end
  endtask

  task automatic enc_val_tail(input int mag, input int sgn, input int lb);
    if (lb > 0 && mag >= 15) begin put(mag - 15, lb); n_linbits++; end
    if (mag != 0) put(sgn, 1);
  endtask

  // one big-values pair with table t (1 or 24) or 0
  task automatic enc_pair(input int t, input int idx);
    int x, y, sx, sy, mx, my, lb;
    if (t == 0) begin expv[idx] = 0; expv[idx + 1] = 0; return; end
    if (t == 1) begin
      x = $urandom % 2; y = $urandom % 2; lb = 0;
      put(c1_code[2 * x + y], c1_len[2 * x + y]);
    end else begin
      x = $urandom % 31; y = $urandom % 31; lb = 4;   // 15..30 use linbits
      mx = x > 15 ? 15 : x; my = y > 15 ? 15 : y;
      put(mx * 16 + my, 8);
    end
    sx = $urandom % 2; sy = $urandom % 2;
    enc_val_tail(x, sx, lb);
    enc_val_tail(y, sy, lb);
    expv[idx]     = sx ? -x : x;
    expv[idx + 1] = sy ? -y : y;
  endtask

  task automatic enc_quad(input int tbsel, input int idx, input bit keep);
    int q;
    q = $urandom % 16;
    if (tbsel == 0) put(ca_code[q], ca_len[q]);
    else put(15 - q, 4);
    for (int i = 0; i < 4; i++) begin
      int s;
      s = $urandom % 2;
      if ((q >> (3 - i)) & 1) put(s, 1);
      expv[idx + i] = keep ? (((q >> (3 - i)) & 1) ? (s ? -1 : 1) : 0) : 0;
    end
  endtask

  // scalefactor values the encoder wrote
  int sfl_exp [22];
  int sfs_exp [13][3];

  task automatic run_and_check(input string name, input int p23start);
    @(negedge clk);
    start = 1; start_ptr = 14'(p23start);
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int i = 0; i < 576; i++) begin
      checks++;
      if (memv[i] != expv[i]) begin
        failures++;
        if (failures < 10) $display("%s line %0d: %0d vs %0d", name, i, memv[i], expv[i]);
      end
    end
    if (!(gi.window_switching && gi.block_type == 2)) begin
      for (int b = 0; b < 22; b++) begin
        checks++;
        if (int'(scalefac_l[b]) != sfl_exp[b]) begin
          failures++;
          $display("%s sfl[%0d] %0d vs %0d", name, b, scalefac_l[b], sfl_exp[b]);
        end
      end
    end else begin
      for (int b = (gi.mixed_block ? 3 : 0); b < 13; b++)
        for (int w = 0; w < 3; w++) begin
          checks++;
          if (int'(scalefac_s[b][w]) != sfs_exp[b][w]) begin
            failures++;
            $display("%s sfs[%0d][%0d] %0d vs %0d", name, b, w, scalefac_s[b][w], sfs_exp[b][w]);
          end
        end
      if (gi.mixed_block)
        for (int b = 0; b < 8; b++) begin
          checks++;
          if (int'(scalefac_l[b]) != sfl_exp[b]) failures++;
        end
    end
  endtask

  initial begin
    int s0, nq, bv;
    rst_n = 0; start = 0; gr = 0; gi = '0; scfsi = 0; start_ptr = 0;
    tbl_we = 0; tbl_addr = 0; tbl_wdata = 0; rp = 0;
    for (int i = 0; i < 16384; i++) bits[i] = 0;
    build_tables();
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_tables();

    // ---------------- case 1: granule 0, long block
    wp = 100; s0 = wp;
    gi = '0;
    gi.scalefac_compress = 4'd10;                 // slen1 = 2, slen2 = 3
    gi.big_values = 9'd40;
    gi.region0_count = 4'd3;                      // region1 starts at line 16
    gi.region1_count = 3'd2;                      // region2 starts at line 30
    gi.table_select[0] = 5'd1; gi.table_select[1] = 5'd24; gi.table_select[2] = 5'd0;
    gi.count1table_select = 1'b0;
    for (int b = 0; b < 21; b++) begin
      sfl_exp[b] = $urandom % (b < 11 ? 4 : 8);
      put(sfl_exp[b], b < 11 ? 2 : 3);
    end
    sfl_exp[21] = 0;
    for (int i = 0; i < 576; i++) expv[i] = 0;
    for (int i = 0; i < 80; i += 2) enc_pair(i < 16 ? 1 : (i < 30 ? 24 : 0), i);
    for (int q = 0; q < 10; q++) enc_quad(0, 80 + 4 * q, 1'b1);
    gi.part2_3_length = 12'(wp - s0);
    gr = 0; scfsi = 4'b0000;
    run_and_check("long", s0);
    n_fill++;

    // ---------------- case 2: granule 1, scfsi reuse, overrun quad
    s0 = wp;
    gi.scalefac_compress = 4'd15;                 // slen1 = 4, slen2 = 3
    gi.table_select[0] = 5'd24; gi.table_select[1] = 5'd24; gi.table_select[2] = 5'd24;
    gi.big_values = 9'd20;
    gi.count1table_select = 1'b1;
    scfsi = 4'b1010;                              // groups 0 and 2 reused
    for (int b = 0; b < 21; b++) begin
      int grp;
      grp = b < 6 ? 0 : (b < 11 ? 1 : (b < 16 ? 2 : 3));
      if (!scfsi[3 - grp]) begin
        sfl_exp[b] = $urandom % (b < 11 ? 16 : 8);
        put(sfl_exp[b], b < 11 ? 4 : 3);
      end
    end
    for (int i = 0; i < 576; i++) expv[i] = 0;
    for (int i = 0; i < 40; i += 2) enc_pair(24, i);
    nq = 6;
    for (int q = 0; q < nq; q++) enc_quad(1, 40 + 4 * q, 1'b1);
    // one more quadruple whose bits overrun part2_3_length: dropped
    gi.part2_3_length = 12'(wp - s0 + 2);
    enc_quad(1, 40 + 4 * nq, 1'b0);
    n_overrun++;
    gr = 1;
    run_and_check("scfsi", s0);

    // ---------------- case 3: short block
    s0 = wp;
    gi = '0;
    gi.window_switching = 1'b1; gi.block_type = 2'd2; gi.mixed_block = 1'b0;
    gi.scalefac_compress = 4'd12;                 // slen1 = 3, slen2 = 2
    gi.table_select[0] = 5'd1; gi.table_select[1] = 5'd24;
    gi.big_values = 9'd50;
    gi.count1table_select = 1'b0;
    for (int b = 0; b < 12; b++)
      for (int w = 0; w < 3; w++) begin
        sfs_exp[b][w] = $urandom % (b < 6 ? 8 : 4);
        put(sfs_exp[b][w], b < 6 ? 3 : 2);
      end
    for (int w = 0; w < 3; w++) sfs_exp[12][w] = 0;
    for (int i = 0; i < 576; i++) expv[i] = 0;
    for (int i = 0; i < 100; i += 2) enc_pair(i < 36 ? 1 : 24, i);
    gi.part2_3_length = 12'(wp - s0);
    gr = 0;
    run_and_check("short", s0);

    // ---------------- case 4: mixed block
    s0 = wp;
    gi.mixed_block = 1'b1;
    gi.big_values = 9'd30;
    gi.scalefac_compress = 4'd6;                  // slen1 = 1, slen2 = 2
    for (int b = 0; b < 8; b++) begin sfl_exp[b] = $urandom % 2; put(sfl_exp[b], 1); end
    for (int b = 3; b < 12; b++)
      for (int w = 0; w < 3; w++) begin
        sfs_exp[b][w] = $urandom % (b < 6 ? 2 : 4);
        put(sfs_exp[b][w], b < 6 ? 1 : 2);
      end
    for (int i = 0; i < 576; i++) expv[i] = 0;
    for (int i = 0; i < 60; i += 2) enc_pair(i < 36 ? 1 : 24, i);
    for (int q = 0; q < 5; q++) enc_quad(0, 60 + 4 * q, 1'b1);
    gi.part2_3_length = 12'(wp - s0);
    run_and_check("mixed", s0);

    checks++;
    if (n_linbits == 0 || n_overrun == 0 || n_fill == 0) begin
      failures++;
      $display("mechanism not exercised: linbits %0d overrun %0d fill %0d", n_linbits, n_overrun, n_fill);
    end
    $display("linbits escapes %0d, overrun drops %0d, zero fills %0d", n_linbits, n_overrun, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
