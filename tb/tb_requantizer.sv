// tb_requantizer: fills a memory model with quantized values (small ones,
// values near the 1024 table boundary and the 8191 maximum), runs the
// requantizer for a long block with preflag and scalefac_scale, a short block
// with subblock gains, and a mixed block, and compares every output line with
//   sign(is) * |is|^(4/3) * 2^(E/4)
// evaluated in floating point (for |is| >= 1024 with the document's
// 16*(|is|/8)^(4/3) rule), to 0.1 % plus two LSBs.  It also checks that one
// granule takes 3 cycles per line.
module tb_requantizer;
  import mp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, done;
  gr_info_t gi;
  sfl_t scalefac_l;
  sfs_t scalefac_s;
  mem_req_t mem;
  sample_t mem_rdata;
  mul_req_t mul;
  mul_prod_t mul_prod;
  int checks = 0, failures = 0;

  requantizer dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t memv [576];
  always @(posedge clk) begin
    if (mem.we) memv[mem.addr] <= mem.wdata;
    mem_rdata <= memv[mem.addr];
  end
  assign mul_prod = mul_prod_t'(mul.a) * mul_prod_t'(mul.b);

  int isv [576];
  int lb [23] = '{0,4,8,12,16,20,24,30,36,44,52,62,74,90,110,134,162,196,238,288,342,418,576};
  int sb [14] = '{0,4,8,12,16,22,30,40,52,66,84,106,136,192};
  int pt [22] = '{0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,2,2,3,3,3,2,0};

  function automatic real pw43(input int a);
    if (a >= 1024) return 16.0 * $pow(real'(a / 8), 4.0 / 3.0);
    return $pow(real'(a), 4.0 / 3.0);
  endfunction

  task automatic run(input string name);
    int t0, cyc;
    for (int i = 0; i < 576; i++) begin
      int r;
      r = $urandom % 100;
      if (r < 80)      isv[i] = int'($urandom % 41) - 20;
      else if (r < 90) isv[i] = int'($urandom % 400) + 900;
      else             isv[i] = int'($urandom % 8192);
      if ($urandom % 2) isv[i] = -isv[i];
      memv[i] = sample_t'(isv[i]);
    end
    isv[0] = 8191; memv[0] = 8191; isv[1] = -1024; memv[1] = -1024;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = 1;
    while (!done) begin @(negedge clk); t0++; end
    cyc = t0;
    checks++;
    if (cyc < 3 * 576 || cyc > 3 * 576 + 4) begin
      failures++; $display("%s: %0d cycles", name, cyc);
    end
    @(negedge clk);
    for (int i = 0; i < 576; i++) begin
      int e, sfb, w, a;
      real ex, got, tol;
      bit sh;
      sh = gi.window_switching && gi.block_type == 2 && !(gi.mixed_block && i < 36);
      e = int'(gi.global_gain) - 210;
      if (sh) begin
        sfb = 0;
        for (int b = 0; b < 13; b++) if (i >= 3 * sb[b]) sfb = b;
        w = (i - 3 * sb[sfb]) / (sb[sfb + 1] - sb[sfb]);
        e = e - 8 * int'(gi.subblock_gain[w]) - 2 * (1 + int'(gi.scalefac_scale)) * int'(scalefac_s[sfb][w]);
      end else begin
        sfb = 0;
        for (int b = 0; b < 22; b++) if (i >= lb[b]) sfb = b;
        e = e - 2 * (1 + int'(gi.scalefac_scale)) * (int'(scalefac_l[sfb]) + (gi.preflag ? pt[sfb] : 0));
      end
      a = isv[i] < 0 ? -isv[i] : isv[i];
      ex = pw43(a) * $pow(2.0, real'(e) / 4.0);
      if (isv[i] < 0) ex = -ex;
      // the 32-bit sample format saturates at +-2048
      if (ex > 2047.999999) ex = 2047.999999;
      if (ex < -2048.0) ex = -2048.0;
      got = real'(memv[i]) / 1048576.0;
      tol = (ex < 0 ? -ex : ex) * 1.0e-3 + 2.0 / 1048576.0;
      checks++;
      if (got - ex > tol || ex - got > tol) begin
        failures++;
        if (failures < 10) $display("%s line %0d is=%0d: %f vs %f", name, i, isv[i], got, ex);
      end
    end
  endtask

  initial begin
    rst_n = 0; start = 0; gi = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // long block
    for (int b = 0; b < 22; b++) scalefac_l[b] = 4'($urandom % 16);
    scalefac_l[21] = 0;
    for (int b = 0; b < 13; b++) for (int w = 0; w < 3; w++) scalefac_s[b][w] = 4'($urandom % 16);
    gi.global_gain = 8'd160;
    gi.preflag = 1'b1;
    gi.scalefac_scale = 1'b1;
    run("long");
    gi.global_gain = 8'd187;
    gi.preflag = 1'b0;
    gi.scalefac_scale = 1'b0;
    run("long2");
    // short block
    gi.window_switching = 1'b1; gi.block_type = 2'd2;
    gi.subblock_gain[0] = 3'd0; gi.subblock_gain[1] = 3'd2; gi.subblock_gain[2] = 3'd7;
    gi.global_gain = 8'd200;
    run("short");
    gi.mixed_block = 1'b1;
    gi.preflag = 1'b1;
    run("mixed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
