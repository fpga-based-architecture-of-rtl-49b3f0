// tb_reorder: loads a granule of distinct values, runs the reorder stage for
// a pure short block, a mixed block and a long block, and checks each output
// position against the band/window/frequency order computed here from the
// 44.1 kHz short band table: inside band sfb the line f of window w moves
// from 3*start + w*width + f to 3*start + 3*f + w.  Long blocks and the long
// part of a mixed block must stay in place.
module tb_reorder;
  import mp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, done;
  gr_info_t gi;
  mem_req_t mem;
  sample_t mem_rdata;
  int checks = 0, failures = 0;

  reorder dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t memv [576];
  always @(posedge clk) begin
    if (mem.we) memv[mem.addr] <= mem.wdata;
    mem_rdata <= memv[mem.addr];
  end

  int sb [14] = '{0,4,8,12,16,22,30,40,52,66,84,106,136,192};

  task automatic run(input string name, input bit ws, input bit mixed);
    sample_t orig [576];
    int expv [576];
    for (int i = 0; i < 576; i++) begin
      orig[i] = sample_t'($urandom);
      memv[i] = orig[i];
      expv[i] = int'(orig[i]);
    end
    gi = '0;
    gi.window_switching = ws; gi.block_type = ws ? 2'd2 : 2'd0; gi.mixed_block = mixed;
    if (ws)
      for (int b = mixed ? 3 : 0; b < 13; b++) begin
        int st, wd;
        st = sb[b]; wd = sb[b + 1] - sb[b];
        for (int w = 0; w < 3; w++)
          for (int f = 0; f < wd; f++) expv[3 * st + 3 * f + w] = int'(orig[3 * st + w * wd + f]);
      end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < 576; i++) begin
      checks++;
      if (int'(memv[i]) != expv[i]) begin
        failures++;
        if (failures < 10) $display("%s line %0d: %h vs %h", name, i, memv[i], expv[i]);
      end
    end
  endtask

  initial begin
    rst_n = 0; start = 0; gi = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run("short", 1, 0);
    run("mixed", 1, 1);
    run("long", 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
