// tb_antialias: fills a granule with random values in (-1, 1), runs the
// alias reduction for a long block, a mixed block and a pure short block,
// and compares the result with the butterflies evaluated in floating point
// from the eight c_i of the standard (cs = 1/sqrt(1+c^2), ca = c/sqrt(1+c^2)).
// Tolerance 2e-5.  The shared multiplier is modelled here.
module tb_antialias;
  import mp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, done;
  gr_info_t gi;
  mem_req_t mem;
  sample_t mem_rdata;
  mul_req_t mul;
  mul_prod_t mul_prod;
  int checks = 0, failures = 0;

  antialias dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
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

  real c [8] = '{-0.6, -0.535, -0.33, -0.185, -0.095, -0.041, -0.0142, -0.0037};

  task automatic run(input string name, input bit ws, input bit mixed);
    real x [576];
    int last;
    for (int i = 0; i < 576; i++) begin
      memv[i] = sample_t'(int'($urandom % 2000000) - 1000000);
      x[i] = real'(memv[i]) / 1048576.0;
    end
    gi = '0;
    gi.window_switching = ws; gi.block_type = ws ? 2'd2 : 2'd0; gi.mixed_block = mixed;
    last = (ws && !mixed) ? 0 : (mixed ? 1 : 31);
    for (int s = 1; s <= last; s++)
      for (int i = 0; i < 8; i++) begin
        real lo, hi, cs, ca;
        cs = 1.0 / $sqrt(1.0 + c[i] * c[i]);
        ca = c[i] / $sqrt(1.0 + c[i] * c[i]);
        lo = x[18 * s - 1 - i]; hi = x[18 * s + i];
        x[18 * s - 1 - i] = lo * cs - hi * ca;
        x[18 * s + i]     = hi * cs + lo * ca;
      end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < 576; i++) begin
      real got;
      got = real'(memv[i]) / 1048576.0;
      checks++;
      if (got - x[i] > 2.0e-5 || x[i] - got > 2.0e-5) begin
        failures++;
        if (failures < 10) $display("%s line %0d: %f vs %f", name, i, got, x[i]);
      end
    end
  endtask

  initial begin
    rst_n = 0; start = 0; gi = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run("long", 0, 0);
    run("mixed", 1, 1);
    run("short", 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
