// tb_imdct: runs the IMDCT stage on five consecutive granules with block
// types normal, start, short, stop and mixed, each filled with random lines
// in (-0.5, 0.5), and compares the 576 time samples of every granule with a
// floating-point model: the 36-point IMDCT (or three 12-point ones for short
// blocks), the standard windows, overlap-add with the previous granule's
// saved half, and the negation of odd samples in odd subbands.  Tolerance
// 3e-4.  It also checks the cycle count of a long granule.
module tb_imdct;
  import mp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, done, busy;
  gr_info_t gi;
  mem_req_t mem;
  sample_t mem_rdata;
  mul_req_t mul;
  mul_prod_t mul_prod;
  int checks = 0, failures = 0;

  imdct dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
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

  localparam real P = 3.14159265358979323846;
  real prev [32][18];

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

  task automatic run(input string name, input int bt, input bit mixed);
    real xin [576];
    real outv [576];
    int cyc;
    for (int i = 0; i < 576; i++) begin
      memv[i] = sample_t'(int'($urandom % 1000000) - 500000);
      xin[i] = real'(memv[i]) / 1048576.0;
    end
    for (int s = 0; s < 32; s++) begin
      real z [36];
      int b;
      b = (mixed && s < 2) ? 0 : bt;
      for (int i = 0; i < 36; i++) z[i] = 0.0;
      if (b == 2) begin
        for (int w = 0; w < 3; w++)
          for (int i = 0; i < 12; i++) begin
            real y;
            y = 0.0;
            for (int k = 0; k < 6; k++)
              y += xin[18 * s + 3 * k + w] * $cos(P / 24.0 * (2 * i + 7) * (2 * k + 1));
            z[6 + 6 * w + i] += y * $sin(P / 12.0 * (i + 0.5));
          end
      end else begin
        for (int i = 0; i < 36; i++) begin
          real y;
          y = 0.0;
          for (int k = 0; k < 18; k++)
            y += xin[18 * s + k] * $cos(P / 72.0 * (2 * i + 19) * (2 * k + 1));
          z[i] = y * win(b, i);
        end
      end
      for (int i = 0; i < 18; i++) begin
        outv[18 * s + i] = z[i] + prev[s][i];
        if ((s % 2) == 1 && (i % 2) == 1) outv[18 * s + i] = -outv[18 * s + i];
        prev[s][i] = z[i + 18];
      end
    end
    gi = '0;
    gi.window_switching = (bt != 0) || mixed;
    gi.block_type = 2'(bt);
    gi.mixed_block = mixed;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (bt == 0) begin
      checks++;
      if (cyc > 32 * (19 + 324 + 36 + 19) + 10) begin
        failures++; $display("%s: %0d cycles", name, cyc);
      end
    end
    @(negedge clk);
    for (int i = 0; i < 576; i++) begin
      real got;
      got = real'(memv[i]) / 1048576.0;
      checks++;
      if (got - outv[i] > 3.0e-4 || outv[i] - got > 3.0e-4) begin
        failures++;
        if (failures < 10) $display("%s line %0d: %f vs %f", name, i, got, outv[i]);
      end
    end
  endtask

  initial begin
    rst_n = 0; start = 0; gi = '0;
    for (int s = 0; s < 32; s++) for (int i = 0; i < 18; i++) prev[s][i] = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (busy) @(negedge clk);     // overlap memory clear after reset
    run("normal", 0, 0);
    run("start", 1, 0);
    run("short", 2, 0);
    run("stop", 3, 0);
    run("mixed", 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
