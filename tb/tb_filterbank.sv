// tb_filterbank: loads a random synthesis window D (the same quantized
// values are used by the model), feeds two granules of random subband
// samples through a memory model, and compares every PCM sample with a
// floating-point polyphase synthesis: V by the direct 64x32 cosine matrix
// (independent of the DCT the hardware uses), a 16-vector V history, the
// U/W/sum rule of the standard and 16-bit saturation.  Tolerance 4 LSB.  The
// PCM consumer stalls at random, and the test counts those stalls.
module tb_filterbank;
  import mp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, done, busy;
  mem_req_t mem;
  sample_t mem_rdata;
  logic pcm_valid, pcm_ready;
  logic signed [15:0] pcm_data;
  logic d_we;
  logic [8:0] d_addr;
  coef_t d_wdata;
  int checks = 0, failures = 0, stalls = 0;

  filterbank dut (.*);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t memv [576];
  always @(posedge clk) mem_rdata <= memv[mem.addr];

  localparam real P = 3.14159265358979323846;
  real dwin [512];
  real vhist [1024];
  real expq [$];

  // PCM consumer
  always @(posedge clk) if (rst_n) begin
    if (pcm_valid && !pcm_ready) stalls++;
    if (pcm_valid && pcm_ready) begin
      real e;
      int ei;
      checks++;
      e = expq.size() ? expq.pop_front() : 0.0;
      ei = int'($floor(e * 32768.0));
      if (ei > 32767) ei = 32767;
      if (ei < -32768) ei = -32768;
      if (int'(pcm_data) - ei > 4 || ei - int'(pcm_data) > 4) begin
        failures++;
        if (failures < 10) $display("pcm %0d vs %0d", pcm_data, ei);
      end
    end
    pcm_ready <= ($urandom % 4) != 0;
  end

  task automatic granule();
    for (int i = 0; i < 576; i++) memv[i] = sample_t'(int'($urandom % 40000) - 20000);
    for (int t = 0; t < 18; t++) begin
      for (int i = 1023; i >= 64; i--) vhist[i] = vhist[i - 64];
      for (int i = 0; i < 64; i++) begin
        real v;
        v = 0.0;
        for (int k = 0; k < 32; k++)
          v += $cos((16 + i) * (2 * k + 1) * P / 64.0) * real'(memv[18 * k + t]) / 1048576.0;
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
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; start = 0; d_we = 0; d_addr = 0; d_wdata = 0;
    for (int i = 0; i < 1024; i++) vhist[i] = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      d_we = 1; d_addr = 9'(i);
      d_wdata = coef_t'(int'($urandom % 262144) - 131072);
      dwin[i] = real'(d_wdata) / 262144.0;
    end
    @(negedge clk); d_we = 0;
    while (busy) @(negedge clk);
    granule();
    granule();
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0 || stalls == 0) begin
      failures++; $display("left %0d stalls %0d", expq.size(), stalls);
    end
    $display("stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
