// tb_main_mem: writes pseudo-random words to every address of the granule
// memory, reads them back in a different order and checks the one-cycle read
// latency and the data against a copy kept in the testbench.
module tb_main_mem;
  import mp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  mem_req_t req;
  sample_t  rdata;
  int checks = 0, failures = 0;
  sample_t model [576];

  main_mem dut (.clk, .req, .rdata);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    for (int i = 0; i < 576; i++) begin
      model[i] = sample_t'($urandom);
      @(negedge clk);
      req.addr = line_t'(i); req.we = 1'b1; req.wdata = model[i];
    end
    @(negedge clk); req.we = 1'b0;
    for (int n = 0; n < 576; n++) begin
      int a;
      a = (n * 7) % 576;
      req.addr = line_t'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 5) $display("mismatch addr %0d: %h vs %h", a, rdata, model[a]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
