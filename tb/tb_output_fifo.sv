// tb_output_fifo: fills the 1024-sample FIFO until it refuses data (checks
// that it holds exactly 1024), drains it with random pauses while new data
// keeps arriving, and checks the order of everything read.
module tb_output_fifo;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, wr_valid, wr_ready, rd_valid, rd_pop;
  logic [15:0] wr_data, rd_data;
  logic [10:0] count;
  int checks = 0, failures = 0;
  logic [15:0] q [$];
  int accepted = 0, full_seen = 0;

  output_fifo dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_valid = 0; wr_data = 0; rd_pop = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill
    for (int i = 0; i < 1100; i++) begin
      @(negedge clk);
      wr_valid = 1; wr_data = 16'($urandom);
    end
    @(negedge clk); wr_valid = 0;
    checks++;
    if (accepted != 1024 || count != 11'd1024 || wr_ready) begin
      failures++;
      $display("fill: accepted %0d count %0d", accepted, count);
    end
    checks++;
    if (full_seen == 0) failures++;
    // drain with random pop and write
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      rd_pop   = ($urandom % 3) != 0;
      wr_valid = (i < 2000) && ($urandom % 2);
      wr_data  = 16'($urandom);
    end
    @(negedge clk); wr_valid = 0; rd_pop = 1;
    repeat (1200) @(negedge clk);
    checks++;
    if (q.size() != 0 || rd_valid) begin failures++; $display("left %0d", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    if (wr_valid && !wr_ready) full_seen++;
    if (rd_pop && rd_valid) begin
      checks++;
      if (q.size() == 0 || rd_data !== q[0]) begin
        failures++;
        if (failures < 5) $display("read %h expected %h", rd_data, q.size() ? q[0] : 16'hxxxx);
      end
      if (q.size()) void'(q.pop_front());
    end
    if (wr_valid && wr_ready) begin
      q.push_back(wr_data);
      accepted++;
    end
  end
endmodule
