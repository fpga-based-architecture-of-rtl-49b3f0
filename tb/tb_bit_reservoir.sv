// tb_bit_reservoir: writes a stream of random bytes, wrapping around the
// store, then reads bits from several start positions (including one that
// crosses the wrap point) and compares them with the bytes written.
module tb_bit_reservoir;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic wr_en, set_ptr, adv, bit_out;
  logic [7:0] wr_data;
  logic [10:0] wr_ptr;
  logic [13:0] ptr_in, bit_ptr;
  logic [7:0] model [2048];
  int checks = 0, failures = 0;

  bit_reservoir dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input int start_bit, input int n);
    @(negedge clk);
    set_ptr = 1; ptr_in = 14'(start_bit);
    @(negedge clk);
    set_ptr = 0;
    for (int i = 0; i < n; i++) begin
      int b;
      logic e;
      b = (start_bit + i) % (2048 * 8);
      e = model[b / 8][7 - (b % 8)];
      checks++;
      if (bit_out !== e) begin
        failures++;
        if (failures < 5) $display("bit %0d: %b vs %b", b, bit_out, e);
      end
      adv = 1;
      @(negedge clk);
      adv = 0;
    end
  endtask

  initial begin
    rst_n = 0; wr_en = 0; set_ptr = 0; adv = 0; wr_data = 0; ptr_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 2048 + 300 bytes: the last 300 overwrite the start
    for (int i = 0; i < 2348; i++) begin
      @(negedge clk);
      wr_en = 1; wr_data = 8'($urandom);
      model[i % 2048] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    checks++;
    if (wr_ptr !== 11'(2348 % 2048)) failures++;
    read_check(0, 200);
    read_check(5, 77);
    read_check(2040 * 8 + 3, 150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
