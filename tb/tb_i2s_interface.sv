// tb_i2s_interface: feeds known samples to the I2S transmitter, samples sd
// and ws on each rising bclk edge like a DAC would, rebuilds the left and
// right words (MSB first, one bit after the ws change) and compares them with
// the samples sent.  It also checks that a word-clock period is 544 system
// clocks and that an empty FIFO produces zero samples and an underflow flag.
module tb_i2s_interface;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, smp_valid, smp_pop, bclk, ws, sd, word_tick, underflow;
  logic [15:0] smp_data;
  int checks = 0, failures = 0;
  logic [15:0] sent [$];
  int n_avail;

  i2s_interface dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample source: n_avail samples, then empty
  logic [15:0] src [0:7];
  int rd_i;
  assign smp_valid = (rd_i < n_avail);
  assign smp_data  = src[rd_i % 8];
  always @(posedge clk) if (rst_n && smp_pop) begin
    sent.push_back(smp_data);
    rd_i <= rd_i + 1;
  end

  // receiver
  logic prev_bclk, prev_ws;
  logic [15:0] sh;
  int nbits;
  logic [15:0] got_l [$];
  logic [15:0] got_r [$];
  int last_tick, periods_ok, uf_count;
  always @(posedge clk) if (rst_n) begin
    prev_bclk <= bclk;
    if (bclk && !prev_bclk) begin
      prev_ws <= ws;
      if (ws != prev_ws) begin
        // word boundary: the bit in this slot is the LSB of the previous word
        if (nbits == 15) begin
          if (prev_ws) got_r.push_back({sh[14:0], sd});
          else         got_l.push_back({sh[14:0], sd});
        end
        nbits <= 0;
        sh <= '0;
      end else begin
        sh <= {sh[14:0], sd};
        nbits <= nbits + 1;
      end
    end
    if (word_tick) begin
      if (last_tick != 0) begin
        checks++;
        if ($time / 10 - last_tick != 544) failures++;
      end
      last_tick <= int'($time / 10);
    end
    if (underflow) uf_count++;
  end

  initial begin
    rst_n = 0; n_avail = 0; rd_i = 0; prev_bclk = 0; prev_ws = 1; sh = 0; nbits = 0;
    last_tick = 0; uf_count = 0;
    for (int i = 0; i < 8; i++) src[i] = 16'($urandom);
    src[0] = 16'h8001; src[1] = 16'h7FFE;
    repeat (3) @(negedge clk);
    rst_n = 1;
    n_avail = 6;
    repeat (544 * 10) @(posedge clk);
    // 6 samples sent then zeros; each appears on left and right
    checks++;
    if (sent.size() != 6) begin failures++; $display("sent %0d", sent.size()); end
    for (int i = 0; i < 6; i++) begin
      checks += 2;
      if (i < got_l.size() && got_l[i] !== sent[i]) begin
        failures++; $display("L %0d: %h vs %h", i, got_l[i], sent[i]);
      end
      if (i < got_r.size() && got_r[i] !== sent[i]) begin
        failures++; $display("R %0d: %h vs %h", i, got_r[i], sent[i]);
      end
    end
    checks++;
    if (got_l.size() < 8 || got_r.size() < 8) failures++;
    else begin
      checks++;
      if (got_l[7] !== 16'h0 || got_r[7] !== 16'h0) failures++;
    end
    checks++;
    if (uf_count < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
