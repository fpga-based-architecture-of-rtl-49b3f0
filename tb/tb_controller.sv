// tb_controller: presents three frames (single channel, stereo, single
// channel again) with random side information and answers every stage start
// with a done pulse after a random delay.  It checks that the stages run in
// the order Huffman, requantizer, reorder, alias reduction, IMDCT,
// filterbank for granule 0 and then granule 1, that each stage gets exactly
// one start pulse, that no start is given while another stage is busy, that
// the Huffman start address follows main_data_begin and part2_3_length, that
// frame_done comes once per frame and that granules_done counts granules.
module tb_controller;
  import mp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, frame_valid, frame_done, gr;
  side_info_t side_info;
  logic [10:0] main_start;
  stage_e stage;
  gr_info_t gi;
  logic [13:0] huff_ptr;
  logic start_huff, start_req, start_reord, start_alias, start_imdct, start_fbank;
  logic done_huff, done_req, done_reord, done_alias, done_imdct, done_fbank;
  logic [15:0] granules_done;
  int checks = 0, failures = 0;

  controller dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stage responder: done after a random delay
  logic [5:0] starts;
  int busy_cnt;
  int busy_stage;
  stage_e seen [$];
  logic [13:0] ptrs [$];
  always @(posedge clk) begin
    logic [5:0] dn;
    dn = '0;
    starts = {start_fbank, start_imdct, start_alias, start_reord, start_req, start_huff};
    if (!rst_n) begin
      busy_cnt <= 0; busy_stage <= -1;
    end else begin
      if (starts != 0) begin
        checks++;
        if ($countones(starts) != 1 || busy_stage >= 0) begin
          failures++; $display("bad start %b busy %0d", starts, busy_stage);
        end
        seen.push_back(stage);
        if (start_huff) ptrs.push_back(huff_ptr);
        busy_stage <= $clog2(int'(starts));
        busy_cnt <= int'($urandom % 20);
      end else if (busy_stage >= 0) begin
        if (busy_cnt == 0) begin
          busy_stage <= -1;
        end else busy_cnt <= busy_cnt - 1;
      end
    end
  end
  always_comb begin
    {done_fbank, done_imdct, done_alias, done_reord, done_req, done_huff} = '0;
    if (busy_stage >= 0 && busy_cnt == 0)
      case (busy_stage)
        0: done_huff = 1; 1: done_req = 1; 2: done_reord = 1;
        3: done_alias = 1; 4: done_imdct = 1; default: done_fbank = 1;
      endcase
  end

  initial begin
    stage_e order [6] = '{ST_HUFF, ST_REQ, ST_REORD, ST_ALIAS, ST_IMDCT, ST_FBANK};
    rst_n = 0; frame_valid = 0; side_info = '0; main_start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      logic [13:0] e0, e1;
      side_info = '0;
      side_info.stereo = (f == 1);
      side_info.main_data_begin = 9'($urandom);
      side_info.gr[0].part2_3_length = 12'($urandom);
      side_info.gr[1].part2_3_length = 12'($urandom);
      side_info.p23_other[0] = 12'($urandom);
      main_start = 11'($urandom);
      e0 = {main_start, 3'b000} - 14'({side_info.main_data_begin, 3'b000});
      e1 = e0 + 14'(side_info.gr[0].part2_3_length) + (side_info.stereo ? 14'(side_info.p23_other[0]) : 14'd0);
      seen.delete(); ptrs.delete();
      @(negedge clk); frame_valid = 1;
      while (!frame_done) @(negedge clk);
      frame_valid = 0;
      checks++;
      if (seen.size() != 12) begin failures++; $display("frame %0d: %0d starts", f, seen.size()); end
      for (int i = 0; i < seen.size() && i < 12; i++) begin
        checks++;
        if (seen[i] != order[i % 6]) begin failures++; $display("start %0d is %s", i, seen[i].name()); end
      end
      checks += 2;
      if (ptrs.size() != 2 || ptrs[0] != e0 || ptrs[1] != e1) begin
        failures++; $display("huffman pointers wrong");
      end
      @(negedge clk);
      checks++;
      if (granules_done != 16'(2 * (f + 1)) || frame_done || stage != ST_IDLE) begin
        failures++; $display("granules %0d", granules_done);
      end
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
