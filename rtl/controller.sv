// controller: sequences the subcores of the decoding core.  When the
// synchronizer presents a complete frame, the controller runs, for granule 0
// and then granule 1, Huffman decoding, requantization, reordering,
// alias reduction, IMDCT and the synthesis filterbank, one after the other;
// each stage gets a one-cycle start pulse and owns the main memory and the
// shared multiplier (the stage output) until it answers done.  After the
// second granule it pulses frame_done so that the synchronizer looks for the
// next frame.
//
// It also computes where each granule's Huffman data begins in the bit
// reservoir: main_data_begin bytes before the frame's own main data for
// granule 0, and part2_3_length bits later (plus channel 1's part2_3_length
// in a stereo stream, whose channel 1 is skipped) for granule 1.  The
// document names the controller but does not describe it; this ordering is
// the natural one for its subcores.  The reorder stage is entered for every
// granule; it finishes at once when the granule has no short block.
module controller
  import mp3_pkg::*;
#(
  parameter int RES_AW = 11,
  localparam int PW    = RES_AW + 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_valid,
  input  side_info_t        side_info,
  input  logic [RES_AW-1:0] main_start,
  output logic              frame_done,
  output stage_e            stage,
  output logic              gr,
  output gr_info_t          gi,
  output logic [PW-1:0]     huff_ptr,
  output logic              start_huff,
  output logic              start_req,
  output logic              start_reord,
  output logic              start_alias,
  output logic              start_imdct,
  output logic              start_fbank,
  input  logic              done_huff,
  input  logic              done_req,
  input  logic              done_reord,
  input  logic              done_alias,
  input  logic              done_imdct,
  input  logic              done_fbank,
  output logic [15:0]       granules_done
);
  logic pending;      // start pulse still to be given for the current stage
  logic stage_done;

  assign gi = side_info.gr[gr];

  always_comb begin
    logic [PW-1:0] base;
    base = {main_start, 3'b000} - PW'({side_info.main_data_begin, 3'b000});
    huff_ptr = gr ? base + PW'(side_info.gr[0].part2_3_length)
                         + (side_info.stereo ? PW'(side_info.p23_other[0]) : '0)
                  : base;
  end

  always_comb begin
    start_huff  = pending && stage == ST_HUFF;
    start_req   = pending && stage == ST_REQ;
    start_reord = pending && stage == ST_REORD;
    start_alias = pending && stage == ST_ALIAS;
    start_imdct = pending && stage == ST_IMDCT;
    start_fbank = pending && stage == ST_FBANK;
    unique case (stage)
      ST_HUFF:  stage_done = done_huff;
      ST_REQ:   stage_done = done_req;
      ST_REORD: stage_done = done_reord;
      ST_ALIAS: stage_done = done_alias;
      ST_IMDCT: stage_done = done_imdct;
      ST_FBANK: stage_done = done_fbank;
      default:  stage_done = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= ST_IDLE;
      gr <= 1'b0;
      pending <= 1'b0;
      frame_done <= 1'b0;
      granules_done <= '0;
    end else begin
      frame_done <= 1'b0;
      pending    <= 1'b0;
      unique case (stage)
        ST_IDLE: if (frame_valid && !frame_done) begin
          gr      <= 1'b0;
          stage   <= ST_HUFF;
          pending <= 1'b1;
        end
        default: if (stage_done && !pending) begin
          pending <= 1'b1;
          unique case (stage)
            ST_HUFF:  stage <= ST_REQ;
            ST_REQ:   stage <= ST_REORD;
            ST_REORD: stage <= ST_ALIAS;
            ST_ALIAS: stage <= ST_IMDCT;
            ST_IMDCT: stage <= ST_FBANK;
            default: begin
              granules_done <= granules_done + 1'b1;
              if (!gr) begin
                gr    <= 1'b1;
                stage <= ST_HUFF;
              end else begin
                stage      <= ST_IDLE;
                pending    <= 1'b0;
                frame_done <= 1'b1;
              end
            end
          endcase
        end
      endcase
    end
  end
endmodule
