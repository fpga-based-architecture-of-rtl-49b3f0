// i2s_interface: sends the decoded samples to an audio DAC over a three-wire
// I2S bus (bit clock bclk, word select ws, serial data sd).  A clock divider
// splits DIV system clocks (544 at 24 MHz gives the document's 44.118 kHz
// word clock) into 2*BITS bit slots of DIV/(2*BITS) clocks each (17 for the
// defaults); bclk is low in the first half of a slot and high in the second,
// so sd and ws change on its falling edge and are sampled on its rising edge.
// As I2S requires, ws changes one bit before the MSB of each word: ws is 0
// (left) in slots 0..15 and 1 (right) in slots 16..31, and slot s carries bit
// s-1 of the 32-bit frame {left, right}, MSB first; slot 0 carries the LSB
// of the previous right word.  The core decodes one channel, so the same
// sample is sent on both channels.  One sample is popped from the FIFO at the
// end of slot 0 of each frame; if the FIFO is empty a zero sample is sent and
// underflow pulses.  Bit slot arithmetic and mono duplication are this
// design's choices; the document fixes the divider and the protocol.
module i2s_interface #(
  parameter int DIV  = 544,
  parameter int BITS = 16,
  localparam int SLOT = DIV / (2 * BITS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            smp_valid,
  input  logic [BITS-1:0] smp_data,
  output logic            smp_pop,
  output logic            bclk,
  output logic            ws,
  output logic            sd,
  output logic            word_tick,   // one pulse per word-clock period
  output logic            underflow
);
  logic [$clog2(SLOT)-1:0]   c;
  logic [$clog2(2*BITS)-1:0] s;
  logic [2*BITS-1:0]         word;
  logic                      load;
  localparam logic [$clog2(SLOT)-1:0]   C_LAST = $clog2(SLOT)'(SLOT - 1);
  localparam logic [$clog2(SLOT)-1:0]   C_HALF = $clog2(SLOT)'(SLOT / 2);
  localparam logic [$clog2(2*BITS)-1:0] S_LAST = $clog2(2*BITS)'(2*BITS - 1);
  localparam logic [$clog2(2*BITS)-1:0] S_HALF = $clog2(2*BITS)'(BITS);

  assign load      = (s == '0) && (c == C_LAST);
  assign smp_pop   = load && smp_valid;
  assign bclk      = (c >= C_HALF);
  assign ws        = (s >= S_HALF);
  assign sd        = (s == '0) ? word[0] : word[2*BITS - int'(s)];
  assign word_tick = load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; s <= '0; word <= '0; underflow <= 1'b0;
    end else begin
      underflow <= 1'b0;
      if (c == C_LAST) begin
        c <= '0;
        s <= (s == S_LAST) ? '0 : s + 1'b1;
      end else c <= c + 1'b1;
      if (load) begin
        if (smp_valid) word <= {smp_data, smp_data};
        else begin
          word      <= '0;
          underflow <= 1'b1;
        end
      end
    end
  end
endmodule
