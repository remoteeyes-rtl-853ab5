// tag_encoder: blinking-pattern modulator of an active infrared tag.
//
// A tag identifies itself by blinking its infrared LED one bit per camera frame:
// a start code, then its identifier, most significant bit first, LED on for a 1
// and off for a 0. The published tag runs at 60 bit/s to match a 60 frame/s
// camera, uses a 5-bit start code with an 8-bit identifier (256 tags, 13 bits,
// about 217 ms per broadcast), makes one off period of the start code slightly
// shorter than the others so the receiver can tell whether it is in step with
// the tag, and pauses briefly after every broadcast so that a tag that drifted
// out of step with a camera is only lost for one broadcast. The published tag
// does this with a small microcontroller; here it is a counter and a shift
// register.
//
// This design's choices: the start code value (10101), which off slot is
// shortened (the last off slot of the start code, slot SHORT_SLOT counted from 0
// at the first start bit), by how much (an eighth of a bit) and the pause (a
// quarter of a bit, LED off). `id` is sampled at the start of each broadcast;
// `bcast_start` pulses in the first clock of each broadcast, and the LED output
// is registered and drives all of the tag's LEDs together. One bit lasts
// CLK_HZ / BIT_HZ clocks.
module tag_encoder #(
  parameter int unsigned CLK_HZ      = 1_000_000,
  parameter int unsigned BIT_HZ      = 60,
  parameter int unsigned ID_BITS     = 8,
  parameter int unsigned START_BITS  = 5,
  parameter logic [START_BITS-1:0] START_CODE = 5'b10101,
  parameter int unsigned SHORT_SLOT  = 3,
  parameter int unsigned BIT_TICKS   = CLK_HZ / BIT_HZ,
  parameter int unsigned SHORT_TICKS = BIT_TICKS / 8,
  parameter int unsigned GAP_TICKS   = BIT_TICKS / 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ID_BITS-1:0] id,
  output logic               led,
  output logic               bcast_start
);

  localparam int unsigned NSLOTS = START_BITS + ID_BITS;
  localparam int unsigned TW     = $clog2(BIT_TICKS + 1);
  localparam int unsigned SW     = $clog2(NSLOTS + 1);

  logic [NSLOTS-1:0] pattern;
  logic [SW-1:0]     slot;      // NSLOTS means the pause after the broadcast
  logic [TW-1:0]     tick;
  logic [TW-1:0]     slot_len;
  logic              slot_end;

  always_comb begin
    if (slot == SW'(NSLOTS))          slot_len = TW'(GAP_TICKS);
    else if (slot == SW'(SHORT_SLOT)) slot_len = TW'(BIT_TICKS - SHORT_TICKS);
    else                              slot_len = TW'(BIT_TICKS);
    slot_end = (tick == slot_len - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot        <= SW'(NSLOTS);
      tick        <= '0;
      pattern     <= '0;
      led         <= 1'b0;
      bcast_start <= 1'b0;
    end else begin
      bcast_start <= 1'b0;
      tick        <= slot_end ? '0 : tick + 1'b1;
      if (slot_end) begin
        if (slot == SW'(NSLOTS)) begin
          slot        <= '0;
          pattern     <= {START_CODE, id};
          led         <= START_CODE[START_BITS-1];
          bcast_start <= 1'b1;
        end else begin
          slot    <= slot + 1'b1;
          pattern <= {pattern[NSLOTS-2:0], 1'b0};
          led     <= (slot == SW'(NSLOTS - 1)) ? 1'b0 : pattern[NSLOTS-2];
        end
      end
    end
  end

  // The shortened slot must be an off slot of the start code.
  initial assert (SHORT_SLOT < START_BITS && !START_CODE[START_BITS-1-SHORT_SLOT]);

endmodule
