// spot_fifo: first-in first-out buffer for spot records.
//
// The detector produces records while the frame streams in; the processor
// collects them later through the register interface, so they wait here. It is a
// single-clock FIFO of DEPTH words held in an array (block RAM on an FPGA) with
// read and write pointers one bit wider than the address. `dout` always shows
// the oldest word (first-word fall-through): `pop` removes it, and the next
// word appears in the following cycle. A push into a full buffer is dropped and
// sets the sticky `overflow` flag until `clr_overflow`. Push and pop may happen
// in the same cycle. The buffer itself is this design's choice: the published
// unit only says that the records of a frame are handed to the processor; the
// depth (1024 records, 32 kbit of the FPGA's roughly 200 kbit of RAM) is an
// assumption.
module spot_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   level,
  output logic                     overflow,
  input  logic                     clr_overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign level   = wr_ptr - rd_ptr;
  assign empty   = (wr_ptr == rd_ptr);
  assign full    = (level == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
      if (push && full)      overflow <= 1'b1;
      else if (clr_overflow) overflow <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));

endmodule
