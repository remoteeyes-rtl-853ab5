// i2c_master: I2C write master for the camera's configuration registers.
//
// The camera chip is configured over an I2C bus. This block performs one
// register write per `start` pulse: START, the 7-bit device address with the
// write bit, the register address, the data byte, STOP, checking the slave's
// acknowledge after each byte. A missing acknowledge sets `nack` (kept until
// the next transfer starts); the transfer still runs to its STOP. `busy` is high
// from the cycle after `start` until the bus is idle again.
//
// Both lines are open drain: `scl_oe`/`sda_oe` high pulls the line low, low
// releases it to the pull-up. `sda_i` is the line as seen on the pad. Each bit
// takes four quarter periods of QUARTER clocks (SCL low, SCL low, SCL high,
// SCL high); data changes in the first quarter and is sampled at the start of
// the third. The default makes 100 kHz from a 100 MHz clock. Only the use of
// I2C for the camera comes from the published unit; placing the master in the
// FPGA under processor control, the write-only sequence and the timing are this
// design's choices. Clock stretching is not supported.
module i2c_master #(
  parameter int unsigned QUARTER = 250
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [6:0] dev_addr,
  input  logic [7:0] reg_addr,
  input  logic [7:0] wr_data,
  output logic       busy,
  output logic       nack,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       sda_i
);

  localparam int unsigned NBITS = 27;   // three bytes, each followed by an acknowledge slot
  localparam int unsigned QW    = $clog2(QUARTER + 1);

  typedef enum logic [1:0] {IDLE, START, BITS, STOP} state_e;

  state_e          state;
  logic [QW-1:0]   qcnt;
  logic [1:0]      phase;
  logic [4:0]      bitn;
  logic [NBITS-1:0] shreg;
  logic            ack_slot;
  logic            qtick;

  assign qtick    = (qcnt == QW'(QUARTER - 1));
  assign ack_slot = (bitn == 5'd8) || (bitn == 5'd17) || (bitn == 5'd26);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      qcnt   <= '0;
      phase  <= '0;
      bitn   <= '0;
      shreg  <= '0;
      busy   <= 1'b0;
      nack   <= 1'b0;
      scl_oe <= 1'b0;
      sda_oe <= 1'b0;
    end else begin
      qcnt <= qtick ? '0 : qcnt + 1'b1;
      if (state == IDLE) begin
        qcnt   <= '0;
        phase  <= '0;
        scl_oe <= 1'b0;
        sda_oe <= 1'b0;
        if (start) begin
          state <= START;
          busy  <= 1'b1;
          nack  <= 1'b0;
          shreg <= {dev_addr, 1'b0, 1'b1, reg_addr, 1'b1, wr_data, 1'b1};
        end
      end else if (qtick) begin
        phase <= phase + 1'b1;
        unique case (state)
          START: begin
            // SDA falls while SCL is high, then SCL goes low.
            unique case (phase)
              2'd0: sda_oe <= 1'b1;
              2'd1: ;
              2'd2: scl_oe <= 1'b1;
              2'd3: begin state <= BITS; bitn <= '0; end
            endcase
          end
          BITS: begin
            unique case (phase)
              2'd0: sda_oe <= !shreg[NBITS-1];     // an acknowledge slot holds a 1: released
              2'd1: scl_oe <= 1'b0;
              2'd2: if (ack_slot && sda_i) nack <= 1'b1;
              2'd3: begin
                scl_oe <= 1'b1;
                shreg  <= {shreg[NBITS-2:0], 1'b0};
                if (bitn == 5'(NBITS - 1)) state <= STOP;
                else                       bitn  <= bitn + 1'b1;
              end
            endcase
          end
          STOP: begin
            // SDA low while SCL low, SCL released, then SDA rises while SCL is high.
            unique case (phase)
              2'd0: sda_oe <= 1'b1;
              2'd1: scl_oe <= 1'b0;
              2'd2: sda_oe <= 1'b0;
              2'd3: begin state <= IDLE; busy <= 1'b0; end
            endcase
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

endmodule
