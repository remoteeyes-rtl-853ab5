// remoteeyes_pkg: types and constants shared by the bright spot sensing unit.
//
// The spot record is the 32-bit word the bright spot detector hands to the
// processor for each accepted horizontal run of bright pixels. Its field order
// (size, group number, row, column centre from most to least significant)
// follows the published record layout. That layout draws each field 8 bits wide,
// which cannot hold the 352 columns and 288 rows of the camera, so this design
// keeps the 32-bit word and the order but gives 9 bits each to the row and the
// column and takes the room from the size field (6 bits, enough for the largest
// accepted run). The group number keeps its 8 bits.
//
// A record with size zero never describes a run; the detector uses it as the
// end-of-frame marker, with the low bits holding the frame number.
package remoteeyes_pkg;

  // Camera geometry (OV6130 full resolution, 8-bit grey).
  localparam int unsigned CAM_W  = 352;
  localparam int unsigned CAM_H  = 288;
  localparam int unsigned PIX_W  = 8;

  // Spot record field widths (sum is 32).
  localparam int unsigned X_W    = 9;
  localparam int unsigned Y_W    = 9;
  localparam int unsigned ID_W   = 8;
  localparam int unsigned SIZE_W = 6;

  typedef struct packed {
    logic [SIZE_W-1:0] size;   // run length in pixels, 0 = end-of-frame marker
    logic [ID_W-1:0]   bpgin;  // bright pixel group identification number
    logic [Y_W-1:0]    y;      // row of the run
    logic [X_W-1:0]    x;      // horizontal centre of the run
  } spot_t;

  // Register map of the processor interface (byte addresses, 32-bit words).
  typedef enum logic [4:0] {
    REG_ID       = 5'h00,  // read-only identification word
    REG_CTRL     = 5'h04,  // bit0 detector enable, bit1 clear error flags
    REG_STATUS   = 5'h08,  // fifo level, frames completed in fifo, error flags
    REG_SPOT     = 5'h0C,  // read pops one spot record
    REG_THRESH   = 5'h10,  // edge threshold (intensity difference)
    REG_MAXW     = 5'h14,  // longest run accepted, in pixels
    REG_FRAMES   = 5'h18,  // frames processed since reset
    REG_I2C      = 5'h1C   // write: start camera register write; read: busy/ack error
  } reg_addr_e;

  localparam logic [31:0] ID_WORD = 32'h4253_4431;  // "BSD1"

endpackage
