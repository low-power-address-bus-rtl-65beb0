// addr_codec_pkg: types and constants shared by the low-power address bus
// encoders and decoders.
//
// Every encoder reports how it sent the most recent address with an
// xfer_kind_e value. The value is for observation only (counting how often
// each mechanism is used); it is not transmitted on the bus. The control
// lines that are transmitted are INC-DAT (instruction bus), INCV (data bus)
// and INC-DAT/ST plus the I/D selector (mixed bus).
package addr_codec_pkg;

  // How one address was carried across the bus.
  typedef enum logic [2:0] {
    XFER_NONE   = 3'd0,  // no transfer yet since reset
    XFER_DIRECT = 3'd1,  // address driven on the bus as is, control line low
    XFER_INC    = 3'd2,  // bus frozen, address = last address + stride
    XFER_DAT    = 3'd3,  // bus frozen, address = DAT target of last address
    XFER_INV    = 3'd4,  // inverted address driven on the bus
    XFER_ST     = 3'd5   // bus frozen, address = Stride-Table prediction
  } xfer_kind_e;

  // Stride used by T0 on an instruction address bus of 32-bit words, and the
  // stride given to a new Stride-Table entry.
  localparam int unsigned DEFAULT_STRIDE = 4;

endpackage
