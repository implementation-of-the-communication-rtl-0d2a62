// od_iobuf: open-drain tri-state pad buffer for one I2C line.
//
// I2C needs SDA (and SCL) to be bidirectional: each device either pulls the
// line low or leaves it in high impedance, and an external pull-up resistor
// makes it high when nobody pulls. This buffer drives 0 onto `pad` when
// `drive_low` is set and releases it (high impedance) otherwise; `rd` always
// returns the level actually present on the pad, so a device can read what
// another device, or itself, is driving. It is purely combinational.
// The pull-up is part of the board, not of this buffer.
module od_iobuf (
  input  logic drive_low,
  output logic rd,
  inout  wire  pad
);
  assign pad = drive_low ? 1'b0 : 1'bz;
  assign rd  = pad;
endmodule
