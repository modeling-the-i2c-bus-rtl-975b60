// i2c_bus: the two open-drain bus wires with their pull-up resistors.
//
// Every device can only pull a line low; a line nobody pulls low is high.
// The resulting level is therefore the logical AND of all devices' released
// states, which is how the protocol model merges the devices' outputs in
// each step. N_DEV devices connect through one bit each of `scl_drive_low`
// and `sda_drive_low`; all of them see `scl` and `sda`. Purely
// combinational; the default of two devices is the one-master, one-slave
// arrangement of the model's overview (this design's choice of count).
module i2c_bus #(
  parameter int N_DEV = 2
) (
  input  logic [N_DEV-1:0] scl_drive_low,
  input  logic [N_DEV-1:0] sda_drive_low,
  output logic             scl,
  output logic             sda
);

  assign scl = ~|scl_drive_low;
  assign sda = ~|sda_drive_low;

endmodule
