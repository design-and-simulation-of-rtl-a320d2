// i2c_bus: the two open-drain lines of an I2C bus, SCL and SDA.
//
// Every device on the bus can only pull a line low through its open-drain
// transistor; a pull-up resistor returns the line high when nobody pulls.
// In logic this is a wired-AND: a line is high exactly when none of the
// N_DEV devices pulls it low. Each device presents one "pull low" bit per
// line and reads the resolved level back.
//
// The open-drain transistors and the pull-up resistors follow the block
// diagram of the source design; reducing them to a wired-AND of pull-down requests is
// this design's own modelling, and drive strength, rise time and the
// resistor value are not represented.
//
// Timing: purely combinational.
module i2c_bus #(
  parameter int unsigned N_DEV = 4
) (
  input  logic [N_DEV-1:0] scl_pull_low,
  input  logic [N_DEV-1:0] sda_pull_low,
  output logic             scl,
  output logic             sda
);

  always_comb begin
    scl = ~|scl_pull_low;
    sda = ~|sda_pull_low;
  end

endmodule
