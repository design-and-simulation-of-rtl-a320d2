// i2c_top: one I2C master and three slaves sharing one two-wire bus.
//
// The master (core logic, clock divider, FIFO data registers) and three
// slaves sit on a single SCL line and a single SDA line. Both lines are
// open-drain with a pull-up, modelled by i2c_bus as a wired-AND of every
// device's pull-low request. The master addresses one slave at a time by its
// 7-bit address; the other two ignore the transfer.
//
// Slave addresses and preset data: slave 1 answers to 1001001 and slave 2 to
// 1000001; each holds its preset byte (00011101 and 10000001) at register
// 1001010, the values of the source design's read examples. Slave 3 answers to
// 1101011, the address of the third read example; its preset byte is not
// given there and defaults to 00000000 here.
//
// Ports: the master's user side is brought out unchanged; `stretch[k]` asks
// slave k+1 to hold SCL low; `slave_selected` and `master_state` report
// which slave is addressed and where the master's state machine is; `scl` and
// `sda` show the resolved bus lines.
// Timing: see i2c_master (4*QUARTER clock cycles per bit).
module i2c_top
  import i2c_pkg::*;
#(
  parameter int unsigned       CLK_HZ     = 50_000_000,
  parameter int unsigned       SCL_HZ     = 100_000,
  parameter int unsigned       QUARTER    = CLK_HZ / (4 * SCL_HZ),
  parameter int unsigned       FIFO_DEPTH = 4,
  parameter logic [ADDR_W-1:0] S1_ADDR    = 7'b1001001,
  parameter logic [ADDR_W-1:0] S2_ADDR    = 7'b1000001,
  parameter logic [ADDR_W-1:0] S3_ADDR    = 7'b1101011,
  parameter logic [6:0]        PRESET_REG = 7'b1001010,
  parameter logic [DATA_W-1:0] S1_DATA    = 8'b00011101,
  parameter logic [DATA_W-1:0] S2_DATA    = 8'b10000001,
  parameter logic [DATA_W-1:0] S3_DATA    = 8'b00000000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ena,
  input  logic              rw,
  input  logic [ADDR_W-1:0] address,
  input  logic [DATA_W-1:0] reg_addr,
  input  logic [3:0]        rd_len,
  input  logic              tx_push,
  input  logic [DATA_W-1:0] data,
  output logic              tx_full,
  input  logic              rx_pop,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_empty,
  output logic              busy,
  output logic              done,
  output logic              ack_err,
  input  logic [2:0]        stretch,
  output logic [2:0]        slave_selected,
  output logic [2:0]        master_state,   // i2c_pkg::m_state_e encoding
  output logic              scl,
  output logic              sda
);

  localparam int unsigned NDEV = 4;   // master + 3 slaves

  logic [NDEV-1:0] scl_pull_low, sda_pull_low;
  m_state_e        m_state;

  assign master_state = m_state;

  i2c_master #(
    .CLK_HZ    (CLK_HZ),
    .SCL_HZ    (SCL_HZ),
    .QUARTER   (QUARTER),
    .FIFO_DEPTH(FIFO_DEPTH)
  ) u_master (
    .clk         (clk),
    .rst_n       (rst_n),
    .ena         (ena),
    .rw          (rw),
    .address     (address),
    .reg_addr    (reg_addr),
    .rd_len      (rd_len),
    .tx_push     (tx_push),
    .data        (data),
    .tx_full     (tx_full),
    .rx_pop      (rx_pop),
    .rx_data     (rx_data),
    .rx_empty    (rx_empty),
    .busy        (busy),
    .done        (done),
    .ack_err     (ack_err),
    .state       (m_state),
    .scl_i       (scl),
    .sda_i       (sda),
    .scl_pull_low(scl_pull_low[0]),
    .sda_pull_low(sda_pull_low[0])
  );

  localparam logic [ADDR_W-1:0] S_ADDRS [3] = '{S1_ADDR, S2_ADDR, S3_ADDR};
  localparam logic [DATA_W-1:0] S_DATAS [3] = '{S1_DATA, S2_DATA, S3_DATA};

  for (genvar k = 0; k < 3; k++) begin : g_slave
    i2c_slave #(
      .SLAVE_ADDR (S_ADDRS[k]),
      .REG_AW     (7),
      .PRESET_REG (PRESET_REG),
      .PRESET_DATA(S_DATAS[k])
    ) u_slave (
      .clk         (clk),
      .rst_n       (rst_n),
      .scl_i       (scl),
      .sda_i       (sda),
      .stretch     (stretch[k]),
      .scl_pull_low(scl_pull_low[k+1]),
      .sda_pull_low(sda_pull_low[k+1]),
      .selected    (slave_selected[k]),
      .state       ()
    );
  end

  i2c_bus #(.N_DEV(NDEV)) u_bus (
    .scl_pull_low(scl_pull_low),
    .sda_pull_low(sda_pull_low),
    .scl         (scl),
    .sda         (sda)
  );

  // Only the addressed slave may answer: at most one slave selected.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(slave_selected))
    else $error("i2c_top: more than one slave selected");

endmodule
