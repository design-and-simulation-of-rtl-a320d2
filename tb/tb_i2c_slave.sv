// tb_i2c_slave: test of one I2C slave driven by a bit-banged master.
//
// The testbench plays the master directly on the two wires (SCL half period
// HALF system-clock cycles, SDA changed in the middle of the SCL low time)
// and wires the slave's pull-low outputs into the same wired-AND. It checks:
//   - the preset register (00011101 at 1001010 for address 1001001) is read
//   - the slave ACKs its own address and stays silent for another address,
//     also during the following bytes
//   - a multi-byte write stores bytes at consecutive registers and every
//     byte is ACKed; a multi-byte read returns them while the master ACKs
//     and stops driving after the master's NACK
//   - a write past the last register gets a NACK and is not stored
//   - with `stretch` high the addressed slave holds SCL low after the next
//     falling edge until `stretch` drops, and an unaddressed slave never does
// Expected values come from a reference register array kept by the test.
module tb_i2c_slave;
  import i2c_pkg::*;

  localparam int unsigned      HALF = 20;
  localparam logic [6:0]       MY_ADDR = 7'b1001001;
  localparam logic [6:0]       PRE_REG = 7'b1001010;
  localparam logic [7:0]       PRE_DAT = 8'b00011101;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     m_scl_low = 1'b0, m_sda_low = 1'b0;
  logic     stretch = 1'b0;
  logic     scl_pull_low, sda_pull_low, selected;
  s_state_e state;
  logic     scl, sda;

  assign scl = !(m_scl_low || scl_pull_low);
  assign sda = !(m_sda_low || sda_pull_low);

  i2c_slave #(
    .SLAVE_ADDR (MY_ADDR),
    .REG_AW     (7),
    .PRESET_REG (PRE_REG),
    .PRESET_DATA(PRE_DAT)
  ) dut (
    .clk, .rst_n, .scl_i(scl), .sda_i(sda), .stretch,
    .scl_pull_low, .sda_pull_low, .selected, .state
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] ref_regs [128];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_cyc(input int n);
    repeat (n) @(negedge clk);
  endtask

  // Release SCL and wait until it is really high (the slave may stretch).
  task automatic scl_high();
    m_scl_low = 1'b0;
    @(negedge clk);
    while (!scl) @(negedge clk);
  endtask

  task automatic start_cond();
    m_sda_low = 1'b0;
    scl_high();
    wait_cyc(HALF);
    m_sda_low = 1'b1;            // SDA falls while SCL high
    wait_cyc(HALF);
    m_scl_low = 1'b1;
    wait_cyc(HALF / 2);
  endtask

  task automatic stop_cond();
    m_sda_low = 1'b1;
    wait_cyc(HALF / 2);
    scl_high();
    wait_cyc(HALF);
    m_sda_low = 1'b0;            // SDA rises while SCL high
    wait_cyc(HALF);
  endtask

  // One clock pulse: SDA is already set; sample in the middle of SCL high.
  task automatic clock_bit(output logic b);
    wait_cyc(HALF / 2);
    scl_high();
    wait_cyc(HALF / 2);
    b = sda;
    wait_cyc(HALF / 2);
    m_scl_low = 1'b1;
    wait_cyc(HALF / 2);
  endtask

  task automatic send_byte(input logic [7:0] b, output logic ack);
    logic dummy;
    for (int i = 7; i >= 0; i--) begin
      m_sda_low = !b[i];
      clock_bit(dummy);
    end
    m_sda_low = 1'b0;
    clock_bit(dummy);
    ack = (dummy == SDA_ACK);
  endtask

  task automatic recv_byte(input logic give_ack, output logic [7:0] b);
    logic bit_v;
    m_sda_low = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      clock_bit(bit_v);
      b[i] = bit_v;
    end
    m_sda_low = give_ack;
    clock_bit(bit_v);
    m_sda_low = 1'b0;
  endtask

  task automatic write_regs(input logic [6:0] a, input logic [7:0] r, input logic [7:0] bytes [$],
                            input bit expect_ack);
    logic ack;
    start_cond();
    send_byte({a, RW_WRITE}, ack);
    check(ack == expect_ack, $sformatf("address %b ACK=%b expected %b", a, ack, expect_ack));
    check(selected == expect_ack, "selected follows the address match");
    send_byte(r, ack);
    check(ack == expect_ack, "register address ACK");
    foreach (bytes[i]) begin
      send_byte(bytes[i], ack);
      check(ack == expect_ack, "data byte ACK");
      if (expect_ack) ref_regs[7'(r + i)] = bytes[i];
    end
    stop_cond();
    check(state == S_IDLE && !selected, "idle after STOP");
  endtask

  task automatic read_regs(input logic [6:0] a, input logic [7:0] r, input int n, input bit expect_ack);
    logic ack;
    logic [7:0] b;
    start_cond();
    send_byte({a, RW_READ}, ack);
    check(ack == expect_ack, $sformatf("read address %b ACK=%b expected %b", a, ack, expect_ack));
    send_byte(r, ack);
    check(ack == expect_ack, "read register address ACK");
    for (int i = 0; i < n; i++) begin
      recv_byte(i != n - 1, b);
      if (expect_ack)
        check(b == ref_regs[7'(r + i)], $sformatf("reg %h read %h expected %h", 7'(r + i), b, ref_regs[7'(r + i)]));
      else
        check(b == 8'hFF, "unaddressed slave leaves SDA high");
    end
    check(!sda_pull_low, "slave released SDA after NACK");
    stop_cond();
  endtask

  logic ack_v;
  int   held;

  initial begin
    for (int i = 0; i < 128; i++) ref_regs[i] = 8'h00;
    ref_regs[PRE_REG] = PRE_DAT;
    wait_cyc(4);
    rst_n = 1'b1;
    wait_cyc(4 * HALF);

    read_regs(MY_ADDR, {1'b0, PRE_REG}, 1, 1);                 // preset byte
    write_regs(MY_ADDR, 8'h20, '{8'hDE, 8'hAD, 8'hBE}, 1);      // 3-byte write
    read_regs(MY_ADDR, 8'h20, 3, 1);                            // read back
    write_regs(7'b1000001, 8'h20, '{8'h11, 8'h22}, 0);          // not us
    read_regs(MY_ADDR, 8'h1F, 5, 1);                            // across the written bytes
    read_regs(7'b1101011, 8'h20, 1, 0);                         // not us

    // Write past the last register: bytes for 126 and 127 are ACKed, the
    // next one is NACKed and dropped (register 0 keeps its value).
    start_cond();
    send_byte({MY_ADDR, RW_WRITE}, ack_v);
    check(ack_v, "full test: address ACK");
    send_byte(8'h7E, ack_v);
    check(ack_v, "full test: register ACK");
    send_byte(8'h61, ack_v);
    check(ack_v, "full test: byte for register 126 ACKed");
    send_byte(8'h62, ack_v);
    check(ack_v, "full test: byte for register 127 ACKed");
    send_byte(8'h63, ack_v);
    check(!ack_v, "full test: byte after the last register NACKed");
    stop_cond();
    ref_regs[126] = 8'h61;
    ref_regs[127] = 8'h62;
    read_regs(MY_ADDR, 8'h7E, 3, 1);                            // 126, 127, then wraps to 0

    // Clock stretching by the addressed slave.
    start_cond();
    stretch = 1'b1;              // takes effect at the falling edge after the ACK
    send_byte({MY_ADDR, RW_WRITE}, ack_v);
    check(ack_v, "ACK before stretch test");
    m_sda_low = 1'b0;
    wait_cyc(HALF / 2);
    m_scl_low = 1'b0;            // try to raise SCL (first register bit)
    wait_cyc(3 * HALF);
    check(!scl, "addressed slave holds SCL low while stretch is high");
    stretch = 1'b0;
    held = 0;
    while (!scl && held < 10) begin
      @(negedge clk);
      held++;
    end
    check(scl, "SCL released after stretch drops");
    m_scl_low = 1'b1;
    wait_cyc(HALF / 2);
    stop_cond();

    // An unaddressed slave never stretches.
    start_cond();
    stretch = 1'b1;
    send_byte({7'b0000001, RW_WRITE}, ack_v);
    check(!ack_v, "no ACK for another address");
    wait_cyc(HALF / 2);
    m_scl_low = 1'b0;
    wait_cyc(3 * HALF);
    check(scl, "unaddressed slave does not stretch");
    stretch = 1'b0;
    m_scl_low = 1'b1;
    stop_cond();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
