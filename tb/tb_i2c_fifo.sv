// tb_i2c_fifo: randomized test of the FIFO data register against a queue.
//
// Random push/pop traffic (including push and pop in the same cycle, pushes
// while full and pops while empty being avoided) is applied for a few
// thousand cycles; after every edge `dout`, `empty`, `full` and `count` are
// compared with a SystemVerilog queue holding the expected contents. A
// directed fill-to-full / drain-to-empty pass checks the ordering and the
// flags at both ends.
module tb_i2c_fifo;

  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 4;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             push = 1'b0, pop = 1'b0;
  logic [WIDTH-1:0] din = '0;
  logic [WIDTH-1:0] dout;
  logic             empty, full;
  logic [2:0]       count;

  i2c_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic pu, input logic po, input logic [WIDTH-1:0] d);
    push = pu;
    pop  = po;
    din  = d;
    @(posedge clk);
    if (po && model.size() > 0) void'(model.pop_front());
    if (pu && (model.size() < DEPTH || po)) model.push_back(d);
    @(negedge clk);
    push = 1'b0;
    pop  = 1'b0;
    check(count == 3'(model.size()), $sformatf("count %0d expected %0d", count, model.size()));
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    if (model.size() > 0)
      check(dout == model[0], $sformatf("dout %h expected %h", dout, model[0]));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");

    // Fill to full, then drain, in order.
    for (int i = 0; i < DEPTH; i++) step(1'b1, 1'b0, WIDTH'(8'h10 + i));
    check(full, "full after DEPTH pushes");
    for (int i = 0; i < DEPTH; i++) begin
      check(dout == WIDTH'(8'h10 + i), "drain order");
      step(1'b0, 1'b1, '0);
    end
    check(empty, "empty after draining");

    // Random traffic that never overflows or underflows.
    for (int n = 0; n < 3000; n++) begin
      logic pu, po;
      pu = $urandom_range(0, 1) == 1;
      po = $urandom_range(0, 1) == 1;
      if (model.size() == 0) po = 1'b0;
      if (model.size() == DEPTH && !po) pu = 1'b0;
      step(pu, po, WIDTH'($urandom));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
