// i2c_fifo: synchronous first-in first-out byte store, the "data register"
// of the I2C master.
//
// The source design describes the data register of master and slave as a FIFO that
// stores data and address bytes; its depth and handshake are not given. This
// version is a circular buffer of DEPTH entries with a show-ahead read port:
// `dout` always presents the oldest entry, and `pop` removes it. A push to a
// full FIFO and a pop from an empty one are ignored (and flagged by an
// assertion). Push and pop in the same cycle are allowed, also when the FIFO
// is full.
//
// Timing: `push` and `pop` act on the rising clock edge; `dout`, `empty`,
// `full` and `count` are valid from the cycle after.
module i2c_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  input  logic                       pop,
  output logic [WIDTH-1:0]           dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_push = push && (!full || pop);
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= next_ptr(wptr);
      if (do_pop)  rptr <= next_ptr(rptr);
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  // A push into a full FIFO or a pop from an empty one loses data.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("i2c_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("i2c_fifo: pop while empty");

endmodule
