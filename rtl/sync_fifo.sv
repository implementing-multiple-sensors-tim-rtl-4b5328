// sync_fifo: single-clock first-in first-out buffer.
//
// Used as the UART's transmit buffer and receive buffer. A write with push
// stores wdata when not full; rdata always shows the oldest entry while not
// empty and pop removes it. A push when full is dropped and flagged on
// overflow for one clock; a pop when empty is ignored. Push and pop in the
// same clock are both done. DEPTH must be a power of two.
// The Tx and Rx buffers are named by the design; their form and depth are
// this implementation's choice.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty,
  output logic [AW:0]      count,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_push, do_pop;

  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && full;
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= wdata;
  end

  assign rdata = mem[rptr[AW-1:0]];
  assign count = wptr - rptr;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (wptr == rptr);

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH) else $error("DEPTH must be a power of two");

endmodule
