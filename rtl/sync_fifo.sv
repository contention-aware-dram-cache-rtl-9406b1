// Synchronous FIFO of DEPTH entries of type T, first word visible on rd_data.
//
// push and pop may happen in the same cycle, also when the FIFO is full (the
// popped entry makes room); push is ignored when full without a pop, and pop
// when empty. count gives the occupancy. Storage is a plain array
// indexed by wrapping read and write pointers.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     wr_data,
  input  logic pop,
  output T     rd_data,
  output logic empty,
  output logic full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH <= 1) ? 1 : $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  T mem [DEPTH];
  logic [PW-1:0] rp, wp;

  wire do_push = push && (!full || pop);
  wire do_pop  = pop && !empty;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign rd_data = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0;
      wp <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wp] <= wr_data;

endmodule
