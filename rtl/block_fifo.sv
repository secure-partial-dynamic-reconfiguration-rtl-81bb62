// block_fifo: small synchronous FIFO with valid/ready on both sides.
//
// DEPTH entries of WIDTH bits held in a register array. 'count' is the number
// of entries stored, so a producer can reserve space ahead of time. A push
// and a pop may happen in the same cycle; writing into a full FIFO or
// reading an empty one is ignored (and flagged by the assertions).
module block_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  output logic                       full,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [WIDTH-1:0]           out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic             do_push, do_pop;

  assign full      = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_q];
  assign do_push   = push && !full;
  assign do_pop    = out_valid && out_ready;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      count <= '0;
    end else begin
      if (do_push) wr_q <= incr(wr_q);
      if (do_pop)  rd_q <= incr(rd_q);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wr_q] <= wdata;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);

endmodule
