// bch_fifo: synchronous first-in first-out buffer for the received bits.
//
// The decoder needs the received word again once its error locations are
// known, roughly two word times after the bits arrived; this buffer holds
// the bits meanwhile. It is a circular buffer of DEPTH entries of WIDTH bits
// with separate read and write pointers and an occupancy counter. A push and
// a pop in the same cycle are both performed, even when the buffer is full. The read data is the oldest
// entry and is valid while empty is low (first-word fall-through).
//
// Interface: push/wdata write, pop takes the oldest entry; full, empty and
// count report the state. Pushing when full or popping when empty is a usage
// error and is caught by assertions.
//
// The buffer's place in the decoder follows the original design; its depth and this
// interface are this design's choices (DEPTH = 32 covers the worst case of
// one word in the syndrome stage, one in the key solver and the first bits
// of the next word).
module bch_fifo #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             wr_en, rd_en;

  assign rd_en = pop && !empty;
  assign wr_en = push && (!full || rd_en);

  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (count == '0);
  assign rdata = mem[rptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr_en) wptr <= incr(wptr);
      if (rd_en) rptr <= incr(rptr);
      case ({wr_en, rd_en})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
