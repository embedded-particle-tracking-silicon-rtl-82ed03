// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used twice in the peripheral: as the small local FIFO of every channel
// server and as the single larger main FIFO that the FIFO server fills and the
// DMA handler empties. The head entry is always visible on `dout` while
// `empty` is low; `pop` removes it at the next clock edge. `push` and `pop` may
// be given in the same cycle, also when the FIFO is full (the pop frees the
// place). `count` is the occupancy and `half` is set while the FIFO holds at
// least DEPTH/2 entries, which the FIFO server uses for its priority rule.
// Storage is a plain array without reset, so it maps onto distributed or block
// RAM. DEPTH must be a power of two.
module sync_fifo #(
  parameter int unsigned WIDTH = 55,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic                     empty,
  output logic                     full,
  output logic                     half,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign half    = (count >= (AW+1)'(DEPTH/2));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  // Callers are expected never to overflow or underflow the FIFO.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(push && full && !pop)) else $error("sync_fifo: push while full");
      assert (!(pop && empty))         else $error("sync_fifo: pop while empty");
    end
  end

endmodule
