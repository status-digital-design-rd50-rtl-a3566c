// sync_fifo: single-clock first-in first-out buffer (the EOC FIFO, 8 x 24 bits).
//
// Storage is a register array addressed by a write and a read pointer, with an
// occupancy counter that gives full_o, empty_o and count_o. rdata_o always shows
// the oldest entry (first-word fall-through), so a pop takes it in the same clock.
// A push and a pop in the same clock are both performed. Pushing while full or
// popping while empty is a protocol error and is flagged by assertions; the
// request is then ignored. DEPTH must be a power of two.
module sync_fifo #(
  parameter int unsigned W     = 24,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push_i,
  input  logic [W-1:0]             wdata_i,
  input  logic                     pop_i,
  output logic [W-1:0]             rdata_o,
  output logic                     full_o,
  output logic                     empty_o,
  output logic [$clog2(DEPTH):0]   count_o
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;
  logic          do_push, do_pop;

  assign do_push = push_i && !full_o;
  assign do_pop  = pop_i && !empty_o;

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  assign rdata_o = mem[rptr];
  assign full_o  = (count == (AW+1)'(DEPTH));
  assign empty_o = (count == '0);
  assign count_o = count;

  assert property (@(posedge clk) disable iff (!rst_n) !(push_i && full_o))
    else $error("sync_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop_i && empty_o))
    else $error("sync_fifo: pop while empty");

endmodule
