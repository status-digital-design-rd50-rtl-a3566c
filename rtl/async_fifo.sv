// async_fifo: dual-clock FIFO (the TX FIFO, 4 x 32 bits) from the 40 MHz control
// unit to the 640 MHz serializer.
//
// Classic Gray-pointer design: each side keeps a binary and a Gray pointer one bit
// wider than the address; the Gray pointer crosses to the other clock through two
// flip-flops. The write side is full when its pointer leads the synchronised read
// pointer by DEPTH; the read side is empty when the pointers are equal. wcount_o
// is the occupancy seen from the write side (it may overstate, never understate,
// the true occupancy). rdata_o shows the oldest entry (first-word fall-through);
// pop_i takes it. Both sides are reset by the same asynchronous rst_n. DEPTH must
// be a power of two. The clock-domain crossing scheme is this implementation's
// choice; the depth and width are those of the described TX FIFO.
module async_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic                   rst_n,
  // write side
  input  logic                   wclk,
  input  logic                   push_i,
  input  logic [W-1:0]           wdata_i,
  output logic                   wfull_o,
  output logic [$clog2(DEPTH):0] wcount_o,
  // read side
  input  logic                   rclk,
  input  logic                   pop_i,
  output logic [W-1:0]           rdata_o,
  output logic                   rempty_o
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer in the read domain
  logic [AW:0]  wbin_nxt, rbin_nxt, rbin_w;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ------------------------------------------------------------------ write side
  assign wbin_nxt = wbin + (AW+1)'(push_i && !wfull_o);

  always_ff @(posedge wclk) begin
    if (push_i && !wfull_o) mem[wbin[AW-1:0]] <= wdata_i;
  end

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  assign rbin_w   = gray2bin(rgray_w2);
  assign wcount_o = wbin - rbin_w;
  assign wfull_o  = (wcount_o == (AW+1)'(DEPTH));

  // ------------------------------------------------------------------- read side
  assign rbin_nxt = rbin + (AW+1)'(pop_i && !rempty_o);

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign rempty_o = (rgray == wgray_r2);
  assign rdata_o  = mem[rbin[AW-1:0]];

  assert property (@(posedge wclk) disable iff (!rst_n) !(push_i && wfull_o))
    else $error("async_fifo: push while full");
  assert property (@(posedge rclk) disable iff (!rst_n) !(pop_i && rempty_o))
    else $error("async_fifo: pop while empty");

endmodule
