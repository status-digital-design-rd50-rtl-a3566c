// ts_counter: free-running timestamp counter.
//
// Counts the 40 MHz clock in binary and wraps after 2**TS_W - 1. Its value is
// distributed to every pixel, which stores it on the leading and trailing edge of
// a hit. The count starts at zero after reset and advances by one on every clock
// while en_i is high, as the TS[7:0] trace of the hit-recording waveform shows
// (00, 01, 02, ...). A Gray-coded counter was planned for a later revision; this
// one is binary, as in the described state of the design.
module ts_counter #(
  parameter int unsigned TS_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en_i,
  output logic [TS_W-1:0] ts_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ts_o <= '0;
    else if (en_i) ts_o <= ts_o + 1'b1;
  end

endmodule
