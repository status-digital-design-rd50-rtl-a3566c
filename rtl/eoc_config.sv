// eoc_config: end-of-column controller for the pixel configuration memories.
//
// One operation writes or reads bit k (bit_i) of the LDRAM of every pixel in the
// column. It takes N_ROWS + 3 clocks, six for three pixels:
//   clock 0            the request is recognised (state changes);
//   clock 1            read only: LD[k] with SHIFT_EN low copies the memory bit of
//                      every pixel into its shift flip-flop;
//   clocks 2..N_ROWS+1 SHIFT_EN and the shift clock enable (CK1) are high and the
//                      column chain moves one place per clock;
//   clock N_ROWS+2     write only: LD[k] with SHIFT_EN high stores the flip-flops.
// A single shift register (the column "stream") sends its MSB into the chain and
// takes the chain output into its LSB, so after the shift clocks it holds the
// values read from the pixels; rdata_o[r] and wdata_i[r] belong to pixel r. In a
// write SHIFT_EN stays high from clock 1 to the end, as in the waveforms.
// start_i is taken only while busy_o is low; done_o pulses in the last clock.
// The clock budget and the LD/SHIFT_EN rules are those of the design description;
// the port list and the parallel data interface are this implementation's.
module eoc_config
  import rd50_pkg::*;
#(
  parameter int unsigned N_ROWS = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  logic               rw_i,      // 1 = write, 0 = read (shift_rw)
  input  logic [2:0]         bit_i,     // memory bit k (selects LD[k])
  input  logic [N_ROWS-1:0]  wdata_i,
  output logic [N_ROWS-1:0]  rdata_o,
  output logic               busy_o,
  output logic               done_o,
  // towards the pixel column
  output logic [CFG_W-1:0]   ld_o,
  output logic               shift_en_o,
  output logic               ck_en_o,
  output logic               ser_o,
  input  logic               ser_i
);

  localparam int unsigned LAST = N_ROWS + 2;
  localparam int unsigned CW   = $clog2(LAST + 1);

  logic              active;
  logic [CW-1:0]     cnt;       // shift_cyc_counter
  logic              rw;
  logic [2:0]        kbit;
  logic [N_ROWS-1:0] stream;
  logic              shifting;

  assign shifting = active && (cnt >= CW'(2)) && (cnt <= CW'(N_ROWS + 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      rw     <= 1'b0;
      kbit   <= '0;
      stream <= '0;
    end else if (!active) begin
      if (start_i) begin
        active <= 1'b1;
        cnt    <= '0;
        rw     <= rw_i;
        kbit   <= bit_i;
        stream <= wdata_i;
      end
    end else begin
      if (shifting) stream <= {stream[N_ROWS-2:0], ser_i};
      if (cnt == CW'(LAST)) active <= 1'b0;
      else                  cnt    <= cnt + 1'b1;
    end
  end

  always_comb begin
    ld_o = '0;
    if (active && ((!rw && cnt == CW'(1)) || (rw && cnt == CW'(LAST))))
      ld_o[kbit] = 1'b1;
  end

  assign shift_en_o = shifting || (active && rw && cnt >= CW'(1));
  assign ck_en_o    = shifting;
  assign ser_o      = stream[N_ROWS-1];
  assign rdata_o    = stream;
  assign busy_o     = active;
  assign done_o     = active && (cnt == CW'(LAST));

endmodule
