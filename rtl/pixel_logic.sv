// pixel_logic: digital part of one pixel.
//
// Configuration: the pixel holds one shift flip-flop (the DFF of the column shift
// chain, SER_IN -> SER_OUT) and an 8-bit configuration memory (LDRAM). While
// SHIFT_EN is high and the column clock enable (CK1) is active, the flip-flop takes
// SER_IN. A pulse on LD[k] with SHIFT_EN high writes the flip-flop into memory bit
// k; a pulse on LD[k] with SHIFT_EN low copies memory bit k into the flip-flop so
// that it can be shifted out. The memory bits drive cfg_o towards the analog front
// end. CK1 is produced by a clock-gating cell in the chip; here it is the clock
// enable ck_en_i.
//
// Hits: the discriminator output hit_in_i (gated by hit_en_i) is sampled on every
// clock. The clock that first sees it high stores the timestamp ts_i as the leading
// edge (LE); the clock that first sees it low again stores the trailing edge (TE).
// The pixel then raises hit_out_o and waits. When the end-of-column logic raises
// read_i and no higher-priority pixel of the column is waiting (prio_i high), the
// pixel drives {address, TE, LE} inverted onto the active-low column bus for that
// one clock. The next clock, with read_i low, resets the pixel (one pause clock
// per hit); only then can it record a new hit. prio_o passes priority down the
// column to the next lower address. The bus outputs are all ones when the pixel
// is not driving, so the column combines pixels with an AND.
//
// The three-clock shift, the LD write/read rule, the 8-bit LE/TE/address fields,
// the one-clock bus slot and the pause clock follow the design description.
// Sampling the discriminator with the 40 MHz clock (the chip latches the edges
// directly), the priority order and the explicit valid line are choices of this
// implementation.
module pixel_logic
  import rd50_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // configuration chain
  input  logic              shift_en_i,
  input  logic              ck_en_i,
  input  logic [CFG_W-1:0]  ld_i,
  input  logic              ser_in_i,
  output logic              ser_out_o,
  output logic [CFG_W-1:0]  cfg_o,
  // hit recording and read-out
  input  logic [ADDR_W-1:0] addr_i,
  input  logic              hit_en_i,
  input  logic              hit_in_i,
  input  logic [TS_W-1:0]   ts_i,
  input  logic              read_i,
  input  logic              prio_i,
  output logic              prio_o,
  output logic              hit_out_o,
  output col_bus_t          bus_o
);

  // ---------------------------------------------------------------- configuration
  logic             sdff;
  logic [CFG_W-1:0] ram;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sdff <= 1'b0;
      ram  <= '0;
    end else begin
      if (shift_en_i && ck_en_i)
        sdff <= ser_in_i;
      else if (!shift_en_i && (ld_i != '0))
        sdff <= |(ram & ld_i);
      if (shift_en_i) begin
        for (int k = 0; k < CFG_W; k++)
          if (ld_i[k]) ram[k] <= sdff;
      end
    end
  end

  assign ser_out_o = sdff;
  assign cfg_o     = ram;

  // ---------------------------------------------------------------- hit recording
  typedef enum logic [1:0] {
    PX_IDLE,     // waiting for a leading edge
    PX_HIGH,     // leading edge stored, waiting for the trailing edge
    PX_PENDING,  // hit complete, waiting to be read
    PX_RESET     // read, reset during the pause clock
  } px_state_t;

  px_state_t       state;
  logic            hit_s, hit_q;
  logic [TS_W-1:0] le, te;
  logic            drive;

  assign hit_s = hit_in_i && hit_en_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PX_IDLE;
      hit_q <= 1'b0;
      le    <= '0;
      te    <= '0;
    end else begin
      hit_q <= hit_s;
      unique case (state)
        PX_IDLE:    if (hit_s && !hit_q) begin le <= ts_i; state <= PX_HIGH; end
        PX_HIGH:    if (!hit_s) begin te <= ts_i; state <= PX_PENDING; end
        PX_PENDING: if (drive) state <= PX_RESET;
        PX_RESET:   if (!read_i) begin le <= '0; te <= '0; state <= PX_IDLE; end
        default:    state <= PX_IDLE;
      endcase
    end
  end

  assign hit_out_o = (state == PX_PENDING);
  assign drive     = hit_out_o && prio_i && read_i;
  assign prio_o    = prio_i && !hit_out_o;

  always_comb begin
    bus_o = COL_BUS_IDLE;
    if (drive) begin
      bus_o.valid_b = 1'b0;
      bus_o.addr_b  = ~addr_i;
      bus_o.te_b    = ~te;
      bus_o.le_b    = ~le;
    end
  end

endmodule
