// rd50_digital_top: digital read-out of a small monolithic pixel matrix.
//
// Data path: every pixel records the timestamps of the leading and trailing edge
// of its discriminator pulse; the end-of-column logic (one per column) collects
// the hits of its column into an 8-deep FIFO; a control unit pulls the words of all
// columns through a token chain into a 4-deep TX FIFO; a serializer running at
// 640 MHz sends them in frames of 40-bit words, 8b/10b encoded, on data_out_o.
// Configuration path: one controller per column writes or reads one bit of every
// pixel's 8-bit configuration memory per operation by shifting through the
// column (cfg_* ports; all columns work in parallel on the same bit).
//
// Clocks: clk40_i (40 MHz) runs everything up to the TX FIFO write side;
// clk640_i (640 MHz) runs the serializer; the TX FIFO crosses between them.
// Reset: rst_n_i, asynchronous, active low. Column c has address c in the data
// words; pixel r of a column has address r.
// The analog front end, the slow-control interface and the PDK clock-gating cell
// are outside this module: discriminator outputs enter as hit_in_i, control bits
// as the *_en_i / debug_i / cfg_* ports, and the gated shift clock is a clock
// enable.
module rd50_digital_top
  import rd50_pkg::*;
#(
  parameter int unsigned N_COLS         = 2,
  parameter int unsigned N_ROWS         = 3,
  parameter int unsigned EOC_FIFO_DEPTH = 8,
  parameter int unsigned TX_FIFO_DEPTH  = 4,
  parameter bit          USE_8B10B      = 1'b1
) (
  input  logic              clk40_i,
  input  logic              clk640_i,
  input  logic              rst_n_i,
  // control bits
  input  logic              readout_en_i,
  input  logic              debug_i,
  input  logic              ser_en_i,
  input  logic              hb_en_col_i [N_COLS],
  // configuration of the pixel memories
  input  logic              cfg_start_i,
  input  logic              cfg_rw_i,
  input  logic [2:0]        cfg_bit_i,
  input  logic [N_ROWS-1:0] cfg_wdata_i [N_COLS],
  output logic [N_ROWS-1:0] cfg_rdata_o [N_COLS],
  output logic              cfg_busy_o,
  output logic [CFG_W-1:0]  pix_cfg_o   [N_COLS][N_ROWS],
  // discriminator outputs
  input  logic              hit_in_i    [N_COLS][N_ROWS],
  // serial link
  output logic              data_out_o
);

  // ------------------------------------------------------------------ timestamp
  logic [TS_W-1:0] ts;

  ts_counter #(.TS_W(TS_W)) u_ts (
    .clk  (clk40_i),
    .rst_n(rst_n_i),
    .en_i (readout_en_i),
    .ts_o (ts)
  );

  // ------------------------------------------------------------------ matrix
  logic            shift_en [N_COLS];
  logic            ck_en    [N_COLS];
  logic [CFG_W-1:0] ld      [N_COLS];
  logic            ser_to_pix   [N_COLS];
  logic            ser_from_pix [N_COLS];
  logic            read     [N_COLS];
  logic            hit_out  [N_COLS];
  col_bus_t        bus      [N_COLS];

  pixel_matrix #(.N_COLS(N_COLS), .N_ROWS(N_ROWS)) u_matrix (
    .clk       (clk40_i),
    .rst_n     (rst_n_i),
    .ts_i      (ts),
    .shift_en_i(shift_en),
    .ck_en_i   (ck_en),
    .ld_i      (ld),
    .ser_in_i  (ser_to_pix),
    .ser_out_o (ser_from_pix),
    .cfg_o     (pix_cfg_o),
    .hit_en_i  (hb_en_col_i),
    .hit_in_i  (hit_in_i),
    .read_i    (read),
    .hit_out_o (hit_out),
    .bus_o     (bus)
  );

  // ------------------------------------------------------------------ end of column
  logic       cfg_busy [N_COLS];
  logic       token    [N_COLS+1];
  logic       eoc_rqt_data, eoc_rd;
  data_word_t eoc_data [N_COLS];
  data_word_t eoc_data_or;

  for (genvar c = 0; c < N_COLS; c++) begin : g_eoc
    eoc_config #(.N_ROWS(N_ROWS)) u_cfg (
      .clk       (clk40_i),
      .rst_n     (rst_n_i),
      .start_i   (cfg_start_i),
      .rw_i      (cfg_rw_i),
      .bit_i     (cfg_bit_i),
      .wdata_i   (cfg_wdata_i[c]),
      .rdata_o   (cfg_rdata_o[c]),
      .busy_o    (cfg_busy[c]),
      .done_o    (),
      .ld_o      (ld[c]),
      .shift_en_o(shift_en[c]),
      .ck_en_o   (ck_en[c]),
      .ser_o     (ser_to_pix[c]),
      .ser_i     (ser_from_pix[c])
    );

    eoc_readout #(.FIFO_DEPTH(EOC_FIFO_DEPTH)) u_eoc (
      .clk             (clk40_i),
      .rst_n           (rst_n_i),
      .eoc_addr_i      (ADDR_W'(c)),
      .readout_en_i    (readout_en_i),
      .hit_out_i       (hit_out[c]),
      .bus_i           (bus[c]),
      .read_o          (read[c]),
      .eoc_rqt_data_i  (eoc_rqt_data),
      .eoc_rd_i        (eoc_rd),
      .eoc_token_prev_i(token[c]),
      .eoc_token_next_o(token[c+1]),
      .eoc_flag_o      (),
      .eoc_data_o      (eoc_data[c]),
      .fill_state_o    (),
      .fifo_full_o     ()
    );
  end

  always_comb begin
    cfg_busy_o  = 1'b0;
    eoc_data_or = '0;
    for (int c = 0; c < N_COLS; c++) begin
      cfg_busy_o  = cfg_busy_o | cfg_busy[c];
      eoc_data_or = eoc_data_or | eoc_data[c];
    end
  end

  // ------------------------------------------------------------------ control unit
  localparam int unsigned TXC = $clog2(TX_FIFO_DEPTH) + 1;

  logic           tx_push;
  data_word_t     tx_wdata;
  logic [TXC-1:0] tx_wcount;

  readout_cu #(.TX_DEPTH(TX_FIFO_DEPTH)) u_cu (
    .clk           (clk40_i),
    .rst_n         (rst_n_i),
    .en_i          (readout_en_i),
    .debug_i       (debug_i),
    .token_o       (token[0]),
    .token_return_i(token[N_COLS]),
    .eoc_rqt_data_o(eoc_rqt_data),
    .eoc_rd_o      (eoc_rd),
    .eoc_data_i    (eoc_data_or),
    .tx_push_o     (tx_push),
    .tx_wdata_o    (tx_wdata),
    .tx_wcount_i   (tx_wcount),
    .state_o       ()
  );

  // ------------------------------------------------------------------ TX FIFO
  logic       tx_pop, tx_empty, tx_rd_n;
  data_word_t tx_rdata;

  async_fifo #(.W($bits(data_word_t)), .DEPTH(TX_FIFO_DEPTH)) u_tx_fifo (
    .rst_n   (rst_n_i),
    .wclk    (clk40_i),
    .push_i  (tx_push),
    .wdata_i (tx_wdata),
    .wfull_o (),
    .wcount_o(tx_wcount),
    .rclk    (clk640_i),
    .pop_i   (tx_pop),
    .rdata_o (tx_rdata),
    .rempty_o(tx_empty)
  );

  assign tx_pop = !tx_rd_n;

  // ------------------------------------------------------------------ serializer
  tx_serializer #(.MAX_FRAME(TX_FIFO_DEPTH), .USE_8B10B(USE_8B10B)) u_ser (
    .clk          (clk640_i),
    .rst_n        (rst_n_i),
    .en_i         (ser_en_i),
    .debug_i      (debug_i),
    .fifo_empty_i (tx_empty),
    .fifo_rdata_i (tx_rdata),
    .fifo_rd_n_o  (tx_rd_n),
    .data_out_o   (data_out_o),
    .data_to_ser_o(),
    .word_kind_o  (),
    .word_start_o (),
    .state_o      ()
  );

endmodule
