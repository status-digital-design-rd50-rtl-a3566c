// pixel_matrix: N_COLS columns of N_ROWS pixels.
//
// In every column the configuration flip-flops form one shift chain: the column
// input feeds pixel 0, pixel r feeds pixel r+1, and the last pixel returns to the
// end of column. The read-out priority runs the other way: the pixel with the
// highest address is served first and passes priority down the column, so hits are
// read in the order 2, 1, 0 for three pixels. The active-low data buses of the
// pixels are combined with an AND (wired bus), the hit flags with an OR (HIT_OUT of
// the column). The pixel address is its row number. All signals of one column
// share the column's configuration controls, READ and hit enable (HB_EN_COL).
// Purely combinational wiring around pixel_logic; timing is that of the pixels.
module pixel_matrix
  import rd50_pkg::*;
#(
  parameter int unsigned N_COLS = 2,
  parameter int unsigned N_ROWS = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TS_W-1:0]   ts_i,
  // per column configuration chain
  input  logic              shift_en_i [N_COLS],
  input  logic              ck_en_i    [N_COLS],
  input  logic [CFG_W-1:0]  ld_i       [N_COLS],
  input  logic              ser_in_i   [N_COLS],
  output logic              ser_out_o  [N_COLS],
  output logic [CFG_W-1:0]  cfg_o      [N_COLS][N_ROWS],
  // per column hit path
  input  logic              hit_en_i   [N_COLS],
  input  logic              hit_in_i   [N_COLS][N_ROWS],
  input  logic              read_i     [N_COLS],
  output logic              hit_out_o  [N_COLS],
  output col_bus_t          bus_o      [N_COLS]
);

  for (genvar c = 0; c < N_COLS; c++) begin : g_col
    logic     ser  [N_ROWS+1];  // ser[r] enters pixel r
    logic     prio [N_ROWS+1];  // prio[r+1] enters pixel r
    logic     hit  [N_ROWS];
    col_bus_t bus  [N_ROWS];

    assign ser[0]       = ser_in_i[c];
    assign prio[N_ROWS] = 1'b1;

    for (genvar r = 0; r < N_ROWS; r++) begin : g_pix
      pixel_logic u_pix (
        .clk       (clk),
        .rst_n     (rst_n),
        .shift_en_i(shift_en_i[c]),
        .ck_en_i   (ck_en_i[c]),
        .ld_i      (ld_i[c]),
        .ser_in_i  (ser[r]),
        .ser_out_o (ser[r+1]),
        .cfg_o     (cfg_o[c][r]),
        .addr_i    (ADDR_W'(r)),
        .hit_en_i  (hit_en_i[c]),
        .hit_in_i  (hit_in_i[c][r]),
        .ts_i      (ts_i),
        .read_i    (read_i[c]),
        .prio_i    (prio[r+1]),
        .prio_o    (prio[r]),
        .hit_out_o (hit[r]),
        .bus_o     (bus[r])
      );
    end

    assign ser_out_o[c] = ser[N_ROWS];

    always_comb begin
      hit_out_o[c] = 1'b0;
      bus_o[c]     = COL_BUS_IDLE;
      for (int r = 0; r < N_ROWS; r++) begin
        hit_out_o[c] = hit_out_o[c] | hit[r];
        bus_o[c]     = bus_o[c] & bus[r];
      end
    end
  end

endmodule
