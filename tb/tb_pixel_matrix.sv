// tb_pixel_matrix: two columns of three pixels.
// Configuration: per column, three shift clocks place three bits so that pixel r
// receives its bit (the first bit sent ends in the last pixel); a write pulse
// stores them and each pixel memory must match. The chain output must then
// return the stored bits after a read load.
// Hits: several pixels of a column hit at once; HIT_OUT of the column is their
// OR; toggling READ must deliver them highest address first, one per READ pulse,
// with the right timestamps on the active-low bus, and not disturb the other
// column.
module tb_pixel_matrix;
  import rd50_pkg::*;
  localparam int NC = 2, NR = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] ts = '0;
  logic shift_en [NC], ck_en [NC], ser_in [NC], ser_out [NC];
  logic [7:0] ld [NC];
  logic [7:0] cfg [NC][NR];
  logic hit_en [NC], hit_in [NC][NR], read [NC], hit_out [NC];
  col_bus_t bus [NC];
  logic [7:0] le_ref [NC][NR], te_ref [NC][NR];

  pixel_matrix #(.N_COLS(NC), .N_ROWS(NR)) dut (
    .clk(clk), .rst_n(rst_n), .ts_i(ts), .shift_en_i(shift_en), .ck_en_i(ck_en), .ld_i(ld),
    .ser_in_i(ser_in), .ser_out_o(ser_out), .cfg_o(cfg), .hit_en_i(hit_en), .hit_in_i(hit_in),
    .read_i(read), .hit_out_o(hit_out), .bus_o(bus));

  always #5 clk = ~clk;
  always @(posedge clk) ts <= ts + 1'b1;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NR-1:0] d [NC];
    for (int c = 0; c < NC; c++) begin
      shift_en[c] = 0; ck_en[c] = 0; ser_in[c] = 0; ld[c] = '0; hit_en[c] = 1; read[c] = 0;
      for (int r = 0; r < NR; r++) hit_in[c][r] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---------------- configuration: write bit 3 of every pixel
    d[0] = 3'b110; d[1] = 3'b011;
    for (int s = NR - 1; s >= 0; s--) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) begin shift_en[c] = 1; ck_en[c] = 1; ser_in[c] = d[c][s]; end
    end
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin ck_en[c] = 0; ld[c] = 8'h08; end
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin ld[c] = '0; shift_en[c] = 0; end
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < NR; r++)
        chk(cfg[c][r] === {4'b0, d[c][r], 3'b0}, $sformatf("cfg col %0d pixel %0d = %h", c, r, cfg[c][r]));
    // read bit 3 back through the chain: last pixel first
    @(negedge clk) for (int c = 0; c < NC; c++) ld[c] = 8'h08;
    @(negedge clk) for (int c = 0; c < NC; c++) ld[c] = '0;
    for (int s = NR - 1; s >= 0; s--) begin
      for (int c = 0; c < NC; c++) chk(ser_out[c] === d[c][s], $sformatf("chain out col %0d bit %0d", c, s));
      @(negedge clk) for (int c = 0; c < NC; c++) begin shift_en[c] = 1; ck_en[c] = 1; ser_in[c] = 0; end
      @(posedge clk) #1;
    end
    @(negedge clk) for (int c = 0; c < NC; c++) begin shift_en[c] = 0; ck_en[c] = 0; end

    // ---------------- hits: all pixels of column 0, pixel 1 of column 1
    @(negedge clk);
    for (int r = 0; r < NR; r++) begin hit_in[0][r] = 1; le_ref[0][r] = ts; end
    hit_in[1][1] = 1; le_ref[1][1] = ts;
    @(negedge clk);
    chk(hit_out[0] === 1'b0, "no HIT_OUT before the trailing edge");
    for (int r = 0; r < NR; r++) begin
      @(negedge clk) hit_in[0][r] = 0; te_ref[0][r] = ts;
    end
    hit_in[1][1] = 0; te_ref[1][1] = ts;
    @(negedge clk);
    chk(hit_out[0] === 1'b1 && hit_out[1] === 1'b1, "HIT_OUT of both columns");
    for (int r = NR - 1; r >= 0; r--) begin
      @(negedge clk) read[0] = 1;
      #1 chk(bus[0].valid_b === 1'b0 && ~bus[0].addr_b === 8'(r) &&
             ~bus[0].le_b === le_ref[0][r] && ~bus[0].te_b === te_ref[0][r],
             $sformatf("column 0 read %0d: addr %h le %h te %h", r, ~bus[0].addr_b, ~bus[0].le_b, ~bus[0].te_b));
      chk(bus[1] === COL_BUS_IDLE, "column 1 bus idle");
      @(negedge clk) read[0] = 0;
    end
    @(negedge clk);
    chk(hit_out[0] === 1'b0, "column 0 empty after three reads");
    chk(hit_out[1] === 1'b1, "column 1 still waiting");
    read[1] = 1;
    #1 chk(~bus[1].addr_b === 8'd1 && ~bus[1].le_b === le_ref[1][1] && ~bus[1].te_b === te_ref[1][1], "column 1 word");
    @(negedge clk) read[1] = 0;
    @(negedge clk);
    chk(hit_out[1] === 1'b0, "column 1 empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
