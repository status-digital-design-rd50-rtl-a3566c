// tb_figure_readout: replays the read-out example of the original design's
// waveforms on the default top level. Every pixel of both columns sees a pulse
// whose leading edge is sampled at timestamp F1 and whose trailing edge at E7
// (after the 8-bit counter wrapped), so the six words must be
// 0002E7F1, 0001E7F1, 0000E7F1 and 0102E7F1, 0101E7F1, 0100E7F1. Each column
// must deliver its words highest pixel address first, and as an EOC refills its
// word register in the clock after a read, the two columns take turns:
// 0002, 0102, 0001, 0101, 0000, 0100 (column 0 is first in the token chain). The
// six words leave in a
// four-word frame (one full TX FIFO) followed by a two-word frame. The line is
// decoded with the reference 8b/10b decoder.
module tb_figure_readout;
  import rd50_pkg::*;
  import tb_8b10b_pkg::*;
  localparam int NC = 2, NR = 3;

  int checks = 0, failures = 0;
  logic clk40 = 0, clk640 = 0, rst_n = 0;
  logic readout_en = 0, ser_en = 0, cfg_busy, dout;
  logic hb_en [NC];
  logic [NR-1:0] cfg_wdata [NC], cfg_rdata [NC];
  logic [7:0] pix_cfg [NC][NR];
  logic hit_in [NC][NR];

  rd50_digital_top dut (
    .clk40_i(clk40), .clk640_i(clk640), .rst_n_i(rst_n), .readout_en_i(readout_en),
    .debug_i(1'b0), .ser_en_i(ser_en), .hb_en_col_i(hb_en), .cfg_start_i(1'b0),
    .cfg_rw_i(1'b0), .cfg_bit_i(3'd0), .cfg_wdata_i(cfg_wdata), .cfg_rdata_o(cfg_rdata),
    .cfg_busy_o(cfg_busy), .pix_cfg_o(pix_cfg), .hit_in_i(hit_in), .data_out_o(dout));

  always #12.5 clk40 = ~clk40;
  always #0.78125 clk640 = ~clk640;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  logic [7:0] ts_ref = '0;
  always @(posedge clk40) if (rst_n && readout_en) ts_ref <= ts_ref + 1'b1;

  // link receiver
  logic [39:0] rsh = '0;
  int bitn = 0, ndata = 0, nfr = 0;
  bit aligned = 0, in_data = 0;
  logic rdisp = 0;
  data_word_t rx [$];
  int frame_sizes [$];

  always @(posedge clk640) if (rst_n) begin
    rsh = {rsh[38:0], dout};
    if (!aligned) begin
      if (rsh == WORD_SOF) begin aligned = 1; bitn = 0; end
    end else if (++bitn == 40) begin
      bitn = 0;
      if (rsh == WORD_SOF) ndata = 0;
      else if (rsh == WORD_EOF) begin if (ndata > 0) frame_sizes.push_back(ndata); ndata = 0; end
      else if (rsh != WORD_IDLE) begin
        logic [33:0] dw;
        dw = dec_word(rsh, rdisp);
        rdisp = dw[0];
        chk(dw[33], $sformatf("valid 8b/10b word %h", rsh));
        rx.push_back(dw[32:1]);
        ndata++;
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_word_t col_words [NC][$];
    for (int c = 0; c < NC; c++) begin
      hb_en[c] = 1; cfg_wdata[c] = '0;
      for (int r = 0; r < NR; r++) hit_in[c][r] = 0;
    end
    #100 rst_n = 1;
    @(negedge clk40) readout_en = 1; ser_en = 1;
    while (ts_ref != 8'hF1) @(negedge clk40);
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) hit_in[c][r] = 1;
    while (ts_ref != 8'hE7) @(negedge clk40);
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) hit_in[c][r] = 0;
    repeat (200) @(negedge clk40);
    chk(rx.size() == 6, $sformatf("six words received, got %0d", rx.size()));
    foreach (rx[i]) begin
      col_words[rx[i].eoc].push_back(rx[i]);
      chk(rx[i] == {8'(i % 2), 8'(NR - 1 - i / 2), 8'hE7, 8'hF1},
          $sformatf("word %0d in turn order: %h", i, rx[i]));
    end
    for (int c = 0; c < NC; c++) begin
      chk(col_words[c].size() == NR, $sformatf("column %0d delivered %0d words", c, col_words[c].size()));
      foreach (col_words[c][i])
        chk(col_words[c][i] == {8'(c), 8'(NR - 1 - i), 8'hE7, 8'hF1},
            $sformatf("column %0d word %0d = %h", c, i, col_words[c][i]));
    end
    chk(frame_sizes.size() == 2 && frame_sizes[0] == 4 && frame_sizes[1] == 2,
        $sformatf("frames of %p words", frame_sizes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
