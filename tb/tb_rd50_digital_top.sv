// tb_rd50_digital_top: end-to-end test of the whole read-out at its default size
// (two columns of three pixels, 8-deep EOC FIFOs, 4-deep TX FIFO, 8b/10b).
//  1. Configuration: every one of the 8 memory bits of every pixel is written
//     with random values and read back through the column chains.
//  2. Hits: bursts of hits with random lengths in random pixels. Each hit must
//     come out of the serial link once, decoded from 8b/10b, as
//     {column, row, trailing-edge timestamp, leading-edge timestamp}, where the
//     timestamps are those of the first 40 MHz clock that saw the pulse high and
//     low. Frames must be SOF, IDLE, EOF or SOF, 1..4 data words, EOF.
//  3. A disabled column records nothing.
//  4. Debug mode: each frame carries exactly one word.
// Mechanisms counted, each must occur: configuration write and read, several
// waiting pixels in one column (priority order), words from both columns in one
// burst (token passing), back-to-back TX FIFO writes from alternating columns
// (columns taking turns while one refills), TX FIFO full (control unit stall), idle frame, frame
// ended at four words, frame ended on an empty FIFO, debug frame.
module tb_rd50_digital_top;
  import rd50_pkg::*;
  import tb_8b10b_pkg::*;
  localparam int NC = 2, NR = 3;

  int checks = 0, failures = 0;
  logic clk40 = 0, clk640 = 0, rst_n = 0;
  logic readout_en = 0, debug = 0, ser_en = 0;
  logic hb_en [NC];
  logic cfg_start = 0, cfg_rw = 0, cfg_busy;
  logic [2:0] cfg_bit = '0;
  logic [NR-1:0] cfg_wdata [NC], cfg_rdata [NC];
  logic [7:0] pix_cfg [NC][NR];
  logic hit_in [NC][NR];
  logic dout;

  rd50_digital_top dut (
    .clk40_i(clk40), .clk640_i(clk640), .rst_n_i(rst_n), .readout_en_i(readout_en),
    .debug_i(debug), .ser_en_i(ser_en), .hb_en_col_i(hb_en), .cfg_start_i(cfg_start),
    .cfg_rw_i(cfg_rw), .cfg_bit_i(cfg_bit), .cfg_wdata_i(cfg_wdata), .cfg_rdata_o(cfg_rdata),
    .cfg_busy_o(cfg_busy), .pix_cfg_o(pix_cfg), .hit_in_i(hit_in), .data_out_o(dout));

  always #12.5 clk40 = ~clk40;
  always #0.78125 clk640 = ~clk640;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // ------------------------------------------------------------ reference timestamp
  logic [7:0] ts_ref = '0;
  always @(posedge clk40) if (rst_n && readout_en) ts_ref <= ts_ref + 1'b1;

  // ------------------------------------------------------------ mechanism counters
  int n_cfg_wr = 0, n_cfg_rd = 0, n_prio = 0, n_token = 0, n_txfull = 0;
  int n_idle_fr = 0, n_full_fr = 0, n_short_fr = 0, n_dbg_fr = 0;
  always @(posedge clk40) if (rst_n && dut.tx_wcount == 3'd4) n_txfull++;
  int n_turns = 0;
  logic push_q = 0;
  logic [7:0] push_col_q = '0;
  always @(posedge clk40) if (rst_n) begin
    if (dut.tx_push && push_q && dut.tx_wdata.eoc != push_col_q) n_turns++;
    push_q     <= dut.tx_push;
    push_col_q <= dut.tx_wdata.eoc;
  end

  // ------------------------------------------------------------ link receiver
  typedef enum {F_OUT, F_SOF, F_IDLE, F_DATA} fpos_t;
  fpos_t fpos = F_OUT;
  logic [39:0] rsh = '0;
  int   ndata = 0, bitn = 0;
  bit   aligned = 0;
  logic rdisp = 0;
  data_word_t expq [$];
  int   nrx = 0;

  task automatic word_done(input logic [39:0] w);
    logic [33:0] dw;
    data_word_t  d;
    int          idx;
    unique case (fpos)
      F_OUT: begin
        chk(w == WORD_SOF, $sformatf("frame starts with SOF, got %h", w));
        fpos = F_SOF; ndata = 0;
      end
      default: begin
        if (w == WORD_IDLE) begin
          chk(fpos == F_SOF, "IDLE right after SOF");
          fpos = F_IDLE;
        end else if (w == WORD_EOF) begin
          if (fpos == F_IDLE) n_idle_fr++;
          else begin
            chk(fpos == F_DATA, "data frame not empty");
            if (debug) begin n_dbg_fr++; chk(ndata == 1, $sformatf("debug frame with %0d words", ndata)); end
            else if (ndata == 4) n_full_fr++;
            else n_short_fr++;
          end
          fpos = F_OUT;
        end else begin
          chk(fpos == F_SOF || fpos == F_DATA, "data word inside a data frame");
          dw = dec_word(w, rdisp);
          rdisp = dw[0];
          d = dw[32:1];
          chk(dw[33], $sformatf("valid 8b/10b word %h", w));
          idx = -1;
          foreach (expq[i]) if (idx < 0 && expq[i] == d) idx = i;
          chk(idx >= 0, $sformatf("received word %h was expected", d));
          if (idx >= 0) expq.delete(idx);
          nrx++;
          ndata++;
          chk(ndata <= 4, "at most four data words per frame");
          fpos = F_DATA;
        end
      end
    endcase
  endtask

  // word alignment: the line is low until the first SOF
  always @(posedge clk640) if (rst_n) begin
    rsh = {rsh[38:0], dout};
    if (!aligned) begin
      if (rsh == WORD_SOF) begin aligned = 1; bitn = 0; fpos = F_SOF; ndata = 0; end
    end else begin
      bitn++;
      if (bitn == 40) begin bitn = 0; word_done(rsh); end
    end
  end

  // ------------------------------------------------------------ stimulus helpers
  task automatic cfg_op(input bit w, input int k);
    @(negedge clk40) cfg_start = 1; cfg_rw = w; cfg_bit = 3'(k);
    @(negedge clk40) cfg_start = 0;
    while (cfg_busy) @(negedge clk40);
  endtask

  // fires hits in the pixels of mask; returns once all pulses have ended
  task automatic burst(input logic [NC*NR-1:0] mask, input bit expect_out);
    int start [NC*NR], len [NC*NR];
    logic [7:0] le [NC*NR];
    int t = 0, done = 0, per_col [NC];
    for (int i = 0; i < NC*NR; i++) begin start[i] = $urandom_range(0, 3); len[i] = $urandom_range(1, 5); end
    for (int c = 0; c < NC; c++) per_col[c] = 0;
    for (int i = 0; i < NC*NR; i++) if (mask[i]) per_col[i / NR]++;
    for (int c = 0; c < NC; c++) if (per_col[c] >= 2) n_prio++;
    if (per_col[0] > 0 && per_col[1] > 0) n_token++;
    while (done < NC*NR) begin
      @(negedge clk40);
      done = 0;
      for (int i = 0; i < NC*NR; i++) begin
        if (!mask[i] || t >= start[i] + len[i] + 1) begin done++; continue; end
        if (t == start[i]) begin hit_in[i / NR][i % NR] = 1; le[i] = ts_ref; end
        if (t == start[i] + len[i]) begin
          hit_in[i / NR][i % NR] = 0;
          if (expect_out) expq.push_back({8'(i / NR), 8'(i % NR), ts_ref, le[i]});
        end
      end
      t++;
    end
  endtask

  task automatic wait_drained(input int max_clk);
    int n = 0;
    while (expq.size() > 0 && n < max_clk) begin @(negedge clk40); n++; end
    chk(expq.size() == 0, $sformatf("%0d words never arrived", expq.size()));
    expq.delete();
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main sequence
  initial begin
    logic [NR-1:0] ref_cfg [NC][8];
    for (int c = 0; c < NC; c++) begin
      hb_en[c] = 1; cfg_wdata[c] = '0;
      for (int r = 0; r < NR; r++) hit_in[c][r] = 0;
    end
    #100 rst_n = 1;
    @(negedge clk40);
    readout_en = 1; ser_en = 1;

    // 1. configuration
    for (int k = 0; k < 8; k++) begin
      for (int c = 0; c < NC; c++) begin cfg_wdata[c] = NR'($urandom); ref_cfg[c][k] = cfg_wdata[c]; end
      cfg_op(1, k);
      n_cfg_wr++;
    end
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < NR; r++)
        for (int k = 0; k < 8; k++)
          chk(pix_cfg[c][r][k] === ref_cfg[c][k][r], $sformatf("pixel %0d/%0d bit %0d", c, r, k));
    for (int k = 7; k >= 0; k--) begin
      cfg_op(0, k);
      n_cfg_rd++;
      for (int c = 0; c < NC; c++)
        chk(cfg_rdata[c] === ref_cfg[c][k], $sformatf("read back column %0d bit %0d: %b", c, k, cfg_rdata[c]));
    end

    // 2. hit bursts in normal mode
    repeat (20) @(negedge clk40);
    burst(6'b111111, 1);
    wait_drained(400);
    for (int b = 0; b < 12; b++) begin
      logic [NC*NR-1:0] m;
      m = 6'($urandom_range(1, 63));
      burst(m, 1);
      wait_drained(400);
      repeat ($urandom_range(0, 10)) @(negedge clk40);
    end

    // 3. disabled column
    hb_en[0] = 0;
    burst(6'b000111, 0);
    burst(6'b111000, 1);
    wait_drained(400);
    hb_en[0] = 1;
    repeat (20) @(negedge clk40);
    chk(dut.hit_out[0] === 1'b0, "disabled column recorded nothing");

    // 4. debug mode
    debug = 1;
    repeat (20) @(negedge clk40);
    burst(6'b101101, 1);
    wait_drained(1000);
    repeat (20) @(negedge clk40);

    chk(n_cfg_wr > 0, "configuration write");
    chk(n_cfg_rd > 0, "configuration read");
    chk(n_prio > 0, "several waiting pixels in a column");
    chk(n_token > 0, "words from both columns in one burst");
    chk(n_turns > 0, "back-to-back words from alternating columns");
    chk(n_txfull > 0, "TX FIFO full");
    chk(n_idle_fr > 0, "idle frame");
    chk(n_full_fr > 0, "frame ended at four words");
    chk(n_short_fr > 0, "frame ended on empty FIFO");
    chk(n_dbg_fr == 4, $sformatf("debug frames: %0d", n_dbg_fr));
    $display("received %0d words; cfg wr %0d rd %0d; prio %0d token %0d turns %0d txfull %0d; frames idle %0d full %0d short %0d debug %0d",
             nrx, n_cfg_wr, n_cfg_rd, n_prio, n_token, n_turns, n_txfull, n_idle_fr, n_full_fr, n_short_fr, n_dbg_fr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
