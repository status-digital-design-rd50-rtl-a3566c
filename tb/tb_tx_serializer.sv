// tb_tx_serializer: the frame builder and serializer, with a behavioural TX FIFO.
// Two instances see the same FIFO: u_enc (8b/10b, the default) and u_cd (data
// tagged with CD). The serial output of u_enc is cut into 40-bit words; the
// testbench checks that words follow each other every 40 clocks without gaps,
// that frames are SOF, IDLE, EOF when the FIFO is empty, SOF, 1..4 data words,
// EOF otherwise, ending on an empty FIFO or after four words, and SOF, one word,
// EOF in debug mode; data words are decoded with a reference 8b/10b decoder
// (running disparity carried across data words) and must equal the words put
// into the FIFO, in order. u_cd must pop at the same clocks and send the same
// data as CD followed by the word. The first data word after reset, 0001E7F1,
// must appear on the line as 9D_1D4E3A31.
module tb_tx_serializer;
  import rd50_pkg::*;
  import tb_8b10b_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, debug = 0;
  logic rd_n, rd_n_cd, dout, dout_cd, wstart, wstart_cd;
  logic [39:0] w_cd;
  data_word_t q [$];
  data_word_t sent [$];
  logic fifo_empty;
  data_word_t fifo_head;

  tx_serializer #(.MAX_FRAME(4), .USE_8B10B(1'b1)) u_enc (
    .clk(clk), .rst_n(rst_n), .en_i(en), .debug_i(debug), .fifo_empty_i(fifo_empty),
    .fifo_rdata_i(fifo_head), .fifo_rd_n_o(rd_n), .data_out_o(dout), .data_to_ser_o(),
    .word_kind_o(), .word_start_o(wstart), .state_o());
  tx_serializer #(.MAX_FRAME(4), .USE_8B10B(1'b0)) u_cd (
    .clk(clk), .rst_n(rst_n), .en_i(en), .debug_i(debug), .fifo_empty_i(fifo_empty),
    .fifo_rdata_i(fifo_head), .fifo_rd_n_o(rd_n_cd), .data_out_o(dout_cd), .data_to_ser_o(),
    .word_kind_o(), .word_start_o(wstart_cd), .state_o());

  assign fifo_empty = (q.size() == 0);
  assign fifo_head  = (q.size() > 0) ? q[0] : '0;

  always #1 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // FIFO pops
  always @(posedge clk) if (rst_n) begin
    if (rd_n !== rd_n_cd) chk(0, "both instances pop together");
    if (!rd_n) begin
      chk(q.size() > 0, "pop of an empty FIFO");
      if (q.size() > 0) sent.push_back(q.pop_front());
    end
  end

  // Deserialiser and frame checker
  typedef enum {F_OUT, F_SOF, F_IDLE, F_DATA} fpos_t;
  fpos_t fpos = F_OUT;
  logic [39:0] sh = '0, sh_cd = '0;
  int  nbits = -1, last_start = -1, cyc = 0;
  int  ndata = 0;
  bit  first_data = 1;
  logic rdisp = 0;
  int  n_idle_frames = 0, n_data_frames = 0, n_full_frames = 0, n_short_frames = 0, n_dbg_frames = 0;
  data_word_t rx [$];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (wstart) begin
      if (last_start >= 0) chk(cyc - last_start == 40, "word period of 40 clocks");
      last_start = cyc;
      if (nbits == 40) word_done(sh, sh_cd);
      nbits = 0;
    end
    if (nbits >= 0 && nbits < 40) begin
      sh = {sh[38:0], dout};
      sh_cd = {sh_cd[38:0], dout_cd};
      nbits++;
    end
  end

  task automatic word_done(input logic [39:0] w, input logic [39:0] wc);
    logic        ok;
    logic [31:0] d;
    logic [33:0] dw;
    if (w == 40'h0) begin
      chk(fpos == F_OUT, "line quiet only outside a frame");
      return;
    end
    if (w != WORD_SOF && w != WORD_EOF && w != WORD_IDLE)
      chk(wc == {8'hCD, sent.size() > rx.size() ? sent[rx.size()] : 32'h0}, $sformatf("CD word %h", wc));
    else
      chk(wc == w, "both instances send the same frame words");
    unique case (fpos)
      F_OUT: begin
        chk(w == WORD_SOF, $sformatf("frame starts with SOF, got %h", w));
        fpos = F_SOF;
        ndata = 0;
      end
      F_SOF, F_DATA, F_IDLE: begin
        if (w == WORD_IDLE) begin
          chk(fpos == F_SOF, "IDLE only right after SOF");
          fpos = F_IDLE;
        end else if (w == WORD_EOF) begin
          if (fpos == F_IDLE) n_idle_frames++;
          else begin
            chk(fpos == F_DATA, "data frame holds at least one word");
            n_data_frames++;
            if (debug) begin
              n_dbg_frames++;
              chk(ndata == 1, $sformatf("debug frame with %0d words", ndata));
            end else if (ndata == 4) n_full_frames++;
            else begin
              n_short_frames++;
              chk(q.size() == 0, "short frame only when the FIFO ran empty");
            end
          end
          fpos = F_OUT;
        end else begin
          chk(fpos != F_IDLE, "no data after IDLE");
          if (first_data) chk(w == 40'h9D_1D4E3A31, $sformatf("first data word on the line %h", w));
          first_data = 0;
          dw    = dec_word(w, rdisp);
          ok    = dw[33];
          d     = dw[32:1];
          rdisp = dw[0];
          chk(ok, $sformatf("valid 8b/10b word %h", w));
          chk(rx.size() < sent.size() && d == sent[rx.size()], $sformatf("decoded %h", d));
          rx.push_back(d);
          fpos = F_DATA;
          ndata++;
          chk(ndata <= 4, "at most four data words per frame");
        end
      end
    endcase
  endtask

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    chk(dout === 1'b0, "line low before enable");
    en = 1;
    repeat (400) @(negedge clk);               // idle frames
    q.push_back(32'h0001E7F1);                 // the word shown encoded in the chip
    repeat (3) q.push_back($urandom);
    repeat (400) @(negedge clk);
    for (int i = 0; i < 6; i++) q.push_back($urandom);   // one full and one short frame
    repeat (1200) @(negedge clk);
    for (int i = 0; i < 3; i++) begin                      // trickle: short frames
      q.push_back($urandom);
      repeat (150) @(negedge clk);
    end
    repeat (400) @(negedge clk);
    debug = 1;
    repeat (200) @(negedge clk);
    for (int i = 0; i < 3; i++) q.push_back($urandom);   // debug: one word per frame
    repeat (1200) @(negedge clk);
    chk(q.size() == 0 && rx.size() == sent.size() && sent.size() == 16, $sformatf("all words sent: %0d/%0d", rx.size(), sent.size()));
    chk(n_idle_frames > 0, "idle frames seen");
    chk(n_full_frames > 0, "frame ended at four words");
    chk(n_short_frames > 0, "frame ended on empty FIFO");
    chk(n_dbg_frames == 3, $sformatf("debug frames %0d", n_dbg_frames));
    $display("frames: idle %0d data %0d full %0d short %0d debug %0d",
             n_idle_frames, n_data_frames, n_full_frames, n_short_frames, n_dbg_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
