// tx_serializer: frame builder and serializer for the 640 MHz output link.
//
// The link carries 40-bit words, most significant bit first, one bit per clock of
// clk (640 MHz). Words are grouped into frames:
//   idle frame   SOF, IDLE, EOF                    (TX FIFO empty)
//   data frame   SOF, data x n, EOF, 1 <= n <= MAX_FRAME   (normal mode)
//   debug frame  SOF, one data word, EOF           (debug_i set)
// SOF = EE_EEEEEEEE, EOF = FF_FFFFFFFF, IDLE = 3C_BC3CBC3C. A data word is the
// 32-bit TX FIFO word, 8b/10b encoded to 40 bits (USE_8B10B = 1) or, for easy
// reading of waveforms, prefixed with the byte CD (USE_8B10B = 0). A data frame
// ends when the FIFO is empty or after MAX_FRAME words (one full TX FIFO).
//
// Timing. bit_counter runs 0..39. In the clock with bit_counter = 38 the next word
// is decided from the flags (FIFO empty, words in frame, state) and the FIFO head
// is encoded into a register, one clock ahead, so that words follow each other
// without gaps; with bit_counter = 39 the chosen word is loaded and, for a data
// word, the FIFO is popped (fifo_rd_n_o low) and the new running disparity is
// kept. The head is encoded at every word boundary whether it is sent or not.
// The state (SER_IDLE, SER_SEND_DATA or SER_DEBUG) is chosen at the start of each
// frame; SER_UNINIT holds the line low until en_i. en_i and debug_i come from the
// 40 MHz domain and pass two flip-flops.
//
// Word values, frame rules, state names, the one-clock-early decision and the
// encoder latency follow the design description; the exact decision clock and
// the 8b/10b symbol order are this implementation's.
module tx_serializer
  import rd50_pkg::*;
#(
  parameter int unsigned MAX_FRAME = 4,
  parameter bit          USE_8B10B = 1'b1
) (
  input  logic             clk,          // serial clock, 640 MHz
  input  logic             rst_n,
  input  logic             en_i,         // enable_serializer
  input  logic             debug_i,      // debug_tx
  input  logic             fifo_empty_i,
  input  data_word_t       fifo_rdata_i,
  output logic             fifo_rd_n_o,
  output logic             data_out_o,
  // observation
  output logic [SER_W-1:0] data_to_ser_o,  // word being shifted out
  output word_kind_t       word_kind_o,
  output logic             word_start_o,   // first bit of a word on data_out_o
  output ser_state_t       state_o
);

  localparam int unsigned BCW = $clog2(SER_W);
  localparam int unsigned FCW = $clog2(MAX_FRAME + 1);

  logic [1:0]       en_sync, dbg_sync;
  logic             en, debug;
  logic [BCW-1:0]   bit_counter;
  logic [SER_W-1:0] sh, cur_word;
  word_kind_t       cur_kind, nxt_kind;
  ser_state_t       state;
  logic [FCW-1:0]   ndata;           // data words in the current frame
  logic [2:0]       word_counter;    // word index inside the frame
  logic [SER_W-1:0] enc_q;
  logic             enc_rd_q, rd;
  logic [SER_W-1:0] enc_code;
  logic             enc_rd;
  logic             decide, load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_sync  <= '0;
      dbg_sync <= '0;
    end else begin
      en_sync  <= {en_sync[0], en_i};
      dbg_sync <= {dbg_sync[0], debug_i};
    end
  end
  assign en    = en_sync[1];
  assign debug = dbg_sync[1];

  enc_8b10b_word #(.NBYTES(4)) u_enc (
    .data_i(fifo_rdata_i),
    .rd_i  (rd),
    .code_o(enc_code),
    .rd_o  (enc_rd)
  );

  assign decide = (bit_counter == BCW'(SER_W - 2));
  assign load   = (bit_counter == BCW'(SER_W - 1));

  always_comb begin
    unique case (nxt_kind)
      W_SOF:   cur_word = WORD_SOF;
      W_IDLE:  cur_word = WORD_IDLE;
      W_DATA:  cur_word = enc_q;
      W_EOF:   cur_word = WORD_EOF;
      default: cur_word = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_counter  <= '0;
      sh           <= '0;
      cur_kind     <= W_NONE;
      nxt_kind     <= W_NONE;
      state        <= SER_UNINIT;
      ndata        <= '0;
      word_counter <= '0;
      enc_q        <= '0;
      enc_rd_q     <= 1'b0;
      rd           <= 1'b0;
      data_to_ser_o <= '0;
    end else begin
      bit_counter <= load ? '0 : bit_counter + 1'b1;

      if (decide) begin
        enc_q    <= USE_8B10B ? enc_code : {DATA_TAG, fifo_rdata_i};
        enc_rd_q <= USE_8B10B ? enc_rd : rd;
        unique case (cur_kind)
          W_SOF: nxt_kind <= (state == SER_IDLE) ? W_IDLE
                           : (fifo_empty_i ? W_EOF : W_DATA);
          W_IDLE: nxt_kind <= W_EOF;
          W_DATA: nxt_kind <= (state == SER_SEND_DATA && !fifo_empty_i &&
                               ndata < FCW'(MAX_FRAME)) ? W_DATA : W_EOF;
          default: begin   // W_NONE or W_EOF: frame boundary
            if (!en) begin
              nxt_kind <= W_NONE;
              state    <= SER_UNINIT;
            end else begin
              nxt_kind <= W_SOF;
              state    <= fifo_empty_i ? SER_IDLE : (debug ? SER_DEBUG : SER_SEND_DATA);
            end
          end
        endcase
      end

      if (load) begin
        sh            <= cur_word;
        data_to_ser_o <= cur_word;
        cur_kind      <= nxt_kind;
        unique case (nxt_kind)
          W_SOF:  begin word_counter <= '0; ndata <= '0; end
          W_DATA: begin
            word_counter <= word_counter + 1'b1;
            ndata        <= ndata + 1'b1;
            rd           <= enc_rd_q;
          end
          W_NONE: word_counter <= '0;
          default: word_counter <= word_counter + 1'b1;
        endcase
      end else begin
        sh <= {sh[SER_W-2:0], 1'b0};
      end
    end
  end

  assign fifo_rd_n_o  = !(load && nxt_kind == W_DATA);
  assign data_out_o   = sh[SER_W-1];
  assign word_kind_o  = cur_kind;
  assign word_start_o = (bit_counter == '0);
  assign state_o      = state;

  assert property (@(posedge clk) disable iff (!rst_n) !(!fifo_rd_n_o && fifo_empty_i))
    else $error("tx_serializer: pop of an empty TX FIFO");

endmodule
