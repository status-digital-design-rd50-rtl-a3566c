// readout_cu: control unit that moves hit words from the EOCs into the TX FIFO.
//
// State machine (encodings as on the STATE trace): CU_UNINIT after reset until
// en_i; CU_IDLE requests data from all EOCs (eoc_rqt_data_o) and waits until at
// least one EOC holds a word, which the token chain reports by not returning the
// token (token_return_i low). It then enters CU_READ_EOCS, or CU_DEBUG when
// debug_i is set.
//   CU_READ_EOCS (normal mode): eoc_rd_o is high in every clock in which an EOC
//   holds a word and the TX FIFO has room, so one word per clock moves; the word
//   appears on the EOC bus one clock after the read and is pushed then. An EOC
//   refills its word register in the clock after it was read, so the machine
//   returns to CU_IDLE only when no EOC holds a word and no read happened in the
//   previous clock.
//   CU_DEBUG: a single word is read and pushed; the request is dropped, so that
//   word stays on the EOC bus. The machine waits until the TX FIFO is empty again
//   (the serializer has sent it) before it returns to CU_IDLE and starts the next
//   read-out cycle.
// Room in the TX FIFO is judged from its write-side count plus the word still in
// flight. The four states, the one-word-per-clock normal mode and the one-word
// debug mode follow the design description; the exact hand-over conditions are
// this implementation's.
module readout_cu
  import rd50_pkg::*;
#(
  parameter int unsigned TX_DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en_i,
  input  logic                      debug_i,
  // EOC side
  output logic                      token_o,         // token into the first EOC
  input  logic                      token_return_i,  // token out of the last EOC
  output logic                      eoc_rqt_data_o,
  output logic                      eoc_rd_o,
  input  data_word_t                eoc_data_i,      // OR of all EOC buses
  // TX FIFO write side
  output logic                      tx_push_o,
  output data_word_t                tx_wdata_o,
  input  logic [$clog2(TX_DEPTH):0] tx_wcount_i,
  // status
  output cu_state_t                 state_o
);

  localparam int unsigned CW = $clog2(TX_DEPTH) + 1;

  cu_state_t state;
  logic      rd_q;        // a word is in flight towards the TX FIFO
  logic      dbg_sent;    // debug mode: the single word has been read
  logic      any_data;
  logic      room;

  assign any_data = !token_return_i;
  assign room     = (tx_wcount_i + CW'(rd_q)) < CW'(TX_DEPTH);

  always_comb begin
    eoc_rqt_data_o = 1'b0;
    eoc_rd_o       = 1'b0;
    unique case (state)
      CU_IDLE:      eoc_rqt_data_o = 1'b1;
      CU_READ_EOCS: begin
        eoc_rqt_data_o = 1'b1;
        eoc_rd_o       = any_data && room;
      end
      CU_DEBUG:     eoc_rd_o = !dbg_sent && any_data && room;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= CU_UNINIT;
      rd_q     <= 1'b0;
      dbg_sent <= 1'b0;
    end else begin
      rd_q <= eoc_rd_o;
      unique case (state)
        CU_UNINIT: if (en_i) state <= CU_IDLE;
        CU_IDLE:   if (any_data) state <= debug_i ? CU_DEBUG : CU_READ_EOCS;
        CU_READ_EOCS: if (!any_data && !rd_q) state <= CU_IDLE;
        CU_DEBUG: begin
          if (eoc_rd_o) dbg_sent <= 1'b1;
          if (dbg_sent && !rd_q && tx_wcount_i == '0) begin
            dbg_sent <= 1'b0;
            state    <= CU_IDLE;
          end
        end
        default: state <= CU_UNINIT;
      endcase
      if (!en_i) state <= CU_UNINIT;
    end
  end

  assign token_o    = (state != CU_UNINIT);
  assign tx_push_o  = rd_q;
  assign tx_wdata_o = eoc_data_i;
  assign state_o    = state;

endmodule
