// eoc_readout: end-of-column hit read-out with its EOC FIFO and token logic.
//
// Column side. HIT_OUT of the column is asynchronous to the periphery clock and
// passes two flip-flops first. The FILL state machine leaves FILL_UNINIT when
// readout_en_i is set, waits in FILL_IDLE and enters FILL_READ once the second
// synchroniser flip-flop shows a hit. In FILL_READ the READ line toggles: one clock
// high, in which the selected pixel drives the active-low column bus and the word
// {address, TE, LE} is pushed into the FIFO, then one clock low, in which that
// pixel resets. So a column delivers one hit every two clocks. READ is not raised
// while the FIFO is full, and the machine returns to FILL_IDLE when the
// synchronised HIT_OUT has gone and READ is low. READ first rises together with
// the change to FILL_READ, three clocks after HIT_OUT.
//
// Control-unit side. While the control unit requests data (eoc_rqt_data_i), the
// oldest FIFO entry is moved into data_eoc_reg as {eoc_addr_i, hit word} and
// eoc_flag_o is set. The EOCs form a token chain: an EOC holds the token when the
// token reaches it (eoc_token_prev_i) and its flag is set; otherwise the token
// passes on (eoc_token_next_o). When the control unit reads (eoc_rd_i) the EOC
// holding the token puts data_eoc_reg on eoc_data_o in the next clock and clears
// its flag. In that next clock, with the request still on, it refills data_eoc_reg
// from its FIFO, so the token passes to the next EOC that holds a word. With words
// in two or more columns the columns take turns and the control unit still reads
// a word every clock; a single EOC delivers one word every two clocks.
// eoc_data_o is zero when no word is on it, so the buses of all EOCs can be ORed;
// without a new read or request it keeps its last word (debug mode).
//
// The synchroniser, the READ toggling, the 8 x 24 FIFO, the word layout, "data on
// the bus one clock after token and read" and the alternating output of an EOC in
// normal mode (its bus shows a word every other clock) follow the design
// description; the token rule, the valid line of the column bus and the state
// names of the FILL machine are this implementation's.
module eoc_readout
  import rd50_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] eoc_addr_i,
  input  logic              readout_en_i,
  // column side
  input  logic              hit_out_i,
  input  col_bus_t          bus_i,
  output logic              read_o,
  // control-unit side
  input  logic              eoc_rqt_data_i,
  input  logic              eoc_rd_i,
  input  logic              eoc_token_prev_i,
  output logic              eoc_token_next_o,
  output logic              eoc_flag_o,
  output data_word_t        eoc_data_o,
  // status
  output fill_state_t       fill_state_o,
  output logic              fifo_full_o
);

  // ------------------------------------------------------------------ column side
  logic        hit_out_reg, hit_out_reg_sync;
  fill_state_t fill_state;
  logic        read_q;
  logic        push;
  hit_word_t   bus_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_out_reg      <= 1'b0;
      hit_out_reg_sync <= 1'b0;
    end else begin
      hit_out_reg      <= hit_out_i;
      hit_out_reg_sync <= hit_out_reg;
    end
  end

  logic fifo_full, fifo_empty, fifo_pop;
  hit_word_t fifo_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_state <= FILL_UNINIT;
      read_q     <= 1'b0;
    end else begin
      unique case (fill_state)
        FILL_UNINIT: if (readout_en_i) fill_state <= FILL_IDLE;
        FILL_IDLE: if (hit_out_reg_sync) begin
          fill_state <= FILL_READ;
          read_q     <= !fifo_full;
        end
        FILL_READ: begin
          read_q <= !read_q && hit_out_reg_sync && !fifo_full;
          if (!hit_out_reg_sync && !read_q) fill_state <= FILL_IDLE;
        end
        default: fill_state <= FILL_UNINIT;
      endcase
      if (!readout_en_i) begin
        fill_state <= FILL_UNINIT;
        read_q     <= 1'b0;
      end
    end
  end

  assign read_o        = read_q;
  assign bus_word.addr = ~bus_i.addr_b;
  assign bus_word.te   = ~bus_i.te_b;
  assign bus_word.le   = ~bus_i.le_b;
  assign push          = read_q && !bus_i.valid_b;

  sync_fifo #(.W($bits(hit_word_t)), .DEPTH(FIFO_DEPTH)) u_eoc_fifo (
    .clk    (clk),
    .rst_n  (rst_n),
    .push_i (push),
    .wdata_i(bus_word),
    .pop_i  (fifo_pop),
    .rdata_o(fifo_rdata),
    .full_o (fifo_full),
    .empty_o(fifo_empty),
    .count_o()
  );

  // ----------------------------------------------------------- control-unit side
  data_word_t data_eoc_reg;
  logic       eoc_flag, select_eoc, rd_sel;

  assign select_eoc       = eoc_token_prev_i && eoc_flag;
  assign eoc_token_next_o = eoc_token_prev_i && !eoc_flag;
  assign rd_sel           = select_eoc && eoc_rd_i;
  assign fifo_pop         = eoc_rqt_data_i && !fifo_empty && !eoc_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eoc_flag     <= 1'b0;
      data_eoc_reg <= '0;
      eoc_data_o   <= '0;
    end else begin
      if (fifo_pop) begin
        data_eoc_reg <= {eoc_addr_i, fifo_rdata};
        eoc_flag     <= 1'b1;
      end else if (rd_sel) begin
        eoc_flag     <= 1'b0;
      end
      if (rd_sel)                          eoc_data_o <= data_eoc_reg;
      else if (eoc_rd_i || eoc_rqt_data_i) eoc_data_o <= '0;
    end
  end

  assign eoc_flag_o   = eoc_flag;
  assign fill_state_o = fill_state;
  assign fifo_full_o  = fifo_full;

  assert property (@(posedge clk) disable iff (!rst_n) read_q |=> !read_q)
    else $error("eoc_readout: READ high for more than one clock");

endmodule
