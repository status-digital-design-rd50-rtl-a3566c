// tb_pixel_logic: one pixel.
// Configuration: shift a bit in, write it into memory bit k with LD[k] and
// SHIFT_EN high, for every k and both values; read memory bit k back into the
// shift flip-flop with LD[k] and SHIFT_EN low. Hits: the timestamps seen at the
// leading and trailing edge must appear inverted on the column bus in the one
// clock in which READ is high and priority is present; no drive without priority
// or READ; HIT_OUT drops after the read and the pixel is free again after one
// pause clock; a disabled pixel (hit enable low) records nothing.
module tb_pixel_logic;
  import rd50_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic shift_en = 0, ck_en = 0, ser_in = 0, ser_out;
  logic [7:0] ld = '0, cfg;
  logic hit_en = 1, hit_in = 0, read = 0, prio = 1, prio_o, hit_out;
  logic [7:0] ts = '0;
  col_bus_t bus;
  logic [7:0] mem_model = '0;

  pixel_logic dut (
    .clk(clk), .rst_n(rst_n), .shift_en_i(shift_en), .ck_en_i(ck_en), .ld_i(ld),
    .ser_in_i(ser_in), .ser_out_o(ser_out), .cfg_o(cfg), .addr_i(8'h05),
    .hit_en_i(hit_en), .hit_in_i(hit_in), .ts_i(ts), .read_i(read), .prio_i(prio),
    .prio_o(prio_o), .hit_out_o(hit_out), .bus_o(bus));

  always #5 clk = ~clk;
  always @(posedge clk) ts <= ts + 1'b1;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  task automatic write_bit(input int k, input bit v);
    @(negedge clk) shift_en = 1; ck_en = 1; ser_in = v;
    @(negedge clk) ck_en = 0; ld = 8'(1 << k);
    @(negedge clk) ld = '0; shift_en = 0;
    mem_model[k] = v;
  endtask

  task automatic read_bit(input int k);
    // load the opposite value into the flip-flop first
    @(negedge clk) shift_en = 1; ck_en = 1; ser_in = !mem_model[k];
    @(negedge clk) shift_en = 0; ck_en = 0; ld = 8'(1 << k);
    @(negedge clk) ld = '0;
    chk(ser_out === mem_model[k], $sformatf("read back bit %0d", k));
  endtask

  task automatic hit(input int len, output logic [7:0] le, output logic [7:0] te);
    @(negedge clk) hit_in = 1; le = ts;
    repeat (len) @(negedge clk);
    hit_in = 0; te = ts;
    @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] le, te;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---------------- configuration memory
    for (int k = 0; k < 8; k++) begin
      write_bit(k, 1);
      chk(cfg === mem_model, $sformatf("cfg after writing 1 to bit %0d", k));
    end
    for (int k = 0; k < 8; k += 2) begin
      write_bit(k, 0);
      chk(cfg === mem_model, $sformatf("cfg after writing 0 to bit %0d", k));
    end
    for (int k = 0; k < 8; k++) read_bit(k);
    // shifting alone does not disturb the memory
    @(negedge clk) shift_en = 1; ck_en = 1; ser_in = 1;
    @(negedge clk) ck_en = 0; shift_en = 0;
    chk(cfg === mem_model, "memory unchanged by shifting");

    // ---------------- hit recording
    hit(4, le, te);
    chk(hit_out === 1'b1, "HIT_OUT after trailing edge");
    chk(prio_o === 1'b0, "priority blocked while waiting");
    chk(bus === COL_BUS_IDLE, "bus idle without READ");
    @(negedge clk) read = 1; prio = 0;
    #1 chk(bus === COL_BUS_IDLE, "no drive without priority");
    prio = 1;
    #1 chk(bus.valid_b === 1'b0 && bus.addr_b === ~8'h05 && bus.le_b === ~le && bus.te_b === ~te,
           $sformatf("bus word le=%h te=%h got %h", le, te, bus));
    @(negedge clk) read = 0;
    chk(hit_out === 1'b0, "HIT_OUT low after read");
    chk(bus === COL_BUS_IDLE, "bus released after read");
    // pause clock: a hit starting now is not seen
    @(negedge clk);
    hit(2, le, te);
    chk(hit_out === 1'b1, "second hit recorded after the pause");
    @(negedge clk) read = 1;
    #1 chk(bus.le_b === ~le && bus.te_b === ~te, "second hit timestamps");
    @(negedge clk) read = 0;
    @(negedge clk);
    // disabled pixel
    hit_en = 0;
    hit(3, le, te);
    @(negedge clk);
    chk(hit_out === 1'b0, "no hit while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
