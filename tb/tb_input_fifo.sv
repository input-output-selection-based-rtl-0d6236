// tb_input_fifo: self-checking test of the register FIFO.
// Random pushes and pops (never overflowing or underflowing) are compared
// against a queue model; full/empty/count are checked every cycle, and the
// 10-flit capacity is checked by filling the buffer completely.
module tb_input_fifo;
  import noc_pkg::*;

  localparam int unsigned DEPTH = 10;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, full;
  flit_t wr_data, rd_data;
  logic [3:0] count;
  int checks = 0, failures = 0;
  flit_t model[$];

  input_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill to capacity
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      check(!full, "not full while filling");
      wr_en = 1; wr_data = flit_t'(32'hA000_0000 + i);
      model.push_back(wr_data);
      @(posedge clk); #1 wr_en = 0;
    end
    check(full && count == DEPTH, "full at 10 flits");
    // random traffic
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      check(count == model.size(), "count matches model");
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      rd_en = (model.size() > 0) && ($urandom_range(0, 1) == 1);
      wr_en = ((model.size() < DEPTH) || rd_en) && ($urandom_range(0, 2) != 0);
      wr_data = $urandom;
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      #1;
    end
    wr_en = 0; rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
