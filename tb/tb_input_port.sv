// tb_input_port: the input channel with its handshake, buffer and CF.
// An upstream driver offers flits whenever it likes but only transfers when
// ready is high; the router side pops at random. Checked: data order through
// the port, ready == buffer not full, the 10-flit capacity, the upstream CL
// passed through, and CF raised while the buffer fills past 6 flits and
// dropped once it drains.
module tb_input_port;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  link_fwd_t link_in;
  link_bwd_t link_out;
  flit_t head;
  logic head_valid, pop, cf;
  logic [CL_W-1:0] cl_up;
  int checks = 0, failures = 0;
  flit_t model[$];
  int cf_high = 0;

  input_port #(.DEPTH(10), .FULL_THRESH(6)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link_in = '0; pop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // phase 1: fill without popping
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      link_in.valid = link_out.ready;
      link_in.flit  = flit_t'(i);
      link_in.cl    = CL_W'(i % 5);
      #1 check(cl_up == CL_W'(i % 5), "cl passed through");
      @(posedge clk);
      if (link_in.valid) model.push_back(link_in.flit);
      #1;
      if (model.size() >= 7) check(cf, "cf high while filling above threshold");
      if (model.size() <= 5) check(!cf, "cf low below threshold");
    end
    check(model.size() == 10 && !link_out.ready, "10 flits accepted, then not ready");
    link_in.valid = 0;
    repeat (3) @(posedge clk);
    #1 check(cf, "cf held while a full buffer stalls");
    // drain one: cf must drop
    @(negedge clk); pop = 1;
    @(posedge clk); void'(model.pop_front()); #1 pop = 0;
    @(posedge clk); #1 check(!cf, "cf dropped when draining");
    // phase 2: random traffic
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check(link_out.ready == (model.size() < 10), "ready == not full");
      check(head_valid == (model.size() > 0), "head_valid");
      if (model.size() > 0) check(head == model[0], "head data");
      if (cf) cf_high++;
      link_in.valid = link_out.ready && ($urandom_range(0, 2) != 0);
      link_in.flit  = $urandom;
      pop = head_valid && ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (link_in.valid) model.push_back(link_in.flit);
    end
    check(cf_high > 0, "cf raised under random traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
