// tb_congestion_detector: drives an occupancy sequence into the detector and
// compares CF, W_Full and the rate sign against a reference computed here:
// CF(t+1) = (n(t) >= 6) && (last nonzero change of n up to t was positive).
module tb_congestion_detector;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] n_new;
  logic w_full, rate_pos, cf;
  int checks = 0, failures = 0;
  int prev_n;
  bit last_up, exp_cf;
  int seq[] = '{0,1,2,3,4,5,6,7,7,7,8,7,7,6,7,8,9,10,10,9,5,6,6,4,8,3};
  int raised = 0;

  congestion_detector #(.DEPTH(10), .FULL_THRESH(6)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_new = 0; prev_n = 0; last_up = 0; exp_cf = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2 * seq.size() + 200; k++) begin
      @(negedge clk);
      if (k < seq.size()) n_new = 4'(seq[k]);
      else if (k < 2 * seq.size()) n_new = 4'(seq[2 * seq.size() - 1 - k]);
      else n_new = 4'($urandom_range(0, 10));
      #1;
      if (n_new > prev_n) last_up = 1;
      else if (n_new < prev_n) last_up = 0;
      check(w_full == (n_new >= 6), "w_full");
      check(rate_pos == last_up, "rate sign");
      @(posedge clk); #1;
      exp_cf = (n_new >= 6) && last_up;
      check(cf == exp_cf, "cf");
      if (cf) raised++;
      prev_n = n_new;
    end
    check(raised > 0, "cf was raised at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
