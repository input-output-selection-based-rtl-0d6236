// tb_cars: exhaustive check of the congestion level, CL = number of set CFs.
module tb_cars;
  import noc_pkg::*;
  logic [3:0] cf;
  logic [CL_W-1:0] cl;
  int checks = 0, failures = 0;

  cars dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int exp_cl;
      cf = 4'(v);
      exp_cl = 0;
      for (int b = 0; b < 4; b++) if ((v >> b) & 1) exp_cl++;
      #1;
      checks++;
      if (cl != CL_W'(exp_cl)) begin
        failures++;
        $display("FAIL cf=%b cl=%0d expected %0d", cf, cl, exp_cl);
      end
    end
    // the worked example: north and east congested gives CL = 2
    cf = 4'b0011; #1;
    checks++;
    if (cl != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
