// tb_ppe: exhaustive check of the programmable priority encoder for N = 5:
// every request vector against every pointer, compared with a reference scan.
module tb_ppe;
  logic [4:0] req, gnt;
  logic [2:0] ptr;
  logic any_gnt;
  int checks = 0, failures = 0;

  ppe #(.N(5)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 5; p++) begin
      for (int r = 0; r < 32; r++) begin
        logic [4:0] exp_g;
        exp_g = '0;
        for (int k = 0; k < 5; k++) begin
          int idx;
          idx = (p + k) % 5;
          if (r[idx] && exp_g == 0) exp_g[idx] = 1'b1;
        end
        req = 5'(r); ptr = 3'(p);
        #1;
        checks++;
        if (gnt != exp_g || any_gnt != (r != 0)) begin
          failures++;
          $display("FAIL req=%b ptr=%0d gnt=%b exp=%b", req, ptr, gnt, exp_g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
