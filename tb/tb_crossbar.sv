// tb_crossbar: 5 inputs, 6 outputs; random owner selections and enables; every output must carry
// the selected input's flit and the enable as valid, including one input
// driving two outputs.
module tb_crossbar;
  import noc_pkg::*;
  flit_t [4:0] in_flit;
  flit_t [5:0] out_flit;
  logic [5:0][2:0] sel;
  logic [5:0] en, out_valid;
  int checks = 0, failures = 0;

  crossbar #(.NI(5), .NO(6)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 5; i++) in_flit[i] = {$urandom} ^ (i << 28);
      for (int o = 0; o < 6; o++) sel[o] = 3'($urandom_range(0, 4));
      if (t % 7 == 0) sel[4] = sel[0];   // fork: one input to two outputs
      en = 6'($urandom);
      #1;
      for (int o = 0; o < 6; o++) begin
        checks++;
        if (out_flit[o] != in_flit[sel[o]] || out_valid[o] != en[o]) begin
          failures++;
          $display("FAIL out %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
