// tb_wrr_arbiter: weighted round-robin arbitration of one output.
// 1) All five inputs request continuously with CL = {0,2,4,1,3}: the grant
//    sequence must be 0, 1,1, 2,2,2,2, 3, 4,4,4 and repeat (weight max(1,CL)).
// 2) All CL = 0: plain round robin 0,1,2,3,4.
// 3) Random requests, CLs and take: compared cycle by cycle with a reference
//    model kept as (turn owner, packets left, pointer).
// 4) An input whose request drops is skipped and loses the rest of its turn.
module tb_wrr_arbiter;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [4:0] req, gnt;
  logic [4:0][CL_W-1:0] cl;
  logic take, any_gnt;
  logic [2:0] p_enc;
  int checks = 0, failures = 0;

  wrr_arbiter #(.N(5)) dut (.*);
  always #5 clk = ~clk;

  // reference model
  int m_ptr, m_owner, m_left;

  function automatic int first_req(logic [4:0] r, int p);
    for (int k = 0; k < 5; k++) if (r[(p + k) % 5]) return (p + k) % 5;
    return -1;
  endfunction

  task automatic model_step(logic [4:0] r, logic [4:0][CL_W-1:0] w, logic tk);
    int g;
    g = first_req(r, m_ptr);
    if (!tk || g < 0) return;
    if (g == m_owner && m_left > 0) begin
      m_left--;
    end else begin
      m_owner = g;
      m_left  = ((w[g] > 1) ? int'(w[g]) : 1) - 1;
    end
    m_ptr = (m_left == 0) ? (g + 1) % 5 : g;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int idx(logic [4:0] g);
    for (int i = 0; i < 5; i++) if (g[i]) return i;
    return -1;
  endfunction

  task automatic reset_all();
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    m_ptr = 0; m_owner = -1; m_left = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_seq[] = '{0, 1, 1, 2, 2, 2, 2, 3, 4, 4, 4};
    req = '0; take = 0; cl = '0;
    @(posedge clk);
    reset_all();
    // 1) weighted sequence
    cl = {3'd3, 3'd1, 3'd4, 3'd2, 3'd0};
    req = 5'b11111; take = 1;
    for (int r = 0; r < 3; r++) begin
      foreach (exp_seq[k]) begin
        @(negedge clk);
        check(idx(gnt) == exp_seq[k], $sformatf("weighted seq step %0d got %0d", k, idx(gnt)));
      end
    end
    // 2) plain round robin
    @(negedge clk); reset_all();
    cl = '0;
    for (int k = 0; k < 15; k++) begin
      @(negedge clk);
      check(idx(gnt) == k % 5, "plain round robin");
    end
    // 4) skip: input 2 has weight 4 but stops after two packets
    @(negedge clk); reset_all();
    cl = {3'd0, 3'd0, 3'd4, 3'd0, 3'd0};
    req = 5'b00100;
    @(negedge clk); check(idx(gnt) == 2, "skip: first of input 2");
    @(negedge clk); check(idx(gnt) == 2, "skip: second of input 2");
    req = 5'b01011;
    #1 check(idx(gnt) == 3, "skip: empty input skipped");
    @(negedge clk);
    req = 5'b00111;
    #1 check(idx(gnt) == 0, "skip: pointer moved on past 3");
    // 3) random against the model
    @(negedge clk); reset_all();
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      req  = 5'($urandom);
      take = ($urandom_range(0, 3) != 0);
      if (t % 50 == 0) for (int i = 0; i < 5; i++) cl[i] = CL_W'($urandom_range(0, 4));
      #1;
      begin
        int g;
        g = first_req(req, m_ptr);
        check(any_gnt == (req != 0), "any_gnt");
        check((g < 0) ? (gnt == 0) : (gnt == 5'(1 << g)), $sformatf("random grant t=%0d", t));
      end
      @(posedge clk);
      model_step(req, cl, take);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
