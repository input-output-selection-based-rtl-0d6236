// tb_wrr_hamum_router: one router at (3,2) of the 8x8 mesh, its neighbours
// played by the testbench.
//   A  unicast W->E: data unchanged, header granted and taken two cycles
//      after it entered, body flits one per cycle
//   B  output selection: of the two minimal directions E and N the one whose
//      downstream CF is low is taken; with both flags equal, E (first choice)
//   C  multicast fork: this node is DEST0, so the local port and the east
//      port receive the same flits in lock-step, the header with DEST0 removed
//   C2 a fork into the low subnetwork delivers its local copy on L2
//   D  weighted round robin: three saturated inputs N, S, W (upstream CL 0, 2,
//      3) contend for E; the packet order must be N,S,S,W,W,W repeated
//   E  congestion: during D the input buffers fill, their CF is raised and
//      the router's CL equals the number of raised CFs on every cycle
// Each scenario's mechanism is counted and a failure recorded if it never
// occurred.
module tb_wrr_hamum_router;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  link_fwd_t [4:0] in_fwd;
  link_fwd_t [5:0] out_fwd;
  link_bwd_t [4:0] in_bwd;
  link_bwd_t [5:0] out_bwd;
  logic [CL_W-1:0] cl;
  int checks = 0, failures = 0;
  int cycle = 0;

  flit_t q_in[5][$];
  flit_t rx[6][$];
  int    rx_cyc[6][$];
  int    acc_cyc[5][$];
  logic [5:0]  ready_mode;          // 1: always ready, 0: random
  logic [4:0][CL_W-1:0] up_cl;
  logic [3:0]  down_cf;
  int n_cf = 0, n_div = 0, n_fork = 0, n_fork2 = 0, n_wrr_repeat = 0;

  wrr_hamum_router #(.MY_X(3), .MY_Y(2), .MESH_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  // upstream drivers and downstream sinks
  always @(negedge clk) begin
    for (int i = 0; i < 5; i++) begin
      in_fwd[i].valid <= (q_in[i].size() > 0);
      in_fwd[i].flit  <= (q_in[i].size() > 0) ? q_in[i][0] : '0;
      in_fwd[i].cl    <= up_cl[i];
    end
    for (int o = 0; o < 6; o++) begin
      out_bwd[o].ready <= ready_mode[o] ? 1'b1 : 1'($urandom_range(0, 1));
      out_bwd[o].cf    <= (o < 4) ? down_cf[o] : 1'b0;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 5; i++) begin
        if (in_fwd[i].valid && in_bwd[i].ready) begin
          void'(q_in[i].pop_front());
          acc_cyc[i].push_back(cycle);
        end
      end
      for (int o = 0; o < 6; o++) begin
        if (out_fwd[o].valid) begin
          check(out_bwd[o].ready, "valid only when downstream ready");
          rx[o].push_back(out_fwd[o].flit);
          rx_cyc[o].push_back(cycle);
        end
      end
      // E: CL = number of raised input CFs
      begin
        int s;
        s = 0;
        for (int i = 0; i < 4; i++) s += int'(in_bwd[i].cf);
        check(cl == CL_W'(s), "CL equals number of raised CFs");
        for (int o = 0; o < 6; o++) check(out_fwd[o].cl == cl, "CL sent on every output");
        if (s > 0) n_cf++;
      end
      if (out_fwd[DIR_L].valid && out_fwd[DIR_E].valid) n_fork++;
    end
  end

  function automatic flit_t hdr(logic mc, int src_tag, int nd, addr_t d0, addr_t d1, addr_t d2);
    return flit_t'(make_header(mc, addr_t'(src_tag), nd, d0, d1, d2));
  endfunction

  task automatic send(int port, flit_t h, int tag, int nbody);
    q_in[port].push_back(h);
    for (int k = 1; k <= nbody; k++) begin
      flit_t f;
      f = flit_t'({tag[7:0], 8'(k), 16'h5A5A});
      f[FLIT_W-1] = (k == nbody);
      f[FLIT_W-2] = 1'b0;
      q_in[port].push_back(f);
    end
  endtask

  task automatic wait_idle(int max_cycles);
    int t;
    t = 0;
    while (t < max_cycles) begin
      bit busy;
      busy = 0;
      for (int i = 0; i < 5; i++) if (q_in[i].size() > 0 || in_bwd[i].ready == 0) busy = 1;
      if (!busy) break;
      @(posedge clk); t++;
    end
    repeat (20) @(posedge clk);
  endtask

  task automatic clear_rx();
    for (int i = 0; i < 6; i++) begin rx[i].delete(); rx_cyc[i].delete(); end
    for (int i = 0; i < 5; i++) acc_cyc[i].delete();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  addr_t z = '0;
  initial begin
    flit_t h;
    ready_mode = '1; up_cl = '0; down_cf = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // ---------------- A: unicast W -> E, timing ----------------
    clear_rx();
    h = hdr(1'b0, 8'o21, 1, addr_t'({3'd2, 3'd6}), z, z);
    send(DIR_W, h, 1, 4);
    wait_idle(200);
    check(rx[DIR_E].size() == 5, $sformatf("A: 5 flits on E, got %0d", rx[DIR_E].size()));
    if (rx[DIR_E].size() == 5) begin
      check(rx[DIR_E][0] == h, "A: header unchanged");
      check(rx_cyc[DIR_E][0] - acc_cyc[DIR_W][0] == 2, "A: header latency 2 cycles");
      for (int k = 1; k < 5; k++) check(rx_cyc[DIR_E][k] == rx_cyc[DIR_E][0] + k, "A: one flit per cycle");
      check(rx[DIR_E][4][FLIT_W-1], "A: EOM last");
    end
    for (int o = 0; o < 6; o++) if (o != DIR_E) check(rx[o].size() == 0, "A: nothing elsewhere");

    // ---------------- B: adaptive output selection ----------------
    // (3,2) -> (5,4): label 19 -> 37, high network, E and N both minimal
    begin
      logic [3:0] cfs[4] = '{4'b0010, 4'b0001, 4'b0011, 4'b0000};
      int exp_port[4] = '{DIR_N, DIR_E, DIR_E, DIR_E};
      for (int c = 0; c < 4; c++) begin
        clear_rx();
        down_cf = cfs[c];
        repeat (2) @(posedge clk);
        send(DIR_S, hdr(1'b0, 8'o20, 1, addr_t'({3'd4, 3'd5}), z, z), 2, 4);
        wait_idle(200);
        check(rx[exp_port[c]].size() == 5, $sformatf("B%0d: message on port %0d", c, exp_port[c]));
        if (c == 0 && rx[DIR_N].size() == 5) n_div++;
      end
      down_cf = '0;
    end

    // ---------------- C: multicast fork ----------------
    clear_rx();
    ready_mode[DIR_L] = 1'b0;   // local sink randomly stalls
    h = hdr(1'b1, 8'o00, 3, addr_t'({3'd2, 3'd3}), addr_t'({3'd4, 3'd5}), addr_t'({3'd6, 3'd1}));
    send(DIR_W, h, 3, 4);
    wait_idle(300);
    ready_mode[DIR_L] = 1'b1;
    check(rx[DIR_L].size() == 5 && rx[DIR_E].size() == 5, "C: 5 flits on L and on E");
    if (rx[DIR_L].size() == 5 && rx[DIR_E].size() == 5) begin
      header_t ho;
      ho = header_t'(rx[DIR_E][0]);
      check(ho.ndest == 2 && ho.dest[MAX_DEST-1] == addr_t'({3'd4, 3'd5}) &&
            ho.dest[MAX_DEST-2] == addr_t'({3'd6, 3'd1}) && ho.mcast, "C: header DEST0 removed");
      for (int k = 0; k < 5; k++) begin
        check(rx[DIR_L][k] == rx[DIR_E][k], "C: same flits to L and E");
        check(rx_cyc[DIR_L][k] == rx_cyc[DIR_E][k], "C: L and E in lock-step");
      end
    end

    // ---------------- C2: multicast fork into the low subnetwork ----------------
    // (3,2) label 19 is DEST0, next (1,2) label 17: local copy on L2, forward W
    clear_rx();
    h = hdr(1'b1, 8'o00, 2, addr_t'({3'd2, 3'd3}), addr_t'({3'd2, 3'd1}), z);
    send(DIR_E, h, 4, 4);
    wait_idle(300);
    check(rx[DIR_L2].size() == 5 && rx[DIR_W].size() == 5 && rx[DIR_L].size() == 0,
          "C2: low fork on L2 and W");
    if (rx[DIR_L2].size() == 5) n_fork2++;

    // ---------------- D/E: weighted round robin under saturation ----------------
    clear_rx();
    up_cl[DIR_N] = 0; up_cl[DIR_S] = 2; up_cl[DIR_W] = 3;
    for (int p = 0; p < 6; p++) begin
      send(DIR_N, hdr(1'b0, 8'd0, 1, addr_t'({3'd2, 3'd7}), z, z), 16 + p, 4);
      send(DIR_S, hdr(1'b0, 8'd2, 1, addr_t'({3'd2, 3'd7}), z, z), 32 + p, 4);
      send(DIR_W, hdr(1'b0, 8'd3, 1, addr_t'({3'd2, 3'd7}), z, z), 48 + p, 4);
    end
    wait_idle(2000);
    check(rx[DIR_E].size() == 90, $sformatf("D: 90 flits on E, got %0d", rx[DIR_E].size()));
    begin
      int exp_src[12] = '{0, 2, 2, 3, 3, 3, 0, 2, 2, 3, 3, 3};
      for (int k = 0; k < 12 && 5 * k < rx[DIR_E].size(); k++) begin
        header_t hh;
        hh = header_t'(rx[DIR_E][5 * k]);
        check(hh.bom && int'(hh.src) == exp_src[k],
              $sformatf("D: packet %0d from input %0d, expected %0d", k, hh.src, exp_src[k]));
        if (k > 0 && int'(hh.src) == exp_src[k - 1] && exp_src[k] == exp_src[k - 1]) n_wrr_repeat++;
      end
    end

    check(n_div > 0, "mechanism: CF diversion seen");
    check(n_fork > 0, "mechanism: multicast fork seen");
    check(n_fork2 > 0, "mechanism: low-subnetwork fork on L2 seen");
    check(n_wrr_repeat > 0, "mechanism: weighted repeat grants seen");
    check(n_cf > 0, "mechanism: congestion flag raised");
    $display("diverted=%0d fork_cycles=%0d wrr_repeats=%0d cf_cycles=%0d", n_div, n_fork, n_wrr_repeat, n_cf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
