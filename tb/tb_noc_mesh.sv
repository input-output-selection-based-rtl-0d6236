// tb_noc_mesh: end-to-end test of the 8x8 mesh at its default parameters.
// The testbench plays the 64 processing elements: it injects messages on
// the local ports and checks every delivery against a scoreboard.
//   1  the path-based multicast example of a node labelled 27 sending to 16
//      destinations, split by the sender into the four label/column subsets
//      and into messages of at most three sorted destinations
//   2  uniform random unicast traffic, several 5-flit messages per node at
//      once, enough to congest the network
//   3  mixed traffic: 70 % unicast, 30 % multicast to random destination sets
// Every message must reach every one of its destinations exactly once, with
// its header source and its four body flits intact and in order, and nothing
// else may arrive. Counted mechanisms (each must occur at least once): a
// multicast fork (local delivery and forwarding in the same cycle), a
// delivery on the second consumption channel L2, a raised
// congestion flag, a router CL above zero, an output chosen for a low
// downstream CF, a WRR turn longer than one packet, and multicasts on both
// the high and the low channel subnetworks.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int W = MESH_W_DEF, H = MESH_H_DEF, NN = W * H;

  logic clk = 0, rst_n = 0;
  link_fwd_t [NN-1:0] pe_in_fwd, pe_out_fwd;
  link_bwd_t [NN-1:0] pe_in_bwd, pe_out_bwd;
  link_fwd_t [NN-1:0] pe_out2_fwd;
  link_bwd_t [NN-1:0] pe_out2_bwd;
  logic [NN-1:0][CL_W-1:0] router_cl;

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  flit_t q_in[NN][$];
  bit    expected[int][int];   // expected[node][tag]
  int    n_expected = 0, n_delivered = 0;
  int    n_mc_high = 0, n_mc_low = 0;
  int    fork_cnt[NN], div_cnt[NN], wrr_cnt[NN], cf_cnt[NN];
  int    cl_cnt = 0;
  int    next_tag = 1;

  // receive state per node
  // receive state per node and consumption channel (0: L, 1: L2)
  bit    rx_busy[NN][2];
  int    rx_tag[NN][2], rx_seq[NN][2];
  int    l2_msgs = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  function automatic int lab2node(int l);
    int y, x;
    y = l / W;
    x = (y % 2 == 0) ? (l % W) : (W - 1 - (l % W));
    return y * W + x;
  endfunction

  function automatic int node2lab(int n);
    int y, x;
    y = n / W; x = n % W;
    return (y % 2 == 0) ? y * W + x : y * W + (W - 1 - x);
  endfunction

  function automatic addr_t node_addr(int n);
    return addr_t'({3'(n / W), 3'(n % W)});
  endfunction

  // queue one message from node src to the node list dst (already in path order)
  task automatic send(int src, int dst[$], bit mc);
    header_t h;
    int tag;
    addr_t d[3];
    tag = next_tag++;
    for (int k = 0; k < 3; k++) d[k] = (k < dst.size()) ? node_addr(dst[k]) : addr_t'(0);
    h = make_header(mc, node_addr(src), dst.size(), d[0], d[1], d[2]);
    q_in[src].push_back(flit_t'(h));
    for (int k = 1; k <= 4; k++)
      q_in[src].push_back({(k == 4), 1'b0, 14'(tag), 16'(k)});
    foreach (dst[k]) begin
      check(!expected[dst[k]].exists(tag), "tag unique");
      expected[dst[k]][tag] = 1'b1;
      n_expected++;
    end
  endtask

  // multicast from src to a destination set: split into high and low label
  // sides, each further by column (x >= or < the source's), sort along the
  // path, and cut into messages of at most three destinations
  task automatic multicast(int src, int dests[$]);
    int part[4][$];
    int labs[$];
    int chunk[$];
    int ls, xs;
    ls = node2lab(src); xs = src % W;
    for (int p = 0; p < 4; p++) part[p].delete();
    foreach (dests[k]) begin
      int p;
      p = (node2lab(dests[k]) > ls ? 0 : 2) + ((dests[k] % W) >= xs ? 0 : 1);
      part[p].push_back(dests[k]);
    end
    for (int p = 0; p < 4; p++) begin
      labs.delete();
      foreach (part[p][k]) labs.push_back(node2lab(part[p][k]));
      if (p < 2) labs.sort(); else labs.rsort();
      for (int k = 0; k < labs.size(); k += 3) begin
        chunk.delete();
        for (int j = k; j < k + 3 && j < labs.size(); j++) chunk.push_back(lab2node(labs[j]));
        send(src, chunk, 1'b1);
        if (p < 2) n_mc_high++; else n_mc_low++;
      end
    end
  endtask

  // PE drivers and sinks
  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      pe_in_fwd[n].valid <= (q_in[n].size() > 0);
      pe_in_fwd[n].flit  <= (q_in[n].size() > 0) ? q_in[n][0] : '0;
      pe_in_fwd[n].cl    <= '0;
      pe_out_bwd[n].ready  <= ($urandom_range(0, 9) != 0);
      pe_out_bwd[n].cf     <= 1'b0;
      pe_out2_bwd[n].ready <= ($urandom_range(0, 9) != 0);
      pe_out2_bwd[n].cf    <= 1'b0;
    end
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      for (int n = 0; n < NN; n++) begin
        if (router_cl[n] != 0) cl_cnt++;
        if (pe_in_fwd[n].valid && pe_in_bwd[n].ready) void'(q_in[n].pop_front());
        for (int c = 0; c < 2; c++) begin
          link_fwd_t lf;
          link_bwd_t lb;
          lf = c ? pe_out2_fwd[n] : pe_out_fwd[n];
          lb = c ? pe_out2_bwd[n] : pe_out_bwd[n];
          if (lf.valid) begin
            flit_t f;
            f = lf.flit;
            check(lb.ready, "delivery only when PE ready");
            if (f[FLIT_W-2]) begin
              check(!rx_busy[n][c], "header only between messages");
              rx_busy[n][c] = 1'b1;
              rx_seq[n][c]  = 0;
            end else begin
              check(rx_busy[n][c], "body flit inside a message");
              rx_seq[n][c]++;
              check(int'(f[15:0]) == rx_seq[n][c], "body flits in order");
              if (rx_seq[n][c] == 1) rx_tag[n][c] = int'(f[29:16]);
              check(int'(f[29:16]) == rx_tag[n][c], "body flits of one message");
              if (f[FLIT_W-1]) begin
                check(rx_seq[n][c] == 4, "EOM on the fourth body flit");
                check(expected.exists(n) && expected[n].exists(rx_tag[n][c]),
                      $sformatf("message %0d expected at node %0d", rx_tag[n][c], n));
                if (expected.exists(n) && expected[n].exists(rx_tag[n][c])) begin
                  expected[n].delete(rx_tag[n][c]);
                  n_delivered++;
                  if (c == 1) l2_msgs++;
                end
                rx_busy[n][c] = 1'b0;
              end
            end
          end
        end
      end
    end
  end

  // per-router mechanism monitors
  for (genvar y = 0; y < H; y++) begin : g_my
    for (genvar x = 0; x < W; x++) begin : g_mx
      localparam int n = y * W + x;
      always @(posedge clk) begin
        // a fork: a local output and a network output moved by one input
        for (int lo = DIR_L; lo <= DIR_L2; lo++)
          for (int o = 0; o < 4; o++)
            if (dut.g_y[y].g_x[x].u_router.xb_en[lo] && dut.g_y[y].g_x[x].u_router.xb_en[o] &&
                dut.g_y[y].g_x[x].u_router.owner_q[lo] == dut.g_y[y].g_x[x].u_router.owner_q[o])
              fork_cnt[n]++;
        if (|(dut.g_y[y].g_x[x].u_router.route_now & dut.g_y[y].g_x[x].u_router.rt_diverted))
          div_cnt[n]++;
        if (|dut.g_y[y].g_x[x].u_router.cf_in[3:0]) cf_cnt[n]++;
        if (dut.g_y[y].g_x[x].u_router.g_arb[DIR_E].u_arb.wcnt != '0 ||
            dut.g_y[y].g_x[x].u_router.g_arb[DIR_N].u_arb.wcnt != '0 ||
            dut.g_y[y].g_x[x].u_router.g_arb[DIR_W].u_arb.wcnt != '0 ||
            dut.g_y[y].g_x[x].u_router.g_arb[DIR_S].u_arb.wcnt != '0 ||
            dut.g_y[y].g_x[x].u_router.g_arb[DIR_L].u_arb.wcnt != '0)
          wrr_cnt[n]++;
      end
    end
  end

  function automatic bit all_sent();
    for (int n = 0; n < NN; n++) if (q_in[n].size() > 0) return 0;
    return 1;
  endfunction

  task automatic drain(int max_cycles);
    int t;
    t = 0;
    while ((!all_sent() || n_delivered < n_expected) && t < max_cycles) begin
      @(posedge clk); t++;
    end
    repeat (30) @(posedge clk);
    check(all_sent() && n_delivered == n_expected,
          $sformatf("all delivered: %0d of %0d", n_delivered, n_expected));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: delivered %0d of %0d", n_delivered, n_expected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_in_fwd = '0; pe_out_bwd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // 1: the multicast example, destinations given as labels
    begin
      int labs[] = '{0, 1, 7, 8, 9, 19, 26, 31, 32, 37, 50, 55, 57, 59, 62, 63};
      int dn[$];
      foreach (labs[k]) dn.push_back(lab2node(labs[k]));
      multicast(lab2node(27), dn);
    end
    drain(5000);

    // 2: uniform unicast burst
    for (int n = 0; n < NN; n++) begin
      for (int k = 0; k < 8; k++) begin
        int d;
        int dl[$];
        dl.delete();
        do d = $urandom_range(0, NN - 1); while (d == n);
        dl.push_back(d);
        send(n, dl, 1'b0);
      end
    end
    drain(50000);

    // 3: mixed traffic, 70 % unicast / 30 % multicast
    for (int n = 0; n < NN; n++) begin
      for (int k = 0; k < 6; k++) begin
        int dl[$];
        dl.delete();
        if ($urandom_range(0, 9) < 7) begin
          int d;
          do d = $urandom_range(0, NN - 1); while (d == n);
          dl.push_back(d);
          send(n, dl, 1'b0);
        end else begin
          bit pick[NN];
          for (int d = 0; d < NN; d++) pick[d] = 1'b0;
          for (int j = 0; j < 8; j++) begin
            int d;
            do d = $urandom_range(0, NN - 1); while (d == n);
            pick[d] = 1'b1;
          end
          for (int d = 0; d < NN; d++) if (pick[d]) dl.push_back(d);
          multicast(n, dl);
        end
      end
    end
    drain(100000);

    begin
      int f = 0, dv = 0, wr = 0, cf = 0;
      for (int n = 0; n < NN; n++) begin
        f += fork_cnt[n]; dv += div_cnt[n]; wr += wrr_cnt[n]; cf += cf_cnt[n];
      end
      $display("messages=%0d deliveries=%0d fork=%0d diverted=%0d wrr_multi=%0d cf=%0d cl=%0d mc_high=%0d mc_low=%0d cycles=%0d",
               next_tag - 1, n_delivered, f, dv, wr, cf, cl_cnt, n_mc_high, n_mc_low, cycle);
      check(f > 0, "mechanism: multicast fork");
      check(dv > 0, "mechanism: output chosen by CF");
      check(wr > 0, "mechanism: WRR turn over one packet");
      check(cf > 0, "mechanism: congestion flag raised");
      check(cl_cnt > 0, "mechanism: CL above zero");
      check(n_mc_high > 0 && n_mc_low > 0, "mechanism: multicast on both subnetworks");
      check(l2_msgs > 0, "mechanism: delivery on the second consumption channel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
