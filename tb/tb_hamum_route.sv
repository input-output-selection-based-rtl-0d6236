// tb_hamum_route: checks the address decoder on the 8x8 mesh.
// The reference allows a direction when it shortens the distance to the
// target and the neighbour's label lies between this node's label and the
// target's (so every hop stays in the high or in the low subnetwork). With both
// a horizontal and a vertical direction allowed, the horizontal one is
// expected unless only it has its CF raised. Every source/destination pair is
// also walked hop by hop with random CFs: the walk must arrive in exactly the
// Manhattan distance with labels strictly monotonic along the way. Multicast header handling (local delivery, forwarding
// to the next destination, list shift, the L2 channel for forks into the low
// subnetwork) is checked as well.
module tb_hamum_route;
  import noc_pkg::*;

  localparam int W = 8, H = 8;
  header_t hdr_in, hdr_out;
  logic [2:0] cur_x, cur_y;
  logic [3:0] cf_down;
  logic [5:0] out_mask;
  logic adaptive, diverted;
  int checks = 0, failures = 0;
  int n_adaptive = 0, n_diverted = 0;

  hamum_route #(.MESH_W(W)) dut (.*);

  function automatic int lab(int x, int y);
    return (y % 2 == 0) ? y * W + x : y * W + (W - 1 - x);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // expected mask for a network hop from (cx,cy) towards (tx,ty)
  function automatic logic [5:0] ref_mask(int cx, int cy, int tx, int ty, logic [3:0] cf);
    int dx[4] = '{0, 1, 0, -1};
    int dy[4] = '{1, 0, -1, 0};
    bit ok[4];
    bit up;
    logic [5:0] m;
    up = lab(tx, ty) > lab(cx, cy);
    for (int d = 0; d < 4; d++) begin
      int nx, ny, dist0, dist1;
      nx = cx + dx[d]; ny = cy + dy[d];
      dist0 = (tx > cx ? tx - cx : cx - tx) + (ty > cy ? ty - cy : cy - ty);
      dist1 = (tx > nx ? tx - nx : nx - tx) + (ty > ny ? ty - ny : ny - ty);
      ok[d] = (nx >= 0 && nx < W && ny >= 0 && ny < H && dist1 < dist0) &&
              (up ? (lab(nx, ny) > lab(cx, cy) && lab(nx, ny) <= lab(tx, ty))
                  : (lab(nx, ny) < lab(cx, cy) && lab(nx, ny) >= lab(tx, ty)));
    end
    m = '0;
    begin
      int h, v;
      h = ok[1] ? 1 : (ok[3] ? 3 : -1);
      v = ok[0] ? 0 : (ok[2] ? 2 : -1);
      if (h >= 0 && v >= 0) m[(cf[h] && !cf[v]) ? v : h] = 1'b1;
      else if (h >= 0) m[h] = 1'b1;
      else if (v >= 0) m[v] = 1'b1;
    end
    return m;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t z;
    z = '0;
    // single-hop reference over all pairs and all CF patterns (sampled)
    for (int s = 0; s < W * H; s++) begin
      for (int d = 0; d < W * H; d++) begin
        int sx, sy, tx, ty;
        sx = s % W; sy = s / W; tx = d % W; ty = d / W;
        if (s == d) continue;
        cur_x = 3'(sx); cur_y = 3'(sy);
        cf_down = 4'($urandom);
        hdr_in = make_header(1'b0, addr_t'({3'(sy), 3'(sx)}), 1,
                             addr_t'({3'(ty), 3'(tx)}), z, z);
        #1;
        check(out_mask == ref_mask(sx, sy, tx, ty, cf_down),
              $sformatf("mask %0d->%0d got %b", s, d, out_mask));
        if (adaptive) n_adaptive++;
        if (diverted) n_diverted++;
        // full walk with random CFs
        begin
          int x, y, hops;
          x = sx; y = sy; hops = 0;
          while (!(x == tx && y == ty) && hops < 20) begin
            int lprev;
            lprev = lab(x, y);
            cur_x = 3'(x); cur_y = 3'(y);
            cf_down = 4'($urandom);
            #1;
            case (out_mask)
              6'b000001: y++;
              6'b000010: x++;
              6'b000100: y--;
              6'b001000: x--;
              default: hops = 99;
            endcase
            hops++;
            if (hops < 99)
              check((lab(tx, ty) > lab(sx, sy)) ? (lab(x, y) > lprev && lab(x, y) <= lab(tx, ty))
                                                : (lab(x, y) < lprev && lab(x, y) >= lab(tx, ty)),
                    $sformatf("walk %0d->%0d leaves its subnetwork", s, d));
          end
          check(hops == (tx > sx ? tx - sx : sx - tx) + (ty > sy ? ty - sy : sy - ty),
                $sformatf("walk %0d->%0d took %0d hops", s, d, hops));
          cur_x = 3'(tx); cur_y = 3'(ty); #1;
          check(out_mask == 6'b010000, "unicast at destination takes local only");
        end
      end
    end
    // multicast: node (3,2) is DEST0, next destination (5,4), then (1,6)
    cur_x = 3; cur_y = 2; cf_down = 4'b0000;
    hdr_in = make_header(1'b1, addr_t'(6'o00), 3, addr_t'({3'd2, 3'd3}),
                         addr_t'({3'd4, 3'd5}), addr_t'({3'd6, 3'd1}));
    #1;
    check(out_mask == (6'b010000 | ref_mask(3, 2, 5, 4, 4'b0)), "mcast local + forward");
    check(hdr_out.ndest == 2, "mcast ndest decremented");
    check(hdr_out.dest[MAX_DEST-1] == addr_t'({3'd4, 3'd5}), "mcast list shifted 0");
    check(hdr_out.dest[MAX_DEST-2] == addr_t'({3'd6, 3'd1}), "mcast list shifted 1");
    check(hdr_out.src == hdr_in.src && hdr_out.mcast, "mcast src and type kept");
    // multicast passing through (not a destination here)
    cur_x = 3; cur_y = 1;
    #1;
    check(out_mask == ref_mask(3, 1, 3, 2, 4'b0) && hdr_out == hdr_in, "mcast transit");
    // last destination of a multicast
    cur_x = 1; cur_y = 6;
    hdr_in = make_header(1'b1, addr_t'(6'o00), 1, addr_t'({3'd6, 3'd1}), z, z);
    #1;
    check(out_mask == 6'b010000, "mcast last destination local only");
    // low-channel multicast: from label 27 (4,3) down to (5,3) label 26
    cur_x = 4; cur_y = 3;
    hdr_in = make_header(1'b1, addr_t'({3'd3, 3'd4}), 2, addr_t'({3'd3, 3'd5}),
                         addr_t'({3'd1, 3'd6}), z);
    #1;
    check(out_mask == 6'b000010, "low channel east hop in odd row");
    // low-subnetwork fork: (4,3) is DEST0, next (5,3) lower: local copy on L2
    hdr_in = make_header(1'b1, addr_t'({3'd7, 3'd0}), 2, addr_t'({3'd3, 3'd4}),
                         addr_t'({3'd3, 3'd5}), z);
    #1;
    check(out_mask == 6'b100010, "low fork: L2 and east");
    check(n_adaptive > 0 && n_diverted > 0, "adaptive choice and CF diversion both seen");
    $display("adaptive=%0d diverted=%0d", n_adaptive, n_diverted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
