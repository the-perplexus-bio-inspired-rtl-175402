// tb_route_array: self-checking test of the dynamic routing fabric on a
// 6 x 6 mesh.
// Random pairs of free units ask for connections, one after another, with
// a random side (source or target) starting each process, so earlier paths
// become obstacles for later ones. For each process the test computes, by
// its own breadth-first search over the free units (8-neighbourhood), the
// shortest hop count D, and checks: ack or fail as reachability says; D+1
// units newly configured; the routed data reaching the target exactly D+1
// cycles after the source drives it; and a process time of the form
// const + 2*D. It also checks that two simultaneous requests are served
// most-bottom-left first, and that an existing path keeps carrying data
// while a new path is being built. Finally it builds one source's tree:
// new targets join an existing path of their label, and the source adds a
// target, each branch as long as the distance to the nearest tree unit,
// and all targets receive the source's data.
module tb_route_array;
  import ubichip_pkg::*;
  localparam int R = 6, C = 6, N = R * C, NW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] req = '0, is_source = '0, has_net = '0, clear_path = '0;
  logic [N-1:0][NW-1:0] net_id = '0;
  logic [N-1:0][0:0] local_data = '0, data;
  route_sel_e [N-1:0] sel;
  logic [N-1:0] ack, fail;
  logic busy;

  route_array #(.ROWS(R), .COLS(C), .DW(1)) dut (
    .clk, .rst_n, .req, .is_source, .has_net, .net_id, .local_data, .clear_path,
    .data, .sel, .ack, .fail, .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask

  // hop distance between a and b through free units (a and b must be free); -1 if none
  function automatic int bfs(input int a, input int b);
    int hop [N];
    int q [$];
    foreach (hop[i]) hop[i] = -1;
    hop[a] = 0; q.push_back(a);
    while (q.size() > 0) begin
      int u;
      u = q.pop_front();
      for (int dx = -1; dx <= 1; dx++)
        for (int dy = -1; dy <= 1; dy++) begin
          int x, y, v;
          x = u % C + dx; y = u / C + dy; v = y * C + x;
          if ((dx != 0 || dy != 0) && x >= 0 && x < C && y >= 0 && y < R &&
              hop[v] < 0 && sel[v] == SEL_NONE) begin
            hop[v] = hop[u] + 1; q.push_back(v);
          end
        end
    end
    return hop[b];
  endfunction

  // hop distance from free unit a, through free units, to the nearest unit
  // already carrying a path (sel set and in mask); -1 if none
  function automatic int bfs_tree(input int a, input logic [N-1:0] mask);
    int hop [N];
    int q [$];
    foreach (hop[i]) hop[i] = -1;
    hop[a] = 0; q.push_back(a);
    while (q.size() > 0) begin
      int u;
      u = q.pop_front();
      if (mask[u] && u != a) return hop[u];
      if (u == a || sel[u] == SEL_NONE)
        for (int dx = -1; dx <= 1; dx++)
          for (int dy = -1; dy <= 1; dy++) begin
            int x, y, v;
            x = u % C + dx; y = u / C + dy; v = y * C + x;
            if ((dx != 0 || dy != 0) && x >= 0 && x < C && y >= 0 && y < R &&
                hop[v] < 0 && (sel[v] == SEL_NONE || mask[v])) begin
              hop[v] = hop[u] + 1; q.push_back(v);
            end
          end
    end
    return -1;
  endfunction

  function automatic logic [N-1:0] on_path();
    for (int i = 0; i < N; i++) on_path[i] = (sel[i] != SEL_NONE);
  endfunction

  int base = -1, n_ok = 0, n_fail = 0, n_reuse = 0;

  // a new partner joins the existing tree of label lab; m starts the process
  // (m_is_src: m is the tree's source and g the new target, else m is the
  // new target). Checks: ack, D new units where D is the distance to the
  // nearest tree unit, the usual process time, and data from src at g.
  task automatic join_tree(input int src, input int m, input int g, input bit m_is_src, input int lab);
    int D, cyc, nbef, naft;
    logic [N-1:0] tree;
    tree = on_path();
    D = bfs_tree(g, tree);
    nbef = $countones(tree);
    has_net[m] = 1; net_id[m] = NW'(lab); is_source[m] = m_is_src;
    if (m != g) begin has_net[g] = 1; net_id[g] = NW'(lab); end
    req[m] = 1;
    cyc = 0;
    while (!ack[m] && !fail[m] && cyc < 500) begin
      tick(); cyc++;
      if (cyc == 1) req[m] = 0;
    end
    has_net = '0;
    check(ack[m], $sformatf("join %0d to tree of %0d must succeed", g, src));
    naft = $countones(on_path());
    check(naft - nbef == D, $sformatf("join: %0d units configured, exp %0d", naft - nbef, D));
    check(cyc - 2 * D == base, $sformatf("join: process time %0d for D=%0d (base %0d)", cyc, D, base));
    n_reuse++;
    // every unit of the old tree keeps its setting
    for (int i = 0; i < N; i++)
      if (tree[i]) check(sel[i] != SEL_NONE, "tree unit kept");
    local_data[src] = 1;
    repeat (2 * N) tick();
    check(data[g] == 1, "new partner receives the source data");
    local_data[src] = 0;
    repeat (2 * N) tick();
    check(data[g] == 0, "new partner follows the source data");
  endtask


  // connect source s and target g; m is the unit that starts the process
  task automatic connect(input int s, input int g, input bit m_is_src, input int lab);
    int m, p, D, cyc, nbef, naft;
    m = m_is_src ? s : g;
    p = m_is_src ? g : s;
    D = bfs(s, g);
    nbef = 0;
    for (int i = 0; i < N; i++) if (sel[i] != SEL_NONE) nbef++;
    has_net[m] = 1; has_net[p] = 1; net_id[m] = NW'(lab); net_id[p] = NW'(lab);
    is_source[m] = m_is_src; req[m] = 1;
    cyc = 0;
    while (!ack[m] && !fail[m] && cyc < 500) begin
      tick(); cyc++;
      if (cyc == 1) req[m] = 0;
    end
    has_net[m] = 0; has_net[p] = 0;
    if (D < 0) begin
      check(fail[m], $sformatf("unreachable %0d->%0d must fail", s, g));
      n_fail++;
    end else begin
      check(ack[m], $sformatf("%0d->%0d (D=%0d) must succeed", s, g, D));
      naft = 0;
      for (int i = 0; i < N; i++) if (sel[i] != SEL_NONE) naft++;
      check(naft - nbef == D + 1, $sformatf("%0d units configured, exp %0d", naft - nbef, D + 1));
      check(sel[s] == SEL_LOCAL, "source drives its own data");
      if (base < 0) base = cyc - 2 * D;
      check(cyc - 2 * D == base, $sformatf("process time %0d for D=%0d (base %0d)", cyc, D, base));
      // data latency: D+1 cycles from source to target
      repeat (D + 3) tick();
      local_data[s] = 1;
      for (int k = 1; k <= D + 1; k++) begin
        tick();
        check(data[g] == (k == D + 1), $sformatf("data at target naft %0d cycles", k));
      end
      local_data[s] = 0;
      repeat (D + 2) tick();
      n_ok++;
    end
  endtask

  initial begin
    int s, g;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // ---- priority: units 14 and 9 ask together, 9 (lower row) wins
    has_net[9] = 1; net_id[9] = 1; has_net[33] = 1; net_id[33] = 1;
    has_net[14] = 1; net_id[14] = 2; has_net[20] = 1; net_id[20] = 2;
    is_source[9] = 1; is_source[14] = 1;
    req[9] = 1; req[14] = 1;
    begin
      int first, cyc;
      first = -1; cyc = 0;
      while (first < 0 && cyc < 200) begin
        tick(); cyc++;
        if (ack[9]) begin first = 9; req[9] = 0; end
        if (ack[14]) begin first = 14; req[14] = 0; end
      end
      check(first == 9, $sformatf("bottom-left request served first (%0d)", first));
      cyc = 0;
      while (!ack[14] && cyc < 200) begin tick(); cyc++; end
      req[14] = 0;
      check(ack[14], "second request served next");
      tick();
    end
    has_net = '0;
    // ---- path 9->33 keeps carrying data while 14->20's path was built: check now with a new process
    begin
      int D0;
      bit ok;
      D0 = 0;
      // measure latency of path 9 -> 33
      local_data[9] = 1;
      while (!data[33][0] && D0 < 40) begin tick(); D0++; end
      check(data[33][0], "existing path 9->33 carries data");
      local_data[9] = 0;
      repeat (D0 + 2) tick();
      // start a new process (0 -> 35) and toggle the old path's data during it
      has_net[0] = 1; has_net[35] = 1; net_id[0] = 7; net_id[35] = 7; is_source[0] = 1; req[0] = 1;
      ok = 1;
      for (int k = 0; k < 30; k++) begin
        local_data[9] = k[0];
        tick(); req[0] = 0;
        if (k >= D0 - 1) begin
          // value driven D0 cycles earlier
          ok &= (data[33][0] == ((k - D0 + 1) % 2 == 1));
        end
        if (ack[0] || fail[0]) has_net[0] = 0;
      end
      check(busy == 0, "process finished");
      check(ok, "old path ran without interruption during routing");
      has_net = '0; local_data = '0;
    end
    // ---- random connections with growing obstacles
    for (int round = 0; round < 6; round++) begin
      clear_path = '1; tick(); clear_path = '0; tick();
      for (int t = 0; t < 8; t++) begin
        s = $urandom_range(0, N - 1);
        g = $urandom_range(0, N - 1);
        if (s != g && sel[s] == SEL_NONE && sel[g] == SEL_NONE)
          connect(s, g, 1'($urandom_range(0, 1)), round * 8 + t);
      end
    end
    // ---- reuse of an existing path
    clear_path = '1; tick(); clear_path = '0; tick();
    connect(0, 5, 1, 3);                  // bottom row, label 3
    join_tree(0, 21, 21, 0, 3);                // target at (3,3) joins: 3 new units
    join_tree(0, 0, 30, 1, 3);                 // source adds target at (0,5)
    join_tree(0, 35, 35, 0, 3);                // target at (5,5) joins
    check(data[5] == 0 && data[21] == 0, "tree idle");
    local_data[0] = 1;
    repeat (2 * N) tick();
    check(data[5] && data[21] && data[30] && data[35], "all four targets fed by one source");
    local_data[0] = 0;
    check(n_reuse == 3, "reuse joins done");
    // ---- a request whose label no other unit has: the search must fail
    begin
      int cyc;
      has_net[17] = 1; net_id[17] = NW'(60); is_source[17] = 1; req[17] = 1;
      cyc = 0;
      while (!ack[17] && !fail[17] && cyc < 200) begin
        tick(); cyc++;
        if (cyc == 1) req[17] = 0;
      end
      check(fail[17], "request without partner fails");
      if (fail[17]) n_fail++;
      has_net = '0;
      tick();
      check(busy == 0, "fabric idle after a failed search");
    end
    check(n_ok > 10, $sformatf("successful connections %0d", n_ok));
    check(n_fail > 0, $sformatf("failed searches %0d", n_fail));
    $display("connections: %0d built, %0d failed", n_ok, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
