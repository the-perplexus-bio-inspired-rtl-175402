// tb_route_unit: self-checking test of one routing unit, with the global
// lines and the neighbours driven by the testbench.
//  1. As master (source): sends {label, source bit} MSB first, is visited
//     from the start of the search, sets its multiplexer to its own logic
//     unit when the backward signal arrives from a random side, and pulses
//     ack when done.
//  2. As the partner reached by the search: recognises its label, becomes
//     visited from a random side (the parent), reports found, starts the
//     backward signal towards the parent and selects the parent's data;
//     the routed data then follows that neighbour one cycle later.
//  3. As an intermediate unit on a path whose master is the target: it
//     selects the side the backward signal came from (the child).
//  4. As master with no free neighbour: pulses fail.
//  5. A busy unit (multiplexer set) is never visited.
// Also: a found unit that loses the grant (another unit found in the same
// cycle has a lower index) stays off the path.
module tb_route_unit;
  import ubichip_pkg::*;
  localparam int NW = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req = 0, is_source = 0, has_net = 0, clear_path = 0;
  logic [NW-1:0] net_id = '0;
  logic local_data = 0, data;
  route_sel_e sel;
  logic ack, fail;
  logic win = 0, g_req = 0, g_bit = 0, g_new = 0, g_found = 0, g_done = 0;
  logic req_out, bit_out, new_out, found_out, done_out, visited;
  logic [7:0] nb_visited = '0, nb_back = '0, back_to;
  logic [7:0][0:0] nb_data = '0;

  route_unit #(.NET_W(NW), .DW(1)) dut (
    .clk, .rst_n, .req, .is_source, .has_net, .net_id, .local_data, .data,
    .clear_path, .sel, .ack, .fail, .win, .g_req, .g_bit, .g_new, .g_found, .g_done,
    .req_out, .bit_out, .new_out, .found_out, .done_out,
    .nb_visited, .nb_back, .nb_data, .visited, .back_to);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask

  // phases 1-3 seen from this unit; label = word broadcast by the master
  task automatic id_phase(input bit master, input logic [NW:0] word);
    g_req = 1; win = master; tick(); g_req = 0; win = 0; req = 0;
    for (int b = NW; b >= 0; b--) begin
      if (master) check(bit_out == word[b], $sformatf("label bit %0d", b));
      g_bit = master ? bit_out : word[b];
      tick();
    end
    g_bit = 0;
    tick();   // compare
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int t = 0; t < 40; t++) begin
      int d, d2;
      logic [NW-1:0] lab;
      clear_path = 1; tick(); clear_path = 0;
      check(sel == SEL_NONE, "free after clear");
      lab = $urandom;
      // ---------------- 1. master, source
      req = 1; is_source = 1; net_id = lab; has_net = 1; #1;
      check(req_out, "request seen");
      id_phase(1, {lab, 1'b1});
      check(visited, "master visited at search start");
      g_new = 1; tick(); tick();
      g_found = 1; tick(); g_found = 0;       // partner found elsewhere
      d = $urandom_range(0, 7);
      tick();
      nb_back[d] = 1; tick(); nb_back = '0;
      check(sel == SEL_LOCAL, "master source drives its logic unit data");
      check(done_out, "master done");
      g_done = 1; g_new = 0; tick(); g_done = 0;
      check(ack, "ack pulse");
      check(!visited, "visited cleared");
      local_data = 1; tick(); check(data == 1, "data from logic unit");
      local_data = 0; tick(); check(data == 0, "data from logic unit 0");
      // ---------------- 2. partner reached by the search
      clear_path = 1; tick(); clear_path = 0;
      net_id = lab; has_net = 1; is_source = 0;
      id_phase(0, {lab, 1'b1});
      check(!visited, "not visited before the wave");
      d = $urandom_range(0, 7);
      g_new = 1; nb_visited[d] = 1; #1;
      check(new_out, "joins the wave");
      tick(); nb_visited = '0;
      check(visited && found_out, "visited and found");
      check(req_out, "found unit asks for the backward-signal grant");
      g_found = 1; win = 1; tick(); g_found = 0; win = 0;
      check(back_to == 8'(1 << d), $sformatf("backward signal to parent %0d: %b", d, back_to));
      check(sel == route_sel_e'(d), "partner selects its parent");
      g_done = 1; tick(); g_done = 0; g_new = 0;
      check(!ack, "no ack for a non-master");
      for (int k = 0; k < 6; k++) begin
        logic v;
        v = $urandom; nb_data[d] = v; tick();
        check(data == v, "data follows the parent");
      end
      // ---------------- 2b. partner found in the same cycle as a lower-index one
      clear_path = 1; tick(); clear_path = 0;
      id_phase(0, {lab, 1'b1});
      g_new = 1; nb_visited[d] = 1; tick(); nb_visited = '0;
      check(found_out, "found");
      g_found = 1; win = 0; tick(); g_found = 0;
      check(back_to == '0 && sel == SEL_NONE, "losing found unit stays off the path");
      g_done = 1; tick(); g_done = 0; g_new = 0;
      check(!found_out && !visited, "released at the end of the process");
      // ---------------- 3. intermediate unit, master is the target
      clear_path = 1; tick(); clear_path = 0;
      has_net = 0;
      id_phase(0, {lab, 1'b0});
      d = $urandom_range(0, 7);
      g_new = 1; nb_visited[d] = 1; tick(); nb_visited = '0;
      check(visited && !found_out, "visited, not involved");
      g_found = 1; tick();
      d2 = $urandom_range(0, 7);
      nb_back[d2] = 1; tick(); nb_back = '0; g_found = 0;
      check(sel == route_sel_e'(d2), "selects the child when the master is the target");
      check(back_to == 8'(1 << d), "passes the backward signal to its parent");
      g_done = 1; tick(); g_done = 0; g_new = 0;
      // ---------------- 5. busy unit is not traversed
      id_phase(0, {lab, 1'b1});
      g_new = 1; nb_visited = 8'hff; #1;
      check(!new_out, "busy unit not visited");
      tick(); nb_visited = '0; g_new = 0;
      tick();   // search ends, nothing new
      // ---------------- 4. master without free neighbours
      clear_path = 1; tick(); clear_path = 0;
      req = 1; is_source = 0; net_id = lab;
      id_phase(1, {lab, 1'b0});
      g_new = 0; tick();
      check(fail, "fail pulse");
      check(!visited, "back to idle");
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
