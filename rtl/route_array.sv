// route_array: the dynamic routing fabric, a ROWS x COLS mesh of
// route_unit with 8-neighbour links, plus the global lines they share.
//
// Unit (x, y) has index y*COLS + x, with y = 0 the bottom row and x = 0
// the left column; its N neighbour is (x, y+1). The global lines are
// wired-ORs of the units' outputs; the request arbitration grants the
// requesting unit with the lowest index, i.e. the most bottom-left one
// (bottom row first, then leftmost). The same arbiter picks one partner
// when the search reaches several in the same cycle (see route_unit, which
// also describes how connections reuse existing paths). Ports per unit are
// the logic-unit side of route_unit; busy is high while a routing process is under way.
// See route_unit for the five phases and their timing.
// The mesh, the priority rule and the wired-OR lines follow the ubichip
// dynamic routing; the index order and the exact arbiter are this
// design's choices.
module route_array
  import ubichip_pkg::*;
#(
  parameter int ROWS  = 8,
  parameter int COLS  = 8,
  parameter int DW    = 1,
  localparam int N    = ROWS * COLS,
  parameter int NET_W = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [N-1:0]         is_source,
  input  logic [N-1:0]         has_net,
  input  logic [N-1:0][NET_W-1:0] net_id,
  input  logic [N-1:0][DW-1:0] local_data,
  input  logic [N-1:0]         clear_path,
  output logic [N-1:0][DW-1:0] data,
  output route_sel_e [N-1:0]   sel,
  output logic [N-1:0]         ack,
  output logic [N-1:0]         fail,
  output logic                 busy
);

  logic [N-1:0] req_o, bit_o, new_o, found_o, done_o, vis;
  logic [N-1:0][7:0] back_to;
  logic [N-1:0] win;
  logic g_req, g_bit, g_new, g_found, g_done;

  assign g_req   = |req_o;
  assign g_bit   = |bit_o;
  assign g_new   = |new_o;
  assign g_found = |found_o;
  assign g_done  = |done_o;
  assign win     = req_o & (~req_o + 1'b1);   // lowest index requester
  assign busy    = g_req || (|vis) || g_bit;

  // x/y offsets of the 8 directions N, NE, E, SE, S, SW, W, NW
  localparam int DX [8] = '{0, 1, 1, 1, 0, -1, -1, -1};
  localparam int DY [8] = '{1, 1, 0, -1, -1, -1, 0, 1};

  for (genvar y = 0; y < ROWS; y++) begin : g_y
    for (genvar x = 0; x < COLS; x++) begin : g_x
      localparam int I = y * COLS + x;
      logic [7:0] nv, nb;
      logic [7:0][DW-1:0] nd;
      for (genvar d = 0; d < 8; d++) begin : g_d
        localparam int NX = x + DX[d];
        localparam int NY = y + DY[d];
        if (NX >= 0 && NX < COLS && NY >= 0 && NY < ROWS) begin : g_in
          localparam int J = NY * COLS + NX;
          assign nv[d] = vis[J];
          assign nb[d] = back_to[J][(d + 4) % 8];
          assign nd[d] = data[J];
        end else begin : g_out
          assign nv[d] = 1'b0;
          assign nb[d] = 1'b0;
          assign nd[d] = '0;
        end
      end
      route_unit #(.NET_W(NET_W), .DW(DW)) u_ru (
        .clk, .rst_n,
        .req(req[I]), .is_source(is_source[I]), .has_net(has_net[I]),
        .net_id(net_id[I]), .local_data(local_data[I]), .data(data[I]),
        .clear_path(clear_path[I]), .sel(sel[I]), .ack(ack[I]), .fail(fail[I]),
        .win(win[I]), .g_req, .g_bit, .g_new, .g_found, .g_done,
        .req_out(req_o[I]), .bit_out(bit_o[I]), .new_out(new_o[I]),
        .found_out(found_o[I]), .done_out(done_o[I]),
        .nb_visited(nv), .nb_back(nb), .nb_data(nd),
        .visited(vis[I]), .back_to(back_to[I])
      );
    end
  end

endmodule
