// route_unit: one routing unit of the ubichip dynamic routing fabric.
//
// Each logic unit of the array has a routing unit next to it with:
//  * a data multiplexer that takes the data of one of its 8 neighbours
//    (N, NE, E, SE, S, SW, W, NW) or of its own logic unit (SEL_LOCAL) and
//    drives it, registered, to the neighbours and to its logic unit;
//  * the register that holds the multiplexer setting (sel), kept until
//    clear_path;
//  * a finite state machine that takes part in building new paths.
// All units step through the phases of a routing process together, driven
// by wired-OR global lines that route_array forms:
//  1. IDLE   a unit whose logic unit wants a connection raises req; the
//            array grants the most bottom-left requester (win) - the master.
//  2. ID     the master sends its connection label serially, MSB first,
//            then one bit saying whether it is the source; every unit
//            shifts the line into its own register.
//  3. CMP    units whose own label equals the received one, and that are
//            not the master, know they are involved (the partner).
//            Units already on a path of the same label (taps) take part too,
//            so that a new connection reuses that path (see below).
//  4. SEARCH breadth-first search: the master is visited; each cycle every
//            free unit (sel = SEL_NONE) next to a visited unit becomes
//            visited and records the neighbour it was reached from
//            (parent, lowest direction index first). It ends when a free
//            involved unit is reached (found) or when no unit was added in
//            a cycle (fail). Of several units found in the same cycle the
//            lowest-index one (most bottom-left) is taken.
//  5. BACK   a backward signal runs from the found unit along the parents
//            to the master; each unit on the way sets its multiplexer, so
//            data flows from the source end to the target end. The master
//            receiving it ends the process (done).
// Reuse of existing paths: every unit on a path stores the label it was
// built for. If the master is a target and a path of its label exists (the
// source already feeds other targets), any unit of that path counts as a
// partner: the search stops at the nearest one, which keeps its own
// setting and the new branch takes its data from it. If the master is a
// source whose label already has a path, the search starts from the master
// and from every unit of that path at once, and the backward signal ends
// at whichever of them the new branch grows from. Either way the new
// branch is only as long as the distance to the existing tree, which
// leaves more free units for later connections. Labels are assumed to
// name one source each.
// Paths already built keep carrying data during the whole process.
// Timing: ID takes NET_W+1 cycles, CMP one, SEARCH one cycle per hop of
// the shortest path (+1), BACK one cycle per hop. Data moves one hop per
// cycle along a path.
// The five phases, bottom-left priority, the 8-neighbourhood and the
// multiplexer/register/FSM structure are the ubichip's. Matching on a
// connection label, the parent tie-break, the tap rule for path reuse and
// one path per unit (a unit never carries two different labels) are this
// design's choices.
module route_unit
  import ubichip_pkg::*;
#(
  parameter int NET_W = 6,
  parameter int DW    = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // logic-unit side
  input  logic              req,          // request a new connection
  input  logic              is_source,    // requester is the data source
  input  logic              has_net,      // this unit waits for a partner
  input  logic [NET_W-1:0]  net_id,       // connection label
  input  logic [DW-1:0]     local_data,
  output logic [DW-1:0]     data,         // routed data (to neighbours and logic unit)
  input  logic              clear_path,   // release this unit's multiplexer
  output route_sel_e        sel,
  output logic              ack,          // pulse: master's path built
  output logic              fail,         // pulse: master's search failed
  // global lines (from route_array)
  input  logic              win,
  input  logic              g_req,
  input  logic              g_bit,
  input  logic              g_new,
  input  logic              g_found,
  input  logic              g_done,
  output logic              req_out,
  output logic              bit_out,
  output logic              new_out,
  output logic              found_out,
  output logic              done_out,
  // neighbours
  input  logic [7:0]        nb_visited,
  input  logic [7:0]        nb_back,      // neighbour d sends back to me
  input  logic [7:0][DW-1:0] nb_data,
  output logic              visited,
  output logic [7:0]        back_to       // one-hot on parent while on the back path
);

  typedef enum logic [2:0] {S_IDLE, S_ID, S_CMP, S_SEARCH, S_BACK} state_e;
  state_e state_q;

  logic [NET_W:0]        sh_q;            // {label, source bit} being sent / received
  logic [$clog2(NET_W+2)-1:0] cnt_q;
  logic                  master_q, inv_q, vis_q, found_q, back_q, tap_q;
  logic [NET_W-1:0]      path_net_q;      // label of the path this unit carries
  logic [2:0]            parent_q;
  route_sel_e            sel_q;
  logic [DW-1:0]         data_q;

  assign sel     = sel_q;
  assign data    = data_q;
  assign visited = vis_q;
  // the request line also arbitrates between units found in the same
  // search cycle: only the lowest-index one starts the backward signal
  assign req_out = ((state_q == S_IDLE) && req) || ((state_q == S_SEARCH) && found_q);
  assign found_out = found_q;
  // source bit as received at the end of the ID phase
  logic src_is_master;
  assign src_is_master = sh_q[0];
  assign done_out  = back_q && (master_q || (tap_q && src_is_master));

  // serial label: the master sends {net_id, is_source}, MSB first
  logic [NET_W:0] tx_word;
  assign tx_word = {net_id, is_source};
  assign bit_out = (state_q == S_ID) && master_q ? tx_word[NET_W - int'(cnt_q)] : 1'b0;

  // first visited neighbour (lowest direction index)
  logic       any_vis;
  logic [2:0] first_vis;
  always_comb begin
    any_vis = 1'b0; first_vis = '0;
    for (int d = 7; d >= 0; d--)
      if (nb_visited[d]) begin any_vis = 1'b1; first_vis = 3'(d); end
  end
  logic       any_back;
  logic [2:0] back_from;
  always_comb begin
    any_back = 1'b0; back_from = '0;
    for (int d = 7; d >= 0; d--)
      if (nb_back[d]) begin any_back = 1'b1; back_from = 3'(d); end
  end

  logic free;
  assign free    = (sel_q == SEL_NONE);
  assign new_out = (state_q == S_SEARCH) && !vis_q && (free || tap_q) && any_vis && !g_found;

  // received label, and whether this unit already carries a path of it
  logic [NET_W-1:0] rx_net;
  logic             tap_c;
  assign rx_net = sh_q[NET_W:1];
  assign tap_c  = !free && !master_q && (path_net_q == rx_net);

  always_comb begin
    back_to = '0;
    if (back_q && !master_q && !(tap_q && src_is_master)) back_to[parent_q] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      sh_q <= '0; cnt_q <= '0;
      master_q <= 1'b0; inv_q <= 1'b0; vis_q <= 1'b0; found_q <= 1'b0; back_q <= 1'b0;
      tap_q <= 1'b0; path_net_q <= '0;
      parent_q <= '0;
      sel_q <= SEL_NONE;
      data_q <= '0;
      ack <= 1'b0; fail <= 1'b0;
    end else begin
      ack  <= 1'b0;
      fail <= 1'b0;
      // data path: runs whatever the routing FSM does
      if (sel_q == SEL_LOCAL)     data_q <= local_data;
      else if (sel_q == SEL_NONE) data_q <= '0;
      else                        data_q <= nb_data[sel_q[2:0]];
      if (clear_path) sel_q <= SEL_NONE;

      unique case (state_q)
        S_IDLE: if (g_req) begin
          state_q  <= S_ID;
          cnt_q    <= '0;
          master_q <= win;
        end
        S_ID: begin
          sh_q  <= {sh_q[NET_W-1:0], g_bit};
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == NET_W[$bits(cnt_q)-1:0]) state_q <= S_CMP;
        end
        S_CMP: begin
          tap_q   <= tap_c;
          inv_q   <= (has_net && !master_q && (rx_net == net_id)) || (tap_c && !src_is_master);
          vis_q   <= master_q || (tap_c && src_is_master);
          state_q <= S_SEARCH;
        end
        S_SEARCH: begin
          if (new_out) begin
            vis_q    <= 1'b1;
            parent_q <= first_vis;
            if (inv_q) found_q <= 1'b1;
          end
          if (g_found) begin
            state_q <= S_BACK;
            if (found_q && win) begin
              back_q <= 1'b1;
              if (!tap_q) begin
                sel_q      <= src_is_master ? route_sel_e'({1'b0, parent_q}) : SEL_LOCAL;
                path_net_q <= rx_net;
              end
            end
          end else if (!g_new) begin
            // no unit added: no free path to a partner
            fail    <= master_q;
            state_q <= S_IDLE;
            master_q <= 1'b0; inv_q <= 1'b0; vis_q <= 1'b0; tap_q <= 1'b0;
          end
        end
        S_BACK: begin
          if (g_done) begin
            ack     <= master_q;
            state_q <= S_IDLE;
            master_q <= 1'b0; inv_q <= 1'b0; vis_q <= 1'b0; tap_q <= 1'b0;
            found_q <= 1'b0;  back_q <= 1'b0;
          end else if (vis_q && !back_q && any_back) begin
            back_q <= 1'b1;
            // a tap keeps its setting: the new branch ends there
            if (!tap_q) begin
              path_net_q <= rx_net;
              if (master_q)
                sel_q <= src_is_master ? SEL_LOCAL : route_sel_e'({1'b0, back_from});
              else
                sel_q <= src_is_master ? route_sel_e'({1'b0, parent_q})
                                       : route_sel_e'({1'b0, back_from});
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
