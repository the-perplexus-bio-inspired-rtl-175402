// theseus_array: a ROWS x COLS mesh of theseus_molecule with two entry
// points, where a cell can be built, inspected and replicated.
//
// Molecule (r, c) has row r counted from the north edge; its N/E/S/W sides
// connect to the facing side of its 4 neighbours. Entry e (e = 0, 1) feeds
// the molecule at row 0, column e*COLS/2 from outside the mesh, and every
// molecule grown from it carries cell id e.
//  * Construction: words on ext_valid[e]/ext_data[e], one per cycle at
//    most, grow cell e along the path encoded in their flags.
//  * Inspection: shift_en[e] rotates cell e's words one step backwards;
//    head_word[e] is the word of its first molecule, so K shifts of a
//    K-molecule cell stream its genome out in the original order and leave
//    the cell unchanged.
//  * Replication: while repl_en is high, cell 0 is inspected and each word
//    it streams out is sent into entry 1 in the same cycle, so that an
//    exact copy of cell 0 grows from entry 1 (ext input 1 is ignored).
// Cell contents are visible on word/built for the functional logic that
// the configuration bits drive (not part of this block).
// Timing: construction advances one molecule per cycle; inspection and
// replication move one word per cycle.
// The entry positions, the two-cell limit and the direct replication link
// are this design's choices.
module theseus_array
  import ubichip_pkg::*;
#(
  parameter int ROWS  = 4,
  parameter int COLS  = 8,
  parameter int CFG_W = 16,
  localparam int W    = 3 + CFG_W,
  localparam int N    = ROWS * COLS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic [1:0]          ext_valid,
  input  logic [1:0][W-1:0]   ext_data,
  input  logic [1:0]          shift_en,
  input  logic                repl_en,
  output logic [1:0][W-1:0]   head_word,
  output logic [N-1:0][W-1:0] word,
  output logic [N-1:0]        built,
  output logic [N-1:0]        cell_id,
  output logic                overflow
);

  logic [N-1:0][3:0]          ov;
  logic [N-1:0][W-1:0]        od;
  logic [N-1:0]               ocid, head, ovf;
  logic [1:0]                 sh;
  logic [1:0]                 xv;
  logic [1:0][W-1:0]          xd;

  assign sh = repl_en ? 2'b01 : shift_en;
  assign xv = repl_en ? {1'b1, ext_valid[0]} : ext_valid;
  assign xd = repl_en ? {head_word[0], ext_data[0]} : ext_data;

  always_comb begin
    head_word = '0;
    for (int i = 0; i < N; i++)
      if (head[i]) head_word[cell_id[i]] = head_word[cell_id[i]] | word[i];
  end

  assign overflow = |ovf;

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      localparam int I = r * COLS + c;
      logic [3:0]          iv;
      logic [3:0][W-1:0]   id, nw;
      logic [3:0]          ic;
      logic                ev;
      logic [W-1:0]        ed;
      logic                ec;
      // N side
      if (r > 0) begin : g_n
        assign iv[0] = ov[I-COLS][2]; assign id[0] = od[I-COLS];
        assign ic[0] = ocid[I-COLS];  assign nw[0] = word[I-COLS];
      end else begin : g_nn
        assign iv[0] = 1'b0; assign id[0] = '0; assign ic[0] = 1'b0; assign nw[0] = '0;
      end
      // E side
      if (c < COLS-1) begin : g_e
        assign iv[1] = ov[I+1][3]; assign id[1] = od[I+1];
        assign ic[1] = ocid[I+1];  assign nw[1] = word[I+1];
      end else begin : g_ne
        assign iv[1] = 1'b0; assign id[1] = '0; assign ic[1] = 1'b0; assign nw[1] = '0;
      end
      // S side
      if (r < ROWS-1) begin : g_s
        assign iv[2] = ov[I+COLS][0]; assign id[2] = od[I+COLS];
        assign ic[2] = ocid[I+COLS];  assign nw[2] = word[I+COLS];
      end else begin : g_ns
        assign iv[2] = 1'b0; assign id[2] = '0; assign ic[2] = 1'b0; assign nw[2] = '0;
      end
      // W side
      if (c > 0) begin : g_w
        assign iv[3] = ov[I-1][1]; assign id[3] = od[I-1];
        assign ic[3] = ocid[I-1];  assign nw[3] = word[I-1];
      end else begin : g_nw
        assign iv[3] = 1'b0; assign id[3] = '0; assign ic[3] = 1'b0; assign nw[3] = '0;
      end
      // entry points
      if (r == 0 && c == 0) begin : g_x0
        assign ev = xv[0]; assign ed = xd[0]; assign ec = 1'b0;
      end else if (r == 0 && c == COLS/2) begin : g_x1
        assign ev = xv[1]; assign ed = xd[1]; assign ec = 1'b1;
      end else begin : g_nx
        assign ev = 1'b0; assign ed = '0; assign ec = 1'b0;
      end

      theseus_molecule #(.CFG_W(CFG_W), .CID_W(1)) u_mol (
        .clk, .rst_n, .clear,
        .in_valid(iv), .in_data(id), .in_cid(ic),
        .ext_valid(ev), .ext_data(ed), .ext_cid(ec),
        .out_valid(ov[I]), .out_data(od[I]), .out_cid(ocid[I]),
        .nb_word(nw), .shift_en(sh), .recirc_in(head_word),
        .word(word[I]), .built(built[I]), .is_head(head[I]),
        .cid(cell_id[I]), .overflow(ovf[I])
      );
    end
  end

endmodule
