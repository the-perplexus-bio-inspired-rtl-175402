// theseus_molecule: one molecule of the THESEUS self-replication fabric.
//
// A "cell" (an organelle) is a set of molecules linked by a configuration
// path. Its genome is a sequence of words; each word holds a path flag (the
// direction of the next molecule of the path, or TD_END) and the molecule's
// configuration bits. Construction (forward direction): the genome enters
// the cell's first molecule; an empty molecule keeps the first word it
// receives, records the direction it came from (prev) and its flag (next),
// and from then on forwards every further word, registered, to the
// neighbour named by its flag. Each word thus lands in the first empty
// molecule at the end of the growing path.
// Self-inspection (backward direction): on shift every built molecule of
// the cell takes the word of its successor on the path; the last molecule
// takes the word of the first one (recirc_in). The first molecule's word,
// read before each shift, is the genome in the order it was sent, and
// after one full turn every molecule holds its own word again. The path
// links (prev/next) are kept apart from the shifting words so that the
// path survives the rotation.
//
// Interface: in_valid/in_data per side (N, E, S, W, see tdir_e) from the
// neighbours, ext_* from outside the array (entry molecules only), out_*
// to the neighbour on the path; cell_id tags the cell a molecule belongs
// to so that several cells can be inspected independently.
// Timing: one hop per cycle during construction; one word per shift.
// The path flags, construction, self-inspection by a shift register that
// follows the path in both directions, and the 3-step replication built on
// them follow the THESEUS mechanism; word format, handshake, and the
// recirculation of the first word to the last molecule are this design's.
module theseus_molecule
  import ubichip_pkg::*;
#(
  parameter int CFG_W = 16,
  parameter int CID_W = 1,
  localparam int W    = 3 + CFG_W       // {flag, config}
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,          // empty the molecule
  input  logic [3:0]            in_valid,
  input  logic [3:0][W-1:0]     in_data,
  input  logic [3:0][CID_W-1:0] in_cid,
  input  logic                  ext_valid,
  input  logic [W-1:0]          ext_data,
  input  logic [CID_W-1:0]      ext_cid,
  output logic [3:0]            out_valid,      // one-hot on the path flag
  output logic [W-1:0]          out_data,
  output logic [CID_W-1:0]      out_cid,
  // self-inspection
  input  logic [3:0][W-1:0]     nb_word,        // neighbours' words
  input  logic [(1<<CID_W)-1:0]          shift_en,
  input  logic [(1<<CID_W)-1:0][W-1:0]   recirc_in,
  output logic [W-1:0]          word,
  output logic                  built,
  output logic                  is_head,        // first molecule of its cell
  output logic [CID_W-1:0]      cid,
  output logic                  overflow        // word arrived at a full path end
);

  logic   built_q, fwd_q, ovf_q;
  logic [W-1:0] word_q, fwd_data_q;
  tdir_e  next_q, prev_q;
  logic [CID_W-1:0] cid_q;

  // incoming word: the external entry has priority, then N, E, S, W
  logic             rx;
  logic [W-1:0]     rx_data;
  logic [CID_W-1:0] rx_cid;
  tdir_e            rx_from;
  always_comb begin
    rx = 1'b0; rx_data = '0; rx_cid = '0; rx_from = TD_END;
    for (int d = 3; d >= 0; d--) begin
      if (in_valid[d]) begin
        rx = 1'b1; rx_data = in_data[d]; rx_cid = in_cid[d]; rx_from = tdir_e'(d);
      end
    end
    if (ext_valid) begin
      rx = 1'b1; rx_data = ext_data; rx_cid = ext_cid; rx_from = TD_END;
    end
  end

  assign word     = word_q;
  assign built    = built_q;
  assign is_head  = built_q && (prev_q == TD_END);
  assign cid      = cid_q;
  assign overflow = ovf_q;
  assign out_data = fwd_data_q;
  assign out_cid  = cid_q;
  always_comb begin
    out_valid = '0;
    if (fwd_q && next_q != TD_END) out_valid[next_q[1:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      built_q <= 1'b0; fwd_q <= 1'b0; ovf_q <= 1'b0;
      word_q  <= '0;   fwd_data_q <= '0;
      next_q  <= TD_END; prev_q <= TD_END; cid_q <= '0;
    end else if (clear) begin
      built_q <= 1'b0; fwd_q <= 1'b0; ovf_q <= 1'b0;
      next_q  <= TD_END; prev_q <= TD_END;
    end else begin
      fwd_q <= 1'b0;
      if (rx && !built_q) begin
        // construction: settle here
        built_q <= 1'b1;
        word_q  <= rx_data;
        next_q  <= tdir_e'(rx_data[W-1 -: 3]);
        prev_q  <= rx_from;
        cid_q   <= rx_cid;
      end else if (rx && built_q) begin
        // construction: pass on along the path
        if (next_q == TD_END) ovf_q <= 1'b1;
        else begin
          fwd_q      <= 1'b1;
          fwd_data_q <= rx_data;
        end
      end else if (built_q && shift_en[cid_q]) begin
        // self-inspection: backward shift along the path
        word_q <= (next_q == TD_END) ? recirc_in[cid_q] : nb_word[next_q[1:0]];
      end
    end
  end

endmodule
