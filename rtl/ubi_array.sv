// ubi_array: the configurable section of the ubichip, a ROWS x COLS array of
// ubi_cell, configured as a SIMD multiprocessor.
//
// Along each row, CELLS_PER_PE neighbouring cells are chained into one PE of
// 4*CELLS_PER_PE bits (lowest column = least significant nibble). All PEs
// execute the instruction broadcast by the sequencer in the same cycle. Each
// PE owns a flag used by conditional stores: an instruction with cond=1
// writes its result only where the flag is set. Each PE also owns:
//   ev_q    the input event of the previous AER frame (loaded from ev_in at
//           frame_update, read by OP_TSTEV),
//   spike_q the output event written by OP_FIRE; it is cleared at
//           frame_update, after the AER encoder has sampled it.
// The configuration bits of all cells form one shift chain, cell 0 first
// in (cfg_in) and the last cell out (cfg_out); cells are numbered
// row * COLS + column. In LUT mode the cells' LUT inputs and outputs are
// brought out directly.
//
// Timing: one broadcast instruction per cycle (instr_valid), results and
// flags visible at the next edge. pe_rd_val shows, combinationally, the rd
// register of the current instruction in every PE (read-out path).
// The array, the n-bit PE assembly and conditional stores follow the
// ubichip architecture; the array size, PE width and the event/flag
// handling are this design's choices.
module ubi_array
  import ubichip_pkg::*;
#(
  parameter int ROWS         = 10,
  parameter int COLS         = 40,
  parameter int CELLS_PER_PE = 4,
  localparam int NCELL = ROWS * COLS,
  localparam int NPE   = NCELL / CELLS_PER_PE,
  localparam int PE_W  = 4 * CELLS_PER_PE
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_en,
  input  logic                     cfg_in,
  output logic                     cfg_out,
  input  logic [NCELL-1:0][3:0][3:0] lut_in,
  output logic [NCELL-1:0][3:0]    lut_out,
  input  pe_instr_t                instr,
  input  logic                     instr_valid,
  input  logic                     frame_update,
  input  logic [NPE-1:0]           ev_in,
  output logic [NPE-1:0]           spike,
  output logic [NPE-1:0]           flag,
  output logic [NPE-1:0][PE_W-1:0] pe_rd_val
);

  logic [NCELL:0] chain;
  assign chain[0] = cfg_in;
  assign cfg_out  = chain[NCELL];

  logic [NPE-1:0] ev_q, spike_q, flag_q;
  assign spike = spike_q;
  assign flag  = flag_q;

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic [CELLS_PER_PE:0] cy;
    logic [CELLS_PER_PE-1:0] shr_up, mode;   // shr_up[k]: rs bit 0 of slice k
    logic [CELLS_PER_PE-1:0][3:0] sum_s;
    logic [CELLS_PER_PE-1:0] c3, rsm;
    logic we;

    assign cy[0] = (instr.op == OP_SUB) || (instr.op == OP_TSTGE);
    assign we    = instr_valid && (!instr.cond || flag_q[p]);

    for (genvar k = 0; k < CELLS_PER_PE; k++) begin : g_slice
      localparam int IDX = p * CELLS_PER_PE + k;
      logic shr_in;
      if (k == CELLS_PER_PE - 1) begin : g_top
        assign shr_in = rsm[k];
      end else begin : g_mid
        assign shr_in = shr_up[k+1];
      end
      ubi_cell u_cell (
        .clk, .rst_n,
        .cfg_en, .cfg_in(chain[IDX]), .cfg_out(chain[IDX+1]),
        .alu_mode(mode[k]),
        .lut_in(lut_in[IDX]), .lut_out(lut_out[IDX]),
        .op(instr.op), .rd(instr.rd), .rs(instr.rs),
        .imm(instr.imm[4*(k % (IMM_W/4)) +: 4]),
        .alu_we(we),
        .carry_in(cy[k]), .carry_out(cy[k+1]),
        .shr_in, .shr_out(shr_up[k]), .rs_msb(rsm[k]),
        .rd_val(pe_rd_val[p][4*k +: 4]),
        .sum(sum_s[k]), .carry3(c3[k])
      );
    end

    // signed rd >= rs  <=>  !(N ^ V) of rd - rs
    logic n_bit, v_bit;
    assign n_bit = sum_s[CELLS_PER_PE-1][3];
    assign v_bit = c3[CELLS_PER_PE-1] ^ cy[CELLS_PER_PE];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        flag_q[p]  <= 1'b0;
        spike_q[p] <= 1'b0;
        ev_q[p]    <= 1'b0;
      end else begin
        if (frame_update) ev_q[p] <= ev_in[p];
        if (instr_valid && mode[CELLS_PER_PE-1]) begin
          unique case (instr.op)
            OP_TSTN:  flag_q[p] <= pe_rd_val[p][PE_W-1];
            OP_TSTGE: flag_q[p] <= !(n_bit ^ v_bit);
            OP_TSTEV: flag_q[p] <= ev_q[p];
            default: ;
          endcase
        end
        if (frame_update)
          spike_q[p] <= 1'b0;
        else if (instr_valid && instr.op == OP_FIRE && mode[CELLS_PER_PE-1])
          spike_q[p] <= flag_q[p];
      end
    end
  end

endmodule
