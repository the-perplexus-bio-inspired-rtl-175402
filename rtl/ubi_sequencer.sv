// ubi_sequencer: centralised sequencer of the ubichip SIMD multiprocessor.
//
// It fetches one instruction per cycle from its program memory and either
// broadcasts the PE part to every PE of the array (SQ_PE, with instr_valid
// high for that cycle) or executes a control operation itself: jump,
// load loop counter, decrement-and-branch loop, wait for the next AER
// frame_update, halt. Data-dependent decisions are not taken here: the PEs
// use conditional stores instead, so that the program runs straight through.
//
// Interface: the program memory (DEPTH words of seq_instr_t) is written
// through prog_we/prog_addr/prog_wdata (from the system manager) while the
// sequencer is stopped. A one-cycle start pulse runs the program from
// address 0; running drops after SQ_HALT. A frame_update that arrives
// while the program is not waiting is remembered, so SQ_WAITF returns at
// once if the frame has already ended. frame_done tells the AER encoder
// that the PEs have finished the current frame: the program waits at
// SQ_WAITF with no frame_update pending or arriving, or it is stopped.
// Timing: the memory is read combinationally at pc; every instruction
// takes one cycle, SQ_WAITF takes one cycle after the frame_update.
// A small instruction set with conditional stores is the ubichip's; the
// encoding and the control operations are this design's own choices.
module ubi_sequencer
  import ubichip_pkg::*;
#(
  parameter int DEPTH = 2 ** PC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     prog_we,
  input  logic [PC_W-1:0]          prog_addr,
  input  seq_instr_t               prog_wdata,
  input  logic                     start,
  input  logic                     frame_update,
  output pe_instr_t                instr,
  output logic                     instr_valid,
  output logic                     running,
  output logic                     frame_done,  // waiting for the next frame, or stopped
  output logic [PC_W-1:0]          pc
);

  seq_instr_t mem [DEPTH];
  seq_instr_t cur;
  logic [PC_W-1:0] pc_q, cnt_q, cnt_dec;
  logic run_q, frame_seen;

  assign cur         = mem[pc_q];
  assign instr       = cur.pe;
  assign instr_valid = run_q && (cur.sop == SQ_PE);
  assign running     = run_q;
  assign frame_done  = !run_q || (cur.sop == SQ_WAITF && !frame_seen && !frame_update);
  assign pc          = pc_q;
  assign cnt_dec     = cnt_q - 1'b1;

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q       <= '0;
      cnt_q      <= '0;
      run_q      <= 1'b0;
      frame_seen <= 1'b0;
    end else begin
      if (frame_update) frame_seen <= 1'b1;
      if (start) begin
        pc_q       <= '0;
        run_q      <= 1'b1;
        frame_seen <= 1'b0;
      end else if (run_q) begin
        unique case (cur.sop)
          SQ_PE:   pc_q <= pc_q + 1'b1;
          SQ_JMP:  pc_q <= cur.target;
          SQ_LDC:  begin cnt_q <= cur.target; pc_q <= pc_q + 1'b1; end
          SQ_LOOP: begin
            cnt_q <= cnt_dec;
            pc_q  <= (cnt_dec != '0) ? cur.target : pc_q + 1'b1;
          end
          SQ_WAITF: if (frame_seen) begin
            frame_seen <= frame_update;
            pc_q       <= pc_q + 1'b1;
          end
          SQ_HALT: run_q <= 1'b0;
          default: run_q <= 1'b0;
        endcase
      end
    end
  end

endmodule
