// sys_manager: system manager of the ubichip, the configuration port
// through which the module's main controller sets up and runs the chip.
//
// The host sees a 16-bit word-address, 32-bit data register bus
// (host_we / host_re, single cycle, read data valid the cycle after
// host_re). addr[15:12] selects a target:
//   0  control   write: bit0 start the sequencer, bit1 start the first AER
//                frame (first chip only); read: {running, pc}
//   1  program   addr[8]=0: stage instruction bits 31:0; addr[8]=1: write
//                bits 38:32 from wdata and commit the word to address
//                addr[7:0] of the sequencer program memory
//   2  CAM       entry addr[CAM_AW-1:0]: wdata[31] valid, wdata[30:24] dest,
//                wdata[13:0] AER source address
//   3  data RAM  word addr[RAM_AW-1:0]: write wdata[15:0]; read returns it
//   4  array configuration chain: each write shifts wdata[0] in
//   5  identity  wdata[6:0] chip id, wdata[8] first chip of the AER ring
// Pulses (start, kick, cam_we, ram_we, cfg_en, prog_we) last one cycle.
// The role of the block - the chip's configuration and its interface to
// the module controller - is the ubichip's; the bus and the whole address
// map are this design's own choices.
module sys_manager
  import ubichip_pkg::*;
#(
  parameter int CAM_AW = 8,
  parameter int RAM_AW = 10,
  parameter int DEST_W = 7,
  parameter int ADDR_W = 14,
  parameter int CHIP_W = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic              host_we,
  input  logic              host_re,
  input  logic [15:0]       host_addr,
  input  logic [31:0]       host_wdata,
  output logic [31:0]       host_rdata,
  // sequencer
  output logic              prog_we,
  output logic [PC_W-1:0]   prog_addr,
  output seq_instr_t        prog_wdata,
  output logic              seq_start,
  input  logic              seq_running,
  input  logic [PC_W-1:0]   seq_pc,
  // AER
  output logic              aer_kick,
  output logic [CHIP_W-1:0] chip_id,
  output logic              is_first,
  // memory controller
  output logic              cam_we,
  output logic [CAM_AW-1:0] cam_idx,
  output logic              cam_valid,
  output logic [ADDR_W-1:0] cam_key,
  output logic [DEST_W-1:0] cam_dest,
  output logic              ram_we,
  output logic              ram_re,
  output logic [RAM_AW-1:0] ram_addr,
  output logic [15:0]       ram_wdata,
  input  logic [15:0]       ram_rdata,
  // configurable array
  output logic              cfg_en,
  output logic              cfg_bit
);

  logic [3:0]  tgt;
  logic [31:0] stage_q;
  logic [3:0]  rd_tgt_q;

  assign tgt = host_addr[15:12];

  // combinational decode of single-cycle commands
  assign prog_we    = host_we && tgt == 4'd1 && host_addr[8];
  assign prog_addr  = host_addr[PC_W-1:0];
  assign prog_wdata = seq_instr_t'({host_wdata[SEQ_INSTR_W-33:0], stage_q});
  assign seq_start  = host_we && tgt == 4'd0 && host_wdata[0];
  assign aer_kick   = host_we && tgt == 4'd0 && host_wdata[1];
  assign cam_we     = host_we && tgt == 4'd2;
  assign cam_idx    = host_addr[CAM_AW-1:0];
  assign cam_valid  = host_wdata[31];
  assign cam_dest   = host_wdata[24 +: DEST_W];
  assign cam_key    = host_wdata[ADDR_W-1:0];
  assign ram_we     = host_we && tgt == 4'd3;
  assign ram_re     = host_re && tgt == 4'd3;
  assign ram_addr   = host_addr[RAM_AW-1:0];
  assign ram_wdata  = host_wdata[15:0];
  assign cfg_en     = host_we && tgt == 4'd4;
  assign cfg_bit    = host_wdata[0];

  logic [31:0] status_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q  <= '0;
      chip_id  <= '0;
      is_first <= 1'b0;
      rd_tgt_q <= '0;
      status_q <= '0;
    end else begin
      if (host_we && tgt == 4'd1 && !host_addr[8]) stage_q <= host_wdata;
      if (host_we && tgt == 4'd5) begin
        chip_id  <= host_wdata[CHIP_W-1:0];
        is_first <= host_wdata[8];
      end
      if (host_re) begin
        rd_tgt_q <= tgt;
        status_q <= 32'({seq_running, seq_pc});
      end
    end
  end

  assign host_rdata = (rd_tgt_q == 4'd3) ? {16'h0, ram_rdata} : status_q;

endmodule
