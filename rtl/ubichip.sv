// ubichip: top level of the bio-inspired reconfigurable chip.
//
// Parts and how they are joined:
//  * sys_manager   - host register port; loads the sequencer program, the
//                    CAM, the data RAM, the array configuration chain and
//                    the chip identity, and starts the sequencer and the
//                    first AER frame.
//  * ubi_sequencer - broadcasts one instruction per cycle to all PEs of
//                    ubi_array (SIMD), waits for frame_update between
//                    simulation steps.
//  * ubi_array     - ROWS x COLS configurable cells, CELLS_PER_PE cells per
//                    PE; the PEs are the neurons: they read the input
//                    event of the last frame and fire output events.
//  * aer_encoder   - sends the PEs' events as addresses on the shared AER
//                    bus during the chip's turn (start_frame/end_frame
//                    token ring, frame_update from the first chip); the
//                    turn waits until the sequencer has finished the
//                    frame's program (frame_done).
//  * aer_decoder + mem_ctrl - turn bus addresses into PE input events via
//                    the CAM; mem_ctrl also holds the data RAM.
//  * route_array   - one routing unit per cell; the routed data enters
//                    input 0 of LUT 0 of the cell, the cell's LUT 0 output
//                    is the data it sends into a path.
//  * theseus_array - the self-replication fabric, with its own ports.
// The shared AER bus is external: aer_bus_* are this chip's drive (zero
// outside its turn), aer_in_* the wired-OR of all chips' drives. A
// single-chip system loops them back, and end_frame to token_in.
// The partition follows the ubichip system architecture; the way the
// routing units meet the cells and the THESEUS fabric being a separate
// mesh are this design's simplifications.
module ubichip
  import ubichip_pkg::*;
#(
  parameter int ROWS         = 10,
  parameter int COLS         = 40,
  parameter int CELLS_PER_PE = 4,
  parameter int CHIP_W       = 7,
  parameter int CAM_DEPTH    = 256,
  parameter int RAM_DEPTH    = 1024,
  parameter int T_ROWS       = 4,
  parameter int T_COLS       = 8,
  parameter int T_CFG_W      = 16,
  localparam int NCELL  = ROWS * COLS,
  localparam int NPE    = NCELL / CELLS_PER_PE,
  localparam int PE_W   = 4 * CELLS_PER_PE,
  localparam int IDX_W  = $clog2(NPE),
  localparam int ADDR_W = CHIP_W + IDX_W,
  localparam int NET_W  = $clog2(NCELL),
  localparam int TW     = 3 + T_CFG_W,
  localparam int TN     = T_ROWS * T_COLS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host (module controller) port
  input  logic                       host_we,
  input  logic                       host_re,
  input  logic [15:0]                host_addr,
  input  logic [31:0]                host_wdata,
  output logic [31:0]                host_rdata,
  // AER
  output logic                       aer_bus_valid,
  output logic [ADDR_W-1:0]          aer_bus_addr,
  input  logic                       aer_in_valid,
  input  logic [ADDR_W-1:0]          aer_in_addr,
  input  logic                       token_in,
  output logic                       start_frame,
  output logic                       end_frame,
  output logic                       frame_update_out,
  input  logic                       frame_update_in,
  // configurable array, LUT mode
  input  logic [NCELL-1:0][3:0][3:0] lut_in,
  output logic [NCELL-1:0][3:0]      lut_out,
  output logic [NPE-1:0]             spike,
  output logic                       seq_running,
  // dynamic routing (logic-unit side)
  input  logic [NCELL-1:0]           rt_req,
  input  logic [NCELL-1:0]           rt_is_source,
  input  logic [NCELL-1:0]           rt_has_net,
  input  logic [NCELL-1:0][NET_W-1:0] rt_net_id,
  input  logic [NCELL-1:0]           rt_clear,
  output logic [NCELL-1:0]           rt_data,
  output logic [NCELL-1:0]           rt_ack,
  output logic [NCELL-1:0]           rt_fail,
  output logic                       rt_busy,
  // THESEUS self-replication fabric
  input  logic                       th_clear,
  input  logic [1:0]                 th_ext_valid,
  input  logic [1:0][TW-1:0]         th_ext_data,
  input  logic [1:0]                 th_shift_en,
  input  logic                       th_repl_en,
  output logic [1:0][TW-1:0]         th_head_word,
  output logic [TN-1:0][TW-1:0]      th_word,
  output logic [TN-1:0]              th_built,
  output logic                       th_overflow,
  // statistics
  output logic [15:0]                aer_sent,
  output logic [15:0]                aer_hits,
  output logic [15:0]                aer_misses
);

  localparam int CAM_AW = $clog2(CAM_DEPTH);
  localparam int RAM_AW = $clog2(RAM_DEPTH);
  localparam int DEST_W = $clog2(NPE);

  // ------------------------------------------------------ system manager
  logic              prog_we, seq_start, aer_kick, is_first;
  logic [PC_W-1:0]   prog_addr, seq_pc;
  seq_instr_t        prog_wdata;
  logic [CHIP_W-1:0] chip_id;
  logic              cam_we, cam_valid, ram_we, ram_re, cfg_en, cfg_bit;
  logic [CAM_AW-1:0] cam_idx;
  logic [ADDR_W-1:0] cam_key;
  logic [DEST_W-1:0] cam_dest;
  logic [RAM_AW-1:0] ram_addr;
  logic [15:0]       ram_wdata, ram_rdata;

  sys_manager #(
    .CAM_AW(CAM_AW), .RAM_AW(RAM_AW), .DEST_W(DEST_W),
    .ADDR_W(ADDR_W), .CHIP_W(CHIP_W)
  ) u_sys (
    .clk, .rst_n,
    .host_we, .host_re, .host_addr, .host_wdata, .host_rdata,
    .prog_we, .prog_addr, .prog_wdata, .seq_start,
    .seq_running, .seq_pc,
    .aer_kick, .chip_id, .is_first,
    .cam_we, .cam_idx, .cam_valid, .cam_key, .cam_dest,
    .ram_we, .ram_re, .ram_addr, .ram_wdata, .ram_rdata,
    .cfg_en, .cfg_bit
  );

  // ----------------------------------------------------------- sequencer
  pe_instr_t instr;
  logic      instr_valid, frame_done;

  ubi_sequencer u_seq (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_wdata,
    .start(seq_start), .frame_update(frame_update_in),
    .instr, .instr_valid, .running(seq_running), .frame_done, .pc(seq_pc)
  );

  // ---------------------------------------------------- configurable array
  logic [NPE-1:0] ev_in, pe_flag;
  logic [NPE-1:0][PE_W-1:0] pe_rd_val;
  logic [NCELL-1:0][3:0][3:0] lut_in_r;
  logic cfg_out;

  for (genvar i = 0; i < NCELL; i++) begin : g_lin
    assign lut_in_r[i] = {lut_in[i][3:1], lut_in[i][0][3:1], rt_data[i]};
  end

  ubi_array #(.ROWS(ROWS), .COLS(COLS), .CELLS_PER_PE(CELLS_PER_PE)) u_array (
    .clk, .rst_n,
    .cfg_en, .cfg_in(cfg_bit), .cfg_out,
    .lut_in(lut_in_r), .lut_out,
    .instr, .instr_valid, .frame_update(frame_update_in),
    .ev_in, .spike, .flag(pe_flag), .pe_rd_val
  );

  // ------------------------------------------------------------------ AER
  aer_encoder #(.NSRC(NPE), .CHIP_W(CHIP_W)) u_enc (
    .clk, .rst_n, .chip_id, .is_first, .kick(aer_kick),
    .events(spike), .ready(frame_done), .token_in, .frame_update_in,
    .frame_update_out, .start_frame, .end_frame,
    .bus_valid(aer_bus_valid), .bus_addr(aer_bus_addr), .sent_count(aer_sent)
  );

  logic              srch_valid, srch_hit;
  logic [ADDR_W-1:0] srch_key;
  logic [NPE-1:0]    srch_ev;
  logic [CAM_AW:0]   srch_nmatch;

  aer_decoder #(.ADDR_W(ADDR_W), .NDEST(NPE)) u_dec (
    .clk, .rst_n, .bus_valid(aer_in_valid), .bus_addr(aer_in_addr),
    .frame_update(frame_update_in),
    .srch_valid, .srch_key, .srch_hit, .srch_ev,
    .ev_out(ev_in), .hit_count(aer_hits), .miss_count(aer_misses)
  );

  mem_ctrl #(
    .RAM_DEPTH(RAM_DEPTH), .RAM_W(16), .CAM_DEPTH(CAM_DEPTH),
    .ADDR_W(ADDR_W), .NDEST(NPE)
  ) u_mem (
    .clk, .rst_n,
    .ram_we, .ram_re, .ram_addr, .ram_wdata, .ram_rdata,
    .cam_we, .cam_idx, .cam_valid, .cam_key, .cam_dest,
    .srch_valid, .srch_key, .srch_hit, .srch_ev, .srch_nmatch
  );

  // ------------------------------------------------------ dynamic routing
  logic [NCELL-1:0][0:0] rt_local, rt_dout;
  route_sel_e [NCELL-1:0] rt_sel;

  for (genvar i = 0; i < NCELL; i++) begin : g_rt
    assign rt_local[i] = lut_out[i][0];
    assign rt_data[i]  = rt_dout[i];
  end

  route_array #(.ROWS(ROWS), .COLS(COLS), .DW(1), .NET_W(NET_W)) u_route (
    .clk, .rst_n,
    .req(rt_req), .is_source(rt_is_source), .has_net(rt_has_net),
    .net_id(rt_net_id), .local_data(rt_local), .clear_path(rt_clear),
    .data(rt_dout), .sel(rt_sel), .ack(rt_ack), .fail(rt_fail), .busy(rt_busy)
  );

  // ---------------------------------------------- THESEUS self-replication
  logic [TN-1:0] th_cid;

  theseus_array #(.ROWS(T_ROWS), .COLS(T_COLS), .CFG_W(T_CFG_W)) u_theseus (
    .clk, .rst_n, .clear(th_clear),
    .ext_valid(th_ext_valid), .ext_data(th_ext_data),
    .shift_en(th_shift_en), .repl_en(th_repl_en),
    .head_word(th_head_word), .word(th_word), .built(th_built),
    .cell_id(th_cid), .overflow(th_overflow)
  );

endmodule
