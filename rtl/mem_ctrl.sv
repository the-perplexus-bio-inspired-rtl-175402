// mem_ctrl: memory controller of the ubichip.
//
// It holds the two memories of the chip:
//  * the data RAM for system parameters (RAM_DEPTH words of RAM_W bits,
//    one read/write port, registered read data one cycle after ram_re);
//  * the CAM that implements the AER connectivity. Each CAM entry is one
//    synapse: a valid bit, the AER address of the source neuron (key) and
//    the index of the local PE that receives it (dest). A search compares
//    srch_key with every valid entry in the same cycle; srch_ev has bit d
//    set when any matching entry has dest d, srch_hit when any entry
//    matched, srch_nmatch counts the matches.
// Entries are written one at a time through cam_we (from the system
// manager); a write and a search may happen in the same cycle, the search
// then sees the old contents.
// The RAM and the CAM and their use for AER are the ubichip's; sizes, entry
// format and the port protocol are this design's own choices.
module mem_ctrl #(
  parameter int RAM_DEPTH = 1024,
  parameter int RAM_W     = 16,
  parameter int CAM_DEPTH = 256,
  parameter int ADDR_W    = 14,     // AER address width
  parameter int NDEST     = 100,    // local PEs
  localparam int RAM_AW   = $clog2(RAM_DEPTH),
  localparam int CAM_AW   = $clog2(CAM_DEPTH),
  localparam int DEST_W   = $clog2(NDEST)
) (
  input  logic              clk,
  input  logic              rst_n,
  // data RAM
  input  logic              ram_we,
  input  logic              ram_re,
  input  logic [RAM_AW-1:0] ram_addr,
  input  logic [RAM_W-1:0]  ram_wdata,
  output logic [RAM_W-1:0]  ram_rdata,
  // CAM write
  input  logic              cam_we,
  input  logic [CAM_AW-1:0] cam_idx,
  input  logic              cam_valid,
  input  logic [ADDR_W-1:0] cam_key,
  input  logic [DEST_W-1:0] cam_dest,
  // CAM search
  input  logic              srch_valid,
  input  logic [ADDR_W-1:0] srch_key,
  output logic              srch_hit,
  output logic [NDEST-1:0]  srch_ev,
  output logic [CAM_AW:0]   srch_nmatch
);

  // ---------------------------------------------------------- data RAM
  logic [RAM_W-1:0] ram [RAM_DEPTH];
  always_ff @(posedge clk) begin
    if (ram_we) ram[ram_addr] <= ram_wdata;
    if (ram_re) ram_rdata <= ram[ram_addr];
  end

  // --------------------------------------------------------------- CAM
  logic [CAM_DEPTH-1:0]              cv;
  logic [CAM_DEPTH-1:0][ADDR_W-1:0]  ck;
  logic [CAM_DEPTH-1:0][DEST_W-1:0]  cd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cv <= '0;
    end else if (cam_we) begin
      cv[cam_idx] <= cam_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (cam_we) begin
      ck[cam_idx] <= cam_key;
      cd[cam_idx] <= cam_dest;
    end
  end

  always_comb begin
    srch_ev     = '0;
    srch_nmatch = '0;
    for (int e = 0; e < CAM_DEPTH; e++) begin
      if (srch_valid && cv[e] && ck[e] == srch_key) begin
        srch_ev[cd[e]] = 1'b1;
        srch_nmatch    = srch_nmatch + 1'b1;
      end
    end
    srch_hit = (srch_nmatch != '0);
  end

endmodule
