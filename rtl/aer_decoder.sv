// aer_decoder: AER decoder of one ubichip.
//
// It watches the shared AER address bus. Every valid address is looked up
// in the CAM of the memory controller (srch_* ports, same cycle); the
// returned bit vector of local destinations is ORed into the frame's input
// events. The accumulated events are offered on ev_out throughout the
// frame; at frame_update the PE array takes them and the decoder clears
// its accumulator for the next frame. Addresses that hit no CAM entry are
// counted as misses and otherwise ignored.
//
// Timing: one address per cycle, no back-pressure; an address on the bus
// in cycle t is visible on ev_out from cycle t+1. Address to event
// translation is the ubichip's; the CAM lookup protocol is this design's.
module aer_decoder #(
  parameter int ADDR_W = 14,
  parameter int NDEST  = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bus_valid,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic              frame_update,
  output logic              srch_valid,
  output logic [ADDR_W-1:0] srch_key,
  input  logic              srch_hit,
  input  logic [NDEST-1:0]  srch_ev,
  output logic [NDEST-1:0]  ev_out,
  output logic [15:0]       hit_count,
  output logic [15:0]       miss_count
);

  assign srch_valid = bus_valid;
  assign srch_key   = bus_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_out     <= '0;
      hit_count  <= '0;
      miss_count <= '0;
    end else begin
      if (frame_update)
        ev_out <= '0;
      else if (bus_valid)
        ev_out <= ev_out | srch_ev;
      if (bus_valid && srch_hit)  hit_count  <= hit_count + 1'b1;
      if (bus_valid && !srch_hit) miss_count <= miss_count + 1'b1;
    end
  end

endmodule
