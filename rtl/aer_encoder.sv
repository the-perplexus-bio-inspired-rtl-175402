// aer_encoder: Address Event Representation (AER) encoder of one ubichip.
//
// The chips of a module share one address bus and take turns on it in a
// fixed ring order within each simulation frame. A chip's turn begins when
// the previous chip pulses end_frame (token_in). The first chip of the ring
// (is_first) instead answers the last chip's end_frame by pulsing the
// global frame_update, on which every chip's components update their
// state from the inputs of the frame; the first chip then takes its own
// turn. A chip granted the bus waits until its components have computed
// the frame (ready), then samples their events and starts its turn.
// During its turn the encoder pulses start_frame, puts the address
// {chip_id, index} of each sampled event on the bus, one per cycle, lowest
// index first, then pulses end_frame to hand the bus on. The bus is a
// wired-OR: outside its turn the encoder drives zeros.
// kick (first chip only) starts the very first frame.
//
// Timing: the events are sampled at the first clock edge with the grant
// (or a later one) seen and ready high; the turn starts in the next cycle.
// A turn with n events takes n+1 cycles: start_frame comes with the first
// address, end_frame in the cycle after the last one (both in the same
// cycle when n = 0). The token/frame_update ring and the signal names
// start_frame, end_frame and frame_update are the ubichip's; the address
// format, the one-address-per-cycle bus and the event ordering are this
// design's choices.
module aer_encoder #(
  parameter int NSRC   = 100,
  parameter int CHIP_W = 7,
  localparam int IDX_W  = $clog2(NSRC),
  localparam int ADDR_W = CHIP_W + IDX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CHIP_W-1:0] chip_id,
  input  logic              is_first,
  input  logic              kick,
  input  logic [NSRC-1:0]   events,
  input  logic              ready,           // events of this frame computed
  input  logic              token_in,        // previous chip's end_frame
  input  logic              frame_update_in, // global frame_update
  output logic              frame_update_out,
  output logic              start_frame,
  output logic              end_frame,
  output logic              bus_valid,
  output logic [ADDR_W-1:0] bus_addr,
  output logic [15:0]       sent_count       // addresses sent, wraps
);

  logic [NSRC-1:0] snap;
  logic            active, first_cyc, pending;
  logic [IDX_W-1:0] idx;
  logic            any;

  // lowest pending event
  always_comb begin
    idx = '0;
    any = 1'b0;
    for (int i = NSRC - 1; i >= 0; i--) begin
      if (snap[i]) begin
        idx = IDX_W'(i);
        any = 1'b1;
      end
    end
  end

  assign bus_valid   = active && any;
  assign bus_addr    = bus_valid ? {chip_id, idx} : '0;
  assign start_frame = active && first_cyc;
  assign end_frame   = active && !any;

  logic grant;
  assign grant = is_first ? frame_update_in : token_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      snap             <= '0;
      active           <= 1'b0;
      first_cyc        <= 1'b0;
      pending          <= 1'b0;
      frame_update_out <= 1'b0;
      sent_count       <= '0;
    end else begin
      frame_update_out <= is_first && (token_in || kick);
      if ((grant || pending) && !active) begin
        if (ready) begin
          snap      <= events;
          pending   <= 1'b0;
          active    <= 1'b1;
          first_cyc <= 1'b1;
        end else begin
          pending   <= 1'b1;
        end
      end else if (active) begin
        first_cyc <= 1'b0;
        if (any) begin
          snap[idx]  <= 1'b0;
          sent_count <= sent_count + 1'b1;
        end else begin
          active <= 1'b0;
        end
      end
    end
  end

endmodule
