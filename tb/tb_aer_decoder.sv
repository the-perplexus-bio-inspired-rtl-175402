// tb_aer_decoder: self-checking test of the AER decoder. The CAM answer is
// modelled in the testbench as a fixed function of the key (some keys
// miss). Random bus traffic across several frames is applied; the test
// checks the search request, the accumulated events one cycle after each
// address, their clearing at frame_update and the hit/miss counters.
module tb_aer_decoder;
  localparam int AW = 8, ND = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bus_valid = 0, frame_update = 0;
  logic [AW-1:0] bus_addr = '0;
  logic srch_valid, srch_hit;
  logic [AW-1:0] srch_key;
  logic [ND-1:0] srch_ev, ev_out;
  logic [15:0] hits, misses;

  // CAM model: key k reaches destinations k mod ND and (3k) mod ND, unless k mod 5 == 0
  function automatic logic [ND-1:0] cam(input logic [AW-1:0] k);
    logic [ND-1:0] v;
    v = '0;
    if (k % 5 != 0) begin v[k % ND] = 1; v[(3 * k) % ND] = 1; end
    return v;
  endfunction
  assign srch_ev  = srch_valid ? cam(srch_key) : '0;
  assign srch_hit = srch_ev != '0;

  aer_decoder #(.ADDR_W(AW), .NDEST(ND)) dut (
    .clk, .rst_n, .bus_valid, .bus_addr, .frame_update,
    .srch_valid, .srch_key, .srch_hit, .srch_ev,
    .ev_out, .hit_count(hits), .miss_count(misses));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [ND-1:0] acc;
  int nh, nm;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    acc = '0; nh = 0; nm = 0;
    check(ev_out == 0, "no events after reset");
    for (int t = 0; t < 2000; t++) begin
      frame_update = ($urandom_range(0, 19) == 0);
      bus_valid = !frame_update && ($urandom_range(0, 2) != 0);
      bus_addr = $urandom;
      #1;
      if (bus_valid) check(srch_valid && srch_key == bus_addr, "search follows the bus");
      else check(!srch_valid, "no search without an address");
      @(posedge clk); #1;
      if (frame_update) acc = '0;
      else if (bus_valid) begin
        acc |= cam(bus_addr);
        if (cam(bus_addr) != 0) nh++; else nm++;
      end
      check(ev_out == acc, $sformatf("t%0d events %h exp %h", t, ev_out, acc));
      check(int'(hits) == nh && int'(misses) == nm, "hit/miss counters");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
