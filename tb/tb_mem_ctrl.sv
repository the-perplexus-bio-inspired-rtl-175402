// tb_mem_ctrl: self-checking test of the memory controller.
// Data RAM: random writes, then reads checked one cycle after ram_re.
// CAM: random entries (keys from a small set so that several entries match
// one key, some entries invalid), random searches checked against a
// reference table for the hit flag, the destination vector and the count.
module tb_mem_ctrl;
  localparam int RD = 64, RW = 16, CD = 16, AW = 6, ND = 8;
  localparam int RAW = $clog2(RD), CAW = $clog2(CD), DW = $clog2(ND);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ram_we = 0, ram_re = 0;
  logic [RAW-1:0] ram_addr = '0;
  logic [RW-1:0] ram_wdata = '0, ram_rdata;
  logic cam_we = 0, cam_valid = 0;
  logic [CAW-1:0] cam_idx = '0;
  logic [AW-1:0] cam_key = '0, srch_key = '0;
  logic [DW-1:0] cam_dest = '0;
  logic srch_valid = 0, srch_hit;
  logic [ND-1:0] srch_ev;
  logic [CAW:0] srch_nmatch;

  mem_ctrl #(.RAM_DEPTH(RD), .RAM_W(RW), .CAM_DEPTH(CD), .ADDR_W(AW), .NDEST(ND)) dut (
    .clk, .rst_n, .ram_we, .ram_re, .ram_addr, .ram_wdata, .ram_rdata,
    .cam_we, .cam_idx, .cam_valid, .cam_key, .cam_dest,
    .srch_valid, .srch_key, .srch_hit, .srch_ev, .srch_nmatch);

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

  logic [RW-1:0] ram_ref [RD];
  logic cv [CD];
  logic [AW-1:0] ck [CD];
  logic [DW-1:0] cdst [CD];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // ---------------- RAM
    for (int a = 0; a < RD; a++) begin
      ram_we = 1; ram_addr = RAW'(a); ram_wdata = $urandom; ram_ref[a] = ram_wdata;
      @(posedge clk); #1;
    end
    ram_we = 0;
    for (int t = 0; t < 100; t++) begin
      ram_re = 1; ram_addr = $urandom;
      @(posedge clk); #1;
      ram_re = 0;
      check(ram_rdata == ram_ref[ram_addr], $sformatf("RAM[%0d]", ram_addr));
    end
    // ---------------- CAM, empty after reset
    srch_valid = 1; srch_key = 0; #1;
    check(!srch_hit && srch_ev == 0, "empty CAM does not match");
    for (int e = 0; e < CD; e++) cv[e] = 0;
    for (int t = 0; t < 60; t++) begin
      // write one entry
      cam_we = 1; cam_idx = $urandom; cam_valid = ($urandom_range(0, 4) != 0);
      cam_key = $urandom_range(0, 5); cam_dest = $urandom;
      srch_valid = 0;
      @(posedge clk); #1;
      cv[cam_idx] = cam_valid; ck[cam_idx] = cam_key; cdst[cam_idx] = cam_dest;
      cam_we = 0;
      // search every key of the small set
      for (int k = 0; k < 8; k++) begin
        logic [ND-1:0] ev;
        int n;
        ev = '0; n = 0;
        for (int e = 0; e < CD; e++)
          if (cv[e] && ck[e] == AW'(k)) begin ev[cdst[e]] = 1; n++; end
        srch_valid = 1; srch_key = AW'(k); #1;
        check(srch_hit == (n > 0), $sformatf("hit key %0d", k));
        check(srch_ev == ev, $sformatf("dests key %0d: %b exp %b", k, srch_ev, ev));
        check(int'(srch_nmatch) == n, $sformatf("count key %0d", k));
      end
    end
    srch_valid = 0; #1;
    check(srch_ev == 0 && !srch_hit, "no search, no match");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
