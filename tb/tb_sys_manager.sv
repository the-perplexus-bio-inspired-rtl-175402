// tb_sys_manager: self-checking test of the host configuration port.
// Random host writes to every target are checked against the decode the
// address map defines (program words assembled from two writes, CAM entry
// fields, RAM writes, configuration-chain shifts, start and kick pulses,
// chip identity); reads return the sequencer status and the RAM data
// delivered by a one-cycle RAM model.
module tb_sys_manager;
  import ubichip_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_we = 0, host_re = 0;
  logic [15:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic prog_we, seq_start, seq_running = 0, aer_kick, is_first;
  logic [PC_W-1:0] prog_addr, seq_pc = '0;
  seq_instr_t prog_wdata;
  logic [6:0] chip_id;
  logic cam_we, cam_valid, ram_we, ram_re, cfg_en, cfg_bit;
  logic [7:0] cam_idx;
  logic [13:0] cam_key;
  logic [6:0] cam_dest;
  logic [9:0] ram_addr;
  logic [15:0] ram_wdata, ram_rdata;

  sys_manager dut (.clk, .rst_n, .host_we, .host_re, .host_addr, .host_wdata, .host_rdata,
    .prog_we, .prog_addr, .prog_wdata, .seq_start, .seq_running, .seq_pc,
    .aer_kick, .chip_id, .is_first, .cam_we, .cam_idx, .cam_valid, .cam_key, .cam_dest,
    .ram_we, .ram_re, .ram_addr, .ram_wdata, .ram_rdata, .cfg_en, .cfg_bit);

  // RAM model: registered read
  logic [15:0] ram [1024];
  always_ff @(posedge clk) begin
    if (ram_we) ram[ram_addr] <= ram_wdata;
    if (ram_re) ram_rdata <= ram[ram_addr];
  end

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

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int t = 0; t < 200; t++) begin
      logic [31:0] lo, hi, d;
      logic [7:0] a;
      // program word through two writes
      lo = $urandom; hi = $urandom; a = $urandom;
      host_we = 1; host_addr = 16'h1000 | a; host_wdata = lo; #1;
      check(!prog_we, "staging write does not commit");
      tick();
      host_addr = 16'h1100 | a; host_wdata = hi; #1;
      check(prog_we && prog_addr == a, "commit");
      check(prog_wdata == seq_instr_t'({hi[6:0], lo}), "program word");
      tick();
      // CAM entry
      d = $urandom; a = $urandom;
      host_addr = 16'h2000 | a; host_wdata = d; #1;
      check(cam_we && cam_idx == a && cam_valid == d[31] && cam_dest == d[30:24] && cam_key == d[13:0], "CAM entry");
      check(!prog_we && !ram_we && !cfg_en, "one target only");
      tick();
      // RAM write
      a = $urandom; d = $urandom;
      host_addr = 16'h3000 | a; host_wdata = d; #1;
      check(ram_we && ram_addr == a && ram_wdata == d[15:0], "RAM write");
      tick();
      // configuration chain
      d = $urandom;
      host_addr = 16'h4000; host_wdata = d; #1;
      check(cfg_en && cfg_bit == d[0], "chain shift");
      tick();
      // identity
      d = $urandom;
      host_addr = 16'h5000; host_wdata = d; tick();
      check(chip_id == d[6:0] && is_first == d[8], "identity");
      // control
      d = $urandom;
      host_addr = 16'h0000; host_wdata = d; #1;
      check(seq_start == d[0] && aer_kick == d[1], "control pulses");
      tick(); host_we = 0; #1;
      check(!seq_start && !aer_kick && !cam_we && !ram_we && !cfg_en && !prog_we, "pulses end");
      // read back the RAM word written above
      host_re = 1; host_addr = 16'h3000 | a; tick(); host_re = 0; #1;
      check(host_rdata == {16'h0, ram[a]}, "RAM read");
      // status read
      seq_running = $urandom; seq_pc = $urandom;
      host_re = 1; host_addr = 16'h0000; tick(); host_re = 0; #1;
      check(host_rdata == {23'h0, seq_running, seq_pc}, "status read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
