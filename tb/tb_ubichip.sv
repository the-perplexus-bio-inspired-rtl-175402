// tb_ubichip: end-to-end test of the whole chip at its default size
// (10 x 40 cells, 100 PEs of 16 bits, 4 x 8 THESEUS molecules), as a
// single-chip system: the AER bus, end_frame -> token_in and
// frame_update_out -> frame_update_in are looped back.
//
//  1. Through the host port: chip identity, the configuration chain of all
//     400 cells (99 PEs in ALU mode with per-neuron initial registers, the
//     last PE in LUT mode), a leaky-free integrate-and-fire program for the
//     sequencer and a chain of CAM synapses.
//  2. 30 AER frames are run. A reference model of the network (membrane
//     v += w if an event arrived in the last frame; v += bias; fire and
//     reset when v >= thr) predicts, frame by frame, the addresses on the
//     bus; CAM hits and misses are counted against the model too.
//  3. The LUT-mode PE is checked as four independent 4-input functions.
//  4. Dynamic routing: a path from cell 0 to the far corner cell is built
//     while the network runs, its data checked at the target; then a
//     request with no partner fails, and a second target of the same
//     connection joins the existing path (path reuse).
//  5. THESEUS: a 5-molecule cell is built, inspected, replicated, and
//     overflowed.
// Every mechanism is counted and must have happened at least once.
module tb_ubichip;
  import ubichip_pkg::*;

  localparam int ROWS = 10, COLS = 40, CPP = 4;
  localparam int NCELL = ROWS * COLS, NPE = NCELL / CPP;
  localparam int CHIP_W = 7, IDX_W = $clog2(NPE), ADDR_W = CHIP_W + IDX_W;
  localparam int NET_W = $clog2(NCELL);
  localparam int TR = 4, TC = 8, TW = 19, TN = TR * TC;
  localparam int FRAMES = 30;
  localparam int THR = 8;
  localparam int LUTPE = NPE - 1;          // this PE's cells are in LUT mode

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_we = 0, host_re = 0;
  logic [15:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic aer_bus_valid, start_frame, end_frame, frame_update;
  logic [ADDR_W-1:0] aer_bus_addr;
  logic [NCELL-1:0][3:0][3:0] lut_in = '0;
  logic [NCELL-1:0][3:0] lut_out;
  logic [NPE-1:0] spike;
  logic seq_running;
  logic [NCELL-1:0] rt_req = '0, rt_is_source = '0, rt_has_net = '0, rt_clear = '0;
  logic [NCELL-1:0][NET_W-1:0] rt_net_id = '0;
  logic [NCELL-1:0] rt_data, rt_ack, rt_fail;
  logic rt_busy;
  logic th_clear = 0, th_repl_en = 0;
  logic [1:0] th_ext_valid = '0, th_shift_en = '0;
  logic [1:0][TW-1:0] th_ext_data = '0, th_head_word;
  logic [TN-1:0][TW-1:0] th_word;
  logic [TN-1:0] th_built;
  logic th_overflow;
  logic [15:0] aer_sent, aer_hits, aer_misses;

  ubichip dut (
    .clk, .rst_n, .host_we, .host_re, .host_addr, .host_wdata, .host_rdata,
    .aer_bus_valid, .aer_bus_addr, .aer_in_valid(aer_bus_valid), .aer_in_addr(aer_bus_addr),
    .token_in(end_frame), .start_frame, .end_frame,
    .frame_update_out(frame_update), .frame_update_in(frame_update),
    .lut_in, .lut_out, .spike, .seq_running,
    .rt_req, .rt_is_source, .rt_has_net, .rt_net_id, .rt_clear,
    .rt_data, .rt_ack, .rt_fail, .rt_busy,
    .th_clear, .th_ext_valid, .th_ext_data, .th_shift_en, .th_repl_en,
    .th_head_word, .th_word, .th_built, .th_overflow,
    .aer_sent, .aer_hits, .aer_misses);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask
  task automatic hw(input logic [15:0] a, input logic [31:0] d);
    host_we = 1; host_addr = a; host_wdata = d; tick(); host_we = 0;
  endtask

  // ------------------------------------------------- network definition
  logic signed [15:0] w [NPE], bias [NPE], v [NPE];
  bit ev [NPE], fired [NPE];
  int syn_dst [NPE];                       // -1: no synapse
  function automatic logic [15:0] reg_init(int p, int r);
    case (r)
      0: return 16'd0;
      1: return w[p];
      2: return bias[p];
      3: return 16'(THR);
      default: return 16'hffff;            // r4..r7: all ones (routing source data)
    endcase
  endfunction

  // LUT-mode functions: LUT i of cell c = parity (i even) or AND (i odd) of
  // its inputs, inverted for odd cells
  function automatic logic lutf(int c, int i, logic [3:0] x);
    logic y;
    y = (i % 2 == 0) ? ^x : &x;
    return y ^ c[0];
  endfunction

  // ----------------------------------------------------- mechanism counts
  int n_cond_mixed = 0, n_seq_wait = 0, n_turn_wait = 0, n_frames = 0;
  int n_hits_exp = 0, n_miss_exp = 0, n_reuse = 0;

  initial begin
    logic [ADDR_W-1:0] got [$];
    int fu_cycle, cyc;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;

    for (int p = 0; p < NPE; p++) begin
      w[p]    = (p % 2 == 0) ? 16'(THR) : 16'd3;
      bias[p] = (p % 4 == 0) ? 16'(THR) : (p % 4 == 1) ? 16'd3 : 16'd0;
      v[p] = 0; ev[p] = 0;
      syn_dst[p] = (p < NPE - 1 && p % 3 != 2) ? p + 1 : -1;
    end

    // ---- 1. configuration through the host port
    hw(16'h5000, 32'h100);                 // chip 0, first of the ring
    for (int c = NCELL - 1; c >= 0; c--) begin
      logic [3:0][15:0] lut;
      int p, k;
      p = c / CPP; k = c % CPP;
      for (int i = 0; i < 4; i++)
        for (int e = 0; e < 16; e++)
          if (p == LUTPE) lut[i][e] = lutf(c, i, 4'(e));
          else lut[i][e] = (e < 8) ? reg_init(p, e)[4 * k + i] : 1'b0;
      for (int b = 0; b < 64; b++) hw(16'h4000, 32'(lut[b / 16][b % 16]));
      hw(16'h4000, 32'(p != LUTPE));
    end
    // program: 0 WAITF; 1 TSTEV; 2 ADD r0,r1 (cond); 3 ADD r0,r2; 4 TSTGE r0,r3;
    //          5 FIRE; 6 LDI r0,0 (cond); 7 JMP 0
    begin
      seq_instr_t prog [8];
      foreach (prog[i]) prog[i] = '0;
      prog[0].sop = SQ_WAITF;
      prog[1].pe.op = OP_TSTEV;
      prog[2].pe.op = OP_ADD;  prog[2].pe.cond = 1; prog[2].pe.rd = 0; prog[2].pe.rs = 1;
      prog[3].pe.op = OP_ADD;  prog[3].pe.rd = 0; prog[3].pe.rs = 2;
      prog[4].pe.op = OP_TSTGE; prog[4].pe.rd = 0; prog[4].pe.rs = 3;
      prog[5].pe.op = OP_FIRE;
      prog[6].pe.op = OP_LDI;  prog[6].pe.cond = 1; prog[6].pe.rd = 0; prog[6].pe.imm = 0;
      prog[7].sop = SQ_JMP;    prog[7].target = 0;
      for (int i = 0; i < 8; i++) begin
        logic [63:0] wd;
        wd = 64'(prog[i]);
        hw(16'h1000 | 16'(i), wd[31:0]);
        hw(16'h1100 | 16'(i), wd[63:32]);
      end
    end
    // CAM: one synapse per chain link, source {chip 0, p} -> PE p+1
    begin
      int e;
      e = 0;
      for (int p = 0; p < NPE; p++)
        if (syn_dst[p] >= 0) begin
          hw(16'h2000 | 16'(e), {1'b1, 7'(syn_dst[p]), 10'd0, 14'(p)});
          e++;
        end
    end
    // data RAM write and read back
    hw(16'h3005, 32'h0000_beef);
    host_re = 1; host_addr = 16'h3005; tick(); host_re = 0; #1;
    check(host_rdata == 32'h0000_beef, "data RAM through the host port");

    // ---- 3. LUT-mode PE
    for (int t = 0; t < 50; t++) begin
      for (int k = 0; k < CPP; k++) lut_in[LUTPE * CPP + k] = {$urandom, $urandom};
      #1;
      for (int k = 0; k < CPP; k++)
        for (int i = 0; i < 4; i++) begin
          logic [3:0] x;
          int c;
          c = LUTPE * CPP + k;
          x = lut_in[c][i];
          if (i == 0) x[0] = rt_data[c];   // input 0 of LUT 0 is the routed data
          check(lut_out[c][i] == lutf(c, i, x), "LUT-mode cell function");
        end
    end
    // routing source data: cell 0 reads register r6/r7 bit 0 (= 1) on LUT 0
    lut_in[0][0] = 4'b0110;

    // ---- 2. run the network
    hw(16'h0000, 32'h1);                   // start the sequencer
    tick();
    host_we = 1; host_addr = 16'h0000; host_wdata = 32'h2; // kick the first frame
    tick(); host_we = 0;
    cyc = 0;
    fu_cycle = -1;
    while (n_frames < FRAMES && cyc < 200000) begin
      if (seq_running && dut.frame_done) n_seq_wait++;
      if (start_frame && fu_cycle >= 0 && cyc - fu_cycle > 2) n_turn_wait++;
      if (aer_bus_valid) got.push_back(aer_bus_addr);
      // ---- 4. routing, started during frame 5 while the network runs
      if (n_frames == 5 && fu_cycle == cyc - 1) begin
        rt_has_net[0] = 1; rt_net_id[0] = 9'd77; rt_is_source[0] = 1; rt_req[0] = 1;
        rt_has_net[NCELL - 1] = 1; rt_net_id[NCELL - 1] = 9'd77;
      end
      if (rt_ack[0]) begin rt_req[0] = 0; rt_has_net[0] = 0; rt_has_net[NCELL - 1] = 0; end
      if (end_frame) begin
        // end of frame n_frames: compare with the model
        int nf;
        bit any_f, any_n;
        logic [ADDR_W-1:0] exp [$];
        any_f = 0; any_n = 0;
        exp.delete();
        for (int p = 0; p < NPE; p++) begin
          fired[p] = 0;
          if (p == LUTPE) continue;
          if (ev[p]) v[p] += w[p];
          v[p] += bias[p];
          if (v[p] >= THR) begin fired[p] = 1; v[p] = 0; any_f = 1; end
          else any_n = 1;
        end
        if (any_f && any_n) n_cond_mixed++;
        for (int p = 0; p < NPE; p++) ev[p] = 0;
        nf = 0;
        for (int p = 0; p < NPE; p++)
          if (fired[p]) begin
            exp.push_back({7'd0, IDX_W'(p)});
            nf++;
            if (syn_dst[p] >= 0) begin ev[syn_dst[p]] = 1; n_hits_exp++; end
            else n_miss_exp++;
          end
        check(got.size() == exp.size(), $sformatf("frame %0d: %0d addresses, exp %0d", n_frames, got.size(), exp.size()));
        foreach (exp[i]) if (i < got.size())
          check(got[i] == exp[i], $sformatf("frame %0d address %0d: %h exp %h", n_frames, i, got[i], exp[i]));
        got.delete();
        n_frames++;
      end
      if (frame_update) fu_cycle = cyc;
      tick(); cyc++;
    end
    check(n_frames == FRAMES, $sformatf("%0d frames run", n_frames));
    check(int'(aer_hits) == n_hits_exp, $sformatf("CAM hits %0d exp %0d", aer_hits, n_hits_exp));
    check(int'(aer_misses) == n_miss_exp, $sformatf("CAM misses %0d exp %0d", aer_misses, n_miss_exp));
    check(int'(aer_sent) == n_hits_exp + n_miss_exp, "addresses sent");

    // routing result: 39 hops from cell 0 to cell 399, data = 1 at the target
    begin
      int c2;
      c2 = 0;
      while (rt_busy && c2 < 1000) begin tick(); c2++; end
      repeat (60) tick();
      check(dut.rt_sel[0] == SEL_LOCAL, "routing: source drives the path");
      check(rt_data[NCELL - 1] == 1'b1, "routing: data reaches the far corner");
    end
    // a request nobody answers fails
    begin
      int c2;
      bit failed;
      rt_has_net[200] = 1; rt_net_id[200] = 9'd5; rt_req[200] = 1;
      failed = 0; c2 = 0;
      while (!failed && c2 < 1000) begin
        tick(); c2++;
        if (rt_fail[200]) failed = 1;
        if (rt_ack[200]) break;
      end
      rt_req[200] = 0; rt_has_net[200] = 0;
      check(failed, "routing: unanswered request fails");
    end
    // a new target of the same connection joins the existing path
    begin
      int c2;
      int nbef, naft;
      repeat (2) tick();
      nbef = 0;
      for (int i = 0; i < NCELL; i++) if (dut.rt_sel[i] != SEL_NONE) nbef++;
      rt_has_net[200] = 1; rt_net_id[200] = 9'd77; rt_is_source[200] = 0; rt_req[200] = 1;
      c2 = 0;
      while (!rt_ack[200] && !rt_fail[200] && c2 < 1000) begin tick(); c2++; end
      rt_req[200] = 0; rt_has_net[200] = 0;
      check(rt_ack[200], "routing: second target joins");
      naft = 0;
      for (int i = 0; i < NCELL; i++) if (dut.rt_sel[i] != SEL_NONE) naft++;
      // the new branch is shorter than a fresh path from cell 0 (5 hops)
      if (naft > nbef && naft - nbef <= 5) n_reuse++;
      repeat (60) tick();
      check(rt_data[200] == rt_data[NCELL - 1] && rt_data[200] == 1'b1,
            "routing: joined target receives the same data");
      check(dut.rt_sel[0] == SEL_LOCAL, "routing: first path kept");
    end

    // ---- 5. THESEUS: path E, S, W, S, end from entry 0
    begin
      logic [TW-1:0] g [5];
      int pos [5] = '{0, 1, TC + 1, TC, 2 * TC};
      logic [TW-1:0] outw [$];
      g[0] = {3'(TD_E), 16'h1111}; g[1] = {3'(TD_S), 16'h2222}; g[2] = {3'(TD_W), 16'h3333};
      g[3] = {3'(TD_S), 16'h4444}; g[4] = {3'(TD_END), 16'h5555};
      for (int j = 0; j < 5; j++) begin th_ext_valid[0] = 1; th_ext_data[0] = g[j]; tick(); end
      th_ext_valid = '0;
      repeat (10) tick();
      for (int j = 0; j < 5; j++) check(th_built[pos[j]] && th_word[pos[j]] == g[j], "THESEUS construction");
      for (int j = 0; j < 5; j++) begin outw.push_back(th_head_word[0]); th_shift_en[0] = 1; tick(); end
      th_shift_en = '0;
      for (int j = 0; j < 5; j++) check(outw[j] == g[j], "THESEUS self-inspection");
      th_repl_en = 1; repeat (5) tick(); th_repl_en = 0;
      repeat (12) tick();
      for (int j = 0; j < 5; j++)
        check(th_built[pos[j] + TC / 2] && th_word[pos[j] + TC / 2] == g[j] && th_word[pos[j]] == g[j],
              "THESEUS replication");
      check(!th_overflow, "no overflow yet");
      th_ext_valid[0] = 1; th_ext_data[0] = g[0]; tick(); th_ext_valid = '0;
      repeat (10) tick();
      check(th_overflow, "THESEUS overflow");
    end

    // ---- mechanism coverage
    $display("frames=%0d cond_mixed=%0d seq_wait=%0d turn_wait=%0d hits=%0d misses=%0d reuse=%0d",
             n_frames, n_cond_mixed, n_seq_wait, n_turn_wait, aer_hits, aer_misses, n_reuse);
    check(n_cond_mixed > 0, "conditional store with mixed flags happened");
    check(n_seq_wait > 0, "sequencer waited for a frame");
    check(n_turn_wait > 0, "bus turn waited for the PEs");
    check(aer_hits > 0 && aer_misses > 0, "CAM hit and miss happened");
    check(n_reuse > 0, "routing reused an existing path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
