// tb_aer_encoder: self-checking test of the AER encoder in a ring of three
// chips sharing one wired-OR bus. Chip 0 is the first of the ring. Each
// chip's ready input is random, so turns are delayed until the chip's
// components are done; a chip's events change right after its turn and
// stay put until the next one. The test predicts the exact address
// sequence on the bus (chip 0's events in index order, then chip 1's, then
// chip 2's, then frame_update), and checks start_frame/end_frame pulses,
// that only one chip drives the bus at a time, that no turn starts while
// ready is low, and that a turn with n events lasts n+1 cycles.
module tb_aer_encoder;
  localparam int NS = 8, CW = 2, NC = 3, AW = CW + $clog2(NS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic kick = 0;
  logic [NC-1:0][NS-1:0] events = '0;
  logic [NC-1:0] ready = '0, ready_q = '0;
  logic [NC-1:0] token, fu_out, sf, ef, bv;
  logic [NC-1:0][AW-1:0] ba;
  logic [NC-1:0][15:0] sent;
  logic frame_update;
  logic bus_valid;
  logic [AW-1:0] bus_addr;

  assign frame_update = fu_out[0];
  assign bus_valid = |bv;
  assign bus_addr  = ba[0] | ba[1] | ba[2];

  for (genvar c = 0; c < NC; c++) begin : g_chip
    assign token[c] = ef[(c + NC - 1) % NC];
    aer_encoder #(.NSRC(NS), .CHIP_W(CW)) u_enc (
      .clk, .rst_n, .chip_id(CW'(c)), .is_first(c == 0), .kick(c == 0 ? kick : 1'b0),
      .events(events[c]), .ready(ready[c]), .token_in(token[c]), .frame_update_in(frame_update),
      .frame_update_out(fu_out[c]), .start_frame(sf[c]), .end_frame(ef[c]),
      .bus_valid(bv[c]), .bus_addr(ba[c]), .sent_count(sent[c]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [AW-1:0] exp_q [$];
  int nexp [NC];
  int frames = 0, turn_len [NC], total = 0;
  bit in_turn [NC];
  int next_chip = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(!bus_valid && fu_out == 0, "bus idle after reset");
    kick = 1; @(posedge clk); #1; kick = 0;
    for (int cyc = 0; cyc < 3000 && frames < 60; cyc++) begin
      check($countones(bv) <= 1, "one driver at a time");
      check(!(fu_out[1] || fu_out[2]), "only the first chip drives frame_update");
      for (int c = 0; c < NC; c++) begin
        if (sf[c]) begin
          check(!in_turn[c], "start_frame inside a turn");
          check(ready_q[c], "turn started while not ready");
          check(next_chip == c, $sformatf("chip %0d took the bus, chip %0d's turn", c, next_chip));
          in_turn[c] = 1; turn_len[c] = 0;
          nexp[c] = 0;
          for (int i = 0; i < NS; i++)
            if (events[c][i]) begin exp_q.push_back({CW'(c), 3'(i)}); nexp[c]++; end
        end
        if (in_turn[c]) turn_len[c]++;
        if (ef[c]) begin
          check(in_turn[c], $sformatf("chip %0d end_frame without start_frame", c));
          check(turn_len[c] == nexp[c] + 1, $sformatf("chip %0d turn %0d cycles, %0d events", c, turn_len[c], nexp[c]));
          check(exp_q.size() == 0, "all addresses of the turn sent");
          in_turn[c] = 0;
          next_chip = (c + 1) % NC;
          events[c] = ($urandom_range(0, 5) == 0) ? '0 : NS'($urandom & $urandom);
        end
      end
      if (bus_valid) begin
        check(exp_q.size() > 0, "unexpected address");
        if (exp_q.size() > 0) begin
          logic [AW-1:0] e;
          e = exp_q.pop_front();
          check(bus_addr == e, $sformatf("address %h exp %h", bus_addr, e));
          total++;
        end
      end
      if (frame_update) begin
        check(next_chip == 0, "frame_update after the last chip");
        frames++;
      end
      // ready for this cycle, sampled at the coming edge
      ready = NC'($urandom);
      ready_q = ready;
      @(posedge clk); #1;
    end
    check(frames >= 60, $sformatf("frames seen %0d", frames));
    check(int'(sent[0] + sent[1] + sent[2]) >= total, "sent counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
