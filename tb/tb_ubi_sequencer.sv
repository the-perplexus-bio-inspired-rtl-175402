// tb_ubi_sequencer: self-checking test of the SIMD sequencer.
// Loads a small program with a counted loop, a frame wait, a jump over an
// instruction and a halt. Checks the program counter trace cycle by cycle,
// the broadcast PE instructions, that the wait holds until frame_update,
// that a frame_update arriving early lets the wait pass in one cycle, and
// that frame_done is high only while waiting for a frame that has not
// ended yet, or when stopped.
module tb_ubi_sequencer;
  import ubichip_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic prog_we = 0, start = 0, frame_update = 0;
  logic [PC_W-1:0] prog_addr = '0, pc;
  seq_instr_t prog_wdata = '0;
  pe_instr_t instr;
  logic instr_valid, running, frame_done;

  ubi_sequencer dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .start,
                     .frame_update, .instr, .instr_valid, .running, .frame_done, .pc);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input sq_op_e s, input int tgt, input pe_op_e o, input int imm);
    seq_instr_t w;
    w = '0; w.sop = s; w.target = PC_W'(tgt); w.pe.op = o; w.pe.rd = 3'(a); w.pe.imm = 16'(imm);
    prog_we = 1; prog_addr = PC_W'(a); prog_wdata = w;
    @(posedge clk); #1;
    prog_we = 0;
  endtask

  // expected pc trace with the wait collapsed to one entry
  int exp_pc [] = '{0, 1, 2, 3, 1, 2, 3, 1, 2, 3, 4, 5, 6, 8};
  pe_op_e exp_ops [] = '{OP_LDI, OP_ADDI, OP_LDI, OP_ADDI, OP_LDI, OP_ADDI, OP_FIRE};

  task automatic run(input int fu_delay, input bit early, output int wait_cycles);
    int pcs [$];
    pe_op_e ops [$];
    int cyc, at4;
    start = 1; @(posedge clk); #1; start = 0;
    cyc = 0; at4 = 0;
    while (running && cyc < 200) begin
      if (pcs.size() == 0 || !(pc == 4 && pcs[$] == 4)) pcs.push_back(int'(pc));
      if (instr_valid) ops.push_back(instr.op);
      if (early && cyc == 0) frame_update = 1;
      check(frame_done == (pc == 4 && !early && at4 < fu_delay), $sformatf("frame_done at pc %0d", pc));
      if (pc == 4) begin
        at4++;
        if (!early && at4 == fu_delay) frame_update = 1;
      end
      @(posedge clk); #1;
      frame_update = 0;
      cyc++;
    end
    check(!running, "program halted");
    check(pcs.size() == exp_pc.size(), $sformatf("trace length %0d", pcs.size()));
    foreach (exp_pc[i]) if (i < pcs.size()) check(pcs[i] == exp_pc[i], $sformatf("pc[%0d]=%0d exp %0d", i, pcs[i], exp_pc[i]));
    check(ops.size() == exp_ops.size(), $sformatf("issued %0d PE instructions", ops.size()));
    foreach (exp_ops[i]) if (i < ops.size()) check(ops[i] == exp_ops[i], $sformatf("op %0d", i));
    wait_cycles = at4;
  endtask

  initial begin
    int w;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    wr(0, SQ_LDC, 3, OP_NOP, 0);
    wr(1, SQ_PE, 0, OP_LDI, 1);
    wr(2, SQ_PE, 0, OP_ADDI, 2);
    wr(3, SQ_LOOP, 1, OP_NOP, 0);
    wr(4, SQ_WAITF, 0, OP_NOP, 0);
    wr(5, SQ_PE, 0, OP_FIRE, 0);
    wr(6, SQ_JMP, 8, OP_NOP, 0);
    wr(7, SQ_PE, 0, OP_XOR, 0);
    wr(8, SQ_HALT, 0, OP_NOP, 0);
    check(!running && frame_done, "idle before start");
    // frame_update during the 6th cycle of waiting: 7 cycles at pc 4
    run(6, 0, w);
    check(w == 7, $sformatf("wait cycles %0d exp 7", w));
    // frame_update before the wait is reached: one cycle at pc 4
    run(0, 1, w);
    check(w == 1, $sformatf("early frame: wait cycles %0d exp 1", w));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
