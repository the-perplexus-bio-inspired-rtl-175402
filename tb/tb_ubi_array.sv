// tb_ubi_array: self-checking test of the SIMD array.
// A 2 x 8 array with 4 cells per PE (four 16-bit PEs) is configured in ALU
// mode through the configuration chain. Random broadcast instructions,
// conditional or not, are applied together with random input events and
// frame updates; a 16-bit reference model of every PE (registers, flag,
// event and spike bits) predicts the registers, flags and spikes.
module tb_ubi_array;
  import ubichip_pkg::*;

  localparam int ROWS = 2, COLS = 8, CPP = 4;
  localparam int NCELL = ROWS * COLS, NPE = NCELL / CPP, PW = 4 * CPP;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_en = 0, cfg_in = 0, cfg_out;
  logic [NCELL-1:0][3:0][3:0] lut_in = '0;
  logic [NCELL-1:0][3:0] lut_out;
  pe_instr_t instr = '0;
  logic instr_valid = 0, frame_update = 0;
  logic [NPE-1:0] ev_in = '0, spike, flag;
  logic [NPE-1:0][PW-1:0] rdv;

  ubi_array #(.ROWS(ROWS), .COLS(COLS), .CELLS_PER_PE(CPP)) dut (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .lut_in, .lut_out,
    .instr, .instr_valid, .frame_update, .ev_in, .spike, .flag, .pe_rd_val(rdv)
  );

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

  logic [PW-1:0] R [NPE][8];
  logic F [NPE], E [NPE], S [NPE];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // every cell: 64 zero LUT bits, then mode = ALU
    for (int c = 0; c < NCELL; c++)
      for (int k = 0; k < 65; k++) begin
        cfg_en = 1; cfg_in = (k == 64); @(posedge clk); #1;
      end
    cfg_en = 0;
    check(cfg_out == 1'b0, "chain output");
    for (int p = 0; p < NPE; p++) begin
      for (int r = 0; r < 8; r++) R[p][r] = '0;
      F[p] = 0; E[p] = 0; S[p] = 0;
    end
    for (int t = 0; t < 2000; t++) begin
      pe_instr_t in;
      in.op   = pe_op_e'($urandom_range(1, 13));
      in.cond = $urandom_range(0, 2) == 0;
      in.rd   = $urandom; in.rs = $urandom; in.imm = $urandom;
      instr = in; instr_valid = 1;
      frame_update = ($urandom_range(0, 15) == 0);
      ev_in = $urandom;
      @(posedge clk); #1;
      for (int p = 0; p < NPE; p++) begin
        logic [PW-1:0] a, b, res;
        logic wr, en;
        a = R[p][in.rd]; b = R[p][in.rs];
        wr = 1; res = a;
        case (in.op)
          OP_LDI:  res = in.imm;
          OP_MOV:  res = b;
          OP_ADD:  res = a + b;
          OP_SUB:  res = a - b;
          OP_AND:  res = a & b;
          OP_OR:   res = a | b;
          OP_XOR:  res = a ^ b;
          OP_SHR:  res = {b[PW-1], b[PW-1:1]};
          OP_ADDI: res = a + in.imm;
          default: wr = 0;
        endcase
        en = !in.cond || F[p];
        if (wr && en) R[p][in.rd] = res;
        if (in.op == OP_TSTN)  F[p] = a[PW-1];
        if (in.op == OP_TSTGE) F[p] = $signed(a) >= $signed(b);
        if (in.op == OP_TSTEV) F[p] = E[p];
        if (frame_update) S[p] = 0;
        else if (in.op == OP_FIRE) S[p] = F[p];
        if (frame_update) E[p] = ev_in[p];
      end
      instr_valid = 0; frame_update = 0;
      for (int p = 0; p < NPE; p++) begin
        check(flag[p] == F[p], $sformatf("t%0d PE%0d flag after %s", t, p, in.op.name()));
        check(spike[p] == S[p], $sformatf("t%0d PE%0d spike", t, p));
      end
      // read back one register in every PE
      instr.op = OP_NOP; instr.rd = $urandom; #1;
      for (int p = 0; p < NPE; p++)
        check(rdv[p] == R[p][instr.rd], $sformatf("t%0d PE%0d r%0d got %h exp %h (after %s)",
              t, p, instr.rd, rdv[p], R[p][instr.rd], in.op.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
