// tb_ubi_cell: self-checking test of one configurable cell.
// Loads random LUT contents through the configuration chain and checks the
// four LUT outputs for random inputs; then switches the cell to ALU mode
// (as a stand-alone 4-bit PE) and checks random register-file operations
// against a reference model of the 8 x 4-bit register file, whose initial
// values are the LUT bits (register r, bit b = LUT b entry r).
module tb_ubi_cell;
  import ubichip_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_en = 0, cfg_in = 0, cfg_out, alu_mode;
  logic [3:0][3:0] lut_in = '0;
  logic [3:0] lut_out;
  pe_op_e op = OP_NOP;
  logic [2:0] rd = 0, rs = 0;
  logic [3:0] imm = 0;
  logic alu_we = 0;
  logic carry_out, shr_out, rs_msb, carry3;
  logic [3:0] rd_val, sum;

  ubi_cell dut (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .alu_mode,
    .lut_in, .lut_out, .op, .rd, .rs, .imm, .alu_we,
    .carry_in(op == OP_SUB || op == OP_TSTGE), .carry_out,
    .shr_in(rs_msb), .shr_out, .rs_msb, .rd_val, .sum, .carry3
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0][15:0] L;
  logic [3:0] regs [8];

  task automatic load(input logic [3:0][15:0] lut, input bit mode);
    logic [63:0] f;
    f = lut;
    for (int k = 0; k < 65; k++) begin
      cfg_en = 1; cfg_in = (k < 64) ? f[k] : mode;
      @(posedge clk); #1;
    end
    cfg_en = 0;
  endtask

  function automatic logic [3:0] ref_op(pe_op_e o, logic [3:0] a, logic [3:0] b, logic [3:0] i);
    case (o)
      OP_LDI:  return i;
      OP_MOV:  return b;
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_ADDI: return a + i;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SHR:  return {b[3], b[3:1]};
      default: return a;
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // ---------------- LUT mode
    for (int t = 0; t < 4; t++) begin
      L = {$urandom, $urandom};
      load(L, 1'b0);
      check(alu_mode == 0, "mode bit after LUT load");
      check(cfg_out == L[0][0], "cfg_out shows first LUT bit");
      for (int v = 0; v < 40; v++) begin
        lut_in = $urandom; #1;
        for (int i = 0; i < 4; i++)
          check(lut_out[i] == L[i][lut_in[i]], $sformatf("LUT %0d input %h", i, lut_in[i]));
      end
    end
    // ---------------- ALU mode
    L = {$urandom, $urandom};
    load(L, 1'b1);
    check(alu_mode == 1, "mode bit after ALU load");
    for (int r = 0; r < 8; r++)
      for (int b = 0; b < 4; b++) regs[r][b] = L[b][r];
    for (int t = 0; t < 300; t++) begin
      pe_op_e o;
      logic [3:0] exp;
      o = pe_op_e'($urandom_range(1, 9));
      rd = $urandom; rs = $urandom; imm = $urandom; op = o;
      alu_we = ($urandom_range(0, 3) != 0);
      #1;
      exp = ref_op(o, regs[rd], regs[rs], imm);
      if (o == OP_SUB) check(carry_out == (regs[rd] >= regs[rs]), "borrow");
      @(posedge clk); #1;
      if (alu_we) regs[rd] = exp;
      op = OP_NOP; #1;
      check(rd_val == regs[rd], $sformatf("op %s rd=%0d: got %h exp %h", o.name(), rd, rd_val, regs[rd]));
    end
    alu_we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
