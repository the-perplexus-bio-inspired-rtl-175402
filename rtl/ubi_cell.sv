// ubi_cell: elementary configurable cell of the ubichip array.
//
// The cell is built around four 4-input look-up tables (4-LUTs). In LUT mode
// each LUT computes an independent function of its own four inputs. In ALU
// mode the same 4 x 16 memory bits are read and written as an 8 x 4-bit
// register file and the cell is one 4-bit slice of a SIMD processing element
// (PE): register r, bit b is LUT b, entry r. Slices are chained through a
// ripple carry (carry_in/carry_out) and a shift link (shr_in/shr_out) so
// that neighbouring cells form an n-bit PE; the PE-level logic (flag,
// conditional store, carry-in of the lowest slice) lives in ubi_array.
//
// Configuration: all 64 LUT bits plus the mode bit form one shift register
// (cfg_en shifts cfg_in in at the mode bit end, cfg_out is the last LUT bit).
// The LUT-bit order is lut[0][0] first out ... lut[3][15]; see cfg shift.
//
// Timing: lut_out, rd_val, carry_out and shr_out are combinational; the
// register file is written at the rising clock edge when alu_we is high.
// The four-LUT / ALU duality and the 8 x 4 register file follow the
// ubichip architecture; the operation set, the bit mapping and the
// configuration-chain order are this design's own choices.
module ubi_cell
  import ubichip_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // configuration chain
  input  logic             cfg_en,
  input  logic             cfg_in,
  output logic             cfg_out,
  output logic             alu_mode,     // current mode bit (1 = ALU)
  // LUT mode
  input  logic [3:0][3:0]  lut_in,       // lut_in[i] = the 4 inputs of LUT i
  output logic [3:0]       lut_out,
  // ALU mode (slice of a PE)
  input  pe_op_e           op,
  input  logic [2:0]       rd,
  input  logic [2:0]       rs,
  input  logic [3:0]       imm,          // this slice's nibble of the immediate
  input  logic             alu_we,       // store the result into rd
  input  logic             carry_in,
  output logic             carry_out,
  input  logic             shr_in,       // bit shifted into bit 3 by SHR
  output logic             shr_out,      // rs bit 0, to the slice below
  output logic             rs_msb,       // rs bit 3 (sign of the top slice)
  output logic [3:0]       rd_val,       // current value of rd
  output logic [3:0]       sum,          // adder output (for flags)
  output logic             carry3        // carry into bit 3 (for overflow)
);

  logic [3:0][15:0] lut;       // LUT memory = register file
  logic             mode_q;

  assign alu_mode = mode_q;

  // ---------------------------------------------------------- LUT mode
  always_comb begin
    for (int i = 0; i < 4; i++) lut_out[i] = lut[i][lut_in[i]];
  end

  // ---------------------------------------------------------- ALU mode
  logic [3:0] rs_val, b_opd, result;
  logic [4:0] c;

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      rd_val[b] = lut[b][{1'b0, rd}];
      rs_val[b] = lut[b][{1'b0, rs}];
    end
  end

  always_comb begin
    unique case (op)
      OP_SUB, OP_TSTGE: b_opd = ~rs_val;
      OP_ADDI:          b_opd = imm;
      default:          b_opd = rs_val;
    endcase
  end

  // ripple-carry adder slice
  assign c[0] = carry_in;
  for (genvar b = 0; b < 4; b++) begin : g_add
    assign sum[b]  = rd_val[b] ^ b_opd[b] ^ c[b];
    assign c[b+1]  = (rd_val[b] & b_opd[b]) | (c[b] & (rd_val[b] ^ b_opd[b]));
  end

  assign carry_out = c[4];
  assign carry3    = c[3];
  assign shr_out   = rs_val[0];
  assign rs_msb    = rs_val[3];

  always_comb begin
    unique case (op)
      OP_LDI:                  result = imm;
      OP_MOV:                  result = rs_val;
      OP_ADD, OP_SUB, OP_ADDI: result = sum;
      OP_AND:                  result = rd_val & rs_val;
      OP_OR:                   result = rd_val | rs_val;
      OP_XOR:                  result = rd_val ^ rs_val;
      OP_SHR:                  result = {shr_in, rs_val[3:1]};
      default:                 result = rd_val;
    endcase
  end

  logic writes;
  always_comb begin
    unique case (op)
      OP_LDI, OP_MOV, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHR, OP_ADDI:
        writes = 1'b1;
      default: writes = 1'b0;
    endcase
  end

  // ------------------------------------------------------ state update
  logic [63:0] lut_flat;
  assign lut_flat = lut;
  assign cfg_out  = lut[0][0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lut    <= '0;
      mode_q <= 1'b0;
    end else if (cfg_en) begin
      // chain: cfg_in -> mode -> lut[3][15] -> ... -> lut[0][0] -> cfg_out
      mode_q <= cfg_in;
      lut    <= {mode_q, lut_flat[63:1]};
    end else if (mode_q && alu_we && writes) begin
      for (int b = 0; b < 4; b++) lut[b][{1'b0, rd}] <= result[b];
    end
  end

endmodule
