// ubichip_pkg: types and constants shared by the ubichip blocks.
//
// Holds the SIMD instruction word that the sequencer broadcasts to the
// processing elements (PEs) of the configurable array, the 8-neighbour
// direction encoding of the dynamic routing fabric and the 4-neighbour
// direction encoding of the self-replication (THESEUS) molecules.
// The mechanisms (4-bit ALU cells, conditional store, 8-neighbourhood,
// path flags) follow the ubichip architecture; every field width and
// opcode value here is this design's own choice.
package ubichip_pkg;

  // ---------------------------------------------------------------- SIMD ISA
  // PE operations. Every PE operation may be made conditional (cond=1): its
  // result is then stored only in PEs whose flag is set, so that a program
  // runs as straight-line code without branches that depend on PE data.
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,   // nothing
    OP_LDI   = 4'd1,   // rd <= imm
    OP_MOV   = 4'd2,   // rd <= rs
    OP_ADD   = 4'd3,   // rd <= rd + rs
    OP_SUB   = 4'd4,   // rd <= rd - rs
    OP_AND   = 4'd5,   // rd <= rd & rs
    OP_OR    = 4'd6,   // rd <= rd | rs
    OP_XOR   = 4'd7,   // rd <= rd ^ rs
    OP_SHR   = 4'd8,   // rd <= rs >>> 1 (arithmetic, across the whole PE)
    OP_ADDI  = 4'd9,   // rd <= rd + imm
    OP_TSTN  = 4'd10,  // flag <= rd < 0 (sign bit of the PE word)
    OP_TSTGE = 4'd11,  // flag <= rd >= rs (signed)
    OP_TSTEV = 4'd12,  // flag <= input event received in the last frame
    OP_FIRE  = 4'd13   // spike <= flag (event sent in the next AER frame)
  } pe_op_e;

  // Sequencer-only operations (bit 4 of the opcode set).
  typedef enum logic [3:0] {
    SQ_PE    = 4'd0,   // broadcast the PE part of the word
    SQ_JMP   = 4'd1,   // pc <= target
    SQ_LDC   = 4'd2,   // loop counter <= target
    SQ_LOOP  = 4'd3,   // if (--counter != 0) pc <= target
    SQ_WAITF = 4'd4,   // wait for the next frame_update
    SQ_HALT  = 4'd5    // stop
  } sq_op_e;

  localparam int IMM_W = 16;   // immediate: one nibble per cell of a 16-bit PE
  localparam int PC_W  = 8;    // program memory address width

  typedef struct packed {
    logic       cond;   // conditional store
    pe_op_e     op;
    logic [2:0] rd;     // register file index (8 x 4-bit per cell)
    logic [2:0] rs;
    logic [IMM_W-1:0] imm;
  } pe_instr_t;         // 27 bits

  typedef struct packed {
    sq_op_e          sop;
    logic [PC_W-1:0] target;
    pe_instr_t       pe;
  } seq_instr_t;        // 39 bits

  localparam int SEQ_INSTR_W = $bits(seq_instr_t);

  // ---------------------------------------------------- dynamic routing
  // 8-neighbourhood, counted clockwise from north. opposite(d) = d ^ 4.
  localparam int DIR_N = 0, DIR_NE = 1, DIR_E = 2, DIR_SE = 3,
                 DIR_S = 4, DIR_SW = 5, DIR_W = 6, DIR_NW = 7;
  typedef enum logic [3:0] {
    SEL_N = 4'd0, SEL_NE = 4'd1, SEL_E = 4'd2, SEL_SE = 4'd3,
    SEL_S = 4'd4, SEL_SW = 4'd5, SEL_W = 4'd6, SEL_NW = 4'd7,
    SEL_LOCAL = 4'd8,   // path starts here: the logic unit drives the path
    SEL_NONE  = 4'd15   // routing unit unused
  } route_sel_e;

  // -------------------------------------------------------- THESEUS
  // 4-neighbourhood of the molecules. opposite(d) = d ^ 2.
  typedef enum logic [2:0] {
    TD_N = 3'd0, TD_E = 3'd1, TD_S = 3'd2, TD_W = 3'd3,
    TD_END = 3'd4       // last molecule of the organelle
  } tdir_e;

endpackage
