// sag_pkg: widths, instruction encoding and packet layout shared by the
// systolic array graphics (SAG) engine.
//
// Data words are 36-bit two's-complement fixed-point numbers and processor
// addresses are 12-bit integers, as in the original engine. Every instruction
// travels as a packet of PKT_SLOTS consecutive words; the word in slot s
// carries X, DX, DDI, DI or I (in that order, as the engine specifies). The
// 12-bit instruction bus that accompanies each word is this design's own
// encoding: opcode, slot number and the address-decoding state of the packet.
package sag_pkg;

  localparam int unsigned DATA_W    = 36;  // fixed-point data path width
  localparam int unsigned ADDR_W    = 12;  // processor address width (X, DX)
  localparam int unsigned INSTR_W   = 12;  // instruction bus width (Iin/Iout)
  localparam int unsigned VIDEO_W   = 12;  // video bus width (Vin/Vout)
  localparam int unsigned FRAC_W    = 23;  // fraction bits of an intensity
  localparam int unsigned PKT_SLOTS = 5;   // X, DX, DDI, DI, I

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [VIDEO_W-1:0] video_t;

  // Packet slots, in the order the words enter the array.
  typedef enum logic [2:0] {
    SLOT_X   = 3'd0,
    SLOT_DX  = 3'd1,
    SLOT_DDI = 3'd2,
    SLOT_DI  = 3'd3,
    SLOT_I   = 3'd4
  } slot_e;

  // Instruction set.
  typedef enum logic [3:0] {
    OP_NOP     = 4'd0,
    OP_REF     = 4'd1,
    OP_EVAL0   = 4'd2,
    OP_EVAL1   = 4'd3,
    OP_EVAL2   = 4'd4,
    OP_SETPI   = 4'd5,
    OP_SETPDI  = 4'd6,
    OP_SETPDDI = 4'd7,
    OP_SETI    = 4'd8,
    OP_SETDI   = 4'd9,
    OP_SETDDI  = 4'd10,
    OP_DIS     = 4'd11,
    OP_ACC_M   = 4'd12
  } op_e;

  // Address-decoding state of a packet as it moves along the array.
  // SEEK: the start location has not been reached yet. ACTIVE: inside the
  // range of an EVAL*/DIS. DONE: the instruction has no further effect.
  typedef enum logic [1:0] {
    ST_SEEK   = 2'd0,
    ST_ACTIVE = 2'd1,
    ST_DONE   = 2'd2
  } ast_e;

  // Instruction bus word: 4 + 3 + 2 + 3 = 12 bits.
  typedef struct packed {
    op_e        op;
    slot_e      slot;
    ast_e       st;
    logic [2:0] rsvd;
  } instr_t;

  localparam instr_t INSTR_NOP = '{op: OP_NOP, slot: SLOT_X, st: ST_SEEK, rsvd: 3'b000};

  function automatic logic is_range_op(op_e op);
    return op inside {OP_EVAL0, OP_EVAL1, OP_EVAL2, OP_DIS};
  endfunction

  function automatic logic is_eval(op_e op);
    return op inside {OP_EVAL0, OP_EVAL1, OP_EVAL2};
  endfunction

  function automatic logic is_periodic(op_e op);
    return op inside {OP_SETPI, OP_SETPDI, OP_SETPDDI};
  endfunction

  function automatic logic is_single_set(op_e op);
    return op inside {OP_SETI, OP_SETDI, OP_SETDDI};
  endfunction

  // Pixel value to video: bit 35 is the sign, bits 34..23 the 12-bit
  // integer intensity, bits 22..0 the fraction. Negative pixels show black.
  function automatic video_t to_video(data_t p);
    if (p[DATA_W-1]) return '0;
    return p[FRAC_W +: VIDEO_W];
  endfunction

endpackage
