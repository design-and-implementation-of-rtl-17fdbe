// fp_pkg: types and constants shared by the flexible AES/DES/RSA engine.
//
// The engine is a reconfigurable datapath built from a 1-D array of 8-bit
// processing elements (PEs), a memory unit made of tile buffers, two fixed
// permutation units and a dedicated DES round unit, all sequenced by context
// words held in a reloadable context memory.  The default sizes follow the
// chosen configuration (16 PEs : 8 tile buffers, 6 registers per PE, two
// 64-bit DES blocks); the SRAM depth, the context memory depth and the
// context word encoding are this design's own choices.
package fp_pkg;

  // ---- sizes -------------------------------------------------------------
  parameter int NUM_PE     = 16;             // PEs in the computation unit
  parameter int NUM_TILE   = 8;              // tile buffers in the memory unit
  parameter int LPT        = NUM_PE / NUM_TILE; // PE lanes served by one tile
  parameter int NUM_REG    = 6;              // registers per PE
  parameter int MU_DEPTH   = 512;            // words per tile buffer SRAM
  parameter int MU_AW      = $clog2(MU_DEPTH);
  parameter int CM_DEPTH   = 64;             // context words
  parameter int CM_AW      = $clog2(CM_DEPTH);
  parameter int NUM_BASE   = 5;              // AGU base registers
  parameter int NUM_DES    = 2;              // 64-bit DES blocks in parallel
  parameter int SLOTS      = 4;              // bytes per lane per MU word
  parameter int LOOP_W     = 16;             // loop counter width

  typedef logic [7:0] byte_t;
  typedef logic [2:0] reg_idx_t;

  // MU byte slots of a lane word. In Montgomery mode the four bytes are the
  // modulus N, the multiplicand B, B+N and the running result T.
  localparam logic [1:0] SLOT_N  = 2'd0;
  localparam logic [1:0] SLOT_B  = 2'd1;
  localparam logic [1:0] SLOT_BN = 2'd2;
  localparam logic [1:0] SLOT_T  = 2'd3;

  // ---- processing element ------------------------------------------------
  // PE_LOGIC   : d = a ^ b ^ c
  // PE_XTLOGIC : d = xtime(a ^ b) ^ c
  // PE_ADD     : {cout, d} = a + b + cin
  typedef enum logic [1:0] {
    PE_NOP     = 2'd0,
    PE_LOGIC   = 2'd1,
    PE_XTLOGIC = 2'd2,
    PE_ADD     = 2'd3
  } pe_op_e;

  // Operand selector: register idx of the PE that sits nbr rows further down
  // the same AES column (nbr = 0 is the PE itself); zero forces 8'h00.
  typedef struct packed {
    logic       zero;
    logic [1:0] nbr;
    reg_idx_t   idx;
  } opnd_t;

  // ---- context word --------------------------------------------------------
  typedef enum logic [3:0] {
    CX_NOP     = 4'd0,
    CX_ALU     = 4'd1,   // one PE operation on all PEs (parallel mode)
    CX_SBOX    = 4'd2,   // table look-up of register rd through the MU
    CX_LDW     = 4'd3,   // load one MU byte slot into register rd
    CX_ROT     = 4'd4,   // PCU-1 byte rotate (ShiftRows) of register rd
    CX_MON     = 4'd5,   // one Montgomery iteration (propagation mode)
    CX_DES_LD  = 4'd6,   // PCU-1 IP / PC-1, load the DES unit
    CX_DES_RND = 4'd7,   // one DES round in the DES unit
    CX_DES_FIN = 4'd8,   // PCU-2 inverse IP, result to register rd
    CX_MON_END = 4'd9,   // finish the last Montgomery iteration
    CX_SBOXR   = 4'd10,  // look-up of the PCU-1 rotate of register rd
                         // (SubBytes and ShiftRows in one word)
    CX_END     = 4'd15
  } cx_op_e;

  // Address generation functions of the AGU.
  typedef enum logic [2:0] {
    AF_BASE     = 3'd0,  // base + imm
    AF_LOOP     = 3'd1,  // base + imm + loop index
    AF_LOOP_REV = 3'd2,  // base + imm - loop index
    AF_DATA     = 3'd3,  // base + data byte (table look-up)
    AF_CHUNK    = 3'd4,  // base + imm + chunk counter (long addition)
    AF_ABIT     = 3'd5   // base + imm + loop index / 128 (multiplier word)
  } af_e;

  typedef struct packed {
    cx_op_e     op;      // 4
    pe_op_e     pe_op;   // 2
    reg_idx_t   rd;      // 3
    opnd_t      sa;      // 6
    opnd_t      sb;      // 6
    opnd_t      sc;      // 6
    logic       inv;     // 1  inverse direction (AES / DES decryption)
    logic [1:0] slot;    // 2  MU byte slot
    af_e        afn;     // 3  address function
    logic [2:0] base;    // 3  AGU base register
    logic [MU_AW-1:0] imm; // 9 offset
  } ctx_t;

  parameter int CTX_W = $bits(ctx_t);

  // Host commands accepted by the controller.
  typedef enum logic [1:0] {
    CMD_FLOW  = 2'd0,    // write a flow / address register
    CMD_CM    = 2'd1,    // write a context word
    CMD_START = 2'd2     // run the loaded context sequence
  } cmd_e;

  // Flow / address register numbers used with CMD_FLOW.
  localparam logic [3:0] FR_BASE0   = 4'd0;  // 0..4: AGU base registers
  localparam logic [3:0] FR_LSTART  = 4'd5;
  localparam logic [3:0] FR_LEND    = 4'd6;
  localparam logic [3:0] FR_LCOUNT  = 4'd7;
  localparam logic [3:0] FR_LSTEP   = 4'd8;
  localparam logic [3:0] FR_CHUNKS  = 4'd9;  // 128-bit chunks per long addition
  localparam logic [3:0] FR_BNTOP   = 4'd10; // bit n of B+N (Montgomery)

  // Decoded per-cycle controls (context decoder outputs).
  typedef struct packed {
    logic       prop;    // propagation mode (carry chained across PEs)
    logic       alu_en;
    pe_op_e     pe_op;
    reg_idx_t   rd;
    opnd_t      sa;
    opnd_t      sb;
    opnd_t      sc;
  } cu_ctrl_t;

  // Source of a register-file load.
  typedef enum logic [1:0] {
    LD_MU  = 2'd0,   // a byte slot of the memory unit's preload buffer
    LD_ROT = 2'd1,   // PCU-1 byte rotate
    LD_DES = 2'd2,   // PCU-2 (DES result)
    LD_IN  = 2'd3    // external input block
  } ld_src_e;

  // GF(2^8) multiply by x (X_TIME).
  function automatic byte_t xtime(byte_t v);
    return {v[6:0], 1'b0} ^ (v[7] ? 8'h1b : 8'h00);
  endfunction

endpackage
