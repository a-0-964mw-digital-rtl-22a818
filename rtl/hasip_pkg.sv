// hasip_pkg: types and constants shared by the hearing-aid ASIP.
//
// The processor is a 16-bit, 3-issue VLIW machine with a 160-bit instruction
// word, two 16-entry register files, four 40-bit accumulators, two data
// memories and a 32-entry loop cache. The data width, the issue width, the
// instruction width, the register file sizes and the loop cache size follow
// the processor "v3" of the design; the opcode numbering, field layout,
// accumulator count and memory depths are this implementation's own choice.
//
// Instruction word (160 bits): three 48-bit slot words and a 16-bit control
// word. A slot word holds an opcode, two destination and two source register
// fields and a 22-bit immediate whose top five bits double as the third
// source register field (immediate bits overlaid on register select bits).
package hasip_pkg;

  localparam int unsigned DATA_W   = 16;   // datapath width
  localparam int unsigned ISSUE    = 3;    // issue slots
  localparam int unsigned NREG     = 32;   // two register files of 16
  localparam int unsigned RF_DEPTH = 16;
  localparam int unsigned ACC_W    = 40;   // intermediate-result registers
  localparam int unsigned NACC     = 4;
  localparam int unsigned IW       = 160;  // instruction width
  localparam int unsigned PM_DEPTH = 256;  // program memory words
  localparam int unsigned PM_AW    = 8;
  localparam int unsigned LC_SIZE  = 32;   // loop cache entries
  localparam int unsigned LC_AW    = 5;
  localparam int unsigned DM_DEPTH = 1024; // words in each data memory
  localparam int unsigned DM_AW    = 10;

  // Constants of the a-priori-SNR unit (decision-directed estimate with
  // smoothing factor alpha = 0.98): K1 = sqrt(alpha), K2 = 1 - alpha in Q15.
  localparam logic signed [15:0] PSNR_K1    = 16'sd32438;
  localparam logic signed [15:0] PSNR_K2    = 16'sd655;
  localparam logic signed [15:0] PSNR_FLOOR = 16'sd0;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ACC_W-1:0]  acc_t;

  typedef enum logic [5:0] {
    OP_NOP     = 6'd0,
    OP_ADD     = 6'd1,   // d1 = s1 + s2
    OP_SUB     = 6'd2,   // d1 = s1 - s2
    OP_ADDI    = 6'd3,   // d1 = s1 + imm[15:0]
    OP_LDI     = 6'd4,   // d1 = imm[15:0]
    OP_AND     = 6'd5,
    OP_OR      = 6'd6,
    OP_XOR     = 6'd7,
    OP_SLL     = 6'd8,   // d1 = s1 << imm[3:0]
    OP_SRA     = 6'd9,   // d1 = s1 >>> imm[3:0]
    OP_SLT     = 6'd10,  // d1 = (s1 < s2) signed
    OP_MODADD  = 6'd11,  // d1 = (s1 + s2) mod s3
    OP_MODADDI = 6'd12,  // d1 = (s1 + imm[5:0]) mod imm[21:6]
    OP_LD      = 6'd13,  // d1 = mem[s1 + imm[15:0]]   (slots 0 and 1)
    OP_ST      = 6'd14,  // mem[s1 + imm[15:0]] = s2   (slots 0 and 1)
    OP_MULA    = 6'd15,  // acc[d1] = s1 * s2
    OP_MACA    = 6'd16,  // acc[d1] += s1 * s2
    OP_SFPMUL  = 6'd17,  // d1 = sat((s1 * s2) >>> imm[4:0])
    OP_WARP    = 6'd18,  // all-pass section, lambda = imm[15:0]
    OP_PSNR    = 6'd19,  // a priori SNR of s1, s2, s3, shift imm[4:0]
    OP_BSLICE  = 6'd20,  // bit range of acc[s1][31:0]
    OP_NORM    = 6'd21   // redundant sign bits of s1
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [4:0]  d1;
    logic [4:0]  d2;
    logic [4:0]  s1;
    logic [4:0]  s2;
    logic [21:0] imm;    // imm[21:17] is also the s3 field
  } slot_t;

  typedef enum logic [2:0] {
    C_NOP  = 3'd0,
    C_JMP  = 3'd1,   // pc = tgt
    C_BNZ  = 3'd2,   // if (r != 0) pc = tgt
    C_BZ   = 3'd3,   // if (r == 0) pc = tgt
    C_LOOP = 3'd4,   // repeat the next tgt bundles r times
    C_HALT = 3'd5
  } cop_e;

  typedef struct packed {
    cop_e        cop;
    logic [4:0]  r;
    logic [7:0]  tgt;
  } ctrl_t;

  typedef struct packed {
    slot_t [ISSUE-1:0] slot;
    ctrl_t             ctrl;
  } instr_t;

  // Register write request from one slot output.
  typedef struct packed {
    logic        en;
    logic [4:0]  addr;
    word_t       data;
  } rf_wr_t;

  // Accumulator write request.
  typedef struct packed {
    logic        en;
    logic [1:0]  addr;
    acc_t        data;
  } acc_wr_t;

  // Data memory request of a load/store unit.
  typedef struct packed {
    logic             en;
    logic             we;
    logic [DM_AW-1:0] addr;
    word_t            wdata;
  } dm_req_t;

endpackage
