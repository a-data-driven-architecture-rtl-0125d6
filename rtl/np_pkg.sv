// np_pkg: types and constants shared by the nanoprocessor array.
//
// The architecture executes static data-flow graphs on a chip of 64 simple
// 16-bit nanoprocessors. Channels carry 16-bit data tokens or 1-bit control
// tokens (T/F) with a send/busy handshake. busy comes from the receiver
// (from every receiver, ORed, when a channel is broadcast) and depends only on
// registered state; a producer raises send only in a cycle where busy is low,
// and every receiver takes the token in each cycle where send is high. A
// broadcast token thus reaches all receivers in the same cycle, exactly once.
//
// From the architecture: 16-bit data path, 8-word x 50-bit instruction store,
// 3-bit program counter, three 4-word data buffers, two control inputs and
// one control output per nanoprocessor, 16 clusters of 4 nanoprocessors, four
// 128 x 16 memory banks, eight 16-bit I/O ports.
// Own choices: the field layout of the 50-bit instruction word, the operation
// encoding, the configuration address map and the serial frame format.
package np_pkg;

  localparam int unsigned W       = 16;  // data path width
  localparam int unsigned IW      = 50;  // instruction word width
  localparam int unsigned N_INSTR = 8;   // instruction store depth
  localparam int unsigned PCW     = 3;   // program counter width
  localparam int unsigned DQ_N    = 4;   // words per data buffer

  // ---------------------------------------------------------------- ALU ops
  typedef enum logic [3:0] {
    OP_PASSA = 4'd0,   // y = a
    OP_PASSB = 4'd1,   // y = b
    OP_ADD   = 4'd2,   // y = a + b
    OP_SUB   = 4'd3,   // y = a - b
    OP_AND   = 4'd4,
    OP_OR    = 4'd5,
    OP_XOR   = 4'd6,
    OP_NOT   = 4'd7,   // y = ~a
    OP_MIN   = 4'd8,   // signed minimum (compare and select)
    OP_MAX   = 4'd9,   // signed maximum
    OP_CMP   = 4'd10,  // y = a, flags from a - b
    OP_BOOTH = 4'd11,  // y = (a + d*b) >>> 2, d = radix-4 Booth digit of MBR
    OP_MBLD  = 4'd12,  // MBR = {b, 0}   (start a multiplication), y = b
    OP_MBLDC = 4'd13,  // MBR = {b[15], b} (continue one from a neighbour), y = b
    OP_MBRD  = 4'd14,  // y = MBR[15:0] (hand the multiplier on)
    OP_ABSD  = 4'd15   // y = |a - b|
  } alu_op_e;

  // operand source selection
  typedef enum logic [1:0] {SRC_DQ0 = 2'd0, SRC_DQ1 = 2'd1, SRC_DQ2 = 2'd2, SRC_ZERO = 2'd3} src_e;

  // control output source
  typedef enum logic [1:0] {CO_N = 2'd0, CO_Z = 2'd1, CO_C = 2'd2, CO_CQ0 = 2'd3} cout_src_e;

  // per data buffer fields of an instruction
  typedef struct packed {
    logic       rd;    // operand needed: stall while the queue is empty
    logic       pop;   // consume the head after this instruction (else hold it)
    logic [1:0] addr;  // register read address in register-file mode
    logic       wb;    // write the result into this buffer (register-file mode)
  } dq_ctl_t;

  // 50-bit instruction word
  typedef struct packed {
    logic [1:0] rsvd;       // 49:48 unused, write 0
    alu_op_e    op;         // 47:44
    src_e       a_sel;      // 43:42
    src_e       b_sel;      // 41:40
    logic       sel_ctl;    // 39  SELECT: a = CQ0 ? DQ1 : DQ0
    dq_ctl_t    dq2;        // 38:34
    dq_ctl_t    dq1;        // 33:29
    dq_ctl_t    dq0;        // 28:24
    logic [1:0] waddr;      // 23:22 write-back register address
    logic       sh_right;   // 21  shifter direction (1 = arithmetic right)
    logic [2:0] sh_amt;     // 20:18 shift distance 0..4 (5..7 act as 4)
    logic [2:0] out_en;     // 17:15 {neighbour, out1, out0}
    logic       sw_ctl;     // 14  SWITCH: CQ0 ? out1 : out0
    logic [1:0] cq_rd;      // 13:12 control tokens needed
    logic [1:0] cq_pop;     // 11:10 control tokens consumed
    logic       cout_en;    // 9   send a control token
    cout_src_e  cout_src;   // 8:7
    logic [2:0] npc;        // 6:4 next program counter
    logic [1:0] br1;        // 3:2 NPC bit 1: 0 keep, 1 CQ1 token, 2 ALU carry, 3 CQ0 token
    logic [1:0] br0;        // 1:0 NPC bit 0: 0 keep, 1 ALU N flag, 2 ALU Z flag, 3 CQ0 token
  } instr_t;

  // ------------------------------------------------ configuration write bus
  localparam int unsigned CFG_TW = 7;    // target id
  localparam int unsigned CFG_AW = 10;   // address within target
  localparam int unsigned CFG_DW = 50;   // data
  localparam int unsigned FRAME  = CFG_TW + CFG_AW + CFG_DW;

  typedef struct packed {
    logic              we;
    logic [CFG_TW-1:0] target;
    logic [CFG_AW-1:0] addr;
    logic [CFG_DW-1:0] data;
  } cfg_t;

  // target map
  localparam int unsigned TGT_CLUSTER = 64;  // 64 + cluster index: level-1 switches
  localparam int unsigned TGT_L2D     = 80;  // level-2 data buses
  localparam int unsigned TGT_L2C     = 81;  // level-2 control buses
  localparam int unsigned TGT_IOP     = 82;  // 82 + port index

  // nanoprocessor address map
  localparam int unsigned NA_INSTR = 0;   // 0..7   instruction words
  localparam int unsigned NA_DQ    = 8;   // 8..19  data buffer i word j at 8+4i+j
  localparam int unsigned NA_MODE  = 20;  // bit i: buffer i is a register file; bit 3: run
  localparam int unsigned NA_DPUSH = 24;  // 24..26 push an initial token into data queue i
  localparam int unsigned NA_CPUSH = 28;  // 28..29 push an initial token into control queue i

  // switch address map (level-1 and level-2)
  localparam int unsigned SA_CTRL  = 256; // control network selects start here
  localparam int unsigned SA_SINK  = 512; // level-2: sink-to-bus selects start here

endpackage
