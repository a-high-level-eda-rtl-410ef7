// hdbist_pkg: types and constants shared by the HD-BIST (Hierarchical
// Distributed BIST) control structure.
//
// The structure has three kinds of parts: TBlocks wrap BISTed cores, a
// TProcessor schedules their tests, and the Test Chain Bus (TBus) is a ring
// that carries tokens from the TProcessor through every TBlock and back.
// Every token either writes one bit of a TBlock's Test Control Register (TCR)
// or reads one bit of its Test Status Register (TSR), and names its target by
// a single-cast address or the chain's broadcast address. Those rules come
// from the HD-BIST scheme; the bit layout below is this design's own.
//
// Token layout, first bit on the bus = bit 0 of token_t:
//   start  1  always 1, marks the first bit of a token (idle ring carries 0)
//   op     1  0 = write TCR bit, 1 = read TSR bit
//   sel    3  TCR/TSR bit index
//   addr   3  target address, all ones = broadcast
//   par    1  even parity over op, sel, addr (self-checking header)
//   val    1  write value, or read result (each addressed block ANDs its bit in)
//   ack    1  set to 1 by every block that accepted the token
//
// TSR bits: 0 = DONE (BIST finished), 1 = GOOD (no failure recorded),
// 2.. = GOOD flag of each block of a lower chain (only TProcessors).
// TCR bit 0 = RUN: writing 1 starts the BIST.
//
// A compiled schedule is a list of instr_t; the two programs of the
// two-chain example system (top chain and TestProcessor1 chain) are given as
// constants at the end.
package hdbist_pkg;

  localparam int unsigned ADDR_W  = 3;
  localparam int unsigned SEL_W   = 3;
  // Blocks per chain: all addresses but the broadcast one.
  localparam int unsigned MAXB    = (1 << ADDR_W) - 1;
  // Extra TSR bits (sub-chain GOOD flags) a TProcessor can expose.
  localparam int unsigned EXT_MAX = (1 << SEL_W) - 2;
  localparam logic [ADDR_W-1:0] BCAST_ADDR = '1;

  localparam logic [SEL_W-1:0] TCR_RUN  = 3'd0;
  localparam logic [SEL_W-1:0] TSR_DONE = 3'd0;
  localparam logic [SEL_W-1:0] TSR_GOOD = 3'd1;
  localparam logic [SEL_W-1:0] TSR_SUB0 = 3'd2;

  typedef struct packed {
    logic              ack;
    logic              val;
    logic              par;
    logic [ADDR_W-1:0] addr;
    logic [SEL_W-1:0]  sel;
    logic              op;     // 0 write TCR, 1 read TSR
    logic              start;
  } token_t;

  localparam int unsigned TOKEN_W = $bits(token_t);

  function automatic logic hdr_parity(token_t t);
    return ^{t.op, t.sel, t.addr};
  endfunction

  function automatic token_t make_token(logic op, logic [SEL_W-1:0] sel,
                                        logic [ADDR_W-1:0] addr, logic val);
    token_t t;
    t.start = 1'b1;
    t.op    = op;
    t.sel   = sel;
    t.addr  = addr;
    t.par   = ^{op, sel, addr};
    t.val   = val;
    t.ack   = 1'b0;
    return t;
  endfunction

  // Scheduling primitives.
  typedef enum logic [2:0] {
    OP_END  = 3'd0,
    OP_TEST = 3'd1,
    OP_WAIT = 3'd2,
    OP_STOP = 3'd3,
    OP_DIAG = 3'd4
  } sched_op_e;

  typedef struct packed {
    sched_op_e       op;
    logic            all;   // target every block of the chain (broadcast)
    logic [MAXB-1:0] mask;  // target blocks by address when all = 0
  } instr_t;

  localparam int unsigned PROG_MAX = 8;
  typedef instr_t [PROG_MAX-1:0] prog_t;

  // One entry of the diagnosis log: a faulty block in the top chain, or a
  // faulty block of the lower chain behind TProcessor 'addr'.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic              sub_valid;
    logic [ADDR_W-1:0] sub_addr;
  } diag_entry_t;

  // Example system. Top chain addresses: TestProcessor1 = 0, BISTedRAM = 1,
  // BISTedCore1 = 2. Lower chain: BISTedRom = 0, BISTedCore2 = 1.
  localparam int unsigned A_TP1   = 0;
  localparam int unsigned A_RAM   = 1;
  localparam int unsigned A_CORE1 = 2;
  localparam int unsigned A_ROM   = 0;
  localparam int unsigned A_CORE2 = 1;

  localparam prog_t TOP_PROG = '{
    7: instr_t'{OP_END,  1'b0, 7'b0000000},
    6: instr_t'{OP_END,  1'b0, 7'b0000000},
    5: instr_t'{OP_DIAG, 1'b0, 7'b0000000},   // diagnose
    4: instr_t'{OP_STOP, 1'b0, 7'b0000001},   // stop TestProcessor1
    3: instr_t'{OP_TEST, 1'b0, 7'b0000001},   // test TestProcessor1
    2: instr_t'{OP_STOP, 1'b0, 7'b0000010},   // stop BISTedRAM
    1: instr_t'{OP_WAIT, 1'b0, 7'b0000100},   // wait BISTedCore1
    0: instr_t'{OP_TEST, 1'b0, 7'b0000110}    // test BISTedRAM BISTedCore1
  };

  localparam prog_t TP1_PROG = '{
    7: instr_t'{OP_END,  1'b0, 7'b0000000},
    6: instr_t'{OP_END,  1'b0, 7'b0000000},
    5: instr_t'{OP_END,  1'b0, 7'b0000000},
    4: instr_t'{OP_END,  1'b0, 7'b0000000},
    3: instr_t'{OP_END,  1'b0, 7'b0000000},
    2: instr_t'{OP_END,  1'b0, 7'b0000000},
    1: instr_t'{OP_WAIT, 1'b1, 7'b0000000},   // wait all
    0: instr_t'{OP_TEST, 1'b1, 7'b0000000}    // test all
  };

endpackage
