// addq_pkg: types and constants shared by the pipelined addq processor and
// by the memory read/write control pipeline.
//
// Widths follow the Y86-64 machine the design implements: 64-bit program
// counter and register values, 4-bit register numbers, register number 0xF
// meaning "no register". The pipeline register structs mirror the four
// register banks between the stages: pP (to fetch), fD (fetch to decode),
// dE (decode to execute) and eW (execute to writeback). Their bubble/reset
// values are the "do-nothing" contents: register fields 0xF, data 0.
// The icode numbering is the standard Y86-64 one.
package addq_pkg;

  localparam int unsigned WORD_W = 64;  // register / PC width
  localparam int unsigned REG_W  = 4;   // register number width

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [REG_W-1:0]  regid_t;

  localparam regid_t REG_NONE = 4'hF;

  // Y86-64 instruction codes (high nibble of the first instruction byte)
  typedef enum logic [3:0] {
    HALT   = 4'h0,
    NOP    = 4'h1,
    RRMOVQ = 4'h2,
    IRMOVQ = 4'h3,
    RMMOVQ = 4'h4,
    MRMOVQ = 4'h5,
    OPQ    = 4'h6,
    JXX    = 4'h7,
    CALL   = 4'h8,
    RET    = 4'h9,
    PUSHQ  = 4'hA,
    POPQ   = 4'hB
  } icode_t;

  // first byte of "addq rA, rB": icode OPQ, ifun 0 (add)
  localparam logic [7:0] ADDQ_BYTE0 = 8'h60;
  localparam int unsigned ADDQ_LEN  = 2;   // bytes per addq instruction

  // pipeline register contents
  typedef struct packed {
    word_t pc;
  } pP_t;

  typedef struct packed {
    regid_t rA;
    regid_t rB;
  } fD_t;

  typedef struct packed {
    word_t  valA;
    word_t  valB;
    regid_t dstE;
  } dE_t;

  typedef struct packed {
    word_t  valE;
    regid_t dstE;
  } eW_t;

  localparam pP_t PP_RESET = '{pc: '0};
  localparam fD_t FD_NONE  = '{rA: REG_NONE, rB: REG_NONE};
  localparam dE_t DE_NONE  = '{valA: '0, valB: '0, dstE: REG_NONE};
  localparam eW_t EW_NONE  = '{valE: '0, dstE: REG_NONE};

endpackage
