// Shared types and constants of the command-list controller.
//
// The controller executes, next to the controlled hardware, a list of simple
// commands sent by a host over a fast but high-latency packet link: block
// writes, block reads, read-modify-write, read-and-test and repeated
// read-and-test. Only the command set and the arguments of each command come
// from the concept; the bit encodings below (opcodes, sub-operation codes,
// header layout, response trailer layout, exception codes) are this design's
// own choice.
//
// Command header word (DATA_W = 32):
//   [31:28] opcode      (opcode_e)
//   [27:24] sub-op      address mode (WRITE/READ), ALU op (RMW), test op (TEST/MTEST)
//   [15:0]  length      number of data words (WRITE/READ), ignored otherwise
// Argument words follow the header, in the order the command lists them:
//   WRITE : address, data[0..len-1]
//   READ  : address
//   RMW   : address, [operand]          (no operand for INC and DEC)
//   TEST  : address, value | mask, ref  (mask ops take two words)
//   MTEST : retries, interval, address, value | mask, ref
//   SYNC  : none
// Response trailer word, the last word of every response packet:
//   [31:28] packet kind (pkt_kind_e)
//   [27:24] exception code (exc_e), EXC_NONE unless kind is PKT_EXC
//   [23:0]  command index within the list (0 = first command); for PKT_DONE
//           it is the number of commands executed
package ctrl_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 32;

  // Any other opcode is rejected with EXC_BAD_CMD.
  typedef enum logic [3:0] {
    OP_WRITE = 4'h1,
    OP_READ  = 4'h2,
    OP_RMW   = 4'h3,
    OP_TEST  = 4'h4,
    OP_MTEST = 4'h5,
    OP_SYNC  = 4'h6
  } opcode_e;

  // Address modification after each word of a block transfer.
  typedef enum logic [3:0] {
    AM_INC  = 4'h0,
    AM_DEC  = 4'h1,
    AM_KEEP = 4'h2   // FIFO access
  } amode_e;

  typedef enum logic [3:0] {
    ALU_INC = 4'h0,
    ALU_DEC = 4'h1,
    ALU_ADD = 4'h2,
    ALU_SUB = 4'h3,
    ALU_AND = 4'h4,
    ALU_OR  = 4'h5,
    ALU_XOR = 4'h6
  } alu_op_e;

  typedef enum logic [3:0] {
    T_SLT   = 4'h0,  // signed less than
    T_ULT   = 4'h1,  // unsigned less than
    T_SGT   = 4'h2,  // signed greater than
    T_UGT   = 4'h3,  // unsigned greater than
    T_ANDEQ = 4'h4,  // (value & mask) == ref
    T_OREQ  = 4'h5   // (value | mask) == ref
  } test_op_e;

  typedef enum logic [3:0] {
    PKT_FULL = 4'h1,  // output buffer filled up, the list goes on
    PKT_CMD  = 4'h2,  // standard mode: one command finished
    PKT_SYNC = 4'h3,  // SYNC command
    PKT_DONE = 4'h4,  // whole list executed without exception
    PKT_EXC  = 4'h5   // list aborted by an exception
  } pkt_kind_e;

  // Exception codes and the words the exception record holds, in order,
  // ahead of the trailer.
  typedef enum logic [3:0] {
    EXC_NONE       = 4'h0,
    EXC_WR_BUS     = 4'h1,  // address, data
    EXC_RD_BUS     = 4'h2,  // address
    EXC_RMW_RD_BUS = 4'h3,  // address, original (0), final (0)
    EXC_RMW_WR_BUS = 4'h4,  // address, original, final
    EXC_TEST_FAIL  = 4'h5,  // address, test-op word, arg0, arg1, value read
    EXC_MTEST_FAIL = 4'h6,  // address, test-op word, arg0, arg1, value read last
    EXC_BAD_CMD    = 4'h7,  // header word
    EXC_TRUNC      = 4'h8   // header word (list ended inside a command)
  } exc_e;

  typedef struct packed {
    opcode_e     op;
    logic [3:0]  sub;
    logic [7:0]  rsvd;
    logic [15:0] len;
  } cmd_hdr_t;

  typedef struct packed {
    pkt_kind_e   kind;
    exc_e        exc;
    logic [23:0] index;
  } trailer_t;

  // Local (internal) bus, one request at a time: the master holds req and
  // its fields until the cycle in which the slave raises ack or err.
  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } lbus_req_t;

  typedef struct packed {
    logic              ack;
    logic              err;
    logic [DATA_W-1:0] rdata;
  } lbus_rsp_t;

endpackage
