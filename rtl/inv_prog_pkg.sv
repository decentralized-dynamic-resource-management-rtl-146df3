// Instruction format of the programmable invasion controller (inv_ctrl_prog).
//
// A VLIW instruction is one control word plus one slot per functional unit
// (FU). The control word holds the branch: a condition that is a product
// term over the flag vector (flags XOR cval, masked by cmask, must be all
// zero), a branch mode and a target. Each slot holds a predicate (always, if
// the condition holds, if it does not), an opcode, a destination, two
// sources and an immediate. The scheme of flags, single-cycle condition
// evaluation, predicated FUs and branch target follows the document's
// description of the control unit; all encodings are this design's own.
package inv_prog_pkg;

  typedef enum logic [1:0] {
    BR_NEXT  = 2'd0,   // fall through
    BR_IF    = 2'd1,   // jump if the condition holds
    BR_IFNOT = 2'd2,   // jump if it does not
    BR_ALWAYS = 2'd3
  } br_e;

  typedef enum logic [1:0] {
    PR_ALWAYS = 2'd0,
    PR_IF     = 2'd1,
    PR_IFNOT  = 2'd2,
    PR_NEVER  = 2'd3
  } pred_e;

  typedef enum logic [3:0] {
    FU_NOP  = 4'd0,
    FU_MOV  = 4'd1,    // d = A
    FU_ADD  = 4'd2,    // d = A + B
    FU_SUB  = 4'd3,    // d = A - B
    FU_AND  = 4'd4,
    FU_OR   = 4'd5,
    FU_XOR  = 4'd6,
    FU_SHL  = 4'd7,    // d = A << B[2:0]
    FU_SHR  = 4'd8,    // d = A >> B[2:0]
    FU_CMP  = 4'd9,    // flags of A - B, no write
    FU_BIT  = 4'd10,   // d = A[B[2:0]]
    FU_SEND = 4'd11,   // send the output message register on port A
    FU_TAKE = 4'd12    // consume the current input message
  } fu_op_e;

  // Flag vector bits seen by the branch condition.
  localparam int unsigned F_Z     = 0;   // last FU0 result was zero
  localparam int unsigned F_N     = 1;   // last FU0 result had bit 7 set
  localparam int unsigned F_MSG   = 2;   // an input message is waiting
  localparam int unsigned F_BUSY  = 3;   // the PE is busy
  localparam int unsigned F_AVAIL = 4;   // bits 4..7: neighbours N, E, S, W free

  // Source selectors.
  localparam logic [4:0] S_R0    = 5'd0;   // 0..7: data registers
  localparam logic [4:0] S_IMM   = 5'd8;
  localparam logic [4:0] S_MOP   = 5'd9;   // fields of the current input message
  localparam logic [4:0] S_MSUB  = 5'd10;
  localparam logic [4:0] S_MPOL  = 5'd11;
  localparam logic [4:0] S_MWEST = 5'd12;
  localparam logic [4:0] S_MFLAG = 5'd13;
  localparam logic [4:0] S_MNORTH= 5'd14;
  localparam logic [4:0] S_MA    = 5'd15;
  localparam logic [4:0] S_MB    = 5'd16;
  localparam logic [4:0] S_PORT  = 5'd17;  // port the current message came in on
  localparam logic [4:0] S_AVAIL = 5'd18;
  localparam logic [4:0] S_FREE  = 5'd19;  // output registers free
  localparam logic [4:0] S_RND   = 5'd20;

  // Destination selectors: 0..7 data registers (R7 bit 0 = PE claimed),
  // 8..15 fields of the output message register.
  localparam logic [3:0] D_OOP    = 4'd8;
  localparam logic [3:0] D_OSUB   = 4'd9;
  localparam logic [3:0] D_OPOL   = 4'd10;
  localparam logic [3:0] D_OWEST  = 4'd11;
  localparam logic [3:0] D_OFLAG  = 4'd12;
  localparam logic [3:0] D_ONORTH = 4'd13;
  localparam logic [3:0] D_OA     = 4'd14;
  localparam logic [3:0] D_OB     = 4'd15;

  typedef struct packed {
    br_e        br;
    logic [7:0] cmask;
    logic [7:0] cval;
    logic [7:0] target;
  } ctrl_t;

  typedef struct packed {
    pred_e      pred;
    fu_op_e     op;
    logic [3:0] dst;
    logic [4:0] srca;
    logic [4:0] srcb;
    logic [7:0] imm;
  } slot_t;

endpackage
