// Shared types for the invasion controllers of a 2D-mesh processor array.
//
// An invasion command has four fields: an opcode (invade, retreat,
// acknowledge, reject), a sub-opcode naming the strategy (linear or
// rectangular), strategy parameters and operands. The four fields follow the
// command syntax of the invasion scheme; their widths and bit encodings are
// this design's own choice.
//
// Controller ports are numbered 0..3 for the mesh neighbours North, East,
// South, West and 4 for the local processing element (PE). A message is
// carried on a valid/ready link: it is transferred on a clock edge where both
// are high.
package inv_pkg;

  // Width of a count or size operand. Eight bits cover regions of up to 255 PEs.
  localparam int unsigned OPND_W = 8;
  localparam int unsigned NPORT  = 5;
  localparam int unsigned NDIR   = 4;

  typedef enum logic [2:0] {
    DIR_N = 3'd0,
    DIR_E = 3'd1,
    DIR_S = 3'd2,
    DIR_W = 3'd3,
    DIR_L = 3'd4   // local PE
  } dir_e;

  typedef enum logic [1:0] {
    OP_INV = 2'd0,   // invade
    OP_RET = 2'd1,   // retreat
    OP_ACK = 2'd2,   // acknowledge
    OP_REJ = 2'd3    // reject
  } opcode_e;

  typedef enum logic {
    SUB_LIN  = 1'b0,
    SUB_RECT = 1'b1
  } subop_e;

  typedef enum logic [1:0] {
    POL_STR = 2'd0,   // straight lines of maximal length
    POL_RND = 2'd1,   // random walk
    POL_MEA = 2'd2    // meander
  } policy_e;

  // Strategy parameters (InstrParams).
  //  linear:      policy, last horizontal heading (meander), meander started
  //  rectangular: vertical direction, horizontal direction, column-only flag
  typedef struct packed {
    logic [1:0] policy;    // policy_e for LIN
    logic       west;      // LIN/MEA: last horizontal move was West; RECT: expand West
    logic       flag;      // LIN/MEA: unused; RECT: column-only (vertical) invasion
    logic       north;     // RECT: expand North (else South)
  } params_t;

  typedef struct packed {
    opcode_e            op;
    subop_e             sub;
    params_t            prm;
    logic [OPND_W-1:0]  a;   // LIN: PEs still to claim; RECT: rows; ACK: PEs claimed
    logic [OPND_W-1:0]  b;   // RECT: columns
  } inv_msg_t;

  localparam int unsigned MSG_W = $bits(inv_msg_t);

  function automatic logic [2:0] opposite(input logic [2:0] d);
    return {1'b0, d[1:0] ^ 2'b10};
  endfunction

  function automatic inv_msg_t mk_resp(input opcode_e op, input logic [OPND_W-1:0] cnt);
    inv_msg_t m;
    m     = '0;
    m.op  = op;
    m.a   = cnt;
    return m;
  endfunction

endpackage
