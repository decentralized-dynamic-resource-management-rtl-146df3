// Exploration programs for the programmable invasion controller, with a
// two-pass assembler for its one-FU instruction format (inv_prog_pkg).
//
// Both programs speak the same message protocol as the hard-wired
// controllers, so either plane can be checked against the same
// expectations:
//  * meander(): linear invasion with the meander policy (the linear policy
//    the document chose for its programmable controller).
//  * rect():    rectangular invasion.
// Each fits the 64-line instruction memory of the smallest configuration.
//
// Register use, meander: R0 predecessor port, R3/R5/R6/R2 the candidate
// successors in order of preference, R4 successor, R7 state (bit 0 claimed,
// bit 1 answer outstanding, bit 2 successor holds part of the region).
// Register use, rect: R0 predecessor port, R1 successor mask, R2 mask of
// outstanding answers, R3 horizontal and R5 vertical direction, R6 running
// count (255 marks a retreat), R7 state (bit 0 claimed, bit 1 some part
// failed).
//
// The condition of an instruction is tested on the flags left by the
// previous instruction, so a compare is followed by the instruction that
// branches on it, which usually does the next piece of work at the same
// time.
package tb_inv_programs;
  import inv_pkg::*;
  import inv_prog_pkg::*;

  localparam int IW    = $bits(ctrl_t) + $bits(slot_t);
  localparam int DEPTH = 64;

  typedef struct packed { logic [7:0] m; logic [7:0] v; } cond_t;

  localparam cond_t CNONE = '{8'h00, 8'h00};
  localparam cond_t CZ    = '{8'h01, 8'h01};
  localparam cond_t CNZ   = '{8'h01, 8'h00};
  localparam cond_t CNMSG = '{8'h04, 8'h00};
  localparam cond_t CBUSY = '{8'h08, 8'h08};

  function automatic cond_t cav(input int d);
    cond_t c;
    c.m = 8'(1 << (F_AVAIL + d));
    c.v = c.m;
    return c;
  endfunction

  localparam logic [4:0] R0 = 5'd0, R1 = 5'd1, R2 = 5'd2, R3 = 5'd3,
                         R4 = 5'd4, R5 = 5'd5, R6 = 5'd6, R7 = 5'd7;
  localparam logic [4:0] IMM = S_IMM, X = 5'd0;

  class inv_asm;
    logic [IW-1:0] mem [DEPTH];
    int            pc;
    int            labs [string];
    bit            pass2;
    int            errors;

    function new();
      pc = 0; pass2 = 0; errors = 0;
    endfunction

    function void start(input bit p2);
      pc    = 0;
      pass2 = p2;
      for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    endfunction

    function void lab(input string s);
      if (!pass2) labs[s] = pc;
    endfunction

    // One instruction: FU slot (op, dst, srca, srcb, imm, predicate) and
    // branch (mode, condition, target label).
    function void i(input fu_op_e op, input logic [4:0] d, input logic [4:0] a,
                    input logic [4:0] b, input int imm,
                    input br_e br, input cond_t c, input string tgt, input pred_e pr);
      ctrl_t ct;
      slot_t sl;
      int    t;
      t = 0;
      if (pass2 && tgt != "") begin
        if (labs.exists(tgt)) t = labs[tgt];
        else begin
          errors++;
          $display("assembler: unknown label %s", tgt);
        end
      end
      ct.br = br; ct.cmask = c.m; ct.cval = c.v; ct.target = 8'(t);
      sl.pred = pr; sl.op = op; sl.dst = d[3:0]; sl.srca = a; sl.srcb = b; sl.imm = 8'(imm);
      if (pc < DEPTH) mem[pc] = {ct, sl};
      else if (pass2) begin
        errors++;
        $display("assembler: program longer than %0d lines", DEPTH);
      end
      pc++;
    endfunction

    // plain operation
    function void o(input fu_op_e op, input logic [4:0] d, input logic [4:0] a,
                    input logic [4:0] b, input int imm);
      i(op, d, a, b, imm, BR_NEXT, CNONE, "", PR_ALWAYS);
    endfunction

    // operation plus conditional branch
    function void ob(input fu_op_e op, input logic [4:0] d, input logic [4:0] a,
                     input logic [4:0] b, input int imm, input cond_t c, input string tgt);
      i(op, d, a, b, imm, BR_IF, c, tgt, PR_ALWAYS);
    endfunction

    // operation done only if c holds, branching when it does
    function void pb(input fu_op_e op, input logic [4:0] d, input logic [4:0] a,
                     input logic [4:0] b, input int imm, input cond_t c, input string tgt);
      i(op, d, a, b, imm, tgt == "" ? BR_NEXT : BR_IF, c, tgt, PR_IF);
    endfunction

    // operation plus unconditional jump
    function void oj(input fu_op_e op, input logic [4:0] d, input logic [4:0] a,
                     input logic [4:0] b, input int imm, input string tgt);
      i(op, d, a, b, imm, BR_ALWAYS, CNONE, tgt, PR_ALWAYS);
    endfunction
  endclass

  localparam logic [4:0] DOOP = 5'(D_OOP), DOSUB = 5'(D_OSUB), DOPOL = 5'(D_OPOL),
                         DOWEST = 5'(D_OWEST), DOFLAG = 5'(D_OFLAG),
                         DONORTH = 5'(D_ONORTH), DOA = 5'(D_OA), DOB = 5'(D_OB);

  // ---------------- linear invasion, meander policy ----------------
  function automatic void meander_body(inv_asm A);
    A.lab("top");
    A.ob(FU_TAKE, X, X, X, 0, CNMSG, "top");            // wait for and take a message
    A.o (FU_CMP, X, S_MOP, IMM, OP_INV);
    A.ob(FU_CMP, X, S_MOP, IMM, OP_RET, CZ, "inv");
    A.ob(FU_BIT, R6, R7, IMM, 1, CZ, "ret");            // ACK/REJ: answer outstanding?
    A.ob(FU_CMP, X, S_PORT, R4, 0, CZ, "top");          //   no: drop
    A.ob(FU_CMP, X, S_MOP, IMM, OP_ACK, CNZ, "top");    //   not from successor: drop
    A.ob(FU_MOV, R7, IMM, X, 5, CZ, "rack");            //   ACK: claimed, successor
    A.o (FU_MOV, R7, IMM, X, 0);                        //   REJ: release
    A.o (FU_MOV, DOOP, IMM, X, OP_REJ);
    A.o (FU_MOV, DOA, IMM, X, 0);
    A.lab("sendpar");
    A.oj(FU_SEND, X, R0, X, 0, "top");
    A.lab("rack");
    A.o (FU_MOV, DOOP, IMM, X, OP_ACK);
    A.oj(FU_ADD, DOA, S_MA, IMM, 1, "sendpar");
    A.lab("ret");                                       // RET
    A.o (FU_CMP, X, S_PORT, R0, 0);
    A.ob(FU_BIT, R6, R7, IMM, 0, CNZ, "top");           //   not from predecessor
    A.ob(FU_BIT, R6, R7, IMM, 2, CZ, "top");            //   not claimed
    A.ob(FU_MOV, R7, IMM, X, 0, CZ, "top");             //   release; no successor: done
    A.o (FU_MOV, DOOP, IMM, X, OP_RET);
    A.oj(FU_SEND, X, R4, X, 0, "top");
    A.lab("inv");                                       // INV
    A.ob(FU_CMP, X, R7, IMM, 0, CBUSY, "rej");
    A.ob(FU_CMP, X, S_MSUB, IMM, SUB_LIN, CNZ, "rej");  //   claimed
    A.ob(FU_CMP, X, S_MA, IMM, 0, CNZ, "rej");          //   not linear
    A.ob(FU_CMP, X, S_MA, IMM, 1, CZ, "rej");           //   no PE wanted
    A.ob(FU_MOV, R2, IMM, X, DIR_N, CZ, "last");        //   one PE wanted
    A.o (FU_CMP, X, S_PORT, IMM, DIR_L);
    A.ob(FU_MOV, R3, IMM, X, DIR_E, CZ, "root");
    A.o (FU_BIT, R4, S_PORT, IMM, 0);                   //   came in horizontally?
    A.ob(FU_XOR, R5, S_PORT, IMM, 2, CNZ, "hor");       //   R5 = straight ahead
    A.o (FU_SHL, R3, S_MWEST, IMM, 1);                  //   vertical: turn back
    A.o (FU_XOR, R3, R3, IMM, 3);                       //   against the last heading
    A.oj(FU_XOR, R6, R3, IMM, 2, "try");
    A.lab("root");
    A.o (FU_MOV, R5, IMM, X, DIR_S);
    A.oj(FU_MOV, R6, IMM, X, DIR_W, "try");
    A.lab("hor");                                       //   ahead, then South, North
    A.o (FU_MOV, R3, R5, X, 0);
    A.o (FU_MOV, R5, IMM, X, DIR_S);
    A.o (FU_MOV, R6, IMM, X, DIR_N);
    A.lab("try");
    A.o (FU_BIT, R4, S_AVAIL, R3, 0);
    A.pb(FU_MOV, R4, R3, X, 0, CNZ, "go");
    A.o (FU_BIT, R4, S_AVAIL, R5, 0);
    A.pb(FU_MOV, R4, R5, X, 0, CNZ, "go");
    A.o (FU_BIT, R4, S_AVAIL, R6, 0);
    A.pb(FU_MOV, R4, R6, X, 0, CNZ, "go");
    A.o (FU_BIT, R4, S_AVAIL, R2, 0);
    A.pb(FU_MOV, R4, R2, X, 0, CNZ, "go");
    A.oj(FU_NOP, X, X, X, 0, "rej");
    A.lab("go");                                        // forward to R4
    A.o (FU_MOV, DOWEST, S_MWEST, X, 0);
    A.o (FU_BIT, R3, R4, IMM, 0);
    A.pb(FU_BIT, DOWEST, R4, IMM, 1, CNZ, "");          //   horizontal move sets heading
    A.o (FU_MOV, DOOP, IMM, X, OP_INV);
    A.o (FU_MOV, DOPOL, S_MPOL, X, 0);
    A.o (FU_SUB, DOA, S_MA, IMM, 1);
    A.o (FU_MOV, R0, S_PORT, X, 0);
    A.o (FU_MOV, R7, IMM, X, 7);
    A.oj(FU_SEND, X, R4, X, 0, "top");
    A.lab("last");                                      // last PE of the chain
    A.o (FU_MOV, R7, IMM, X, 1);
    A.o (FU_MOV, R0, S_PORT, X, 0);
    A.o (FU_MOV, DOOP, IMM, X, OP_ACK);
    A.oj(FU_MOV, DOA, IMM, X, 1, "sendport");
    A.lab("rej");
    A.o (FU_MOV, DOOP, IMM, X, OP_REJ);
    A.lab("sendport");
    A.oj(FU_SEND, X, S_PORT, X, 0, "top");
  endfunction

  // ---------------- rectangular invasion ----------------
  function automatic void rect_body(inv_asm A);
    A.lab("top");
    A.ob(FU_TAKE, X, X, X, 0, CNMSG, "top");
    A.o (FU_CMP, X, S_MOP, IMM, OP_INV);
    A.ob(FU_CMP, X, S_MOP, IMM, OP_RET, CZ, "inv");
    A.ob(FU_BIT, R4, R2, S_PORT, 0, CZ, "ret");         // ACK/REJ: outstanding here?
    A.ob(FU_SHL, R4, IMM, S_PORT, 1, CZ, "top");
    A.o (FU_XOR, R2, R2, R4, 0);                        //   no longer outstanding
    A.o (FU_CMP, X, S_MOP, IMM, OP_ACK);
    A.pb(FU_ADD, R6, R6, S_MA, 0, CZ, "chk");           //   ACK: count it
    A.o (FU_XOR, R1, R1, R4, 0);                        //   REJ: not a successor
    A.o (FU_OR, R7, R7, IMM, 2);
    A.lab("chk");
    A.o (FU_CMP, X, R2, IMM, 0);
    A.ob(FU_BIT, R4, R7, IMM, 1, CNZ, "top");           //   wait for the others
    A.ob(FU_MOV, DOOP, IMM, X, OP_ACK, CZ, "rack");
    A.oj(FU_MOV, R6, IMM, X, 0, "rel");                 //   failed: release
    A.lab("ret");
    A.o (FU_CMP, X, S_PORT, R0, 0);
    A.ob(FU_BIT, R4, R7, IMM, 0, CNZ, "top");           //   not from predecessor
    A.ob(FU_MOV, R6, IMM, X, 255, CZ, "top");           //   not claimed
    A.lab("rel");
    A.o (FU_MOV, R7, IMM, X, 0);
    A.o (FU_MOV, DOOP, IMM, X, OP_RET);
    A.o (FU_BIT, R4, R1, R3, 0);
    A.pb(FU_SEND, X, R3, X, 0, CNZ, "");
    A.o (FU_BIT, R4, R1, R5, 0);
    A.pb(FU_SEND, X, R5, X, 0, CNZ, "");
    A.o (FU_CMP, X, R6, IMM, 255);
    A.ob(FU_MOV, R1, IMM, X, 0, CZ, "top");             //   retreat: done
    A.o (FU_MOV, DOOP, IMM, X, OP_REJ);
    A.lab("sendpar");
    A.oj(FU_SEND, X, R0, X, 0, "top");
    A.lab("rack");
    A.oj(FU_ADD, DOA, R6, IMM, 1, "sendpar");
    A.lab("inv");
    A.ob(FU_CMP, X, R7, IMM, 0, CBUSY, "rej");
    A.ob(FU_CMP, X, S_MSUB, IMM, SUB_RECT, CNZ, "rej"); //   claimed
    A.ob(FU_MOV, R1, IMM, X, 0, CNZ, "rej");            //   not rectangular
    A.o (FU_SHL, R3, S_MWEST, IMM, 1);                  //   R3 = West ? W : E
    A.o (FU_OR, R3, R3, IMM, 1);
    A.o (FU_XOR, R5, S_MNORTH, IMM, 1);                 //   R5 = North ? N : S
    A.o (FU_SHL, R5, R5, IMM, 1);
    A.o (FU_MOV, DOWEST, S_MWEST, X, 0);
    A.o (FU_MOV, DONORTH, S_MNORTH, X, 0);
    A.o (FU_MOV, DOSUB, IMM, X, SUB_RECT);
    A.o (FU_MOV, DOOP, IMM, X, OP_INV);
    A.o (FU_CMP, X, S_MFLAG, IMM, 0);
    A.ob(FU_CMP, X, S_MB, IMM, 1, CNZ, "noh");          //   column: no row successor
    A.ob(FU_BIT, R4, S_AVAIL, R3, 0, CZ, "noh");        //   last column
    A.ob(FU_SHL, R1, IMM, R3, 1, CZ, "rej");            //   neighbour not free
    A.lab("noh");
    A.o (FU_CMP, X, S_MA, IMM, 1);
    A.ob(FU_BIT, R4, S_AVAIL, R5, 0, CZ, "nov");        //   last row
    A.ob(FU_SHL, R4, IMM, R5, 1, CZ, "rej");
    A.o (FU_OR, R1, R1, R4, 0);
    A.lab("nov");
    A.o (FU_BIT, R4, R1, R3, 0);
    A.ob(FU_MOV, DOFLAG, IMM, X, 0, CZ, "skiph");
    A.o (FU_MOV, DOA, S_MA, X, 0);
    A.o (FU_SUB, DOB, S_MB, IMM, 1);
    A.o (FU_SEND, X, R3, X, 0);
    A.lab("skiph");
    A.o (FU_BIT, R4, R1, R5, 0);
    A.ob(FU_MOV, DOFLAG, IMM, X, 1, CZ, "skipv");
    A.o (FU_SUB, DOA, S_MA, IMM, 1);
    A.o (FU_MOV, DOB, IMM, X, 1);
    A.o (FU_SEND, X, R5, X, 0);
    A.lab("skipv");
    A.o (FU_MOV, R2, R1, X, 0);
    A.o (FU_MOV, R0, S_PORT, X, 0);
    A.o (FU_MOV, R6, IMM, X, 0);
    A.oj(FU_MOV, R7, IMM, X, 1, "chk");                 //   no successor: ACK 1 at once
    A.lab("rej");
    A.o (FU_MOV, DOOP, IMM, X, OP_REJ);
    A.oj(FU_SEND, X, S_PORT, X, 0, "top");
  endfunction

  function automatic inv_asm meander();
    inv_asm A = new();
    A.start(0); meander_body(A);
    A.start(1); meander_body(A);
    return A;
  endfunction

  function automatic inv_asm rect();
    inv_asm A = new();
    A.start(0); rect_body(A);
    A.start(1); rect_body(A);
    return A;
  endfunction

endpackage
