// Programmable invasion controller: a small VLIW processor that runs an
// exploration program instead of a hard-wired strategy.
//
// It has the three parts of the programmable controller of the document:
//  * register file: the input ports (one message slot per link, through
//    inv_link_io), the output ports (one register per link) and NREG 8-bit
//    data registers. The fields of the current input message are separate
//    sources, and an output message register is written field by field, so
//    a program decodes and builds commands a field at a time.
//  * execution unit: NUM_FU functional units working in parallel, each
//    doing the arithmetic and logic operations of inv_prog_pkg plus SEND
//    (copy the output message register to the output port named by A) and
//    TAKE (move the waiting input message into the received-message
//    register and free its port; the message field sources read that
//    register, so later arrivals cannot change a message being decoded).
//  * control unit: program counter and an IMEM_DEPTH-line instruction
//    memory. Each instruction carries a branch whose condition is a product
//    term over the flags (zero and sign of FU0, message waiting, PE busy,
//    four neighbour-free bits), evaluated in the same cycle; each FU slot is
//    predicated on that condition or its complement, so an if-then-else fits
//    in one instruction.
// Data register R7 bit 0 is the claim flag of the PE: it drives invaded and,
// with pe_busy, avail_out.
//
// Interface: the five valid/ready message ports, avail_in/avail_out and
// pe_busy as in the hard-wired controllers; imem_we/imem_addr/imem_wdata load
// the program; run starts it at line 0 (while low, the PC is held at 0).
// Timing: one instruction per cycle. An instruction whose SEND finds its
// output register full does not execute and is retried next cycle (stall).
// With several FUs, writes to the same destination go to the highest slot.
// NUM_FU = 1 and IMEM_DEPTH = 64 are the smallest configuration the document
// reports; the instruction set and encodings are this design's own.
module inv_ctrl_prog
  import inv_pkg::*;
  import inv_prog_pkg::*;
#(
  parameter int unsigned NUM_FU     = 1,
  parameter int unsigned IMEM_DEPTH = 64,
  parameter int unsigned NREG       = 8,
  parameter logic [15:0] SEED       = 16'hACE1,
  localparam int unsigned IW = $bits(ctrl_t) + NUM_FU * $bits(slot_t),
  localparam int unsigned AW = $clog2(IMEM_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic     [NPORT-1:0] in_valid,
  input  inv_msg_t             in_msg   [NPORT],
  output logic     [NPORT-1:0] in_ready,
  output logic     [NPORT-1:0] out_valid,
  output inv_msg_t             out_msg  [NPORT],
  input  logic     [NPORT-1:0] out_ready,
  input  logic     [NDIR-1:0]  avail_in,
  output logic                 avail_out,
  input  logic                 pe_busy,
  output logic                 invaded,
  output logic                 stall,
  // program load and start
  input  logic                 imem_we,
  input  logic     [AW-1:0]    imem_addr,
  input  logic     [IW-1:0]    imem_wdata,
  input  logic                 run,
  output logic     [AW-1:0]    pc
);

  typedef struct packed {
    ctrl_t              c;
    slot_t [NUM_FU-1:0] s;
  } instr_t;

  // ---------------- register file: ports ----------------
  logic                sel_valid, sel_take;
  logic [2:0]          sel_port;
  inv_msg_t            sel_msg;
  logic [NPORT-1:0]    out_free, out_set;
  inv_msg_t            out_new [NPORT];
  logic [15:0]         rnd;

  inv_link_io u_io (
    .clk, .rst_n,
    .in_valid, .in_msg, .in_ready,
    .out_valid, .out_msg, .out_ready,
    .sel_valid, .sel_port, .sel_msg, .sel_take,
    .out_free, .out_set, .out_new
  );

  inv_lfsr #(.SEED(SEED)) u_rnd (.clk, .rst_n, .value(rnd));

  // ---------------- register file: data ----------------
  logic [OPND_W-1:0] rf [NREG];
  inv_msg_t          om;               // output message register
  inv_msg_t          im;               // received message register
  logic [2:0]        iport;            // port it came in on
  logic              flag_z, flag_n;

  assign invaded   = rf[NREG-1][0];
  assign avail_out = !rf[NREG-1][0] && !pe_busy;

  // ---------------- control unit ----------------
  logic [IW-1:0] imem [IMEM_DEPTH];
  instr_t        ir;

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_addr] <= imem_wdata;
  end

  assign ir = instr_t'(imem[pc]);

  logic [7:0] flags;
  logic       cond, jump;

  always_comb begin
    flags          = '0;
    flags[F_Z]     = flag_z;
    flags[F_N]     = flag_n;
    flags[F_MSG]   = sel_valid;
    flags[F_BUSY]  = pe_busy;
    flags[F_AVAIL +: 4] = avail_in;
    cond = ((flags ^ ir.c.cval) & ir.c.cmask) == 8'h00;
    unique case (ir.c.br)
      BR_NEXT:   jump = 1'b0;
      BR_IF:     jump = cond;
      BR_IFNOT:  jump = !cond;
      default:   jump = 1'b1;
    endcase
  end

  // ---------------- execution unit ----------------
  function automatic logic [OPND_W-1:0] src(input logic [4:0] sel, input logic [7:0] imm,
                                            input logic [OPND_W-1:0] r [NREG]);
    logic [OPND_W-1:0] v;
    v = '0;
    if (sel < 5'(NREG) && sel < 5'd8) v = r[sel[2:0]];
    else begin
      unique case (sel)
        S_IMM:    v = imm;
        S_MOP:    v = OPND_W'(im.op);
        S_MSUB:   v = OPND_W'(im.sub);
        S_MPOL:   v = OPND_W'(im.prm.policy);
        S_MWEST:  v = OPND_W'(im.prm.west);
        S_MFLAG:  v = OPND_W'(im.prm.flag);
        S_MNORTH: v = OPND_W'(im.prm.north);
        S_MA:     v = im.a;
        S_MB:     v = im.b;
        S_PORT:   v = OPND_W'(iport);
        S_AVAIL:  v = OPND_W'(avail_in);
        S_FREE:   v = OPND_W'(out_free);
        S_RND:    v = rnd[7:0];
        default:  v = '0;
      endcase
    end
    return v;
  endfunction

  logic [NUM_FU-1:0]  en, wr, fl, snd, tk;
  logic [OPND_W-1:0]  res  [NUM_FU];
  logic [2:0]         sport[NUM_FU];
  logic               blocked;

  always_comb begin
    blocked = 1'b0;
    for (int f = 0; f < NUM_FU; f++) begin
      logic [OPND_W-1:0] a, b;
      a = src(ir.s[f].srca, ir.s[f].imm, rf);
      b = src(ir.s[f].srcb, ir.s[f].imm, rf);
      unique case (ir.s[f].pred)
        PR_ALWAYS: en[f] = run;
        PR_IF:     en[f] = run && cond;
        PR_IFNOT:  en[f] = run && !cond;
        default:   en[f] = 1'b0;
      endcase
      res[f]   = '0;
      wr[f]    = 1'b0;
      fl[f]    = 1'b0;
      snd[f]   = 1'b0;
      tk[f]    = 1'b0;
      sport[f] = a[2:0];
      unique case (ir.s[f].op)
        FU_MOV:  begin res[f] = a;                 wr[f] = 1'b1; fl[f] = 1'b1; end
        FU_ADD:  begin res[f] = a + b;             wr[f] = 1'b1; fl[f] = 1'b1; end
        FU_SUB:  begin res[f] = a - b;             wr[f] = 1'b1; fl[f] = 1'b1; end
        FU_AND:  begin res[f] = a & b;             wr[f] = 1'b1; fl[f] = 1'b1; end
        FU_OR:   begin res[f] = a | b;             wr[f] = 1'b1; fl[f] = 1'b1; end
        FU_XOR:  begin res[f] = a ^ b;             wr[f] = 1'b1; fl[f] = 1'b1; end
        FU_SHL:  begin res[f] = a << b[2:0];       wr[f] = 1'b1; fl[f] = 1'b1; end
        FU_SHR:  begin res[f] = a >> b[2:0];       wr[f] = 1'b1; fl[f] = 1'b1; end
        FU_CMP:  begin res[f] = a - b;                           fl[f] = 1'b1; end
        FU_BIT:  begin res[f] = OPND_W'(a[b[2:0]]); wr[f] = 1'b1; fl[f] = 1'b1; end
        FU_SEND: snd[f] = 1'b1;
        FU_TAKE: tk[f]  = 1'b1;
        default: ;
      endcase
      if (en[f] && snd[f] && (sport[f] > 3'(DIR_L) || !out_free[sport[f]])) blocked = 1'b1;
    end
  end

  logic go;
  assign go    = run && !blocked;
  assign stall = run && blocked;

  always_comb begin
    out_set = '0;
    for (int i = 0; i < NPORT; i++) out_new[i] = om;
    sel_take = 1'b0;
    for (int f = 0; f < NUM_FU; f++) begin
      if (go && en[f] && snd[f]) out_set[sport[f]] = 1'b1;
      if (go && en[f] && tk[f])  sel_take = sel_valid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc     <= '0;
      flag_z <= 1'b0;
      flag_n <= 1'b0;
      om     <= '0;
      im     <= '0;
      iport  <= 3'(DIR_L);
      for (int i = 0; i < NREG; i++) rf[i] <= '0;
    end else if (!run) begin
      pc <= '0;
    end else if (go) begin
      pc <= jump ? AW'(ir.c.target) : pc + AW'(1);
      if (sel_take) begin
        im    <= sel_msg;
        iport <= sel_port;
      end
      if (en[0] && fl[0]) begin
        flag_z <= res[0] == '0;
        flag_n <= res[0][OPND_W-1];
      end
      for (int f = 0; f < NUM_FU; f++) begin
        if (en[f] && wr[f]) begin
          unique case (ir.s[f].dst)
            D_OOP:    om.op         <= opcode_e'(res[f][1:0]);
            D_OSUB:   om.sub        <= subop_e'(res[f][0]);
            D_OPOL:   om.prm.policy <= res[f][1:0];
            D_OWEST:  om.prm.west   <= res[f][0];
            D_OFLAG:  om.prm.flag   <= res[f][0];
            D_ONORTH: om.prm.north  <= res[f][0];
            D_OA:     om.a          <= res[f];
            D_OB:     om.b          <= res[f];
            default:  if (int'(ir.s[f].dst) < int'(NREG)) rf[ir.s[f].dst[2:0]] <= res[f];
          endcase
        end
      end
    end
  end

endmodule
