// Hard-wired invasion controller for linear invasion (LIN strategy).
//
// One controller sits next to every PE of a 2D mesh. A linear invasion claims
// a chain of neighbouring PEs one at a time: the controller that receives
// (INV, LIN, policy, n) claims its own PE, and if more PEs are wanted it picks
// one free neighbour by the policy and passes (INV, LIN, policy, n-1) on. The
// last PE of the chain answers ACK with a count of 1; each PE on the way back
// adds itself, so the PE that started the invasion gets ACK with n. A PE that
// is busy or already claimed answers REJ. A controller that finds no free
// neighbour, or gets REJ from its successor, releases its PE and passes REJ
// back, so a failed invasion leaves nothing claimed. RET (retreat) from the
// predecessor releases the PE and is passed on down the chain.
//
// Policies (InstrParams), following the exploration policies of the scheme:
//  STR  keep the current heading; when blocked turn right, else turn left.
//  MEA  sweep rows: keep the horizontal heading; when blocked step South
//       (else North); after a vertical step turn to the opposite horizontal
//       heading, else keep going vertically, else take the same horizontal
//       heading again.
//  RND  take a free neighbour chosen at random (LFSR).
// The invading PE itself starts East, then South, West, North. The exact
// turn orders are this design's reading of the example walks; the document
// names the policies but gives no decision rule.
//
// Interface: five valid/ready message ports (0..3 = N, E, S, W neighbours,
// 4 = local PE; see inv_link_io), avail_in[3:0] from the neighbours,
// avail_out to them (this PE can be claimed), pe_busy from the PE (it is used
// by another application), and the claim state for the PE.
//
// Timing: a message is handled in the cycle it arrives and its successor
// message leaves from a register in the next cycle: one cycle per hop forward
// and one back, two cycles per claimed PE, as the document reports for its
// FSM-based controller. A step that needs an output register that is still
// full waits (stall) and keeps its message.
module inv_ctrl_lin
  import inv_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
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
  output logic     [2:0]       parent_dir,
  output logic     [NDIR-1:0]  child_mask,
  output logic                 stall
);

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

  // claim state
  logic              own_q, own_d;
  logic [2:0]        par_q, par_d;
  logic [NDIR-1:0]   chd_q, chd_d;     // successor(s) holding part of the region
  logic [NDIR-1:0]   pnd_q, pnd_d;     // successors whose answer is outstanding
  logic              rej_q, rej_d;
  logic [OPND_W-1:0] acc_q, acc_d;

  assign avail_out  = !own_q && !pe_busy;
  assign invaded    = own_q;
  assign parent_dir = par_q;
  assign child_mask = chd_q;

  // Neighbour choice for one step of the linear invasion.
  typedef logic [2:0] order_t [4];

  function automatic order_t pick_order(input logic [1:0] pol, input logic root,
                                        input logic [1:0] head, input logic west,
                                        input logic [1:0] r);
    order_t o;
    if (root) begin
      o = '{3'(DIR_E), 3'(DIR_S), 3'(DIR_W), 3'(DIR_N)};
    end else begin
      case (pol)
        2'(POL_MEA): begin
          if (head == 2'(DIR_E) || head == 2'(DIR_W))
            o = '{{1'b0, head}, 3'(DIR_S), 3'(DIR_N), {1'b0, head}};
          else
            o = '{west ? 3'(DIR_E) : 3'(DIR_W), {1'b0, head},
                  west ? 3'(DIR_W) : 3'(DIR_E), {1'b0, head}};
        end
        default: begin   // STR: ahead, right turn, left turn
          o = '{{1'b0, head}, {1'b0, head + 2'd1}, {1'b0, head + 2'd3}, {1'b0, head}};
        end
      endcase
    end
    if (pol == 2'(POL_RND))
      o = '{{1'b0, r}, {1'b0, r + 2'd1}, {1'b0, r + 2'd2}, {1'b0, r + 2'd3}};
    return o;
  endfunction

  order_t     ord;
  logic       found;
  logic [2:0] nxt;
  logic [2:0] head;   // direction of travel: away from the sender

  always_comb begin
    head  = opposite(sel_port);
    ord   = pick_order(sel_msg.prm.policy, sel_port == 3'(DIR_L),
                       head[1:0], sel_msg.prm.west, rnd[1:0]);
    found = 1'b0;
    nxt   = 3'(DIR_E);
    for (int k = 3; k >= 0; k--) begin
      if (avail_in[ord[k][1:0]] && ord[k] != sel_port) begin
        found = 1'b1;
        nxt   = ord[k];
      end
    end
  end

  // Step decision for the offered message.
  logic [NPORT-1:0] need;
  inv_msg_t         fwd;

  always_comb begin
    own_d   = own_q;
    par_d   = par_q;
    chd_d   = chd_q;
    pnd_d   = pnd_q;
    rej_d   = rej_q;
    acc_d   = acc_q;
    need    = '0;
    for (int i = 0; i < NPORT; i++) out_new[i] = '0;
    fwd     = sel_msg;

    if (sel_valid) begin
      unique case (sel_msg.op)
        OP_INV: begin
          if (own_q || pe_busy || sel_msg.sub != SUB_LIN || sel_msg.a == '0) begin
            need[sel_port]    = 1'b1;
            out_new[sel_port] = mk_resp(OP_REJ, '0);
          end else if (sel_msg.a == OPND_W'(1)) begin
            own_d = 1'b1;  par_d = sel_port;  chd_d = '0;  pnd_d = '0;
            need[sel_port]    = 1'b1;
            out_new[sel_port] = mk_resp(OP_ACK, OPND_W'(1));
          end else if (!found) begin
            need[sel_port]    = 1'b1;
            out_new[sel_port] = mk_resp(OP_REJ, '0);
          end else begin
            own_d = 1'b1;  par_d = sel_port;
            chd_d = '0;  chd_d[nxt[1:0]] = 1'b1;
            pnd_d = chd_d;  rej_d = 1'b0;  acc_d = '0;
            fwd.a = sel_msg.a - OPND_W'(1);
            if (nxt == 3'(DIR_W)) fwd.prm.west = 1'b1;
            if (nxt == 3'(DIR_E)) fwd.prm.west = 1'b0;
            need[nxt]    = 1'b1;
            out_new[nxt] = fwd;
          end
        end
        OP_RET: begin
          if (own_q && sel_port == par_q) begin
            own_d = 1'b0;  chd_d = '0;  pnd_d = '0;
            for (int i = 0; i < NDIR; i++) begin
              if (chd_q[i]) begin
                need[i]    = 1'b1;
                out_new[i] = mk_resp(OP_RET, '0);
              end
            end
          end
        end
        default: begin  // ACK or REJ from a successor
          if (sel_port != 3'(DIR_L) && pnd_q[sel_port[1:0]]) begin
            pnd_d[sel_port[1:0]] = 1'b0;
            if (sel_msg.op == OP_REJ) begin
              rej_d = 1'b1;
              chd_d[sel_port[1:0]] = 1'b0;
            end else begin
              acc_d = acc_q + sel_msg.a;
            end
            if (pnd_d == '0) begin
              need[par_q] = 1'b1;
              if (rej_d) begin
                own_d = 1'b0;
                out_new[par_q] = mk_resp(OP_REJ, '0);
                for (int i = 0; i < NDIR; i++) begin
                  if (chd_d[i]) begin
                    need[i]    = 1'b1;
                    out_new[i] = mk_resp(OP_RET, '0);
                  end
                end
                chd_d = '0;
              end else begin
                out_new[par_q] = mk_resp(OP_ACK, acc_d + OPND_W'(1));
              end
            end
          end
        end
      endcase
    end
  end

  // A step goes ahead only when every output register it writes is free.
  assign sel_take = sel_valid && ((need & ~out_free) == '0);
  assign out_set  = sel_take ? need : '0;
  assign stall    = sel_valid && !sel_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_q <= 1'b0;
      par_q <= 3'(DIR_L);
      chd_q <= '0;
      pnd_q <= '0;
      rej_q <= 1'b0;
      acc_q <= '0;
    end else if (sel_take) begin
      own_q <= own_d;
      par_q <= par_d;
      chd_q <= chd_d;
      pnd_q <= pnd_d;
      rej_q <= rej_d;
      acc_q <= acc_d;
    end
  end

endmodule
