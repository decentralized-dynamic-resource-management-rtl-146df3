// Hard-wired invasion controller for rectangular invasion (RECT strategy).
//
// One controller sits next to every PE of a 2D mesh. (INV, RECT, dirs, N, M)
// claims an N-row by M-column region that starts at the receiving PE and
// grows in the horizontal and vertical directions named in the parameters
// (for example SE: East and South). A PE of the first row claims itself,
// passes (INV, RECT, row, N, M-1) to its horizontal neighbour while M > 1 and
// at the same time (INV, RECT, column, N-1) to its vertical neighbour while
// N > 1; a PE reached by a column invasion only continues vertically. The
// columns are thus claimed in parallel, as in the rectangular scheme. A PE
// answers its predecessor once every successor has answered: ACK with the
// number of PEs claimed in its part of the region, or REJ if any part failed,
// after releasing itself and sending RET to the successors that did succeed.
// A PE that is busy or claimed answers REJ, and a PE whose required
// neighbour is not free (or off the array) rejects at once, so a failed
// invasion leaves nothing claimed. RET from the predecessor releases the PE
// and is passed to all its successors.
//
// Interface and timing are those of inv_ctrl_lin: five valid/ready ports
// (0..3 = N, E, S, W, 4 = local PE), avail_in/avail_out, pe_busy and the
// claim state. One cycle per hop each way, so an N x M region is answered
// 2*(N-1) + 2*(M-1) + 1 cycles after the command, two cycles per step in
// each dimension as the document reports for its FSM-based controller.
// Message formats, the count in ACK and the release on failure are this
// design's own choices.
module inv_ctrl_rect
  import inv_pkg::*;
(
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

  inv_link_io u_io (
    .clk, .rst_n,
    .in_valid, .in_msg, .in_ready,
    .out_valid, .out_msg, .out_ready,
    .sel_valid, .sel_port, .sel_msg, .sel_take,
    .out_free, .out_set, .out_new
  );

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

  // Successors wanted by an INV step.
  logic             want_h, want_v, nbr_ok;
  logic [2:0]       hdir, vdir;

  always_comb begin
    hdir   = sel_msg.prm.west  ? 3'(DIR_W) : 3'(DIR_E);
    vdir   = sel_msg.prm.north ? 3'(DIR_N) : 3'(DIR_S);
    want_h = !sel_msg.prm.flag && sel_msg.b > OPND_W'(1);
    want_v = sel_msg.a > OPND_W'(1);
    nbr_ok = (!want_h || avail_in[hdir[1:0]]) && (!want_v || avail_in[vdir[1:0]]);
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
          if (own_q || pe_busy || sel_msg.sub != SUB_RECT || sel_msg.a == '0 ||
              sel_msg.b == '0 || !nbr_ok) begin
            need[sel_port]    = 1'b1;
            out_new[sel_port] = mk_resp(OP_REJ, '0);
          end else begin
            own_d = 1'b1;  par_d = sel_port;  rej_d = 1'b0;  acc_d = '0;
            chd_d = '0;
            if (want_h) chd_d[hdir[1:0]] = 1'b1;
            if (want_v) chd_d[vdir[1:0]] = 1'b1;
            pnd_d = chd_d;
            if (want_h) begin
              fwd       = sel_msg;
              fwd.b     = sel_msg.b - OPND_W'(1);
              need[hdir]    = 1'b1;
              out_new[hdir] = fwd;
            end
            if (want_v) begin
              fwd          = sel_msg;
              fwd.prm.flag = 1'b1;
              fwd.a        = sel_msg.a - OPND_W'(1);
              fwd.b        = OPND_W'(1);
              need[vdir]    = 1'b1;
              out_new[vdir] = fwd;
            end
            if (!want_h && !want_v) begin
              need[sel_port]    = 1'b1;
              out_new[sel_port] = mk_resp(OP_ACK, OPND_W'(1));
            end
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
