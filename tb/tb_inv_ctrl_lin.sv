// Self-checking testbench for one linear-invasion controller (inv_ctrl_lin).
// The five ports are driven directly and every message the controller sends
// is logged per port; each case compares the log with the step the policy
// must take:
//  * root invasion forwards n-1 East and answers ACK n when its successor
//    answers ACK n-1, one cycle after each message arrives
//  * STR turns right when blocked ahead; MEA turns to the opposite
//    horizontal heading after a vertical step and steps South when blocked
//    horizontally; RND only ever picks a free neighbour
//  * a busy PE, or one with no free neighbour, rejects at once
//  * REJ from the successor releases the PE and is passed back
//  * RET from the predecessor releases the PE and is passed down
module tb_inv_ctrl_lin;
  import inv_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset fires
  always #5 clk = ~clk;

  logic     [NPORT-1:0] in_valid, in_ready, out_valid, out_ready;
  inv_msg_t             in_msg [NPORT];
  inv_msg_t             out_msg[NPORT];
  logic     [NDIR-1:0]  avail_in, child_mask;
  logic                 avail_out, pe_busy, invaded, stall;
  logic     [2:0]       parent_dir;

  inv_ctrl_lin dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // log of sent messages
  inv_msg_t log_m [$];
  int       log_p [$];
  int       log_t [$];
  always @(posedge clk)
    for (int i = 0; i < NPORT; i++)
      if (rst_n && out_valid[i] && out_ready[i]) begin
        log_m.push_back(out_msg[i]);
        log_p.push_back(i);
        log_t.push_back(cyc);
      end

  function automatic inv_msg_t lin(input logic [1:0] pol, input int n, input bit west);
    inv_msg_t m = '0;
    m.op = OP_INV; m.sub = SUB_LIN; m.prm.policy = pol; m.prm.west = west; m.a = OPND_W'(n);
    return m;
  endfunction

  function automatic inv_msg_t rsp(input opcode_e op, input int n);
    return mk_resp(op, OPND_W'(n));
  endfunction

  int t_in;
  // Presents a message on port p for one handshake; t_in = cycle taken.
  task automatic put(input int p, input inv_msg_t m);
    @(negedge clk);
    in_msg[p]   = m;
    in_valid[p] = 1'b1;
    forever begin
      @(posedge clk);
      if (in_ready[p]) break;
    end
    t_in = cyc;
    #1 in_valid[p] = 1'b0;
  endtask

  // Expects exactly one message, on port p, one cycle after the input.
  task automatic expect1(input int p, input opcode_e op, input int a, input string what);
    repeat (4) @(posedge clk);
    #1;
    check(log_m.size() == 1, $sformatf("%s: one message sent (got %0d)", what, log_m.size()));
    if (log_m.size() >= 1) begin
      check(log_p[0] == p, $sformatf("%s: port %0d (got %0d)", what, p, log_p[0]));
      check(log_m[0].op == op && int'(log_m[0].a) == a,
            $sformatf("%s: op %0d a %0d (got %0d %0d)", what, op, a, log_m[0].op, log_m[0].a));
      check(log_t[0] - t_in == 1, $sformatf("%s: one-cycle step (got %0d)", what, log_t[0] - t_in));
    end
    log_m.delete(); log_p.delete(); log_t.delete();
  endtask

  task automatic reset_dut();
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
  endtask

  int seen_w, seen_other;

  initial begin
    in_valid = '0; out_ready = '1; pe_busy = 1'b0; avail_in = '0;
    for (int i = 0; i < NPORT; i++) in_msg[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // root invasion, n = 5, all neighbours free: first choice East
    avail_in = 4'b1111;
    put(DIR_L, lin(2'(POL_STR), 5, 0));
    expect1(DIR_E, OP_INV, 4, "root forwards East");
    check(invaded && parent_dir == 3'(DIR_L) && child_mask == 4'b0010, "root claimed, child E");
    check(!avail_out, "claimed PE not available");
    put(DIR_E, rsp(OP_ACK, 4));
    expect1(DIR_L, OP_ACK, 5, "root answers ACK 5");
    // claimed PE rejects a second invasion
    put(DIR_N, lin(2'(POL_STR), 2, 0));
    expect1(DIR_N, OP_REJ, 0, "claimed PE rejects");
    // retreat from the PE goes down the chain
    put(DIR_L, rsp(OP_RET, 0));
    expect1(DIR_E, OP_RET, 0, "retreat passed on");
    check(!invaded && avail_out, "retreat frees the PE");

    // STR heading East (from West), East blocked: right turn is South
    avail_in = 4'b0101;   // N and S free
    put(DIR_W, lin(2'(POL_STR), 3, 0));
    expect1(DIR_S, OP_INV, 2, "STR blocked ahead turns right");
    // successor rejects: PE freed, REJ back West
    put(DIR_S, rsp(OP_REJ, 0));
    expect1(DIR_W, OP_REJ, 0, "REJ passed back");
    check(!invaded, "REJ frees the PE");

    // STR heading North (from South), N blocked, E blocked: left turn West
    avail_in = 4'b1000;
    put(DIR_S, lin(2'(POL_STR), 3, 0));
    expect1(DIR_W, OP_INV, 2, "STR turns left when right is blocked");
    reset_dut();

    // MEA after a vertical step (from North) with last heading West: East
    avail_in = 4'b1111;
    put(DIR_N, lin(2'(POL_MEA), 3, 1));
    expect1(DIR_E, OP_INV, 2, "MEA reverses horizontal heading");
    reset_dut();
    // MEA heading West (from East), West blocked: South
    avail_in = 4'b0101;
    put(DIR_E, lin(2'(POL_MEA), 3, 1));
    expect1(DIR_S, OP_INV, 2, "MEA steps South when blocked");
    reset_dut();
    // MEA heading West, West and South blocked: North
    avail_in = 4'b0001;
    put(DIR_E, lin(2'(POL_MEA), 3, 1));
    expect1(DIR_N, OP_INV, 2, "MEA steps North when South blocked");
    reset_dut();

    // no free neighbour: REJ, nothing claimed
    avail_in = 4'b0000;
    put(DIR_W, lin(2'(POL_MEA), 3, 0));
    expect1(DIR_W, OP_REJ, 0, "no free neighbour rejects");
    check(!invaded, "nothing claimed after REJ");

    // last PE of a chain: ACK 1 without forwarding
    put(DIR_W, lin(2'(POL_MEA), 1, 0));
    expect1(DIR_W, OP_ACK, 1, "last PE acknowledges");
    check(invaded && child_mask == '0, "last PE claimed");
    reset_dut();

    // busy PE rejects
    pe_busy = 1'b1;
    avail_in = 4'b1111;
    put(DIR_S, lin(2'(POL_STR), 3, 0));
    expect1(DIR_S, OP_REJ, 0, "busy PE rejects");
    check(!avail_out, "busy PE not available");
    pe_busy = 1'b0;

    // RND only picks free neighbours; both of two free ones get picked
    seen_w = 0; seen_other = 0;
    avail_in = 4'b1010;   // E and W free
    for (int k = 0; k < 24; k++) begin
      reset_dut();
      repeat ($urandom_range(0, 5)) @(posedge clk);
      put(DIR_N, lin(2'(POL_RND), 3, 0));
      repeat (3) @(posedge clk);
      #1;
      check(log_m.size() == 1 && (log_p[0] == DIR_E || log_p[0] == DIR_W) &&
            log_m[0].op == OP_INV, "RND picks a free neighbour");
      if (log_m.size() == 1 && log_p[0] == DIR_W) seen_w++; else seen_other++;
      log_m.delete(); log_p.delete(); log_t.delete();
    end
    check(seen_w > 0 && seen_other > 0, $sformatf("RND varies (%0d W, %0d E)", seen_w, seen_other));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
