// Self-checking testbench for one rectangular-invasion controller
// (inv_ctrl_rect). The five ports are driven directly and every message the
// controller sends is logged per port. Cases:
//  * a first-row PE of an SE 3 x 5 invasion sends (row, 3, 4) East and
//    (column, 2) South in the same cycle, one cycle after the command, and
//    answers ACK 1+a+b only after both successors answered
//  * NW variant goes West and North; a column PE only goes vertically
//  * the last PE of a column answers ACK 1 at once
//  * a missing neighbour, a busy PE or a claimed PE rejects at once
//  * one successor ACK and one REJ: RET to the successful one, REJ back,
//    PE released
//  * RET is passed to both successors
module tb_inv_ctrl_rect;
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

  inv_ctrl_rect dut (.*);

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

  function automatic inv_msg_t rect(input bit north, input bit west, input bit col,
                                    input int rows, input int cols);
    inv_msg_t m = '0;
    m.op = OP_INV; m.sub = SUB_RECT; m.prm.north = north; m.prm.west = west;
    m.prm.flag = col; m.a = OPND_W'(rows); m.b = OPND_W'(cols);
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

  initial begin
    in_valid = '0; out_ready = '1; pe_busy = 1'b0; avail_in = '0;
    for (int i = 0; i < NPORT; i++) in_msg[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // SE 3 x 5 at the origin PE: both successors at once
    avail_in = 4'b1111;
    put(DIR_L, rect(0, 0, 0, 3, 5));
    repeat (3) @(posedge clk);
    #1;
    check(log_m.size() == 2, "two successors invaded");
    for (int k = 0; k < log_m.size(); k++) begin
      check(log_t[k] - t_in == 1, "one-cycle step");
      if (log_p[k] == DIR_E)
        check(log_m[k].op == OP_INV && log_m[k].a == 8'd3 && log_m[k].b == 8'd4 && !log_m[k].prm.flag,
              "row invasion East 3 x 4");
      else
        check(log_p[k] == DIR_S && log_m[k].op == OP_INV && log_m[k].a == 8'd2 &&
              log_m[k].b == 8'd1 && log_m[k].prm.flag, "column invasion South 2");
    end
    log_m.delete(); log_p.delete(); log_t.delete();
    check(invaded && child_mask == 4'b0110, "claimed with children E and S");
    put(DIR_E, rsp(OP_ACK, 12));
    repeat (3) @(posedge clk);
    #1 check(log_m.size() == 0, "no answer before the second successor");
    put(DIR_S, rsp(OP_ACK, 2));
    expect1(DIR_L, OP_ACK, 15, "ACK 15 after both successors");
    put(DIR_W, rect(0, 0, 1, 2, 1));
    expect1(DIR_W, OP_REJ, 0, "claimed PE rejects");
    put(DIR_L, rsp(OP_RET, 0));
    repeat (3) @(posedge clk);
    #1;
    check(log_m.size() == 2 && log_m[0].op == OP_RET && log_m[1].op == OP_RET &&
          ((log_p[0] == DIR_E && log_p[1] == DIR_S) || (log_p[0] == DIR_S && log_p[1] == DIR_E)),
          "RET to both successors");
    log_m.delete(); log_p.delete(); log_t.delete();
    check(!invaded, "retreat frees the PE");

    // NW row PE reached from the East: goes West and North
    put(DIR_E, rect(1, 1, 0, 2, 2));
    repeat (3) @(posedge clk);
    #1;
    check(log_m.size() == 2 && ((log_p[0] == DIR_W && log_p[1] == DIR_N) ||
                                (log_p[0] == DIR_N && log_p[1] == DIR_W)), "NW goes West and North");
    log_m.delete(); log_p.delete(); log_t.delete();
    // West ACKs, North REJs: RET West, REJ back East, PE released
    put(DIR_W, rsp(OP_ACK, 2));
    put(DIR_N, rsp(OP_REJ, 0));
    repeat (3) @(posedge clk);
    #1;
    check(log_m.size() == 2, "two messages on partial failure");
    for (int k = 0; k < log_m.size(); k++) begin
      if (log_p[k] == DIR_W) check(log_m[k].op == OP_RET, "RET to the successful successor");
      else check(log_p[k] == DIR_E && log_m[k].op == OP_REJ, "REJ back to the predecessor");
    end
    log_m.delete(); log_p.delete(); log_t.delete();
    check(!invaded, "partial failure frees the PE");

    // column PE from the North: only South, even with columns > 1
    put(DIR_N, rect(0, 0, 1, 3, 1));
    expect1(DIR_S, OP_INV, 2, "column PE continues South");
    put(DIR_S, rsp(OP_ACK, 2));
    expect1(DIR_N, OP_ACK, 3, "column ACK 3");
    reset_dut();

    // last PE of a column
    put(DIR_N, rect(0, 0, 1, 1, 1));
    expect1(DIR_N, OP_ACK, 1, "last PE acknowledges");
    reset_dut();

    // required neighbour missing: reject at once, nothing claimed
    avail_in = 4'b0100;   // only South
    put(DIR_W, rect(0, 0, 0, 2, 3));
    expect1(DIR_W, OP_REJ, 0, "missing East neighbour rejects");
    check(!invaded, "nothing claimed");

    // busy PE
    avail_in = 4'b1111;
    pe_busy  = 1'b1;
    put(DIR_L, rect(0, 0, 0, 1, 1));
    expect1(DIR_L, OP_REJ, 0, "busy PE rejects");
    pe_busy  = 1'b0;

    // a linear command is not for this controller
    begin
      inv_msg_t m = '0;
      m.op = OP_INV; m.sub = SUB_LIN; m.a = 8'd3;
      put(DIR_L, m);
      expect1(DIR_L, OP_REJ, 0, "linear command rejected");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
