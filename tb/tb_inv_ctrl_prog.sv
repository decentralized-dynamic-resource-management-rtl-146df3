// Self-checking testbench for one programmable invasion controller
// (inv_ctrl_prog) at its default size (one FU, 64-line instruction memory).
// The program is loaded through the instruction-memory port, the five
// message ports are driven directly and every message sent is logged.
//  * meander program: root invasion forwards n-1 East; ACK n-1 from the
//    successor gives ACK n to the predecessor; a claimed PE rejects; RET is
//    passed down and releases; the last PE answers ACK 1; REJ from the
//    successor is passed back and releases; after a vertical step the walk
//    turns against its last horizontal heading; a busy PE, or one with no
//    free neighbour, rejects
//  * rectangle program: a row PE sends the rest of the row and its column
//    at the same time and answers with the sum only after both answers; RET
//    reaches both successors; a failing column makes the PE retreat its row
//    successor and reject
//  * a SEND into a full output register stalls the program
// The cycles from taking a message to sending its result are measured and
// printed; the document reports 35 cycles per PE for its programmable
// linear invasion, so each step must stay within 64 cycles here.
module tb_inv_ctrl_prog;
  import inv_pkg::*;
  import inv_prog_pkg::*;
  import tb_inv_programs::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset fires
  always #5 clk = ~clk;

  logic     [NPORT-1:0] in_valid, in_ready, out_valid, out_ready;
  inv_msg_t             in_msg [NPORT];
  inv_msg_t             out_msg[NPORT];
  logic     [NDIR-1:0]  avail_in;
  logic                 avail_out, pe_busy, invaded, stall;
  logic                 imem_we, run;
  logic     [5:0]       imem_addr, pc;
  logic     [IW-1:0]    imem_wdata;

  inv_ctrl_prog dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
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

  inv_msg_t log_m [$];
  int       log_p [$];
  int       log_t [$];
  int       stall_cycles = 0;
  always @(posedge clk) begin
    for (int i = 0; i < NPORT; i++)
      if (rst_n && out_valid[i] && out_ready[i]) begin
        log_m.push_back(out_msg[i]);
        log_p.push_back(i);
        log_t.push_back(cyc);
      end
    if (stall) stall_cycles++;
  end

  task automatic load(input inv_asm A);
    check(A.errors == 0, "program assembles");
    check(A.pc <= DEPTH, $sformatf("program of %0d lines fits", A.pc));
    $display("program of %0d lines", A.pc);
    run = 1'b0;
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_addr = 6'(i); imem_wdata = A.mem[i];
    end
    @(negedge clk);
    imem_we = 1'b0; run = 1'b1;
    repeat (3) @(posedge clk);
  endtask

  function automatic inv_msg_t lin(input int n, input bit west);
    inv_msg_t m = '0;
    m.op = OP_INV; m.sub = SUB_LIN; m.prm.policy = POL_MEA; m.prm.west = west; m.a = OPND_W'(n);
    return m;
  endfunction

  function automatic inv_msg_t rct(input int rows, input int cols, input bit flag);
    inv_msg_t m = '0;
    m.op = OP_INV; m.sub = SUB_RECT; m.prm.flag = flag; m.a = OPND_W'(rows); m.b = OPND_W'(cols);
    return m;
  endfunction

  int t_in;
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

  int worst_step = 0;
  // Waits until n messages were sent (or 100 cycles), checks the count and
  // the step time, leaves the log for the caller and returns.
  task automatic collect(input int n, input string what);
    int w = 0;
    while (log_m.size() < n && w < 100) begin
      @(posedge clk);
      w++;
    end
    repeat (n == 0 ? 60 : 3) @(posedge clk);
    #1;
    check(log_m.size() == n, $sformatf("%s: %0d messages (got %0d)", what, n, log_m.size()));
    foreach (log_t[i]) begin
      if (log_t[i] - t_in > worst_step) worst_step = log_t[i] - t_in;
      check(log_t[i] - t_in <= 64, $sformatf("%s: step of %0d cycles", what, log_t[i] - t_in));
    end
  endtask

  task automatic expect1(input int p, input opcode_e op, input int a, input string what);
    collect(1, what);
    if (log_m.size() >= 1) begin
      check(log_p[0] == p, $sformatf("%s: port %0d (got %0d)", what, p, log_p[0]));
      // the count field of a REJ carries nothing
      check(log_m[0].op == op && (op == OP_REJ || int'(log_m[0].a) == a),
            $sformatf("%s: op %0d a %0d (got %0d %0d)", what, op, a, log_m[0].op, log_m[0].a));
    end
    clear();
  endtask

  task automatic expect_op(input int p, input opcode_e op, input string what);
    collect(1, what);
    if (log_m.size() >= 1)
      check(log_p[0] == p && log_m[0].op == op,
            $sformatf("%s: port %0d op %0d (got %0d %0d)", what, p, op, log_p[0], log_m[0].op));
    clear();
  endtask

  task automatic clear();
    log_m.delete(); log_p.delete(); log_t.delete();
  endtask

  int t_fwd, t_ack, lin_fwd, lin_ack;
  inv_msg_t m;

  initial begin
    in_valid = '0; out_ready = '1; pe_busy = 1'b0; avail_in = '0;
    imem_we = 1'b0; imem_addr = '0; imem_wdata = '0; run = 1'b0;
    for (int i = 0; i < NPORT; i++) in_msg[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ================= meander program =================
    load(meander());
    check(!invaded && avail_out, "meander: starts free");

    // root: forward East, then answer
    avail_in = 4'b1111;
    put(DIR_L, lin(4, 1'b0));
    collect(1, "root forward");
    check(log_p[0] == DIR_E && log_m[0].op == OP_INV && log_m[0].a == 8'd3 && !log_m[0].prm.west,
          "root forwards INV 3 East heading East");
    lin_fwd = log_t[0] - t_in;
    clear();
    check(invaded && !avail_out, "root claimed");
    put(DIR_E, mk_resp(OP_ACK, 8'd3));
    collect(1, "root answer");
    check(log_p[0] == DIR_L && log_m[0].op == OP_ACK && log_m[0].a == 8'd4, "root answers ACK 4");
    lin_ack = log_t[0] - t_in;
    clear();
    $display("meander program: forward step %0d cycles, answer step %0d cycles", lin_fwd, lin_ack);

    put(DIR_W, lin(2, 1'b0));
    expect1(DIR_W, OP_REJ, 0, "claimed PE rejects");
    check(invaded, "still claimed after rejecting");
    put(DIR_S, mk_resp(OP_ACK, 8'd5));
    collect(0, "answer from a non-successor is dropped");
    clear();

    put(DIR_L, '{op: OP_RET, sub: SUB_LIN, prm: '0, a: '0, b: '0});
    expect_op(DIR_E, OP_RET, "RET passed to successor");
    check(!invaded && avail_out, "RET releases");

    // last PE
    put(DIR_W, lin(1, 1'b0));
    expect1(DIR_W, OP_ACK, 1, "last PE answers ACK 1");
    check(invaded, "last PE claimed");
    put(DIR_W, '{op: OP_RET, sub: SUB_LIN, prm: '0, a: '0, b: '0});
    collect(0, "last PE retreats silently");
    clear();
    check(!invaded, "last PE released");

    // heading East, blocked ahead: South
    avail_in = 4'b0101;   // N and S free
    put(DIR_W, lin(3, 1'b0));
    expect1(DIR_S, OP_INV, 2, "heading East, blocked: South");
    put(DIR_S, mk_resp(OP_REJ, 8'd0));
    expect1(DIR_W, OP_REJ, 0, "REJ passed back");
    check(!invaded, "REJ releases");

    // heading West, only North free
    avail_in = 4'b0001;
    put(DIR_E, lin(3, 1'b1));
    expect1(DIR_N, OP_INV, 2, "heading West, blocked: North");
    put(DIR_L, '{op: OP_RET, sub: SUB_LIN, prm: '0, a: '0, b: '0});
    collect(0, "RET from a non-predecessor is ignored");
    clear();
    check(invaded, "still claimed");
    put(DIR_W, '{op: OP_RET, sub: SUB_LIN, prm: '0, a: '0, b: '0});
    collect(0, "RET from a non-predecessor is ignored (W)");
    clear();
    put(DIR_E, '{op: OP_RET, sub: SUB_LIN, prm: '0, a: '0, b: '0});
    expect_op(DIR_N, OP_RET, "RET from predecessor passed North");

    // vertical step after heading East: turn West
    avail_in = 4'b1111;
    put(DIR_N, lin(3, 1'b0));
    collect(1, "vertical after East");
    check(log_p[0] == DIR_W && log_m[0].prm.west, "vertical after East turns West");
    clear();
    put(DIR_W, mk_resp(OP_REJ, 8'd0));
    expect1(DIR_N, OP_REJ, 0, "REJ back North");
    // vertical step after heading West: turn East
    put(DIR_N, lin(3, 1'b1));
    collect(1, "vertical after West");
    check(log_p[0] == DIR_E && !log_m[0].prm.west, "vertical after West turns East");
    clear();
    put(DIR_E, mk_resp(OP_REJ, 8'd0));
    expect1(DIR_N, OP_REJ, 0, "REJ back North");
    // vertical, both sides taken: straight on
    avail_in = 4'b0101;
    put(DIR_N, lin(3, 1'b1));
    expect1(DIR_S, OP_INV, 2, "vertical, sides taken: ahead");
    put(DIR_S, mk_resp(OP_REJ, 8'd0));
    expect1(DIR_N, OP_REJ, 0, "REJ back North");

    // no free neighbour, busy PE, wrong strategy
    avail_in = 4'b0000;
    put(DIR_W, lin(3, 1'b0));
    expect1(DIR_W, OP_REJ, 0, "no free neighbour: REJ");
    check(!invaded, "not claimed");
    avail_in = 4'b1111;
    pe_busy = 1'b1;
    put(DIR_W, lin(3, 1'b0));
    expect1(DIR_W, OP_REJ, 0, "busy PE: REJ");
    check(!avail_out, "busy PE not offered");
    pe_busy = 1'b0;
    put(DIR_W, rct(2, 2, 1'b0));
    expect1(DIR_W, OP_REJ, 0, "rectangle command: REJ");

    // stall: the forward waits in the East register, so the RET that
    // follows finds it full and the program stalls until the link is ready
    @(negedge clk) out_ready[DIR_E] = 1'b0;
    begin
      int s0 = stall_cycles;
      put(DIR_W, lin(3, 1'b0));
      repeat (40) @(posedge clk);
      put(DIR_W, '{op: OP_RET, sub: SUB_LIN, prm: '0, a: '0, b: '0});
      repeat (60) @(posedge clk);
      check(stall_cycles - s0 >= 10, $sformatf("SEND into a full register stalls (%0d)", stall_cycles - s0));
      check(log_m.size() == 0, "nothing sent while the link is not ready");
      @(negedge clk) out_ready[DIR_E] = 1'b1;
      repeat (5) @(posedge clk);
      #1;
      check(log_m.size() == 2 && log_p[0] == DIR_E && log_p[1] == DIR_E &&
            log_m[0].op == OP_INV && log_m[1].op == OP_RET, "INV then RET sent once the link is ready");
      check(!invaded, "released after the stalled RET");
      clear();
    end

    // ================= rectangle program =================
    load(rect());
    avail_in = 4'b1111;
    put(DIR_L, rct(2, 3, 1'b0));
    collect(2, "row PE sends row and column");
    t_fwd = 0;
    begin
      bit got_e = 0, got_s = 0;
      foreach (log_m[i]) begin
        if (log_p[i] == DIR_E && log_m[i].op == OP_INV && log_m[i].a == 8'd2 && log_m[i].b == 8'd2
            && !log_m[i].prm.flag && log_m[i].sub == SUB_RECT) got_e = 1;
        if (log_p[i] == DIR_S && log_m[i].op == OP_INV && log_m[i].a == 8'd1 && log_m[i].b == 8'd1
            && log_m[i].prm.flag && log_m[i].sub == SUB_RECT) got_s = 1;
        if (log_t[i] - t_in > t_fwd) t_fwd = log_t[i] - t_in;
      end
      check(got_e, "row rest 2 x 2 East");
      check(got_s, "column 1 x 1 South, column flag set");
    end
    clear();
    put(DIR_E, mk_resp(OP_ACK, 8'd4));
    collect(0, "no answer after one of two");
    clear();
    put(DIR_S, mk_resp(OP_ACK, 8'd1));
    collect(1, "answer after both");
    check(log_p[0] == DIR_L && log_m[0].op == OP_ACK && log_m[0].a == 8'd6, "rect ACK 6");
    t_ack = log_t[0] - t_in;
    clear();
    $display("rect program: forward step %0d cycles, answer step %0d cycles", t_fwd, t_ack);
    put(DIR_L, '{op: OP_RET, sub: SUB_RECT, prm: '0, a: '0, b: '0});
    collect(2, "RET to both successors");
    check(log_m[0].op == OP_RET && log_m[1].op == OP_RET &&
          ((log_p[0] == DIR_E && log_p[1] == DIR_S) || (log_p[0] == DIR_S && log_p[1] == DIR_E)),
          "RET sent East and South");
    clear();
    check(!invaded, "rect RET releases");

    // column PE: no row successor
    put(DIR_N, rct(2, 1, 1'b1));
    expect1(DIR_S, OP_INV, 1, "column PE forwards South only");
    put(DIR_S, mk_resp(OP_ACK, 8'd1));
    expect1(DIR_N, OP_ACK, 2, "column PE ACK 2");
    put(DIR_N, '{op: OP_RET, sub: SUB_RECT, prm: '0, a: '0, b: '0});
    expect_op(DIR_S, OP_RET, "column RET");

    // partial failure: column rejects, row retreated
    put(DIR_L, rct(2, 2, 1'b0));
    collect(2, "partial: two sent");
    clear();
    put(DIR_E, mk_resp(OP_ACK, 8'd2));
    put(DIR_S, mk_resp(OP_REJ, 8'd0));
    collect(2, "partial: retreat and reject");
    begin
      bit ret_e = 0, rej_l = 0;
      foreach (log_m[i]) begin
        if (log_p[i] == DIR_E && log_m[i].op == OP_RET) ret_e = 1;
        if (log_p[i] == DIR_L && log_m[i].op == OP_REJ) rej_l = 1;
      end
      check(ret_e, "partial: row successor retreated");
      check(rej_l, "partial: REJ to predecessor");
    end
    clear();
    check(!invaded, "partial: released");

    // last PE, missing neighbour, busy
    put(DIR_W, rct(1, 1, 1'b0));
    expect1(DIR_W, OP_ACK, 1, "rect last PE ACK 1");
    put(DIR_W, '{op: OP_RET, sub: SUB_RECT, prm: '0, a: '0, b: '0});
    collect(0, "rect last PE retreats silently");
    clear();
    avail_in = 4'b1011;   // S taken
    put(DIR_L, rct(2, 2, 1'b0));
    expect1(DIR_L, OP_REJ, 0, "column neighbour taken: REJ");
    check(!invaded, "not claimed");
    avail_in = 4'b1111;
    pe_busy = 1'b1;
    put(DIR_L, rct(2, 2, 1'b0));
    expect1(DIR_L, OP_REJ, 0, "busy: REJ");
    pe_busy = 1'b0;
    put(DIR_L, lin(3, 1'b0));
    expect1(DIR_L, OP_REJ, 0, "linear command: REJ");

    $display("worst step %0d cycles, %0d stall cycles", worst_step, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
