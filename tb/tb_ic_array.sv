// Self-checking testbench for ic_array: replays the invasion examples on a
// 5 x 5 mesh with the PEs marked busy in those examples and compares the
// claimed PEs, the answer and its latency with hand-worked expectations.
//  * linear STR, 15 PEs from PE(0,0): the straight-line walk
//  * linear MEA, 15 PEs from PE(0,0): the meander walk
//  * linear RND, 15 PEs: either ACK 15 with 15 claimed, or REJ with none
//  * rectangular SE 3 x 5 from PE(0,0)
//  * a rectangle that cannot fit (REJ, nothing left claimed)
//  * retreat of every claimed region
// Latency: a linear invasion of n PEs answers 2n-1 cycles after the command
// is taken, an N x M rectangle 2(N-1)+2(M-1)+1 cycles after.
module tb_ic_array;
  import inv_pkg::*;

  localparam int R = 5, C = 5, NPE = R * C;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset fires
  always #5 clk = ~clk;

  logic [NPE-1:0] cv [2], cr [2], rv [2], rr [2], busy [2], inv [2], stl [2];
  inv_msg_t       cm [2][NPE];
  inv_msg_t       rm [2][NPE];

  ic_array #(.ROWS(R), .COLS(C), .RECT(1'b0)) u_lin (
    .clk, .rst_n,
    .pe_cmd_valid(cv[0]), .pe_cmd(cm[0]), .pe_cmd_ready(cr[0]),
    .pe_rsp_valid(rv[0]), .pe_rsp(rm[0]), .pe_rsp_ready(rr[0]),
    .pe_busy(busy[0]), .invaded(inv[0]), .stall(stl[0]),
    .imem_we(1'b0), .imem_addr(6'd0), .imem_wdata('0), .run(1'b0));

  ic_array #(.ROWS(R), .COLS(C), .RECT(1'b1)) u_rect (
    .clk, .rst_n,
    .pe_cmd_valid(cv[1]), .pe_cmd(cm[1]), .pe_cmd_ready(cr[1]),
    .pe_rsp_valid(rv[1]), .pe_rsp(rm[1]), .pe_rsp_ready(rr[1]),
    .pe_busy(busy[1]), .invaded(inv[1]), .stall(stl[1]),
    .imem_we(1'b0), .imem_addr(6'd0), .imem_wdata('0), .run(1'b0));

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

  function automatic int pe(input int r, input int c);
    return r * C + c;
  endfunction

  function automatic inv_msg_t lin_cmd(input policy_e pol, input int n);
    inv_msg_t m = '0;
    m.op = OP_INV; m.sub = SUB_LIN; m.prm.policy = pol; m.a = OPND_W'(n);
    return m;
  endfunction

  function automatic inv_msg_t rect_cmd(input bit north, input bit west, input int rows, input int cols);
    inv_msg_t m = '0;
    m.op = OP_INV; m.sub = SUB_RECT; m.prm.north = north; m.prm.west = west;
    m.a = OPND_W'(rows); m.b = OPND_W'(cols);
    return m;
  endfunction

  function automatic inv_msg_t ret_cmd();
    inv_msg_t m = '0;
    m.op = OP_RET;
    return m;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Sends a command from PE p of plane k; returns the cycle it was taken.
  task automatic send(input int k, input int p, input inv_msg_t m, output int t);
    @(negedge clk);
    cm[k][p] = m;
    cv[k][p] = 1'b1;
    forever begin
      @(posedge clk);
      if (cr[k][p]) break;
    end
    t = cyc;
    #1 cv[k][p] = 1'b0;
  endtask

  // Waits for the answer to PE p of plane k; returns it and its cycle.
  task automatic recv(input int k, input int p, output inv_msg_t m, output int t);
    forever begin
      @(posedge clk);
      if (rv[k][p]) break;
    end
    m = rm[k][p];
    t = cyc;
  endtask

  logic [NPE-1:0] exp_mask, busy_fig2, busy_fig3;
  inv_msg_t       rsp;
  int             t0, t1, cnt;

  initial begin
    for (int k = 0; k < 2; k++) begin
      cv[k] = '0; rr[k] = '1; busy[k] = '0;
      for (int i = 0; i < NPE; i++) cm[k][i] = '0;
    end
    busy_fig2 = '0;
    busy_fig2[pe(1,0)] = 1; busy_fig2[pe(2,0)] = 1; busy_fig2[pe(3,0)] = 1; busy_fig2[pe(4,0)] = 1;
    busy_fig2[pe(2,4)] = 1; busy_fig2[pe(3,4)] = 1; busy_fig2[pe(4,4)] = 1;
    busy_fig3 = '0;
    for (int c = 0; c < C; c++) busy_fig3[pe(4,c)] = 1;
    busy[0] = busy_fig2;
    busy[1] = busy_fig3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---- linear, straight lines ----
    send(0, pe(0,0), lin_cmd(POL_STR, 15), t0);
    recv(0, pe(0,0), rsp, t1);
    check(rsp.op == OP_ACK && rsp.a == 8'd15, "STR: ACK 15");
    check(t1 - t0 == 2 * 15 - 1, $sformatf("STR latency %0d", t1 - t0));
    exp_mask = '0;
    for (int c = 0; c < 5; c++) exp_mask[pe(0,c)] = 1;
    for (int c = 1; c < 5; c++) exp_mask[pe(1,c)] = 1;
    exp_mask[pe(2,1)] = 1; exp_mask[pe(3,1)] = 1; exp_mask[pe(4,1)] = 1;
    exp_mask[pe(4,2)] = 1; exp_mask[pe(4,3)] = 1; exp_mask[pe(3,3)] = 1;
    check(inv[0] == exp_mask, $sformatf("STR region %h vs %h", inv[0], exp_mask));
    send(0, pe(0,0), ret_cmd(), t0);
    repeat (20) @(posedge clk);
    check(inv[0] == '0, "STR retreat frees all");

    // ---- linear, meander ----
    send(0, pe(0,0), lin_cmd(POL_MEA, 15), t0);
    recv(0, pe(0,0), rsp, t1);
    check(rsp.op == OP_ACK && rsp.a == 8'd15, "MEA: ACK 15");
    check(t1 - t0 == 2 * 15 - 1, $sformatf("MEA latency %0d", t1 - t0));
    exp_mask = '0;
    for (int c = 0; c < 5; c++) exp_mask[pe(0,c)] = 1;
    for (int c = 1; c < 5; c++) exp_mask[pe(1,c)] = 1;
    for (int c = 1; c < 4; c++) exp_mask[pe(2,c)] = 1;
    for (int c = 1; c < 4; c++) exp_mask[pe(3,c)] = 1;
    check(inv[0] == exp_mask, $sformatf("MEA region %h vs %h", inv[0], exp_mask));
    send(0, pe(0,0), ret_cmd(), t0);
    repeat (20) @(posedge clk);
    check(inv[0] == '0, "MEA retreat frees all");

    // ---- linear, random walk, several tries ----
    for (int trial = 0; trial < 8; trial++) begin
      send(0, pe(0,0), lin_cmd(POL_RND, 6), t0);
      recv(0, pe(0,0), rsp, t1);
      repeat (2) @(posedge clk);
      cnt = $countones(inv[0]);
      if (rsp.op == OP_ACK) begin
        check(rsp.a == 8'd6 && cnt == 6, $sformatf("RND ACK count %0d claimed %0d", rsp.a, cnt));
        check((inv[0] & busy_fig2) == '0, "RND avoids busy PEs");
        send(0, pe(0,0), ret_cmd(), t0);
        repeat (20) @(posedge clk);
      end else begin
        check(rsp.op == OP_REJ, "RND answer is ACK or REJ");
        check(cnt == 0, "RND REJ leaves nothing claimed");
      end
      check(inv[0] == '0, "RND region released");
      repeat ($urandom_range(1, 7)) @(posedge clk);
    end

    // ---- linear, too many PEs: REJ and full release ----
    send(0, pe(0,0), lin_cmd(POL_MEA, 19), t0);
    recv(0, pe(0,0), rsp, t1);
    repeat (2) @(posedge clk);
    check(rsp.op == OP_REJ, "MEA 19 of 18 free PEs: REJ");
    check(inv[0] == '0, "MEA REJ leaves nothing claimed");

    // ---- rectangle SE 3 x 5 ----
    send(1, pe(0,0), rect_cmd(1'b0, 1'b0, 3, 5), t0);
    recv(1, pe(0,0), rsp, t1);
    check(rsp.op == OP_ACK && rsp.a == 8'd15, $sformatf("RECT ACK %0d", rsp.a));
    check(t1 - t0 == 2 * 2 + 2 * 4 + 1, $sformatf("RECT latency %0d", t1 - t0));
    exp_mask = '0;
    for (int r = 0; r < 3; r++) for (int c = 0; c < 5; c++) exp_mask[pe(r,c)] = 1;
    check(inv[1] == exp_mask, "RECT region rows 0-2");
    send(1, pe(0,0), ret_cmd(), t0);
    repeat (20) @(posedge clk);
    check(inv[1] == '0, "RECT retreat frees all");

    // ---- rectangle NW 2 x 3 from PE(3,4) ----
    send(1, pe(3,4), rect_cmd(1'b1, 1'b1, 2, 3), t0);
    recv(1, pe(3,4), rsp, t1);
    check(rsp.op == OP_ACK && rsp.a == 8'd6, "RECT NW ACK 6");
    exp_mask = '0;
    for (int r = 2; r < 4; r++) for (int c = 2; c < 5; c++) exp_mask[pe(r,c)] = 1;
    check(inv[1] == exp_mask, "RECT NW region");
    send(1, pe(3,4), ret_cmd(), t0);
    repeat (20) @(posedge clk);

    // ---- rectangle that runs into the busy row: REJ, nothing kept ----
    send(1, pe(1,1), rect_cmd(1'b0, 1'b0, 4, 3), t0);
    recv(1, pe(1,1), rsp, t1);
    repeat (20) @(posedge clk);
    check(rsp.op == OP_REJ, "RECT into busy row: REJ");
    check(inv[1] == '0, "RECT REJ leaves nothing claimed");

    // ---- a busy PE rejects an invasion of itself ----
    send(1, pe(4,2), rect_cmd(1'b1, 1'b0, 1, 1), t0);
    recv(1, pe(4,2), rsp, t1);
    check(rsp.op == OP_REJ && t1 - t0 == 1, "busy PE rejects at once");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
