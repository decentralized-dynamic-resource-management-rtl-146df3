// End-to-end testbench of invasion_mppa at its default size (5 x 5 per
// plane). PE models on every tile issue commands and collect answers. It
// drives, and counts, each mechanism of the design:
//   STR, MEA and RND linear invasions; rectangular invasions in all four
//   corner directions; ACK; REJ from a busy or claimed PE; REJ for want of a
//   free neighbour with release of the partial region; retreat; concurrent
//   invasions from several PEs; an output-register stall; the programmable
//   plane running the meander and the rectangle program, which must claim
//   the same PEs as the hard-wired controllers.
// After each phase the claimed PEs must equal the sum of the ACK counts of
// the regions still held, and after retreat no PE may be claimed.
module tb_invasion_mppa;
  import inv_pkg::*;

  localparam int R = 5, C = 5, NPE = R * C;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset fires
  always #5 clk = ~clk;

  logic [NPE-1:0] cv [3], cr [3], rv [3], rr [3], busy [3], inv [3], stl [3];
  inv_msg_t       cm [3][NPE];
  inv_msg_t       rm [3][NPE];
  logic           imem_we = 1'b0, prun = 1'b0;
  logic [5:0]     imem_addr = '0;
  logic [tb_inv_programs::IW-1:0] imem_wdata = '0;

  invasion_mppa dut (
    .clk, .rst_n,
    .lin_cmd_valid (cv[0]), .lin_cmd (cm[0]), .lin_cmd_ready (cr[0]),
    .lin_rsp_valid (rv[0]), .lin_rsp (rm[0]), .lin_rsp_ready (rr[0]),
    .lin_pe_busy   (busy[0]), .lin_invaded (inv[0]), .lin_stall (stl[0]),
    .rect_cmd_valid(cv[1]), .rect_cmd(cm[1]), .rect_cmd_ready(cr[1]),
    .rect_rsp_valid(rv[1]), .rect_rsp(rm[1]), .rect_rsp_ready(rr[1]),
    .rect_pe_busy  (busy[1]), .rect_invaded(inv[1]), .rect_stall(stl[1]),
    .prog_cmd_valid(cv[2]), .prog_cmd(cm[2]), .prog_cmd_ready(cr[2]),
    .prog_rsp_valid(rv[2]), .prog_rsp(rm[2]), .prog_rsp_ready(rr[2]),
    .prog_pe_busy  (busy[2]), .prog_invaded(inv[2]), .prog_stall(stl[2]),
    .prog_imem_we(imem_we), .prog_imem_addr(imem_addr), .prog_imem_wdata(imem_wdata),
    .prog_run(prun));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_str, n_mea, n_rnd, n_rect, n_ack, n_rej, n_ret, n_stall, n_conc, n_release, n_prog;
  always @(posedge clk) if (rst_n) n_stall <= n_stall + $countones(stl[0]) + $countones(stl[1]) + $countones(stl[2]);

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic int pe(input int r, input int c);
    return r * C + c;
  endfunction

  function automatic inv_msg_t lin_cmd(input logic [1:0] pol, input int n);
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

  // PE model: per plane and PE, the command to send and the answer seen.
  logic [NPE-1:0] want [3];
  inv_msg_t       todo [3][NPE];
  bit             got  [3][NPE];
  inv_msg_t       ans  [3][NPE];
  int             held [3][NPE];   // PEs held by the region this PE invaded
  int             t_iss[3][NPE];   // cycle the command was issued
  int             t_ans[3][NPE];   // cycle the answer arrived

  // Command senders: valid until ready.
  always @(negedge clk) begin
    for (int k = 0; k < 3; k++)
      for (int p = 0; p < NPE; p++) begin
        cv[k][p] = want[k][p];
        cm[k][p] = todo[k][p];
      end
  end

  always @(posedge clk) begin
    for (int k = 0; k < 3; k++)
      for (int p = 0; p < NPE; p++) begin
        if (cv[k][p] && cr[k][p]) want[k][p] <= 1'b0;
        if (rv[k][p] && rr[k][p]) begin
          got[k][p] <= 1'b1;
          ans[k][p] <= rm[k][p];
          t_ans[k][p] <= cyc;
          if (rm[k][p].op == OP_ACK) n_ack <= n_ack + 1;
          if (rm[k][p].op == OP_REJ) n_rej <= n_rej + 1;
        end
      end
  end

  task automatic issue(input int k, input int p, input inv_msg_t m);
    @(negedge clk);
    todo[k][p] = m;
    want[k][p] = 1'b1;
    got[k][p]  = 1'b0;
    t_iss[k][p] = cyc;
    if (k == 2 && m.op == OP_INV) n_prog++;
    if (m.op == OP_INV && m.sub == SUB_LIN) begin
      if (m.prm.policy == 2'(POL_STR)) n_str++;
      if (m.prm.policy == 2'(POL_MEA)) n_mea++;
      if (m.prm.policy == 2'(POL_RND)) n_rnd++;
    end
    if (m.op == OP_INV && m.sub == SUB_RECT) n_rect++;
  endtask

  task automatic wait_idle(input int cycles);
    repeat (cycles) @(posedge clk);
  endtask

  // Records the answers of all invading PEs and checks the claimed total.
  task automatic settle(input int k, input logic [NPE-1:0] roots, input string what);
    int total;
    wait_idle(k == 2 ? 1200 : 80);
    total = 0;
    for (int p = 0; p < NPE; p++) begin
      if (roots[p]) begin
        check(got[k][p], $sformatf("%s: PE %0d answered", what, p));
        if (got[k][p] && ans[k][p].op == OP_ACK) held[k][p] = int'(ans[k][p].a);
      end
      total += held[k][p];
    end
    check($countones(inv[k]) == total,
          $sformatf("%s: claimed %0d, acknowledged %0d", what, $countones(inv[k]), total));
    check((inv[k] & busy[k]) == '0, $sformatf("%s: no busy PE claimed", what));
  endtask

  task automatic retreat_all(input int k);
    inv_msg_t m = '0;
    m.op = OP_RET;
    for (int p = 0; p < NPE; p++)
      if (held[k][p] != 0) begin
        issue(k, p, m);
        n_ret++;
        held[k][p] = 0;
      end
    wait_idle(k == 2 ? 600 : 60);
    check(inv[k] == '0, "retreat frees every PE");
  endtask

  // Loads an exploration program into every programmable controller.
  task automatic load(input tb_inv_programs::inv_asm A);
    check(A.errors == 0, "program assembles");
    @(negedge clk) prun = 1'b0;
    for (int i = 0; i < tb_inv_programs::DEPTH; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_addr = 6'(i); imem_wdata = A.mem[i];
    end
    @(negedge clk);
    imem_we = 1'b0; prun = 1'b1;
  endtask

  logic [NPE-1:0] roots, fig2;
  int             p0, n0;

  initial begin
    n_str = 0; n_mea = 0; n_rnd = 0; n_rect = 0; n_ack = 0; n_rej = 0;
    n_ret = 0; n_stall = 0; n_conc = 0; n_release = 0;
    for (int k = 0; k < 3; k++) begin
      want[k] = '0; rr[k] = '1; busy[k] = '0; cv[k] = '0;
      for (int p = 0; p < NPE; p++) begin
        todo[k][p] = '0; got[k][p] = 0; ans[k][p] = '0; held[k][p] = 0; cm[k][p] = '0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait_idle(2);

    // Phase 1: one invasion of each kind on an empty array.
    issue(0, pe(0,0), lin_cmd(2'(POL_STR), 12));
    issue(1, pe(0,0), rect_cmd(0, 0, 3, 4));
    settle(0, 25'(1) << pe(0,0), "STR 12");
    settle(1, 25'(1) << pe(0,0), "RECT SE 3x4");
    check(ans[0][pe(0,0)].op == OP_ACK && ans[0][pe(0,0)].a == 8'd12, "STR 12 ACK");
    check(ans[1][pe(0,0)].op == OP_ACK && ans[1][pe(0,0)].a == 8'd12, "RECT 3x4 ACK");

    // Phase 2: an invasion of a claimed PE is rejected at once.
    issue(0, pe(0,1), lin_cmd(2'(POL_MEA), 3));
    issue(1, pe(1,1), rect_cmd(1, 1, 1, 1));
    settle(0, 25'(1) << pe(0,1), "INV on claimed PE");
    settle(1, 25'(1) << pe(1,1), "RECT on claimed PE");
    check(ans[0][pe(0,1)].op == OP_REJ, "claimed PE rejects (lin)");
    check(ans[1][pe(1,1)].op == OP_REJ, "claimed PE rejects (rect)");

    // Phase 3: stall. The invading PE does not take its answer; a second
    // command to its controller must wait for the output register.
    retreat_all(0);
    @(negedge clk) rr[0][pe(2,2)] = 1'b0;
    issue(0, pe(2,2), lin_cmd(2'(POL_MEA), 4));
    wait_idle(12);
    p0 = n_stall;
    issue(0, pe(2,2), lin_cmd(2'(POL_MEA), 4));
    wait_idle(6);
    check(n_stall > p0, "second command stalls behind an untaken answer");
    @(negedge clk) rr[0][pe(2,2)] = 1'b1;
    @(negedge clk);
    check(got[0][pe(2,2)] && ans[0][pe(2,2)].op == OP_ACK && ans[0][pe(2,2)].a == 8'd4,
          "first answer ACK 4 once taken");
    got[0][pe(2,2)] = 1'b0;
    held[0][pe(2,2)] = 4;
    @(negedge clk);
    check(got[0][pe(2,2)] && ans[0][pe(2,2)].op == OP_REJ, "second command then rejected");
    retreat_all(0);
    retreat_all(1);

    // Phase 4: failure with release. Busy PEs wall in a corner.
    busy[0] = '0;
    busy[0][pe(0,2)] = 1; busy[0][pe(1,2)] = 1; busy[0][pe(2,0)] = 1; busy[0][pe(2,1)] = 1;
    busy[1] = busy[0];
    issue(0, pe(0,0), lin_cmd(2'(POL_MEA), 5));
    issue(1, pe(0,0), rect_cmd(0, 0, 2, 3));
    settle(0, 25'(1) << pe(0,0), "walled MEA 5");
    settle(1, 25'(1) << pe(0,0), "walled RECT 2x3");
    check(ans[0][pe(0,0)].op == OP_REJ && inv[0] == '0, "walled linear: REJ, nothing kept");
    check(ans[1][pe(0,0)].op == OP_REJ && inv[1] == '0, "walled rect: REJ, nothing kept");
    n_release += 2;
    busy[0] = '0; busy[1] = '0;

    // Phase 5: concurrent invasions from the four corners, random sizes and
    // policies, repeated.
    for (int round = 0; round < 12; round++) begin
      roots = '0;
      roots[pe(0,0)] = 1; roots[pe(0,4)] = 1; roots[pe(4,0)] = 1; roots[pe(4,4)] = 1;
      busy[0] = '0; busy[1] = '0;
      for (int p = 0; p < NPE; p++)
        if (!roots[p] && $urandom_range(0, 9) == 0) begin
          busy[0][p] = 1; busy[1][p] = 1;
        end
      for (int p = 0; p < NPE; p++) begin
        if (roots[p]) begin
          n0 = $urandom_range(2, 8);
          issue(0, p, lin_cmd(2'($urandom_range(0, 2)), n0));
          issue(1, p, rect_cmd(p >= pe(4,0), (p % C) == C - 1,
                               $urandom_range(1, 3), $urandom_range(1, 3)));
        end
      end
      n_conc++;
      settle(0, roots, $sformatf("round %0d lin", round));
      settle(1, roots, $sformatf("round %0d rect", round));
      retreat_all(0);
      retreat_all(1);
    end

    // Phase 6: the programmable plane. With the meander program it must
    // claim the same PEs as the hard-wired MEA controllers; with the
    // rectangle program the same PEs as the rectangular ones.
    fig2 = '0;
    fig2[pe(1,0)] = 1; fig2[pe(2,0)] = 1; fig2[pe(3,0)] = 1; fig2[pe(4,0)] = 1;
    fig2[pe(2,4)] = 1; fig2[pe(3,4)] = 1; fig2[pe(4,4)] = 1;
    busy[0] = fig2; busy[1] = '0; busy[2] = fig2;
    load(tb_inv_programs::meander());
    issue(0, pe(0,0), lin_cmd(2'(POL_MEA), 15));
    issue(2, pe(0,0), lin_cmd(2'(POL_MEA), 15));
    settle(0, 25'(1) << pe(0,0), "MEA 15 hard-wired");
    settle(2, 25'(1) << pe(0,0), "MEA 15 programmable");
    check(ans[2][pe(0,0)].op == OP_ACK && ans[2][pe(0,0)].a == 8'd15, "programmable MEA 15 ACK");
    check(inv[2] == inv[0], "programmable and hard-wired meander claim the same PEs");
    $display("MEA 15: hard-wired %0d cycles, programmable %0d cycles",
             t_ans[0][pe(0,0)] - t_iss[0][pe(0,0)], t_ans[2][pe(0,0)] - t_iss[2][pe(0,0)]);
    issue(2, pe(2,2), lin_cmd(2'(POL_MEA), 3));
    settle(2, 25'(1) << pe(2,2), "programmable: claimed PE");
    check(ans[2][pe(2,2)].op == OP_REJ, "programmable: claimed PE rejects");
    retreat_all(0);
    retreat_all(2);
    busy[2] = '0;
    busy[2][pe(2,0)] = 1; busy[2][pe(2,1)] = 1;
    issue(2, pe(0,0), lin_cmd(2'(POL_MEA), 8));
    settle(2, 25'(1) << pe(0,0), "programmable MEA 8, 8 free");
    check(ans[2][pe(0,0)].op == OP_ACK, "programmable MEA 8 ACK");
    retreat_all(2);
    busy[0] = '0; busy[2] = '0;
    busy[2][pe(0,2)] = 1; busy[2][pe(1,2)] = 1; busy[2][pe(2,0)] = 1; busy[2][pe(2,1)] = 1;
    issue(2, pe(0,0), lin_cmd(2'(POL_MEA), 5));
    settle(2, 25'(1) << pe(0,0), "programmable walled MEA 5");
    check(ans[2][pe(0,0)].op == OP_REJ && inv[2] == '0, "programmable walled: REJ, nothing kept");
    n_release++;

    busy[2] = '0;
    load(tb_inv_programs::rect());
    issue(1, pe(0,0), rect_cmd(0, 0, 3, 4));
    issue(2, pe(0,0), rect_cmd(0, 0, 3, 4));
    settle(1, 25'(1) << pe(0,0), "RECT 3x4 hard-wired");
    settle(2, 25'(1) << pe(0,0), "RECT 3x4 programmable");
    check(ans[2][pe(0,0)].op == OP_ACK && ans[2][pe(0,0)].a == 8'd12, "programmable RECT 3x4 ACK 12");
    check(inv[2] == inv[1], "programmable and hard-wired rectangle claim the same PEs");
    $display("RECT 3x4: hard-wired %0d cycles, programmable %0d cycles",
             t_ans[1][pe(0,0)] - t_iss[1][pe(0,0)], t_ans[2][pe(0,0)] - t_iss[2][pe(0,0)]);
    retreat_all(1);
    retreat_all(2);
    for (int round = 0; round < 4; round++) begin
      roots = '0;
      roots[pe(0,0)] = 1; roots[pe(0,4)] = 1; roots[pe(4,0)] = 1; roots[pe(4,4)] = 1;
      busy[2] = '0;
      for (int p = 0; p < NPE; p++)
        if (!roots[p] && $urandom_range(0, 9) == 0) busy[2][p] = 1;
      for (int p = 0; p < NPE; p++)
        if (roots[p])
          issue(2, p, rect_cmd(p >= pe(4,0), (p % C) == C - 1,
                               $urandom_range(1, 3), $urandom_range(1, 3)));
      n_conc++;
      settle(2, roots, $sformatf("round %0d programmable rect", round));
      retreat_all(2);
    end

    // Every mechanism must have happened.
    check(n_prog > 0,    "programmable invasion exercised");
    check(n_str > 0,     "STR invasion exercised");
    check(n_mea > 0,     "MEA invasion exercised");
    check(n_rnd > 0,     "RND invasion exercised");
    check(n_rect > 0,    "RECT invasion exercised");
    check(n_ack > 0,     "ACK seen");
    check(n_rej > 0,     "REJ seen");
    check(n_ret > 0,     "retreat exercised");
    check(n_stall > 0,   "stall seen");
    check(n_conc > 0,    "concurrent invasions exercised");
    check(n_release > 0, "release after failure exercised");
    $display("mechanisms: STR=%0d MEA=%0d RND=%0d RECT=%0d PROG=%0d ACK=%0d REJ=%0d RET=%0d stall_cycles=%0d concurrent_rounds=%0d release=%0d",
             n_str, n_mea, n_rnd, n_rect, n_prog, n_ack, n_rej, n_ret, n_stall, n_conc, n_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
