// Success-ratio experiment for the linear invasion policies on a 5 x 5
// array of hard-wired linear controllers (ic_array).
//
// Each trial occupies a random share of the PEs (R_occ drawn between 0 and
// 40 %), picks a free root PE at random and asks it for N_clm PEs, with
// N_clm = R_clm * 25 for claim ratios R_clm = 10 % .. 90 %. The same
// occupation is tried with the straight, random and meander policies in
// turn; a trial succeeds when the answer is ACK N_clm. The table of success
// ratios is printed. The publication ran this 10000 times per claim ratio on
// a simulation model; here TRIALS trials per ratio keep the run short, so
// the figures are coarse.
//
// Checked on every trial: ACK carries exactly N_clm and that many PEs are
// claimed, a REJ leaves nothing claimed, no busy PE is ever claimed, and the
// retreat frees every PE. Checked on the totals: the success ratio does not
// grow from the smallest to the largest claim ratio, and the meander policy
// succeeds at least as often as the random one (the ordering the publication
// reports).
module tb_success_ratio;
  import inv_pkg::*;

  localparam int R = 5, C = 5, NPE = R * C;
  localparam int TRIALS = 400;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset fires
  always #5 clk = ~clk;

  logic [NPE-1:0] cv, cr, rv, rr, busy, inv, stl;
  inv_msg_t       cm [NPE];
  inv_msg_t       rm [NPE];

  ic_array u_arr (
    .clk, .rst_n,
    .pe_cmd_valid(cv), .pe_cmd(cm), .pe_cmd_ready(cr),
    .pe_rsp_valid(rv), .pe_rsp(rm), .pe_rsp_ready(rr),
    .pe_busy(busy), .invaded(inv), .stall(stl),
    .imem_we(1'b0), .imem_addr(6'd0), .imem_wdata('0), .run(1'b0));

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
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

  task automatic send(input int p, input inv_msg_t m);
    @(negedge clk);
    cm[p] = m;
    cv[p] = 1'b1;
    forever begin
      @(posedge clk);
      if (cr[p]) break;
    end
    #1 cv[p] = 1'b0;
  endtask

  task automatic recv(input int p, output inv_msg_t m);
    forever begin
      @(posedge clk);
      if (rv[p]) break;
    end
    m = rm[p];
  endtask

  int success [3][9];
  inv_msg_t rsp, cmd;
  int root, nclm, occ;

  initial begin
    cv = '0; rr = '1; busy = '0;
    for (int i = 0; i < NPE; i++) cm[i] = '0;
    for (int k = 0; k < 3; k++) for (int j = 0; j < 9; j++) success[k][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    for (int j = 0; j < 9; j++) begin
      nclm = ((j + 1) * 10 * NPE + 50) / 100;
      for (int t = 0; t < TRIALS; t++) begin
        occ = $urandom_range(0, 40);
        busy = '0;
        for (int p = 0; p < NPE; p++) if ($urandom_range(0, 99) < occ) busy[p] = 1'b1;
        root = $urandom_range(0, NPE - 1);
        while (busy[root]) root = (root + 1) % NPE;
        for (int k = 0; k < 3; k++) begin
          cmd = '0;
          cmd.op = OP_INV; cmd.sub = SUB_LIN; cmd.a = OPND_W'(nclm);
          cmd.prm.policy = k == 0 ? 2'(POL_STR) : k == 1 ? 2'(POL_RND) : 2'(POL_MEA);
          send(root, cmd);
          recv(root, rsp);
          repeat (2) @(posedge clk);
          if (rsp.op == OP_ACK) begin
            success[k][j]++;
            check(int'(rsp.a) == nclm && $countones(inv) == nclm,
                  $sformatf("ACK %0d with %0d claimed, %0d wanted", rsp.a, $countones(inv), nclm));
          end else begin
            check(rsp.op == OP_REJ && inv == '0, "REJ leaves nothing claimed");
          end
          check((inv & busy) == '0, "no busy PE claimed");
          if (rsp.op == OP_ACK) begin
            cmd = '0; cmd.op = OP_RET;
            send(root, cmd);
            repeat (2 * nclm + 4) @(posedge clk);
          end
          check(inv == '0, "every PE free again");
        end
      end
    end

    $display("success ratio in %% of %0d trials, 5 x 5 array, R_occ 0..40 %%", TRIALS);
    $display("R_clm   STR   RND   MEA");
    for (int j = 0; j < 9; j++)
      $display("%3d %%  %4d  %4d  %4d", (j + 1) * 10,
               success[0][j] * 100 / TRIALS, success[1][j] * 100 / TRIALS, success[2][j] * 100 / TRIALS);
    for (int k = 0; k < 3; k++)
      check(success[k][0] >= success[k][8], $sformatf("policy %0d: success falls with the claim ratio", k));
    begin
      int s_rnd = 0, s_mea = 0;
      for (int j = 0; j < 9; j++) begin
        s_rnd += success[1][j];
        s_mea += success[2][j];
      end
      check(s_mea >= s_rnd, $sformatf("meander (%0d) at least as good as random (%0d)", s_mea, s_rnd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
