// tb_pscop: end-to-end test of the scheduling coprocessor at its default
// size (64 VPTs, 8-bit parameters, 20-EC plans).
//
// A reference model of the planning scheduler runs alongside: for every EC it
// releases each variable whose period comes round (counting ECs from the
// start, first release at EC Ph), then walks the pending variables in slot
// order and accepts each while its C fits the EC time left, stopping at the
// first that does not fit. Its EC words are compared with the words the CPU
// reads from the plan port, and the clocks the builder spends on each plan
// are compared with 3*W + 6*(accepted transactions).
//
// Scenarios: the worst case of 22 minimum-length transactions in every EC
// (1 ms EC, 44 us messages, here 4 us units: EC = 250, C = 11), which must
// take 2700 clocks per plan; an 8.9 ms EC in 35 us units (EC = 254) with
// 4-data-byte frames at 125 kbit/s (about 0.7 ms, C = 20); random variable
// sets, one read by a CPU slow enough that both banks fill and the builder
// waits, one with an on-line parameter change between plans, one sparse
// enough to leave ECs empty; stop and restart; register read-back. Each
// mechanism (allocation, rejection, empty EC, chain contention, bank swap,
// builder wait, deadline miss, on-line change, restart) is counted and must
// occur at least once.
module tb_pscop;
  import pscop_pkg::*;

  localparam int N = 64;
  localparam int W = 20;
  localparam int SW = 6;
  localparam int MAXP = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_we = 1'b0;
  logic [SW+1:0] cpu_addr = '0;
  logic [7:0] cpu_wdata = '0, cpu_rdata;
  logic [N-1:0] plan_word;
  logic plan_valid, plan_last, plan_pop = 1'b0;
  logic ev_alloc, ev_reject, ev_ec_done, ev_plan_done;

  pscop dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_alloc = 0, n_reject = 0, n_empty_ec = 0, n_contention = 0,
      n_swap = 0, n_wait = 0, n_miss = 0, n_online = 0, n_restart = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  int mP[N], mPh[N], mC[N];            // parameters the model uses
  int mEC;
  bit pend[N];
  bit mmiss;
  longint unsigned ec_count;           // ECs since start
  logic [N-1:0] exp_word [MAXP][W];
  int exp_cycles [MAXP];
  // pending parameter change applied before model plan chg_plan
  int chg_plan = -1;
  int chg_slot[4], chg_P[4], chg_C[4];

  function automatic bit released(int s, longint unsigned k);
    if (mP[s] == 0) return 0;
    if (k < longint'(mPh[s])) return 0;
    return ((k - mPh[s]) % mP[s]) == 0;
  endfunction

  // Release step for EC number k. The period used between releases is the
  // one in force at the previous release, as the hardware reloads its
  // counter then; the model tracks that with a next-release time.
  longint unsigned nxt_rel[N];
  function automatic void release_ec(longint unsigned k);
    for (int s = 0; s < N; s++) begin
      if (mP[s] != 0 && nxt_rel[s] == k) begin
        if (pend[s]) mmiss = 1;
        pend[s] = 1;
        nxt_rel[s] = k + mP[s];
      end
    end
  endfunction

  function automatic void model_start();
    ec_count = 0;
    mmiss = 0;
    for (int s = 0; s < N; s++) begin
      pend[s] = 0;
      nxt_rel[s] = mPh[s];
    end
    release_ec(0);
  endfunction

  // Builds model plan q; returns the number of accepted transactions.
  function automatic void model_plan(int q);
    int acc = 0;
    if (q == chg_plan) begin
      for (int i = 0; i < 4; i++) begin
        // a new period counts from the next reload, as in the hardware
        mP[chg_slot[i]] = chg_P[i];
        mC[chg_slot[i]] = chg_C[i];
      end
    end
    for (int e = 0; e < W; e++) begin
      int rem = mEC;
      logic [N-1:0] wd = '0;
      for (int s = 0; s < N; s++) begin
        if (pend[s]) begin
          if (mC[s] <= rem) begin
            rem -= mC[s];
            wd[s] = 1'b1;
            pend[s] = 0;
            acc++;
          end else break;
        end
      end
      exp_word[q][e] = wd;
      ec_count++;
      release_ec(ec_count);
    end
    exp_cycles[q] = 3 * W + 6 * acc;
  endfunction

  // ---------------- CPU bus helpers ----------------
  task automatic cpu_write(input reg_sel_e sel, input int slot, input int data);
    @(negedge clk);
    cpu_we = 1'b1;
    cpu_addr = {sel, SW'(slot)};
    cpu_wdata = 8'(data);
    @(negedge clk);
    cpu_we = 1'b0;
  endtask

  task automatic cpu_read(input reg_sel_e sel, input int slot, output logic [7:0] d);
    @(negedge clk);
    cpu_addr = {sel, SW'(slot)};
    #1 d = cpu_rdata;
  endtask

  task automatic load_params();
    for (int s = 0; s < N; s++) begin
      cpu_write(REG_P, s, mP[s]);
      cpu_write(REG_PH, s, mPh[s]);
      cpu_write(REG_C, s, mC[s]);
    end
    cpu_write(REG_GLOBAL, GREG_EC, mEC);
  endtask

  // ---------------- monitors ----------------
  int busy_cycles = 0;
  int got_cycles [$];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_spb.busy) busy_cycles++;
    if (ev_plan_done) begin
      got_cycles.push_back(busy_cycles);
      busy_cycles = 0;
    end
    if (ev_alloc) n_alloc++;
    if (ev_reject) n_reject++;
    if (ev_ec_done && dut.u_spb.wr_data == '0) n_empty_ec++;
    if (dut.u_spb.state == SPB_SEL && !$onehot0(dut.req)) n_contention++;
    if (dut.u_spb.state == SPB_WAIT && !dut.wr_ready) n_wait++;
    if (plan_pop && plan_valid && plan_last) n_swap++;
  end

  // Reads NP plans, comparing each with the model; `slow` lets both banks
  // fill before a plan is read; a change scheduled for a plan is written to
  // the hardware while it waits.
  task automatic run_plans(input int NP, input bit slow, input int chg_at);
    logic [7:0] st;
    for (int q = 0; q < NP; q++) model_plan(q);
    for (int q = 0; q < NP; q++) begin
      if (slow || (chg_at >= 0 && q + 2 == chg_at)) begin
        // wait until the builder has filled both banks
        while (!(dut.spm_full == 2'b11 && !dut.spb_busy)) @(negedge clk);
        repeat (3) @(negedge clk);
        if (chg_at >= 0 && q + 2 == chg_at) begin
          for (int i = 0; i < 4; i++) begin
            cpu_write(REG_P, chg_slot[i], chg_P[i]);
            cpu_write(REG_C, chg_slot[i], chg_C[i]);
          end
          n_online++;
        end
        cpu_read(REG_GLOBAL, GREG_CTRL, st);
        check(st[ST_FULL0] && st[ST_FULL1] && !st[ST_BUSY] && st[ST_RUN],
              $sformatf("status %02h with both banks full", st));
      end
      for (int e = 0; e < W; e++) begin
        while (!plan_valid) @(negedge clk);
        check(plan_word == exp_word[q][e],
              $sformatf("plan %0d EC %0d: got %016h exp %016h", q, e, plan_word, exp_word[q][e]));
        check(plan_last == (e == W - 1), "plan_last flag");
        plan_pop = 1'b1;
        @(negedge clk);
        plan_pop = 1'b0;
      end
    end
    // wait for the builder to idle, then compare cycle counts
    while (got_cycles.size() < NP) @(negedge clk);
    for (int q = 0; q < NP; q++) begin
      int c = got_cycles.pop_front();
      check(c == exp_cycles[q], $sformatf("plan %0d took %0d clocks, expected %0d", q, c, exp_cycles[q]));
    end
  endtask

  task automatic stop_run();
    cpu_write(REG_GLOBAL, GREG_CTRL, 0);
    repeat (2) @(negedge clk);
    got_cycles.delete();
    busy_cycles = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. worst case of the feasibility estimate
    for (int s = 0; s < N; s++) begin
      mP[s] = 1; mPh[s] = 0; mC[s] = 11;
    end
    mEC = 250;
    load_params();
    model_start();
    got_cycles.delete(); busy_cycles = 0;
    cpu_write(REG_GLOBAL, GREG_CTRL, 1);
    run_plans(2, 1'b0, -1);
    for (int e = 0; e < W; e++)
      check(exp_word[0][e] == N'({22{1'b1}}), "worst case: 22 transactions per EC");
    check(exp_cycles[0] == 2700, "worst case plan is 2700 clocks");
    cpu_read(REG_GLOBAL, GREG_CTRL, d);
    check(d[ST_MISS] == mmiss, "deadline-miss status, worst case");
    if (mmiss) n_miss++;
    stop_run();

    // 1b. 8.9 ms EC, 20-EC plans, 125 kbit/s frames of four data bytes
    for (int s = 0; s < N; s++) begin
      mP[s] = 1 + $urandom % 20; mPh[s] = $urandom % 20; mC[s] = 20;
    end
    mEC = 254;
    load_params();
    model_start();
    got_cycles.delete(); busy_cycles = 0;
    cpu_write(REG_GLOBAL, GREG_EC, mEC);
    cpu_write(REG_GLOBAL, GREG_CTRL, 1);
    run_plans(2, 1'b0, -1);
    for (int e = 0; e < W; e++)
      check($countones(exp_word[0][e]) <= 12, "at most 12 frames of C = 20 in EC = 254");
    $display("8.9 ms EC workload: plan built in %0d and %0d clocks", exp_cycles[0], exp_cycles[1]);
    stop_run();

    // 2. register read-back
    cpu_write(REG_P, 5, 8'h5a);
    cpu_write(REG_PH, 63, 8'h3c);
    cpu_write(REG_C, 17, 8'ha5);
    cpu_read(REG_P, 5, d);  check(d == 8'h5a, "read back P");
    cpu_read(REG_PH, 63, d); check(d == 8'h3c, "read back Ph");
    cpu_read(REG_C, 17, d); check(d == 8'ha5, "read back C");
    cpu_read(REG_GLOBAL, GREG_EC, d); check(d == 8'd254, "read back EC");

    // 3. random variable sets, slow CPU, on-line change, restart
    for (int run_i = 0; run_i < 3; run_i++) begin
      for (int s = 0; s < N; s++) begin
        // run 0 is sparse (six variables, long periods) so some ECs stay empty
        if (run_i == 0) mP[s] = (s < 6) ? 6 + $urandom % 8 : 0;
        else            mP[s] = ($urandom % 8 == 0) ? 0 : 1 + $urandom % 10;
        mPh[s] = $urandom % 12;
        mC[s]  = 5 + $urandom % 40;
      end
      mEC = 120 + $urandom % 100;
      load_params();
      model_start();
      chg_plan = -1;
      if (run_i == 1) begin
        chg_plan = 3;
        for (int i = 0; i < 4; i++) begin
          chg_slot[i] = 8 * i + 1;
          chg_P[i] = 1 + $urandom % 3;
          chg_C[i] = 3 + $urandom % 10;
        end
      end
      got_cycles.delete(); busy_cycles = 0;
      cpu_write(REG_GLOBAL, GREG_CTRL, 1);
      if (run_i > 0) n_restart++;
      run_plans(5, run_i == 2, chg_plan);
      cpu_read(REG_GLOBAL, GREG_CTRL, d);
      check(d[ST_MISS] == mmiss, "deadline-miss status");
      if (mmiss) n_miss++;
      stop_run();
      cpu_read(REG_GLOBAL, GREG_CTRL, d);
      check(d[ST_RUN] == 0 && !plan_valid, "stopped and plan memory flushed");
    end

    $display("mechanisms: alloc=%0d reject=%0d empty_ec=%0d contention=%0d swap=%0d wait=%0d miss=%0d online=%0d restart=%0d",
             n_alloc, n_reject, n_empty_ec, n_contention, n_swap, n_wait, n_miss, n_online, n_restart);
    check(n_alloc > 0, "allocation happened");
    check(n_reject > 0, "rejection happened");
    check(n_empty_ec > 0, "empty EC happened");
    check(n_contention > 0, "chain contention happened");
    check(n_swap > 0, "bank swap happened");
    check(n_wait > 0, "builder wait happened");
    check(n_miss > 0, "deadline miss happened");
    check(n_online > 0, "on-line change happened");
    check(n_restart > 0, "restart happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
