// tb_pscop_spb: self-checking test of the Schedule Plan Builder.
//
// The VPTs are replaced by a small model here: 8 requesters, a priority
// chain (lowest pending index wins) that puts the winner's slot number on
// the bus, and random new requests added on every ec_next. Random durations
// C and the EC length are written into the builder's parameter registers
// over the configuration bus and read back. The expected EC word is worked out from the pending set and the
// EC length: take pending requesters in index order while C fits, stop at
// the first that does not. The test checks every written word, that each
// EC costs exactly 3 + 6*(accepted) clocks, the init pulse on start, that
// the builder waits while the plan memory has no free bank, and stop.
module tb_pscop_spb;
  import pscop_pkg::*;
  localparam int N = 8, W = 4;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  int ec_len = 60;
  logic cfg_we = 1'b0;
  reg_sel_e cfg_sel = REG_C;
  logic [2:0] cfg_slot = '0;
  logic [7:0] cfg_wdata = '0, cfg_rdata;
  logic init, ec_next, chain_head, chain_tail, ack;
  logic [2:0] bus_data;
  logic wr_en, wr_ready = 1'b1;
  logic [N-1:0] wr_data;
  spb_state_e state;
  logic busy, alloc, reject, ec_done, plan_done;
  logic [$clog2(W+1)-1:0] ec_idx;

  pscop_spb #(.N_VPT(N), .PARAM_W(8), .PLAN_ECS(W), .SLOT_W(3)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // requester model
  logic [N-1:0] pend = '0;
  int cdur[N];
  int winner;
  always_comb begin
    winner = -1;
    for (int i = N - 1; i >= 0; i--) if (pend[i]) winner = i;
    chain_tail = (pend == '0) || !chain_head;
    bus_data = '0;
    if (winner >= 0) bus_data = 3'(winner);
  end

  // expected word for the current EC, computed when the EC starts
  logic [N-1:0] exp_word;
  int exp_acc;
  function automatic void predict();
    int rem = ec_len;
    exp_word = '0; exp_acc = 0;
    for (int i = 0; i < N; i++) if (pend[i]) begin
      if (cdur[i] <= rem) begin rem -= cdur[i]; exp_word[i] = 1; exp_acc++; end
      else break;
    end
  endfunction

  int ec_cycles = 0, n_init = 0, n_words = 0, n_waited = 0, n_rej = 0;
  bit started = 0;
  always @(posedge clk) if (rst_n) begin
    if (init) n_init++;
    if (reject) n_rej++;
    if (state == SPB_WAIT && !wr_ready) n_waited++;
    if (busy && rst_n) ec_cycles++;
    if (ack) begin
      check(winner >= 0, "ack with a request");
      if (winner >= 0) pend[winner] <= 1'b0;
    end
    if (wr_en) begin
      n_words++;
      check(wr_data == exp_word, $sformatf("word %0d: %b expected %b", n_words, wr_data, exp_word));
    end
    if (ec_done) begin
      check(ec_cycles == 3 + 6 * exp_acc,
            $sformatf("EC took %0d clocks, expected %0d", ec_cycles, 3 + 6 * exp_acc));
      ec_cycles = 0;
    end
  end

  // new requests and prediction at every EC start
  always @(negedge clk) begin
    if ((state == SPB_SEL && !started) || (ec_next_d)) begin
      predict();
      started = 1;
    end
  end
  logic ec_next_d = 0;
  always @(posedge clk) begin
    ec_next_d <= ec_next;
    if (ec_next || init) begin
      for (int i = 0; i < N; i++) if ($urandom % 3 == 0) pend[i] <= 1'b1;
    end
  end

  task automatic wr(input reg_sel_e s, input int slot, input int d);
    @(negedge clk); cfg_we = 1; cfg_sel = s; cfg_slot = 3'(slot); cfg_wdata = 8'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) cdur[i] = 4 + $urandom % 20;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) wr(REG_C, i, cdur[i]);
    wr(REG_GLOBAL, GREG_EC, ec_len);
    wr(REG_P, 0, 8'hff);   // not the builder's: must change nothing
    for (int i = 0; i < N; i++) begin
      @(negedge clk); cfg_sel = REG_C; cfg_slot = 3'(i);
      #1 check(cfg_rdata == 8'(cdur[i]), "C read back");
    end
    cfg_sel = REG_GLOBAL; cfg_slot = 3'(GREG_EC);
    #1 check(cfg_rdata == 8'(ec_len), "EC read back");
    cfg_sel = REG_P; #1 check(cfg_rdata == 0, "P is not held in the builder");
    repeat (3) @(negedge clk);
    check(state == SPB_IDLE && !busy, "idle while stopped");
    run = 1;
    // three plans with free banks
    while (n_words < 3 * W) @(negedge clk);
    // no free bank after the fourth plan: the builder must wait
    while (!(n_words == 4 * W && state == SPB_E2)) @(negedge clk);
    wr_ready = 0;
    repeat (30) @(negedge clk);
    check(state == SPB_WAIT && n_words == 4 * W, "waits for a free bank");
    wr_ready = 1;
    repeat (2) @(negedge clk);
    check(busy, "resumes when a bank is free");
    while (n_words < 6 * W) @(negedge clk);
    run = 0;
    @(negedge clk); @(negedge clk);
    check(state == SPB_IDLE, "stops");
    check(n_init == 1, "one init pulse on start");
    check(n_waited > 0, "builder waited");
    check(n_rej > 0, "a transaction was rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
