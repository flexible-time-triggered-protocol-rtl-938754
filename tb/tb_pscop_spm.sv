// tb_pscop_spm: self-checking test of the two-bank plan memory.
//
// Uses small plans (4 ECs of 16 bits). Fills bank 0, checks that it becomes
// readable and that writing moves to bank 1, fills bank 1, checks that
// wr_ready drops with both banks full and that a write then is ignored,
// reads both plans back in order with the last-word flag, writes and reads
// at the same time, and checks that flush empties everything.
module tb_pscop_spm;
  localparam int N = 16, W = 4;
  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  logic wr_en = 1'b0, wr_ready, rd_pop = 1'b0, rd_valid, rd_last;
  logic [N-1:0] wr_data = '0, rd_data;
  logic [1:0] full;
  logic wr_bank, rd_bank;

  pscop_spm #(.N_VPT(N), .PLAN_ECS(W)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [N-1:0] pat(int plan, int e);
    return N'(16'h1000 * (plan + 1) + 16'h0011 * (e + 1));
  endfunction

  task automatic write_plan(int plan);
    for (int e = 0; e < W; e++) begin
      @(negedge clk); wr_en = 1; wr_data = pat(plan, e);
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic read_plan(int plan);
    for (int e = 0; e < W; e++) begin
      @(negedge clk);
      check(rd_valid, "word valid");
      check(rd_data == pat(plan, e), $sformatf("plan %0d word %0d: %h", plan, e, rd_data));
      check(rd_last == (e == W - 1), "last flag");
      rd_pop = 1; @(negedge clk); rd_pop = 0;
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!rd_valid && wr_ready && full == 0, "empty after reset");
    write_plan(0);
    check(full == 2'b01 && wr_bank == 1 && rd_valid && wr_ready, "bank 0 full, writing bank 1");
    write_plan(1);
    check(full == 2'b11 && !wr_ready, "both banks full");
    @(negedge clk); wr_en = 1; wr_data = '1; @(negedge clk); wr_en = 0;
    read_plan(0);
    check(full == 2'b10 && rd_bank == 1 && wr_ready && wr_bank == 0, "bank 0 freed");
    // write plan 2 into bank 0 while reading plan 1 from bank 1
    fork
      write_plan(2);
      read_plan(1);
    join
    read_plan(2);
    check(!rd_valid && full == 0, "all read");
    write_plan(3);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    check(!rd_valid && full == 0 && wr_bank == 0 && rd_bank == 0, "flush empties");
    write_plan(4);
    read_plan(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
