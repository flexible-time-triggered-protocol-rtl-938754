// tb_pscop_ccu: self-checking test of the Configuration Control Unit.
//
// Checks that parameter writes (per-slot and the EC register) reach the
// configuration bus with the right kind and slot, that control writes stay
// in the CCU and drive run, that parameter reads return the owners' data and
// that the status register packs the status inputs at their bit positions.
module tb_pscop_ccu;
  import pscop_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_we = 1'b0;
  logic [7:0] cpu_addr = '0, cpu_wdata = '0, cpu_rdata;
  logic cfg_we;
  reg_sel_e cfg_sel;
  logic [5:0] cfg_slot;
  logic [7:0] cfg_wdata, cfg_rdata_in = 8'h00;
  logic run;
  logic spb_busy = 0, spm_rd_bank = 0, miss_any = 0;
  logic [1:0] spm_full = '0;

  pscop_ccu #(.PARAM_W(8), .SLOT_W(6)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int seen_we = 0;
  reg_sel_e seen_sel;
  logic [5:0] seen_slot;
  logic [7:0] seen_data;
  always @(posedge clk) if (cfg_we) begin
    seen_we++; seen_sel = cfg_sel; seen_slot = cfg_slot; seen_data = cfg_wdata;
  end

  task automatic wr(input reg_sel_e s, input int slot, input int d);
    @(negedge clk); cpu_we = 1; cpu_addr = {s, 6'(slot)}; cpu_wdata = 8'(d);
    @(negedge clk); cpu_we = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!run, "reset state");
    wr(REG_PH, 42, 8'h17);
    check(seen_we == 1 && seen_sel == REG_PH && seen_slot == 42 && seen_data == 8'h17,
          "per-slot write forwarded");
    wr(REG_GLOBAL, GREG_EC, 200);
    check(seen_we == 2 && seen_sel == REG_GLOBAL && seen_slot == GREG_EC && seen_data == 200,
          "EC register write forwarded");
    wr(REG_GLOBAL, GREG_CTRL, 1);
    check(seen_we == 2, "control write not forwarded");
    check(run, "run set");
    @(negedge clk); cpu_addr = {REG_GLOBAL, 6'(GREG_EC)}; cfg_rdata_in = 8'd200;
    #1 check(cpu_rdata == 200, "EC read path");
    cpu_addr = {REG_C, 6'd3}; cfg_rdata_in = 8'h9e; #1 check(cpu_rdata == 8'h9e, "parameter read path");
    cpu_addr = {REG_GLOBAL, 6'(GREG_CTRL)};
    for (int i = 0; i < 32; i++) begin
      logic [7:0] exp;
      {miss_any, spm_rd_bank, spm_full, spb_busy} = 5'(i);
      exp = {2'b00, miss_any, spm_rd_bank, spm_full[1], spm_full[0], spb_busy, 1'b1};
      #1 check(cpu_rdata == exp, $sformatf("status %02h expected %02h", cpu_rdata, exp));
    end
    wr(REG_GLOBAL, GREG_CTRL, 0);
    check(!run, "run cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
