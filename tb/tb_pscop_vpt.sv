// tb_pscop_vpt: self-checking test of one Variable's Production Timer.
//
// Writes P and Ph through the configuration bus, reads them back, then
// pulses init and ec_next and checks that a request appears exactly in ECs
// Ph, Ph+P, Ph+2P, ... (worked out from the parameters, not from the
// counter), that the daisy chain and the slot number on the bus follow the
// grant, that ack
// drops the request only while granted, that a request left pending into
// its next release sets the miss flag, and that P = 0 never requests.
module tb_pscop_vpt;
  import pscop_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  reg_sel_e cfg_sel = REG_P;
  logic [5:0] cfg_slot = '0;
  logic [7:0] cfg_wdata = '0, cfg_rdata;
  logic init = 1'b0, ec_next = 1'b0, chain_in = 1'b1, chain_out, ack = 1'b0;
  logic [5:0] bus_data;
  logic req, miss;

  pscop_vpt #(.PARAM_W(8), .SLOT_W(6), .SLOT(9)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input reg_sel_e s, input int slot, input int d);
    @(negedge clk); cfg_we = 1; cfg_sel = s; cfg_slot = 6'(slot); cfg_wdata = 8'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic pulse_init();
    @(negedge clk); init = 1; @(negedge clk); init = 0;
  endtask
  task automatic pulse_ec();
    @(negedge clk); ec_next = 1; @(negedge clk); ec_next = 0;
  endtask
  task automatic do_ack();
    @(negedge clk); ack = 1; @(negedge clk); ack = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // parameters of another slot must not land here
    wr(REG_P, 3, 77);
    wr(REG_P, 9, 4); wr(REG_PH, 9, 2); wr(REG_C, 9, 33);
    wr(REG_GLOBAL, 9, 55);
    @(negedge clk); cfg_sel = REG_P; cfg_slot = 9; #1 check(cfg_rdata == 4, "P read back");
    cfg_sel = REG_PH; #1 check(cfg_rdata == 2, "Ph read back");
    cfg_sel = REG_C;  #1 check(cfg_rdata == 0, "C is not held in the VPT");
    cfg_slot = 3;     #1 check(cfg_rdata == 0, "not addressed reads zero");

    // release pattern over 14 ECs, served right away
    pulse_init();
    for (int k = 0; k < 14; k++) begin
      automatic bit due = (k >= 2) && ((k - 2) % 4 == 0);
      @(negedge clk);
      check(req == due, $sformatf("EC %0d request %0d expected %0d", k, req, due));
      check(chain_out == !due, "chain_out follows request");
      if (due) begin
        #1 check(bus_data == 9, "slot number on bus when granted");
        chain_in = 0;     #1 check(bus_data == 0, "bus idle when not granted");
        do_ack();
        check(req == 1, "ack without grant keeps request");
        chain_in = 1;
        do_ack();
        check(req == 0, "ack with grant drops request");
      end else begin
        #1 check(bus_data == 0, "bus idle without request");
      end
      pulse_ec();
    end
    check(!miss, "no miss while served");

    // leave the request pending over a release: miss
    pulse_init();
    for (int k = 0; k < 7; k++) pulse_ec();
    @(negedge clk);
    check(req && miss, "unserved request until next release sets miss");
    pulse_init();
    @(negedge clk);
    check(!miss, "init clears miss");

    // P = 0: never requests
    wr(REG_P, 9, 0); wr(REG_PH, 9, 0);
    pulse_init();
    for (int k = 0; k < 5; k++) begin
      @(negedge clk); check(!req, "P = 0 never requests");
      pulse_ec();
    end

    // P = 1, Ph = 0: every EC
    wr(REG_P, 9, 1);
    pulse_init();
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); check(req, "P = 1 requests every EC");
      do_ack();
      pulse_ec();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
