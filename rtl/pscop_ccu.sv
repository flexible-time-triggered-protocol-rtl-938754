// pscop_ccu: Configuration Control Unit.
//
// The CPU's register interface to the coprocessor. An address is
// {sel[1:0], slot[SLOT_W-1:0]} (map in pscop_pkg). The CCU itself holds the
// control/status register (sel = GLOBAL, slot = GREG_CTRL): on write, bit
// CTRL_RUN starts or stops the coprocessor; on read, it returns the status
// bits (running, building, which plan-memory banks hold a plan, the bank the
// CPU reads next, deadline missed). Every other access is passed on over
// the configuration bus, where the register's owner takes it: P and Ph live
// in the VPTs, C and the EC duration in the Schedule Plan Builder. Their
// read data come back as the OR of the owners' outputs (cfg_rdata_in).
//
// Writes take effect at the clock edge where cpu_we is high; reads are
// combinational from cpu_addr. From the text: the three parameter registers
// per slot, the EC register, a control/status register that starts and
// stops the coprocessor and reports on scheduling, and the CCU's access to
// the parameter registers in the VPTs and the SPB. The address map, the
// status bits and the PARAM_W-bit data path are this design's choices.
module pscop_ccu
  import pscop_pkg::*;
#(
  parameter int unsigned PARAM_W = 8,
  parameter int unsigned SLOT_W  = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // CPU port
  input  logic                  cpu_we,
  input  logic [SLOT_W+1:0]     cpu_addr,
  input  logic [PARAM_W-1:0]    cpu_wdata,
  output logic [PARAM_W-1:0]    cpu_rdata,
  // configuration bus to the VPTs and the SPB
  output logic                  cfg_we,
  output reg_sel_e              cfg_sel,
  output logic [SLOT_W-1:0]     cfg_slot,
  output logic [PARAM_W-1:0]    cfg_wdata,
  input  logic [PARAM_W-1:0]    cfg_rdata_in,
  // control
  output logic                  run,
  // status inputs
  input  logic                  spb_busy,
  input  logic [1:0]            spm_full,
  input  logic                  spm_rd_bank,
  input  logic                  miss_any
);

  logic is_ctrl;
  logic [PARAM_W-1:0] status;

  assign cfg_sel   = reg_sel_e'(cpu_addr[SLOT_W+1:SLOT_W]);
  assign cfg_slot  = cpu_addr[SLOT_W-1:0];
  assign cfg_wdata = cpu_wdata;
  assign is_ctrl   = (cfg_sel == REG_GLOBAL) && (cfg_slot == SLOT_W'(GREG_CTRL));
  assign cfg_we    = cpu_we && !is_ctrl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                run <= 1'b0;
    else if (cpu_we && is_ctrl) run <= cpu_wdata[CTRL_RUN];
  end

  always_comb begin
    status            = '0;
    status[ST_RUN]    = run;
    status[ST_BUSY]   = spb_busy;
    status[ST_FULL0]  = spm_full[0];
    status[ST_FULL1]  = spm_full[1];
    status[ST_RDBANK] = spm_rd_bank;
    status[ST_MISS]   = miss_any;
  end

  assign cpu_rdata = is_ctrl ? status : cfg_rdata_in;

endmodule
