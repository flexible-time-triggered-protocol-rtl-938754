// pscop: Planning Scheduler CoProcessor for the FTT-CAN master node.
//
// Builds FTT-CAN schedule plans in hardware. The CPU writes, for each of up
// to N_VPT variables, its period P and initial phase Ph (in elementary
// cycles, ECs) and its transaction duration C (in EC time units), plus the EC
// duration, then sets the run bit. From then on the coprocessor builds plans
// of PLAN_ECS ECs back to back into a two-bank plan memory: while the CPU
// reads (dispatches) one plan, the next is built in the other bank. Each plan
// word is the N_VPT-bit EC schedule (bit s set = slot s transmits in that EC),
// coded like the data field of the EC trigger message.
//
// Inside (see each module): one Variable's Production Timer (VPT) per slot,
// chained in a daisy chain from slot 0 (highest priority) to slot N_VPT-1;
// the Schedule Plan Builder (SPB), which serves the chain's winner and
// accepts its transaction while it fits the EC; the Schedule Plan Memory
// (SPM); and the Configuration Control Unit (CCU), the CPU's register port.
// The shared bus on which the granted VPT gives the SPB its slot number, and
// the read data of the configuration bus, are the OR of all outputs, each
// unit driving zero unless selected.
//
// CPU port: cpu_we/cpu_addr/cpu_wdata write a register at the clock edge,
// cpu_rdata reads cpu_addr combinationally (map in pscop_pkg). Plan port:
// plan_word is the head EC word of the read bank while plan_valid is high,
// plan_pop takes it, plan_last marks the last EC of a plan. Building a plan
// of W ECs with A accepted transactions takes 3*W + 6*A clocks.
module pscop
  import pscop_pkg::*;
#(
  parameter int unsigned N_VPT    = 64,  // number of VPTs (variables)
  parameter int unsigned PARAM_W  = 8,   // parameter resolution in bits
  parameter int unsigned PLAN_ECS = 20,  // ECs per plan
  localparam int unsigned SLOT_W  = (N_VPT > 2) ? $clog2(N_VPT) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // CPU register port
  input  logic               cpu_we,
  input  logic [SLOT_W+1:0]  cpu_addr,
  input  logic [PARAM_W-1:0] cpu_wdata,
  output logic [PARAM_W-1:0] cpu_rdata,
  // plan read port
  output logic [N_VPT-1:0]   plan_word,
  output logic               plan_valid,
  output logic               plan_last,
  input  logic               plan_pop,
  // events, for monitoring
  output logic               ev_alloc,
  output logic               ev_reject,
  output logic               ev_ec_done,
  output logic               ev_plan_done
);

  // configuration bus
  logic               cfg_we;
  reg_sel_e           cfg_sel;
  logic [SLOT_W-1:0]  cfg_slot;
  logic [PARAM_W-1:0] cfg_wdata, cfg_rdata_or, cfg_rdata_spb;
  logic [PARAM_W-1:0] cfg_rdata [N_VPT];

  // SPB <-> VPTs
  logic               init, ec_next, ack;
  logic [SLOT_W-1:0]  bus_or;
  logic [SLOT_W-1:0]  bus_data [N_VPT];
  logic [N_VPT:0]     chain;
  logic [N_VPT-1:0]   req, miss;

  // SPB <-> SPM, CCU
  logic               run;
  logic               wr_en, wr_ready;
  logic [N_VPT-1:0]   wr_data;
  logic [1:0]         spm_full;
  logic               spm_wr_bank, spm_rd_bank, spb_busy;
  spb_state_e         spb_state;
  logic [$clog2(PLAN_ECS+1)-1:0] ec_idx;

  pscop_ccu #(.PARAM_W(PARAM_W), .SLOT_W(SLOT_W)) u_ccu (
    .clk, .rst_n,
    .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
    .cfg_we, .cfg_sel, .cfg_slot, .cfg_wdata,
    .cfg_rdata_in(cfg_rdata_or),
    .run,
    .spb_busy, .spm_full, .spm_rd_bank,
    .miss_any(|miss)
  );

  pscop_spb #(
    .N_VPT(N_VPT), .PARAM_W(PARAM_W), .PLAN_ECS(PLAN_ECS),
    .SLOT_W(SLOT_W)
  ) u_spb (
    .clk, .rst_n, .run,
    .cfg_we, .cfg_sel, .cfg_slot, .cfg_wdata, .cfg_rdata(cfg_rdata_spb),
    .init, .ec_next,
    .chain_head(chain[0]), .chain_tail(chain[N_VPT]),
    .bus_data(bus_or), .ack,
    .wr_en, .wr_data, .wr_ready,
    .state(spb_state), .busy(spb_busy), .ec_idx,
    .alloc(ev_alloc), .reject(ev_reject),
    .ec_done(ev_ec_done), .plan_done(ev_plan_done)
  );

  pscop_spm #(.N_VPT(N_VPT), .PLAN_ECS(PLAN_ECS)) u_spm (
    .clk, .rst_n, .flush(!run),
    .wr_en, .wr_data, .wr_ready,
    .rd_pop(plan_pop), .rd_data(plan_word), .rd_valid(plan_valid),
    .rd_last(plan_last),
    .full(spm_full), .wr_bank(spm_wr_bank), .rd_bank(spm_rd_bank)
  );

  for (genvar s = 0; s < N_VPT; s++) begin : g_vpt
    pscop_vpt #(
      .PARAM_W(PARAM_W), .SLOT_W(SLOT_W), .SLOT(s)
    ) u_vpt (
      .clk, .rst_n,
      .cfg_we, .cfg_sel, .cfg_slot, .cfg_wdata,
      .cfg_rdata(cfg_rdata[s]),
      .init, .ec_next,
      .chain_in(chain[s]), .chain_out(chain[s+1]),
      .bus_data(bus_data[s]), .ack,
      .req(req[s]), .miss(miss[s])
    );
  end

  always_comb begin
    bus_or       = '0;
    cfg_rdata_or = cfg_rdata_spb;
    for (int s = 0; s < N_VPT; s++) begin
      bus_or       |= bus_data[s];
      cfg_rdata_or |= cfg_rdata[s];
    end
  end

  // At most one VPT is granted, so at most one drives the shared bus.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0(req & chain[N_VPT-1:0]));

endmodule
