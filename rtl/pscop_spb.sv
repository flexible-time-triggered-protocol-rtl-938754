// pscop_spb: Schedule Plan Builder.
//
// Builds one plan of PLAN_ECS elementary cycles (ECs) at a time. It holds
// the parameter registers the CPU writes into it over the configuration bus:
// a table of transaction durations C, one per VPT slot, and the EC duration.
// For the EC being built it keeps the EC time still free (`rem`) and the EC
// word, one bit per slot (bit s = slot s, slot 0 being the highest-priority
// VPT), the coding of the FTT-CAN EC trigger message data field.
//
// In state SEL the SPB looks at the end of the VPT daisy chain. If some VPT
// requests allocation, the granted VPT's slot number is on the shared bus;
// the SPB looks up its C and compares it with `rem`:
//   * C <= rem: the transaction is accepted. A1 takes C off rem, A2 sets the
//     slot's bit, A3 acknowledges the VPT, A4 and A5 let the request drop and
//     the chain ripple to the next winner; then SEL again. 6 clocks.
//   * C > rem, or no request left: the EC is closed. E1 writes the EC word to
//     the plan memory (SPM), E2 pulses `ec_next` so the VPTs advance to the
//     next EC, and reloads rem. 3 clocks.
// Building a plan of W ECs with A accepted transactions takes 3*W + 6*A
// clocks. The text gives the 6-clock and 3-clock costs and the accept/reject
// rule; which step falls in which clock, and the two settling clocks, are
// this design's. A rejected request stays pending in its VPT. After the last
// EC of a plan the SPB waits in WAIT until the SPM has a free bank.
//
// run high starts the builder: in IDLE, once the SPM is free, it pulses
// `init` (the VPTs load their phases) and goes to SEL. run low stops it from
// any state. alloc, reject, ec_done and plan_done are one-clock event
// pulses. The C table has no reset: the CPU writes every slot it uses.
module pscop_spb
  import pscop_pkg::*;
#(
  parameter int unsigned N_VPT    = 64,
  parameter int unsigned PARAM_W  = 8,
  parameter int unsigned PLAN_ECS = 20,
  parameter int unsigned SLOT_W   = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  // configuration bus (from the CCU)
  input  logic               cfg_we,
  input  reg_sel_e           cfg_sel,
  input  logic [SLOT_W-1:0]  cfg_slot,
  input  logic [PARAM_W-1:0] cfg_wdata,
  output logic [PARAM_W-1:0] cfg_rdata,   // zero unless addressed
  // global timing to the VPTs
  output logic               init,
  output logic               ec_next,
  // daisy chain and shared bus
  output logic               chain_head,  // into VPT_1
  input  logic               chain_tail,  // out of VPT_N: high = no request
  input  logic [SLOT_W-1:0]  bus_data,    // slot number of the granted VPT
  output logic               ack,
  // plan memory write port
  output logic               wr_en,
  output logic [N_VPT-1:0]   wr_data,
  input  logic               wr_ready,    // write bank is free
  // status and events
  output spb_state_e         state,
  output logic               busy,
  output logic [$clog2(PLAN_ECS+1)-1:0] ec_idx,
  output logic               alloc,
  output logic               reject,
  output logic               ec_done,
  output logic               plan_done
);

  localparam int unsigned EC_W = $clog2(PLAN_ECS + 1);

  logic [PARAM_W-1:0] c_tab [N_VPT];
  logic [PARAM_W-1:0] ec_len;

  spb_state_e         nxt;
  logic [PARAM_W-1:0] rem_q, c_q, c_bus;
  logic [SLOT_W-1:0]  id_q;
  logic [N_VPT-1:0]   word_q;
  logic               any_req, fits, last_ec;

  // parameter registers
  always_ff @(posedge clk) begin
    if (cfg_we && cfg_sel == REG_C) c_tab[cfg_slot] <= cfg_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ec_len <= '0;
    else if (cfg_we && cfg_sel == REG_GLOBAL && cfg_slot == SLOT_W'(GREG_EC))
      ec_len <= cfg_wdata;
  end

  always_comb begin
    cfg_rdata = '0;
    if (cfg_sel == REG_C) cfg_rdata = c_tab[cfg_slot];
    if (cfg_sel == REG_GLOBAL && cfg_slot == SLOT_W'(GREG_EC)) cfg_rdata = ec_len;
  end

  assign c_bus      = c_tab[bus_data];
  assign any_req    = ~chain_tail;
  assign fits       = (c_bus <= rem_q);
  assign last_ec    = (ec_idx == EC_W'(PLAN_ECS - 1));
  assign chain_head = 1'b1;

  always_comb begin
    nxt = state;
    unique case (state)
      SPB_IDLE: if (run && wr_ready) nxt = SPB_SEL;
      SPB_SEL:  nxt = (any_req && fits) ? SPB_A1 : SPB_E1;
      SPB_A1:   nxt = SPB_A2;
      SPB_A2:   nxt = SPB_A3;
      SPB_A3:   nxt = SPB_A4;
      SPB_A4:   nxt = SPB_A5;
      SPB_A5:   nxt = SPB_SEL;
      SPB_E1:   nxt = SPB_E2;
      SPB_E2:   nxt = last_ec ? SPB_WAIT : SPB_SEL;
      SPB_WAIT: if (wr_ready) nxt = SPB_SEL;
      default:  nxt = SPB_IDLE;
    endcase
    if (!run) nxt = SPB_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= SPB_IDLE;
      rem_q  <= '0;
      c_q    <= '0;
      id_q   <= '0;
      word_q <= '0;
      ec_idx <= '0;
    end else begin
      state <= nxt;
      unique case (state)
        SPB_IDLE: begin
          rem_q  <= ec_len;
          word_q <= '0;
          ec_idx <= '0;
        end
        SPB_SEL: begin
          c_q  <= c_bus;
          id_q <= bus_data;
        end
        SPB_A1:  rem_q <= rem_q - c_q;
        SPB_A2:  word_q[id_q] <= 1'b1;
        SPB_E2: begin
          rem_q  <= ec_len;
          word_q <= '0;
          ec_idx <= last_ec ? '0 : ec_idx + 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign init      = (state == SPB_IDLE) && run && wr_ready;
  assign ec_next   = (state == SPB_E2);
  assign ack       = (state == SPB_A3);
  assign wr_en     = (state == SPB_E1);
  assign wr_data   = word_q;
  assign busy      = (state != SPB_IDLE) && (state != SPB_WAIT);
  assign alloc     = (state == SPB_SEL) && any_req && fits;
  assign reject    = (state == SPB_SEL) && any_req && !fits;
  assign ec_done   = (state == SPB_E2);
  assign plan_done = (state == SPB_E2) && last_ec;

  // An EC word is only written into a free bank.
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> wr_ready);

endmodule
