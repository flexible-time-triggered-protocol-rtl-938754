// pscop_vpt: Variable's Production Timer, one per scheduled variable.
//
// Holds the period P and the initial phase Ph of one variable, both counted
// in elementary cycles (ECs) and written by the CPU over the configuration
// bus. A down-counter tracks the ECs left until the variable is next
// produced. On `init` the counter is loaded from Ph and the first EC of the
// first plan is evaluated; each `ec_next` pulse from the Schedule Plan
// Builder (SPB) then advances it by one EC. When the count reaches zero the
// VPT raises an allocation request and reloads P-1, so the variable is
// released in ECs Ph, Ph+P, Ph+2P, ... counted from the start.
//
// Requests are arbitrated by a daisy chain: chain_out = chain_in & ~req.
// Only the VPT that has a request and sees chain_in high is granted; it puts
// its slot number on the shared bus. Every other VPT drives zero, so the bus
// is the OR of all VPT outputs. The request drops on `ack` while granted.
// A request the SPB rejects (its transaction does not fit the EC) stays
// pending and competes again in the next EC. If a new release finds the
// previous request still pending, the deadline (equal to the period) has
// been missed: the two merge into one request and the sticky `miss` flag is
// set until the next `init`.
//
// From the text: P and Ph per VPT, the daisy chain from VPT_1 to VPT_N and
// the request towards the SPB. This design's own choices: the counter form,
// P = 0 meaning "slot unused", the carry-over of rejected requests, the miss
// flag, and a read port that drives zero unless addressed.
// Timing: req, miss and the counter are registered and change the clock
// after init/ec_next/ack; chain_out, bus_data and cfg_rdata are
// combinational.
module pscop_vpt
  import pscop_pkg::*;
#(
  parameter int unsigned PARAM_W = 8,   // parameter resolution
  parameter int unsigned SLOT_W  = 6,   // width of a slot number
  parameter int unsigned SLOT    = 0    // this VPT's slot number
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration bus (from the CCU)
  input  logic               cfg_we,
  input  reg_sel_e           cfg_sel,
  input  logic [SLOT_W-1:0]  cfg_slot,
  input  logic [PARAM_W-1:0] cfg_wdata,
  output logic [PARAM_W-1:0] cfg_rdata,   // zero unless addressed
  // global timing (from the SPB)
  input  logic               init,
  input  logic               ec_next,
  // daisy chain and shared bus
  input  logic               chain_in,
  output logic               chain_out,
  output logic [SLOT_W-1:0]  bus_data,    // zero unless granted
  input  logic               ack,
  // status
  output logic               req,
  output logic               miss
);

  logic [PARAM_W-1:0] p_q, ph_q;
  logic [PARAM_W-1:0] cnt_q;
  logic               sel_me, grant;

  assign sel_me    = (cfg_slot == SLOT_W'(SLOT));
  assign grant     = chain_in & req;
  assign chain_out = chain_in & ~req;
  assign bus_data  = grant ? SLOT_W'(SLOT) : '0;

  // parameter registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q  <= '0;
      ph_q <= '0;
    end else if (cfg_we && sel_me) begin
      if (cfg_sel == REG_P)  p_q  <= cfg_wdata;
      if (cfg_sel == REG_PH) ph_q <= cfg_wdata;
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (sel_me && cfg_sel == REG_P)  cfg_rdata = p_q;
    if (sel_me && cfg_sel == REG_PH) cfg_rdata = ph_q;
  end

  // production timer and request
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      req   <= 1'b0;
      miss  <= 1'b0;
    end else if (init) begin
      miss <= 1'b0;
      if (p_q == '0) begin
        req   <= 1'b0;
        cnt_q <= '0;
      end else if (ph_q == '0) begin
        req   <= 1'b1;
        cnt_q <= p_q - 1'b1;
      end else begin
        req   <= 1'b0;
        cnt_q <= ph_q - 1'b1;
      end
    end else if (ec_next) begin
      if (p_q != '0) begin
        if (cnt_q == '0) begin
          req   <= 1'b1;
          cnt_q <= p_q - 1'b1;
          if (req) miss <= 1'b1;
        end else begin
          cnt_q <= cnt_q - 1'b1;
        end
      end
    end else if (ack && grant) begin
      req <= 1'b0;
    end
  end

  // The SPB never acknowledges in the clock it starts or advances an EC.
  assert property (@(posedge clk) disable iff (!rst_n) !(ack && (ec_next || init)));

endmodule
