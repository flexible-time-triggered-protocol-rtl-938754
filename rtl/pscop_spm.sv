// pscop_spm: Schedule Plan Memory.
//
// Two banks, each a FIFO of PLAN_ECS words of N_VPT bits (one word per EC of
// a plan). The Schedule Plan Builder fills the write bank one EC word at a
// time; when the bank's last word is written the bank becomes full and the
// write side moves to the other bank. The CPU reads the full read bank word
// by word (rd_data shows the head word combinationally while rd_valid is
// high; rd_pop takes it); popping the last word frees the bank and the read
// side moves on. So one plan is built while the previous one is dispatched.
// wr_ready tells the builder whether its bank is free. flush (held while the
// coprocessor is stopped) empties both banks and points both sides at bank 0.
//
// Follows the text: two banks of 20 x 64-bit FIFO memory. This design's
// choices: asynchronous read of the head word, the full/free handshake
// between the two sides and the flush on stop.
module pscop_spm #(
  parameter int unsigned N_VPT    = 64,
  parameter int unsigned PLAN_ECS = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  // write side (Schedule Plan Builder)
  input  logic             wr_en,
  input  logic [N_VPT-1:0] wr_data,
  output logic             wr_ready,
  // read side (CPU)
  input  logic             rd_pop,
  output logic [N_VPT-1:0] rd_data,
  output logic             rd_valid,
  output logic             rd_last,    // head word is the plan's last EC
  // status
  output logic [1:0]       full,
  output logic             wr_bank,
  output logic             rd_bank
);

  localparam int unsigned PTR_W = (PLAN_ECS > 1) ? $clog2(PLAN_ECS) : 1;

  logic [N_VPT-1:0] mem [2][PLAN_ECS];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;

  assign wr_ready = ~full[wr_bank];
  assign rd_valid = full[rd_bank];
  assign rd_data  = mem[rd_bank][rd_ptr];
  assign rd_last  = (rd_ptr == PTR_W'(PLAN_ECS - 1));

  always_ff @(posedge clk) begin
    if (wr_en && wr_ready) mem[wr_bank][wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= '0;
      wr_bank <= 1'b0;
      rd_bank <= 1'b0;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
    end else if (flush) begin
      full    <= '0;
      wr_bank <= 1'b0;
      rd_bank <= 1'b0;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
    end else begin
      if (wr_en && wr_ready) begin
        if (wr_ptr == PTR_W'(PLAN_ECS - 1)) begin
          wr_ptr        <= '0;
          full[wr_bank] <= 1'b1;
          wr_bank       <= ~wr_bank;
        end else begin
          wr_ptr <= wr_ptr + 1'b1;
        end
      end
      if (rd_pop && rd_valid) begin
        if (rd_last) begin
          rd_ptr        <= '0;
          full[rd_bank] <= 1'b0;
          rd_bank       <= ~rd_bank;
        end else begin
          rd_ptr <= rd_ptr + 1'b1;
        end
      end
    end
  end

endmodule
