// reg_avail_table: register-availability table of the Distance issue scheme.
//
// One entry per physical register: a known bit and the cycle from which the
// register's value can be used by an issuing instruction. The Distance
// scheme writes an entry when it schedules the producer (time known), when
// it sends the producer to the wait queue or schedules a load (time
// unknown), and when a load writes back (time = that cycle). The table
// itself is the document's; the reset state (every register available since
// cycle 0), the number of write ports and the rule that a later port wins
// over an earlier one writing the same register in the same cycle (later
// ports carry younger instructions) are this design's choices.
//
// Interface: wr_v/wr_preg/wr_known/wr_time write ports, applied at the next
// rising edge; known/avail_time read out the whole table (registered).
module reg_avail_table
  import issue_pkg::*;
#(
  parameter int unsigned N_REGS = NUM_PREGS,
  parameter int unsigned N_WR   = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic   [N_WR-1:0]   wr_v,
  input  preg_t               wr_preg  [N_WR],
  input  logic   [N_WR-1:0]   wr_known,
  input  logic   [TIME_W-1:0] wr_time  [N_WR],
  output logic   [N_REGS-1:0] known,
  output logic   [TIME_W-1:0] avail_time [N_REGS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      known <= '1;
      for (int r = 0; r < N_REGS; r++) avail_time[r] <= '0;
    end else begin
      for (int w = 0; w < N_WR; w++) begin
        if (wr_v[w]) begin
          known[wr_preg[w]]      <= wr_known[w];
          avail_time[wr_preg[w]] <= wr_time[w];
        end
      end
    end
  end

endmodule
