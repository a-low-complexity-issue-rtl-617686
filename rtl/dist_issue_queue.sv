// dist_issue_queue: the Issue queue of the Distance issue scheme.
//
// A circular buffer of DEPTH rows, one row per future cycle, each with WIDTH
// instruction slots (the issue width). Instructions are written into the row
// of the cycle in which they must issue; every cycle the head row is issued
// as a whole and the head pointer moves on by one, so issue needs no
// selection logic at all. The organisation, the head-row issue rule and the
// 4 x 4 size are the document's. This design's choices: the scheduler sees
// and addresses rows relative to the head (row 0 = the row issued at the
// coming clock edge), issue is registered (the head row, including anything
// written into it in the same cycle, appears on iss_v/iss_i during the next
// cycle), and the class of each occupied slot is exported so the scheduler
// can respect the number of units per class.
//
// Interface: wr_v/wr_row/wr_slot/wr_i write ports (row relative to head);
// occ_v/occ_fu occupancy relative to head; iss_v/iss_i issued row.
module dist_issue_queue
  import issue_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned WIDTH = ISSUE_W,
  parameter int unsigned N_WR  = 10
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic   [N_WR-1:0]           wr_v,
  input  logic   [$clog2(DEPTH)-1:0]  wr_row  [N_WR],
  input  logic   [$clog2(WIDTH)-1:0]  wr_slot [N_WR],
  input  instr_t                      wr_i    [N_WR],
  output logic   [WIDTH-1:0]          occ_v   [DEPTH],
  output fu_e                         occ_fu  [DEPTH][WIDTH],
  output logic   [WIDTH-1:0]          iss_v,
  output instr_t                      iss_i   [WIDTH]
);

  localparam int unsigned RW = $clog2(DEPTH);

  logic   [WIDTH-1:0] q_v [DEPTH];
  instr_t             q_i [DEPTH][WIDTH];
  logic   [RW-1:0]    head;

  function automatic logic [RW-1:0] abs_row(input logic [RW-1:0] h, input logic [RW-1:0] r);
    return RW'((int'(h) + int'(r)) % DEPTH);
  endfunction

  always_comb begin
    for (int r = 0; r < DEPTH; r++) begin
      occ_v[r] = q_v[abs_row(head, RW'(r))];
      for (int s = 0; s < WIDTH; s++) occ_fu[r][s] = q_i[abs_row(head, RW'(r))][s].fu;
    end
  end

  // head row as it stands after this cycle's writes
  logic   [WIDTH-1:0] head_v_n;
  instr_t             head_i_n [WIDTH];
  always_comb begin
    head_v_n = q_v[head];
    for (int s = 0; s < WIDTH; s++) head_i_n[s] = q_i[head][s];
    for (int w = 0; w < N_WR; w++) begin
      if (wr_v[w] && wr_row[w] == '0) begin
        head_v_n[wr_slot[w]] = 1'b1;
        head_i_n[wr_slot[w]] = wr_i[w];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      iss_v <= '0;
      for (int r = 0; r < DEPTH; r++) q_v[r] <= '0;
    end else begin
      for (int w = 0; w < N_WR; w++)
        if (wr_v[w]) q_v[abs_row(head, wr_row[w])][wr_slot[w]] <= 1'b1;
      q_v[head] <= '0;
      iss_v     <= head_v_n;
      head      <= abs_row(head, RW'(1));
    end
  end

  always_ff @(posedge clk) begin
    for (int w = 0; w < N_WR; w++)
      if (wr_v[w]) q_i[abs_row(head, wr_row[w])][wr_slot[w]] <= wr_i[w];
    iss_i <= head_i_n;
  end

  // The scheduler only writes free slots.
  always_ff @(posedge clk) begin
    if (rst_n)
      for (int w = 0; w < N_WR; w++)
        if (wr_v[w])
          assert (!occ_v[wr_row[w]][wr_slot[w]])
            else $error("dist_issue_queue: slot %0d of row %0d already taken", wr_slot[w], wr_row[w]);
  end

endmodule
