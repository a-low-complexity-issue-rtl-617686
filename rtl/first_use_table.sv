// first_use_table: the First-use table of the First-use issue scheme.
//
// One entry per physical register. While a register is not yet available,
// its entry can hold the first (oldest) instruction that reads it. An
// instruction waiting for two registers is copied into both entries and each
// copy's pointer names the other entry; an instruction waiting for one
// register has a NIL pointer. When a register is produced its entry is
// looked up: with a NIL pointer the instruction is forwarded to the ready
// queue, otherwise the partner entry's pointer is set to NIL so that the
// second production forwards it. Entry, pointer and the forwarding rule are
// the document's; the port structure is this design's choice.
//
// Completions are handled before dispatch writes and, within a cycle, in
// port order, so two completions that free both operands of one instruction
// in the same cycle forward it exactly once.
//
// Interface: wb_v/wb_preg (registers produced this cycle), wr_* (dispatch
// insertions: instruction, first entry, whether a second entry is used and
// which), fwd_v/fwd_i (one forwarded instruction per completion port,
// combinational), occupied (registered entry-valid bits, read by dispatch
// to decide whether a non-ready operand is a first use). All updates take
// effect at the next rising edge.
module first_use_table
  import issue_pkg::*;
#(
  parameter int unsigned N_REGS = NUM_PREGS,
  parameter int unsigned N_WB   = WB_W,
  parameter int unsigned N_WR   = DISPATCH_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic   [N_WB-1:0]   wb_v,
  input  preg_t               wb_preg [N_WB],
  input  logic   [N_WR-1:0]   wr_v,
  input  instr_t              wr_i    [N_WR],
  input  preg_t               wr_a    [N_WR],
  input  logic   [N_WR-1:0]   wr_two,
  input  preg_t               wr_b    [N_WR],
  output logic   [N_WB-1:0]   fwd_v,
  output instr_t              fwd_i   [N_WB],
  output logic   [N_REGS-1:0] occupied
);

  instr_t             ent_i   [N_REGS];
  logic  [N_REGS-1:0] ent_v;
  logic  [N_REGS-1:0] ptr_v;          // 0 = NIL
  preg_t              ptr     [N_REGS];

  logic  [N_REGS-1:0] ent_v_c, ptr_v_c;   // after completions
  logic  [N_REGS-1:0] ent_v_n, ptr_v_n;   // after dispatch writes

  assign occupied = ent_v;

  always_comb begin
    ent_v_c = ent_v;
    ptr_v_c = ptr_v;
    for (int w = 0; w < N_WB; w++) begin
      fwd_v[w] = 1'b0;
      fwd_i[w] = ent_i[wb_preg[w]];
      if (wb_v[w] && ent_v_c[wb_preg[w]]) begin
        if (!ptr_v_c[wb_preg[w]]) fwd_v[w] = 1'b1;
        else                      ptr_v_c[ptr[wb_preg[w]]] = 1'b0;
        ent_v_c[wb_preg[w]] = 1'b0;
      end
    end
  end

  always_comb begin
    ent_v_n = ent_v_c;
    ptr_v_n = ptr_v_c;
    for (int d = 0; d < N_WR; d++) begin
      if (wr_v[d]) begin
        ent_v_n[wr_a[d]] = 1'b1;
        ptr_v_n[wr_a[d]] = wr_two[d];
        if (wr_two[d]) begin
          ent_v_n[wr_b[d]] = 1'b1;
          ptr_v_n[wr_b[d]] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_v <= '0;
      ptr_v <= '0;
    end else begin
      ent_v <= ent_v_n;
      ptr_v <= ptr_v_n;
    end
  end

  always_ff @(posedge clk) begin
    for (int d = 0; d < N_WR; d++) begin
      if (wr_v[d]) begin
        ent_i[wr_a[d]] <= wr_i[d];
        ptr[wr_a[d]]   <= wr_b[d];
        if (wr_two[d]) begin
          ent_i[wr_b[d]] <= wr_i[d];
          ptr[wr_b[d]]   <= wr_a[d];
        end
      end
    end
  end

  // Dispatch only claims entries that are free: a register has one first use.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < N_WR; d++) begin
        if (wr_v[d]) begin
          assert (!ent_v[wr_a[d]]) else $error("first_use_table: entry %0d already taken", wr_a[d]);
          if (wr_two[d])
            assert (!ent_v[wr_b[d]] && wr_b[d] != wr_a[d])
              else $error("first_use_table: bad second entry %0d", wr_b[d]);
        end
      end
    end
  end

endmodule
