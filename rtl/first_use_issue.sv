// first_use_issue: the First-use issue scheme.
//
// Most register values are read at most once, so an instruction that waits
// for a value can be parked in a table indexed by the register it waits for
// instead of in an associatively searched window. Dispatch steers each
// renamed instruction, in program order, by the state of its sources:
//   (a) all sources available            -> ready queue of its unit class
//   (b) every non-ready source is the first use of that register (its
//       First-use table entry is free)   -> First-use table (one or two
//                                           entries, linked by pointers)
//   (c) otherwise                        -> I-buffer, or dispatch stalls
//                                           when the I-buffer is absent
//                                           (IBUF_EN = 0, the basic scheme)
//                                           or full.
// Dispatch is in order: the first instruction that cannot be placed stops
// the rest of the group, and disp_cnt reports how many were taken. A
// register scoreboard (one ready bit per physical register) says which
// sources are available; a dispatched destination is marked not ready and a
// completion marks it ready. Completions of this cycle are seen by dispatch
// in the same cycle, and earlier instructions of a dispatch group are seen
// by later ones.
//
// Issue takes up to ISSUE_W instructions per cycle, limited per class to the
// number of units (3 data-cache ports, 1 multiplier, 3 ALUs). An in-order
// I-buffer goes first and gives its ready entries from the oldest on, up to
// the first that cannot issue. Then classes are served in the order memory,
// multiply, ALU; within a class ready entries of an out-of-order I-buffer,
// oldest first, come before the head of the class's ready queue.
// The steering rules, the table with its pointers, the per-class in-order
// ready queues and both I-buffer organisations follow the document. The
// scoreboard, the ready-queue depth, the back-pressure rule and the issue
// priority between I-buffer and ready queues are this design's choices.
//
// Timing: an instruction whose last operand is produced in cycle t (wb_v)
// can issue from cycle t+1 on. A ready queue accepts dispatch only while
// WB_W entries stay free after this cycle, so forwards from the table are
// never refused.
module first_use_issue
  import issue_pkg::*;
#(
  parameter bit          IBUF_EN    = 1'b1,
  parameter bit          IBUF_OOO   = 1'b1,
  parameter int unsigned IBUF_DEPTH = 8,
  parameter int unsigned RQ_DEPTH   = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // dispatch group, program order (slot 0 oldest)
  input  logic   [DISPATCH_W-1:0]       disp_v,
  input  instr_t                        disp_i  [DISPATCH_W],
  output logic   [$clog2(DISPATCH_W+1)-1:0] disp_cnt,
  // produced registers
  input  logic   [WB_W-1:0]             wb_v,
  input  preg_t                         wb_preg [WB_W],
  // issued instructions
  output logic   [ISSUE_W-1:0]          iss_v,
  output instr_t                        iss_i   [ISSUE_W],
  // where this cycle's dispatched instructions went
  output logic   [$clog2(DISPATCH_W+1)-1:0] ev_to_rq,
  output logic   [$clog2(DISPATCH_W+1)-1:0] ev_to_fut,
  output logic   [$clog2(DISPATCH_W+1)-1:0] ev_to_fut2,
  output logic   [$clog2(DISPATCH_W+1)-1:0] ev_to_ibuf,
  output logic                          ev_stall,
  output logic   [$clog2(WB_W+1)-1:0]   ev_fwd
);

  localparam int unsigned RQ_PUSH = WB_W + DISPATCH_W;
  localparam int unsigned RQ_CW   = $clog2(RQ_DEPTH+1);
  localparam int unsigned IB_CW   = $clog2(IBUF_DEPTH+1);
  localparam int unsigned DC_W    = $clog2(DISPATCH_W+1);
  localparam int unsigned POP_CW  = $clog2(MAX_UNITS+1);

  // ---------------------------------------------------------------- state
  logic [NUM_PREGS-1:0] preg_ready;

  // First-use table
  logic   [DISPATCH_W-1:0] fut_wr_v, fut_wr_two;
  instr_t                  fut_wr_i [DISPATCH_W];
  preg_t                   fut_wr_a [DISPATCH_W];
  preg_t                   fut_wr_b [DISPATCH_W];
  logic   [WB_W-1:0]       fwd_v;
  instr_t                  fwd_i    [WB_W];
  logic   [NUM_PREGS-1:0]  fut_occ;

  first_use_table #(.N_REGS(NUM_PREGS), .N_WB(WB_W), .N_WR(DISPATCH_W)) u_fut (
    .clk, .rst_n,
    .wb_v, .wb_preg,
    .wr_v(fut_wr_v), .wr_i(fut_wr_i), .wr_a(fut_wr_a), .wr_two(fut_wr_two), .wr_b(fut_wr_b),
    .fwd_v, .fwd_i, .occupied(fut_occ)
  );

  // Ready queues, one per unit class
  logic   [RQ_PUSH-1:0]    rq_push_v [NUM_FU_TYPES];
  instr_t                  rq_push_i [NUM_FU_TYPES][RQ_PUSH];
  logic   [POP_CW-1:0]     rq_pop    [NUM_FU_TYPES];
  logic   [MAX_UNITS-1:0]  rq_head_v [NUM_FU_TYPES];
  instr_t                  rq_head_i [NUM_FU_TYPES][MAX_UNITS];
  logic   [RQ_CW-1:0]      rq_count  [NUM_FU_TYPES];

  for (genvar t = 0; t < NUM_FU_TYPES; t++) begin : g_rq
    ready_queue #(.DEPTH(RQ_DEPTH), .PUSH_W(RQ_PUSH), .POP_W(MAX_UNITS)) u_rq (
      .clk, .rst_n,
      .push_v(rq_push_v[t]), .push_i(rq_push_i[t]),
      .pop_cnt(rq_pop[t]),
      .head_v(rq_head_v[t]), .head_i(rq_head_i[t]),
      .count(rq_count[t])
    );
  end

  // I-buffer
  logic   [DISPATCH_W-1:0] ib_push_v, ib_push_r1, ib_push_r2;
  instr_t                  ib_push_i [DISPATCH_W];
  logic   [IBUF_DEPTH-1:0] ib_cand_v, ib_grant;
  instr_t                  ib_cand_i [IBUF_DEPTH];
  logic   [IB_CW-1:0]      ib_count;

  ibuffer #(.DEPTH(IBUF_DEPTH), .OOO(IBUF_OOO), .N_IN(DISPATCH_W), .N_WB(WB_W),
            .N_REGS(NUM_PREGS)) u_ibuf (
    .clk, .rst_n,
    .push_v(ib_push_v), .push_i(ib_push_i), .push_r1(ib_push_r1), .push_r2(ib_push_r2),
    .wb_v, .wb_preg, .preg_ready,
    .cand_v(ib_cand_v), .cand_i(ib_cand_i), .grant(ib_grant), .count(ib_count)
  );

  // ------------------------------------------------------------- dispatch
  logic [NUM_PREGS-1:0] ready_n;     // scoreboard after this cycle

  always_comb begin
    logic [NUM_PREGS-1:0] rdy, occ;
    int unsigned          rq_used [NUM_FU_TYPES];
    int unsigned          ib_used, n_ok, n_rq, n_fut, n_fut2, n_ib, n_fwd;
    logic                 stop;

    rdy = preg_ready;
    for (int w = 0; w < WB_W; w++) if (wb_v[w]) rdy[wb_preg[w]] = 1'b1;
    occ = fut_occ;

    // forwarded instructions go first into their ready queues
    n_fwd = 0;
    for (int t = 0; t < NUM_FU_TYPES; t++) begin
      rq_used[t]   = int'(rq_count[t]);
      rq_push_v[t] = '0;
      for (int p = 0; p < RQ_PUSH; p++) rq_push_i[t][p] = (p < WB_W) ? fwd_i[p] : disp_i[p-WB_W];
    end
    for (int w = 0; w < WB_W; w++) begin
      if (fwd_v[w]) begin
        rq_push_v[int'(fwd_i[w].fu)][w] = 1'b1;
        for (int cx = 0; cx < NUM_FU_TYPES; cx++) if (cx == int'(fwd_i[w].fu)) rq_used[cx]++;
        n_fwd++;
      end
    end

    ib_used = int'(ib_count);
    stop  = 1'b0;
    n_ok  = 0; n_rq = 0; n_fut = 0; n_fut2 = 0; n_ib = 0;
    fut_wr_v   = '0;
    fut_wr_two = '0;
    ib_push_v  = '0;
    ib_push_r1 = '0;
    ib_push_r2 = '0;
    for (int d = 0; d < DISPATCH_W; d++) begin
      logic  s1nr, s2nr, f1, f2;
      instr_t in;
      in            = disp_i[d];
      fut_wr_i[d]   = in;
      ib_push_i[d]  = in;
      fut_wr_a[d]   = in.src1;
      fut_wr_b[d]   = in.src2;
      s1nr = in.src1_v && !rdy[in.src1];
      s2nr = in.src2_v && !rdy[in.src2];
      if (s1nr && s2nr && in.src1 == in.src2) s2nr = 1'b0;
      f1 = s1nr && !occ[in.src1];
      f2 = s2nr && !occ[in.src2];
      if (!stop && disp_v[d]) begin
        if (!s1nr && !s2nr) begin
          // (a) all operands available
          if (rq_used[int'(in.fu)] + 1 + WB_W <= RQ_DEPTH) begin
            rq_push_v[int'(in.fu)][WB_W + d] = 1'b1;
            for (int cx = 0; cx < NUM_FU_TYPES; cx++) if (cx == int'(in.fu)) rq_used[cx]++;
            n_rq++;
          end else stop = 1'b1;
        end else if ((!s1nr || f1) && (!s2nr || f2)) begin
          // (b) every missing operand is a first use
          fut_wr_v[d]   = 1'b1;
          fut_wr_a[d]   = s1nr ? in.src1 : in.src2;
          fut_wr_two[d] = s1nr && s2nr;
          if (s1nr) occ[in.src1] = 1'b1;
          if (s2nr) occ[in.src2] = 1'b1;
          n_fut++;
          if (s1nr && s2nr) n_fut2++;
        end else begin
          // (c) a missing operand already has its first use
          if (IBUF_EN && ib_used < IBUF_DEPTH) begin
            ib_push_v[d]  = 1'b1;
            ib_push_r1[d] = !s1nr;
            ib_push_r2[d] = !s2nr;
            ib_used++;
            n_ib++;
          end else stop = 1'b1;
        end
        if (!stop) begin
          n_ok++;
          if (in.dst_v) rdy[in.dst] = 1'b0;
        end
      end
    end
    ready_n    = rdy;
    disp_cnt   = DC_W'(n_ok);
    ev_to_rq   = DC_W'(n_rq);
    ev_to_fut  = DC_W'(n_fut);
    ev_to_fut2 = DC_W'(n_fut2);
    ev_to_ibuf = DC_W'(n_ib);
    ev_fwd     = ($clog2(WB_W+1))'(n_fwd);
    ev_stall   = stop;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) preg_ready <= '1;
    else        preg_ready <= ready_n;
  end

  // ---------------------------------------------------------------- issue
  always_comb begin
    int unsigned slots, used, pop;
    int unsigned cls_used [NUM_FU_TYPES];
    logic        in_order;
    slots    = 0;
    iss_v    = '0;
    ib_grant = '0;
    for (int s = 0; s < ISSUE_W; s++) iss_i[s] = rq_head_i[0][0];
    for (int t = 0; t < NUM_FU_TYPES; t++) cls_used[t] = 0;
    // in-order I-buffer: take its ready run from the oldest entry until a
    // unit class or the issue width is exhausted
    in_order = !IBUF_OOO;
    for (int k = 0; k < IBUF_DEPTH; k++) begin
      if (in_order && ib_cand_v[k] && slots < ISSUE_W &&
          cls_used[int'(ib_cand_i[k].fu)] < fu_units(int'(ib_cand_i[k].fu))) begin
        ib_grant[k] = 1'b1;
        iss_v[slots] = 1'b1;
        iss_i[slots] = ib_cand_i[k];
        for (int cx = 0; cx < NUM_FU_TYPES; cx++) if (cx == int'(ib_cand_i[k].fu)) cls_used[cx]++;
        slots++;
      end else in_order = 1'b0;
    end
    for (int t = 0; t < NUM_FU_TYPES; t++) begin
      used = cls_used[t];
      for (int k = 0; k < IBUF_DEPTH; k++) begin
        if (IBUF_OOO && ib_cand_v[k] && int'(ib_cand_i[k].fu) == t && used < fu_units(t) && slots < ISSUE_W) begin
          ib_grant[k] = 1'b1;
          iss_v[slots] = 1'b1;
          iss_i[slots] = ib_cand_i[k];
          used++;
          slots++;
        end
      end
      pop = 0;
      for (int k = 0; k < MAX_UNITS; k++) begin
        if (rq_head_v[t][k] && pop == k && used < fu_units(t) && slots < ISSUE_W) begin
          iss_v[slots] = 1'b1;
          iss_i[slots] = rq_head_i[t][k];
          used++;
          slots++;
          pop++;
        end
      end
      rq_pop[t] = POP_CW'(pop);
    end
  end

endmodule
