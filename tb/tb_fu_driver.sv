// tb_fu_driver: random instruction-stream driver and checker for the
// First-use issue scheme (used by tb_first_use_issue and tb_issue_logic_top).
//
// It plays the rest of an out-of-order core around the issue logic: it
// renames a random program over 16 logical registers onto the 96 physical
// registers (a physical register is recycled only when it is unmapped,
// produced and no waiting instruction reads it), keeps at most 64
// instructions in flight, offers groups of up to 8 in program order, and
// models the functional units: ALU latency 1, multiply 3, loads 1 (hit) or 7
// (miss), at most WB_W results signalled per cycle (the rest wait).
// Checks, counted in `checks`/`failures`:
//   - every issued instruction is in flight and issues once;
//   - every source was signalled as produced in an earlier cycle;
//   - per cycle at most ISSUE_W issues and no more than the units per class;
//   - every dispatched instruction issues, and all N_INSTR are dispatched.
// Event counters report how often each mechanism happened. Inputs are driven
// after the falling edge and outputs sampled 2 time units later.
module tb_fu_driver
  import issue_pkg::*;
#(
  parameter int unsigned N_INSTR = 2000,
  parameter int unsigned SEED    = 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  output logic   [DISPATCH_W-1:0]           disp_v,
  output instr_t                            disp_i  [DISPATCH_W],
  input  logic   [$clog2(DISPATCH_W+1)-1:0] disp_cnt,
  output logic   [WB_W-1:0]                 wb_v,
  output preg_t                             wb_preg [WB_W],
  input  logic   [ISSUE_W-1:0]              iss_v,
  input  instr_t                            iss_i   [ISSUE_W],
  input  logic   [$clog2(DISPATCH_W+1)-1:0] ev_to_rq,
  input  logic   [$clog2(DISPATCH_W+1)-1:0] ev_to_fut,
  input  logic   [$clog2(DISPATCH_W+1)-1:0] ev_to_fut2,
  input  logic   [$clog2(DISPATCH_W+1)-1:0] ev_to_ibuf,
  input  logic                              ev_stall,
  input  logic   [$clog2(WB_W+1)-1:0]       ev_fwd,
  output logic                              done,
  output int                                checks,
  output int                                failures,
  output int                                n_rq, n_fut, n_fut2, n_ibuf, n_stall, n_fwd,
  output int                                cycles
);

  localparam int NL = 16;

  int          map [NL];
  bit          mapped [NUM_PREGS];
  bit          produced [NUM_PREGS];
  int          prod_cyc [NUM_PREGS];
  int          readers [NUM_PREGS];
  int          free_pregs [$];
  int          free_tags [$];
  instr_t      pend [$];
  bit          inflight [64];
  instr_t      fl_i [64];
  int          comp_t [$];
  int          comp_p [$];
  int          n_gen, n_disp, n_iss, cyc;
  int unsigned rs;

  function automatic int rnd(input int n);
    rs = rs * 1103515245 + 12345;
    return int'((rs >> 8) % n);
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL fu_driver cycle %0d: %s", cyc, msg);
  endtask

  task automatic gen_instr();
    instr_t in;
    int     c, ls1, ls2, ld;
    in = '0;
    c = rnd(10);
    in.fu      = (c < 3) ? FU_MEM : (c < 4) ? FU_MUL : FU_ALU;
    in.is_load = (in.fu == FU_MEM) && (rnd(10) < 7);
    ls1 = rnd(NL); ls2 = rnd(NL);
    // many near-term reuses to create two-operand and non-first-use waits
    in.src1_v = rnd(10) < 9;
    in.src2_v = (in.fu != FU_MEM || !in.is_load) && rnd(10) < 7;
    in.src1   = preg_t'(map[ls1]);
    in.src2   = preg_t'(map[ls2]);
    in.dst_v  = !(in.fu == FU_MEM && !in.is_load);
    in.lat    = (in.fu == FU_MUL) ? 3 : 1;
    in.tag    = 6'(free_tags.pop_front());
    if (in.src1_v) readers[in.src1]++;
    if (in.src2_v) readers[in.src2]++;
    if (in.dst_v) begin
      ld = rnd(NL);
      in.dst = preg_t'(free_pregs.pop_front());
      mapped[map[ld]] = 1'b0;
      map[ld] = int'(in.dst);
      mapped[in.dst] = 1'b1;
      produced[in.dst] = 1'b0;
    end
    inflight[in.tag] = 1'b1;
    fl_i[in.tag] = in;
    pend.push_back(in);
    n_gen++;
  endtask

  initial begin
    rs = SEED;
    checks = 0; failures = 0; done = 1'b0;
    n_rq = 0; n_fut = 0; n_fut2 = 0; n_ibuf = 0; n_stall = 0; n_fwd = 0;
    n_gen = 0; n_disp = 0; n_iss = 0; cyc = 0; cycles = 0;
    for (int p = 0; p < NUM_PREGS; p++) begin
      mapped[p] = (p < NL); produced[p] = 1'b1; prod_cyc[p] = -1; readers[p] = 0;
      if (p >= NL) free_pregs.push_back(p);
    end
    for (int l = 0; l < NL; l++) map[l] = l;
    for (int t = 0; t < 64; t++) begin free_tags.push_back(t); inflight[t] = 1'b0; end
    disp_v = '0; wb_v = '0;
    for (int d = 0; d < DISPATCH_W; d++) disp_i[d] = '0;
    for (int w = 0; w < WB_W; w++) wb_preg[w] = '0;
    @(posedge rst_n);
    forever begin
      int sent, cls_used [NUM_FU_TYPES], k;
      @(negedge clk);
      cyc++;
      if (!done) cycles = cyc;
      // refill the rename buffer
      while (pend.size() < DISPATCH_W && n_gen < N_INSTR && free_tags.size() > 0 && free_pregs.size() > 0)
        gen_instr();
      for (int d = 0; d < DISPATCH_W; d++) begin
        disp_v[d] = d < pend.size();
        disp_i[d] = (d < pend.size()) ? pend[d] : '0;
      end
      // results due this cycle, at most WB_W of them
      wb_v = '0;
      sent = 0;
      k = 0;
      while (k < comp_t.size()) begin
        if (comp_t[k] <= cyc && sent < WB_W) begin
          wb_v[sent] = 1'b1;
          wb_preg[sent] = preg_t'(comp_p[k]);
          produced[comp_p[k]] = 1'b1;
          prod_cyc[comp_p[k]] = cyc;
          sent++;
          comp_t.delete(k);
          comp_p.delete(k);
        end else k++;
      end
      #2;
      // dispatch outcome
      if (int'(disp_cnt) > pend.size()) fail("disp_cnt larger than offered");
      for (int d = 0; d < int'(disp_cnt) && pend.size() > 0; d++) begin
        void'(pend.pop_front());
        n_disp++;
      end
      n_rq += int'(ev_to_rq); n_fut += int'(ev_to_fut); n_fut2 += int'(ev_to_fut2);
      n_ibuf += int'(ev_to_ibuf); n_fwd += int'(ev_fwd);
      if (ev_stall) n_stall++;
      // issue checks
      for (int c = 0; c < NUM_FU_TYPES; c++) cls_used[c] = 0;
      for (int s = 0; s < ISSUE_W; s++) begin
        if (iss_v[s]) begin
          instr_t in;
          in = iss_i[s];
          checks++;
          if (!inflight[in.tag] || fl_i[in.tag] != in) fail($sformatf("issue of unknown tag %0d", in.tag));
          else begin
            inflight[in.tag] = 1'b0;
            if (in.src1_v && !(produced[in.src1] && prod_cyc[in.src1] < cyc))
              fail($sformatf("tag %0d issued before src1 p%0d", in.tag, in.src1));
            if (in.src2_v && !(produced[in.src2] && prod_cyc[in.src2] < cyc))
              fail($sformatf("tag %0d issued before src2 p%0d", in.tag, in.src2));
            if (in.src1_v) readers[in.src1]--;
            if (in.src2_v) readers[in.src2]--;
            cls_used[int'(in.fu)]++;
            if (in.dst_v) begin
              comp_p.push_back(int'(in.dst));
              comp_t.push_back(cyc + (in.is_load ? ((rnd(4) == 0) ? 7 : 1) : int'(in.lat)));
            end
            free_tags.push_back(int'(in.tag));
            n_iss++;
          end
        end
      end
      for (int c = 0; c < NUM_FU_TYPES; c++) begin
        checks++;
        if (cls_used[c] > int'(fu_units(c))) fail($sformatf("class %0d over-issued", c));
      end
      // recycle physical registers
      for (int p = 0; p < NUM_PREGS; p++) begin
        bit listed;
        listed = 1'b0;
        foreach (free_pregs[q]) if (free_pregs[q] == p) listed = 1'b1;
        if (!listed && !mapped[p] && produced[p] && readers[p] == 0 && p >= 0) begin
          // a produced register whose value is dead goes back to the free list
          free_pregs.push_back(p);
        end
      end
      if (n_gen == N_INSTR && n_disp == N_INSTR && n_iss == N_INSTR && comp_t.size() == 0) begin
        checks++;
        done = 1'b1;
      end
    end
  end

endmodule
