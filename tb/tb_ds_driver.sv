// tb_ds_driver: random instruction-stream driver and checker for the
// Distance issue scheme (used by tb_distance_issue and tb_issue_logic_top).
//
// It renames a random program over 16 logical registers onto the 96
// physical registers, keeps at most 64 instructions in flight, offers groups
// of up to 8 in program order and models the data cache: a load issued in
// cycle c writes back in cycle c+1 (hit) or c+7 (miss), at most LD_WB_W
// write-backs per cycle (the rest wait). Other results need no signal: the
// scheme knows their latency.
// Checks, counted in `checks`/`failures`:
//   - every issued instruction is in flight and issues once;
//   - a source written by a non-load issued in cycle p with latency L is
//     only read by an instruction issued in cycle >= p+L; a source written
//     by a load only after the cycle of its write-back;
//   - per cycle no more issues per class than units;
//   - every dispatched instruction issues, and all N_INSTR are dispatched.
// Event counters report how often each mechanism happened.
module tb_ds_driver
  import issue_pkg::*;
#(
  parameter int unsigned N_INSTR = 2000,
  parameter int unsigned SEED    = 1,
  parameter int unsigned LD_WB_W = 3
) (
  input  logic                              clk,
  input  logic                              rst_n,
  output logic   [DISPATCH_W-1:0]           disp_v,
  output instr_t                            disp_i  [DISPATCH_W],
  input  logic   [$clog2(DISPATCH_W+1)-1:0] disp_cnt,
  output logic   [LD_WB_W-1:0]              ld_wb_v,
  output preg_t                             ld_wb_preg [LD_WB_W],
  input  logic   [ISSUE_W-1:0]              iss_v,
  input  instr_t                            iss_i   [ISSUE_W],
  input  int                                ev_iq, ev_wq, ev_wq_out, ev_conf,
  input  logic                              ev_stall,
  output logic                              done,
  output int                                checks,
  output int                                failures,
  output int                                n_iq, n_wq, n_wq_out, n_conf, n_stall, n_ldwb,
  output int                                cycles
);

  localparam int NL  = 16;
  localparam int INF = 32'h3fff_ffff;

  int          map [NL];
  bit          mapped [NUM_PREGS];
  int          avail [NUM_PREGS];     // first cycle a reader may issue
  int          readers [NUM_PREGS];
  bit          is_free [NUM_PREGS];
  int          free_pregs [$];
  int          free_tags [$];
  instr_t      pend [$];
  bit          inflight [64];
  instr_t      fl_i [64];
  int          ld_t [$];
  int          ld_p [$];
  int          n_gen, n_disp, n_iss, cyc;
  int unsigned rs;

  function automatic int rnd(input int n);
    rs = rs * 1103515245 + 12345;
    return int'((rs >> 8) % n);
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL ds_driver cycle %0d: %s", cyc, msg);
  endtask

  task automatic gen_instr();
    instr_t in;
    int     c, ls1, ls2, ld;
    in = '0;
    c = rnd(10);
    in.fu      = (c < 3) ? FU_MEM : (c < 4) ? FU_MUL : FU_ALU;
    in.is_load = (in.fu == FU_MEM) && (rnd(10) < 7);
    ls1 = rnd(NL); ls2 = rnd(NL);
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
      is_free[in.dst] = 1'b0;
      mapped[map[ld]] = 1'b0;
      map[ld] = int'(in.dst);
      mapped[in.dst] = 1'b1;
      avail[in.dst] = INF;
    end
    inflight[in.tag] = 1'b1;
    fl_i[in.tag] = in;
    pend.push_back(in);
    n_gen++;
  endtask

  initial begin
    rs = SEED;
    checks = 0; failures = 0; done = 1'b0;
    n_iq = 0; n_wq = 0; n_wq_out = 0; n_conf = 0; n_stall = 0; n_ldwb = 0;
    n_gen = 0; n_disp = 0; n_iss = 0; cyc = 0; cycles = 0;
    for (int p = 0; p < NUM_PREGS; p++) begin
      mapped[p] = (p < NL); avail[p] = 0; readers[p] = 0; is_free[p] = (p >= NL);
      if (p >= NL) free_pregs.push_back(p);
    end
    for (int l = 0; l < NL; l++) map[l] = l;
    for (int t = 0; t < 64; t++) begin free_tags.push_back(t); inflight[t] = 1'b0; end
    disp_v = '0; ld_wb_v = '0;
    for (int d = 0; d < DISPATCH_W; d++) disp_i[d] = '0;
    for (int w = 0; w < LD_WB_W; w++) ld_wb_preg[w] = '0;
    @(posedge rst_n);
    forever begin
      int sent, cls_used [NUM_FU_TYPES], k;
      @(negedge clk);
      cyc++;
      if (!done) cycles = cyc;
      while (pend.size() < DISPATCH_W && n_gen < N_INSTR && free_tags.size() > 0 && free_pregs.size() > 0)
        gen_instr();
      for (int d = 0; d < DISPATCH_W; d++) begin
        disp_v[d] = d < pend.size();
        disp_i[d] = (d < pend.size()) ? pend[d] : '0;
      end
      ld_wb_v = '0;
      sent = 0;
      k = 0;
      while (k < ld_t.size()) begin
        if (ld_t[k] <= cyc && sent < int'(LD_WB_W)) begin
          ld_wb_v[sent] = 1'b1;
          ld_wb_preg[sent] = preg_t'(ld_p[k]);
          avail[ld_p[k]] = cyc + 1;
          sent++;
          n_ldwb++;
          ld_t.delete(k);
          ld_p.delete(k);
        end else k++;
      end
      #2;
      if (int'(disp_cnt) > pend.size()) fail("disp_cnt larger than offered");
      for (int d = 0; d < int'(disp_cnt) && pend.size() > 0; d++) begin
        void'(pend.pop_front());
        n_disp++;
      end
      n_iq += ev_iq; n_wq += ev_wq; n_wq_out += ev_wq_out; n_conf += ev_conf;
      if (ev_stall) n_stall++;
      for (int c = 0; c < NUM_FU_TYPES; c++) cls_used[c] = 0;
      for (int s = 0; s < ISSUE_W; s++) begin
        if (iss_v[s]) begin
          instr_t in;
          in = iss_i[s];
          checks++;
          if (!inflight[in.tag] || fl_i[in.tag] != in) fail($sformatf("issue of unknown tag %0d", in.tag));
          else begin
            inflight[in.tag] = 1'b0;
            if (in.src1_v && avail[in.src1] > cyc)
              fail($sformatf("tag %0d issued before src1 p%0d (avail %0d)", in.tag, in.src1, avail[in.src1]));
            if (in.src2_v && avail[in.src2] > cyc)
              fail($sformatf("tag %0d issued before src2 p%0d (avail %0d)", in.tag, in.src2, avail[in.src2]));
            if (in.src1_v) readers[in.src1]--;
            if (in.src2_v) readers[in.src2]--;
            cls_used[int'(in.fu)]++;
            if (in.dst_v) begin
              if (in.is_load) begin
                ld_p.push_back(int'(in.dst));
                ld_t.push_back(cyc + ((rnd(4) == 0) ? 7 : 1));
              end else avail[in.dst] = cyc + int'(in.lat);
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
      for (int p = 0; p < NUM_PREGS; p++) begin
        if (!is_free[p] && !mapped[p] && avail[p] <= cyc && readers[p] == 0) begin
          is_free[p] = 1'b1;
          free_pregs.push_back(p);
        end
      end
      if (n_gen == N_INSTR && n_disp == N_INSTR && n_iss == N_INSTR && ld_t.size() == 0) begin
        checks++;
        done = 1'b1;
      end
    end
  end

endmodule
