// tb_ibuffer: self-checking test of the I-buffer in both organisations
// (g_mode[0]: out-of-order with associative wake-up, g_mode[1]: in-order).
//
// The test keeps a register scoreboard of its own: registers become ready
// through the completion ports (visible in the scoreboard one cycle later)
// and ready registers are randomly made busy again when nothing in the
// buffer reads them. Instructions with random, partly ready sources are
// pushed, and a random subset of the offered candidates is granted. A model
// list in age order predicts exactly which entries must be offered: in
// out-of-order mode every entry whose sources were produced before this
// cycle, in in-order mode the run of entries from the oldest whose sources
// are ready in the scoreboard (of which a random prefix is granted).
// The test also requires that younger entries issued ahead of older ones in
// out-of-order mode, that the in-order buffer issued several entries in one
// cycle, and that the buffer filled up.
module tb_ibuffer;
  import issue_pkg::*;

  localparam int DEPTH = 8, NI = DISPATCH_W, NW = WB_W, NR = NUM_PREGS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int chk [2], fl [2], n_ooo [2], n_full [2];
  int n_run = 0;
  bit fin [2];

  for (genvar m = 0; m < 2; m++) begin : g_mode
    logic   [NI-1:0]            push_v, push_r1, push_r2;
    instr_t                     push_i [NI];
    logic   [NW-1:0]            wb_v;
    preg_t                      wb_preg [NW];
    logic   [NR-1:0]            preg_ready;
    logic   [DEPTH-1:0]         cand_v, grant;
    instr_t                     cand_i [DEPTH];
    logic   [$clog2(DEPTH+1)-1:0] count;

    ibuffer #(.DEPTH(DEPTH), .OOO(m == 0), .N_IN(NI), .N_WB(NW), .N_REGS(NR)) dut (.*);

    instr_t mq [$];
    bit     mr1 [$], mr2 [$];
    bit     busy [NR];
    int     tag = 0;

    task automatic check(input bit ok, input string msg);
      chk[m]++;
      if (!ok) begin fl[m]++; if (fl[m] < 10) $display("FAIL mode %0d: %s", m, msg); end
    endtask

    function automatic bit read_in_buffer(input int r);
      foreach (mq[k]) if ((mq[k].src1_v && mq[k].src1 == r) || (mq[k].src2_v && mq[k].src2 == r)) return 1'b1;
      return 1'b0;
    endfunction

    initial begin
      chk[m] = 0; fl[m] = 0; n_ooo[m] = 0; n_full[m] = 0; fin[m] = 1'b0;
      push_v = '0; push_r1 = '0; push_r2 = '0; wb_v = '0; grant = '0;
      for (int p = 0; p < NI; p++) push_i[p] = '0;
      for (int w = 0; w < NW; w++) wb_preg[w] = '0;
      for (int r = 0; r < NR; r++) busy[r] = (r % 3 == 0);
      for (int r = 0; r < NR; r++) preg_ready[r] = !busy[r];
      @(posedge rst_n);
      for (int c = 0; c < 3000; c++) begin
        bit nb [NR];
        int room, first_granted;
        bit run;
        @(negedge clk);
        for (int r = 0; r < NR; r++) preg_ready[r] = !busy[r];
        #1;
        // expected candidates
        check(int'(count) == mq.size(), "count");
        run = 1'b1;
        if (mq.size() == DEPTH) n_full[m]++;
        for (int k = 0; k < DEPTH; k++) begin
          bit e;
          if (m == 0) e = (k < mq.size()) && mr1[k] && mr2[k];
          else begin
            run = run && (k < mq.size()) &&
                  (!mq[k].src1_v || !busy[mq[k].src1]) && (!mq[k].src2_v || !busy[mq[k].src2]);
            e = run;
          end
          check(cand_v[k] == e, $sformatf("cand_v[%0d] = %0b", k, cand_v[k]));
          if (e) check(cand_i[k].tag == mq[k].tag, "cand tag");
        end
        // random grant of offered candidates
        // (in-order mode: a prefix of the offered run)
        first_granted = -1;
        for (int k = 0; k < DEPTH; k++) begin
          grant[k] = cand_v[k] && ($urandom_range(0, 2) != 0);
          if (m == 1 && k > 0 && !grant[k-1]) grant[k] = 1'b0;
          if (grant[k] && first_granted < 0) first_granted = k;
          if (m == 1 && grant[k] && k > 0) n_run++;
        end
        if (first_granted > 0) n_ooo[m]++;
        // completions of busy registers
        for (int r = 0; r < NR; r++) nb[r] = busy[r];
        wb_v = '0;
        for (int w = 0; w < NW; w++) begin
          int r;
          r = $urandom_range(0, NR-1);
          if (nb[r] && $urandom_range(0, 1) == 0) begin
            wb_v[w] = 1'b1; wb_preg[w] = preg_t'(r); nb[r] = 1'b0;
          end
        end
        // pushes, sources seen after this cycle's completions
        room = DEPTH - mq.size();
        push_v = '0;
        for (int p = 0; p < NI; p++) begin
          push_i[p] = '0;
          push_i[p].tag = 6'(tag + p);
          push_i[p].src1_v = $urandom_range(0, 3) != 0;
          push_i[p].src2_v = $urandom_range(0, 1) != 0;
          push_i[p].src1 = preg_t'($urandom_range(0, NR-1));
          push_i[p].src2 = preg_t'($urandom_range(0, NR-1));
          push_r1[p] = !push_i[p].src1_v || !nb[push_i[p].src1];
          push_r2[p] = !push_i[p].src2_v || !nb[push_i[p].src2];
          if (p < room && $urandom_range(0, 3) == 0) push_v[p] = 1'b1;
        end
        // model update at the edge
        @(posedge clk);
        for (int k = mq.size() - 1; k >= 0; k--) if (grant[k]) begin
          mq.delete(k); mr1.delete(k); mr2.delete(k);
        end
        foreach (mq[k]) begin
          mr1[k] = mr1[k] || (mq[k].src1_v && !nb[mq[k].src1]);
          mr2[k] = mr2[k] || (mq[k].src2_v && !nb[mq[k].src2]);
        end
        for (int p = 0; p < NI; p++) if (push_v[p]) begin
          mq.push_back(push_i[p]);
          mr1.push_back(push_r1[p]);
          mr2.push_back(push_r2[p]);
          tag++;
        end
        tag = tag % 64;
        // make some ready registers busy again (not read by waiting entries)
        for (int r = 0; r < NR; r++) begin
          busy[r] = nb[r];
          if (!busy[r] && $urandom_range(0, 19) == 0 && !read_in_buffer(r)) busy[r] = 1'b1;
        end
      end
      check(n_full[m] > 0, "buffer never full");
      if (m == 0) check(n_ooo[m] > 0, "no out-of-order issue");
      else begin
        check(n_ooo[m] == 0, "in-order buffer issued out of order");
        check(n_run > 0, "in-order buffer never issued more than one entry");
      end
      fin[m] = 1'b1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    fork
      wait (fin[0] && fin[1]);
      begin repeat (10000) @(posedge clk); fl[0]++; $display("FAIL watchdog"); end
    join_any
    $display("out-of-order issues ahead of older entries: %0d", n_ooo[0]);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1], fl[0] + fl[1]);
    $finish;
  end

endmodule
