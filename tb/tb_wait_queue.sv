// tb_wait_queue: self-checking test of the Distance scheme's wait queue.
// Instructions with some unknown source times are pushed; every cycle random
// (register, time) pairs are broadcast over a small register range, so that
// entries often match, sometimes on both sources and sometimes in the very
// cycle they are pushed. A model list in age order predicts which entries
// have all times known, and with which times (the first matching broadcast
// port wins for a source), and a random subset of those is popped.
module tb_wait_queue;
  import issue_pkg::*;

  localparam int DEPTH = 8, NI = DISPATCH_W, NB = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   [NI-1:0]      push_v, push_k1, push_k2;
  instr_t               push_i  [NI];
  logic   [TIME_W-1:0]  push_t1 [NI], push_t2 [NI];
  logic   [NB-1:0]      bc_v;
  preg_t                bc_preg [NB];
  logic   [TIME_W-1:0]  bc_time [NB];
  logic   [DEPTH-1:0]   rdy_v, pop;
  instr_t               ent_i  [DEPTH];
  logic   [TIME_W-1:0]  ent_t1 [DEPTH], ent_t2 [DEPTH];
  logic   [$clog2(DEPTH+1)-1:0] count;

  wait_queue #(.DEPTH(DEPTH), .N_IN(NI), .N_BC(NB)) dut (.*);

  typedef struct {
    instr_t i; bit k1; logic [TIME_W-1:0] t1; bit k2; logic [TIME_W-1:0] t2;
  } ment_t;

  ment_t mq [$];
  int checks = 0, failures = 0, n_wake = 0, n_push_wake = 0, n_pop = 0, tag = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  function automatic ment_t snoop(input ment_t x);
    ment_t y;
    y = x;
    for (int b = 0; b < NB; b++) begin
      if (bc_v[b] && !y.k1 && bc_preg[b] == x.i.src1) begin y.k1 = 1'b1; y.t1 = bc_time[b]; end
      if (bc_v[b] && !y.k2 && bc_preg[b] == x.i.src2) begin y.k2 = 1'b1; y.t2 = bc_time[b]; end
    end
    return y;
  endfunction

  initial begin
    push_v = '0; push_k1 = '0; push_k2 = '0; bc_v = '0; pop = '0;
    for (int p = 0; p < NI; p++) begin push_i[p] = '0; push_t1[p] = '0; push_t2[p] = '0; end
    for (int b = 0; b < NB; b++) begin bc_preg[b] = '0; bc_time[b] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      int room, npop;
      @(negedge clk);
      check(int'(count) == mq.size(), "count");
      for (int k = 0; k < DEPTH; k++) begin
        bit e;
        e = (k < mq.size()) && mq[k].k1 && mq[k].k2;
        check(rdy_v[k] == e, $sformatf("rdy_v[%0d]", k));
        if (e) begin
          check(ent_i[k].tag == mq[k].i.tag, "tag");
          check(ent_t1[k] == mq[k].t1 && ent_t2[k] == mq[k].t2, $sformatf("times of entry %0d", k));
        end
      end
      npop = 0;
      for (int k = 0; k < DEPTH; k++) begin
        pop[k] = rdy_v[k] && $urandom_range(0, 1) == 0;
        npop += int'(pop[k]);
      end
      n_pop += npop;
      for (int b = 0; b < NB; b++) begin
        bc_v[b] = $urandom_range(0, 2) == 0;
        bc_preg[b] = preg_t'($urandom_range(0, 11));
        bc_time[b] = TIME_W'(c + $urandom_range(0, 5));
      end
      room = DEPTH - mq.size() + npop;
      push_v = '0;
      for (int p = 0; p < NI; p++) begin
        push_i[p] = '0;
        push_i[p].tag = 6'(tag + p);
        push_i[p].src1_v = 1'b1;
        push_i[p].src2_v = $urandom_range(0, 1) == 0;
        push_i[p].src1 = preg_t'($urandom_range(0, 11));
        push_i[p].src2 = preg_t'($urandom_range(0, 11));
        push_k1[p] = $urandom_range(0, 2) == 0;
        push_k2[p] = !push_i[p].src2_v || $urandom_range(0, 1) == 0;
        push_t1[p] = TIME_W'($urandom_range(0, 1000));
        push_t2[p] = TIME_W'($urandom_range(0, 1000));
        if (p < room && $urandom_range(0, 3) == 0) push_v[p] = 1'b1;
      end
      @(posedge clk);
      for (int k = DEPTH - 1; k >= 0; k--) if (pop[k]) mq.delete(k);
      foreach (mq[k]) begin
        ment_t y;
        y = snoop(mq[k]);
        if ((y.k1 && !mq[k].k1) || (y.k2 && !mq[k].k2)) n_wake++;
        mq[k] = y;
      end
      for (int p = 0; p < NI; p++) if (push_v[p]) begin
        ment_t x, y;
        x.i = push_i[p]; x.k1 = push_k1[p]; x.t1 = push_t1[p]; x.k2 = push_k2[p]; x.t2 = push_t2[p];
        y = snoop(x);
        if ((y.k1 && !x.k1) || (y.k2 && !x.k2)) n_push_wake++;
        mq.push_back(y);
        tag++;
      end
      tag = tag % 64;
    end
    check(n_wake > 0 && n_push_wake > 0 && n_pop > 0, "coverage");
    $display("wake-ups=%0d wake-ups on entry=%0d pops=%0d", n_wake, n_push_wake, n_pop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
