// tb_first_use_table: self-checking test of first_use_table.
//
// The reference model does not use pointers: it keeps, per waiting
// instruction, the set of registers it still waits for, and expects the
// instruction to be forwarded on the completion port that removes the last
// one. The test starts with the example of the scheme's description (ADD P3
// waits for P1 and P2, a store waits for P3; the loads finish one after the
// other), then runs random insertions of one- and two-register waiters and
// random completions, several per cycle, including both registers of one
// instruction in the same cycle and registers nobody waits for. Forwarded
// tags and the occupied vector are compared every cycle.
module tb_first_use_table;
  import issue_pkg::*;

  localparam int NR = NUM_PREGS, NW = WB_W, ND = DISPATCH_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   [NW-1:0] wb_v;
  preg_t           wb_preg [NW];
  logic   [ND-1:0] wr_v, wr_two;
  instr_t          wr_i [ND];
  preg_t           wr_a [ND], wr_b [ND];
  logic   [NW-1:0] fwd_v;
  instr_t          fwd_i [NW];
  logic   [NR-1:0] occupied;

  first_use_table #(.N_REGS(NR), .N_WB(NW), .N_WR(ND)) dut (.*);

  int checks = 0, failures = 0, n_two = 0, n_same_cycle = 0, n_fwd = 0;
  // model: which tag waits on each register (-1 none) and missing counts
  int wait_tag [NR];
  int missing [64];
  int next_tag = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic clear_inputs();
    wb_v = '0; wr_v = '0; wr_two = '0;
    for (int w = 0; w < NW; w++) wb_preg[w] = '0;
    for (int d = 0; d < ND; d++) begin wr_i[d] = '0; wr_a[d] = '0; wr_b[d] = '0; end
  endtask

  // Expected forwards for the completions on the inputs; updates the model.
  task automatic settle_and_check();
    int exp_tag [NW];
    for (int w = 0; w < NW; w++) begin
      exp_tag[w] = -1;
      if (wb_v[w] && wait_tag[wb_preg[w]] >= 0) begin
        int t;
        t = wait_tag[wb_preg[w]];
        wait_tag[wb_preg[w]] = -1;
        missing[t]--;
        if (missing[t] == 0) exp_tag[w] = t;
      end
    end
    #2;
    for (int w = 0; w < NW; w++) begin
      check(fwd_v[w] == (exp_tag[w] >= 0), $sformatf("fwd_v[%0d]=%0b expected tag %0d", w, fwd_v[w], exp_tag[w]));
      if (exp_tag[w] >= 0) begin
        check(int'(fwd_i[w].tag) == exp_tag[w], $sformatf("fwd tag %0d vs %0d", fwd_i[w].tag, exp_tag[w]));
        n_fwd++;
      end
    end
    for (int d = 0; d < ND; d++) if (wr_v[d]) begin
      int t;
      t = int'(wr_i[d].tag);
      wait_tag[wr_a[d]] = t;
      missing[t] = 1;
      if (wr_two[d]) begin wait_tag[wr_b[d]] = t; missing[t] = 2; end
    end
  endtask

  task automatic check_occ();
    for (int r = 0; r < NR; r++) check(occupied[r] == (wait_tag[r] >= 0), $sformatf("occupied[%0d]", r));
  endtask

  initial begin
    for (int r = 0; r < NR; r++) wait_tag[r] = -1;
    for (int t = 0; t < 64; t++) missing[t] = 0;
    clear_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Example: ADD P3,P1,P2 (tag 2) -> entries P1 and P2; ST 0(P6),P3 (tag 3) -> entry P3
    @(negedge clk);
    clear_inputs();
    wr_v[0] = 1'b1; wr_i[0].tag = 6'd2; wr_a[0] = 7'd1; wr_two[0] = 1'b1; wr_b[0] = 7'd2;
    wr_v[1] = 1'b1; wr_i[1].tag = 6'd3; wr_a[1] = 7'd3;
    settle_and_check();
    @(negedge clk); check_occ();
    clear_inputs(); wb_v[0] = 1'b1; wb_preg[0] = 7'd1;       // first load finishes
    settle_and_check();
    @(negedge clk); check_occ();
    clear_inputs(); wb_v[0] = 1'b1; wb_preg[0] = 7'd2;       // second load: ADD forwarded
    settle_and_check();
    check(fwd_v[0] && fwd_i[0].tag == 6'd2, "example: ADD not forwarded");
    @(negedge clk); check_occ();
    clear_inputs(); wb_v[0] = 1'b1; wb_preg[0] = 7'd3;       // ADD result: ST forwarded
    settle_and_check();
    check(fwd_v[0] && fwd_i[0].tag == 6'd3, "example: ST not forwarded");
    next_tag = 4;

    for (int c = 0; c < 3000; c++) begin
      bit used [NR];
      bit tag_taken [64];
      @(negedge clk);
      for (int t = 0; t < 64; t++) tag_taken[t] = 1'b0;
      check_occ();
      clear_inputs();
      for (int r = 0; r < NR; r++) used[r] = 1'b0;
      // completions: mostly registers somebody waits for
      for (int w = 0; w < NW; w++) begin
        int r;
        r = $urandom_range(0, NR-1);
        for (int s = 0; s < NR && $urandom_range(0, 3) != 0 && wait_tag[r] < 0; s++) r = (r + 1) % NR;
        if (!used[r] && $urandom_range(0, 2) != 0) begin
          wb_v[w] = 1'b1; wb_preg[w] = preg_t'(r); used[r] = 1'b1;
        end
      end
      for (int w = 0; w < NW; w++) for (int v = w + 1; v < NW; v++)
        if (wb_v[w] && wb_v[v] && wait_tag[wb_preg[w]] >= 0 && wait_tag[wb_preg[w]] == wait_tag[wb_preg[v]])
          n_same_cycle++;
      // insertions into free entries
      for (int d = 0; d < ND; d++) begin
        int a, b;
        a = $urandom_range(0, NR-1);
        b = $urandom_range(0, NR-1);
        for (int s = 0; s < 64 && (missing[next_tag] != 0 || tag_taken[next_tag]); s++)
          next_tag = (next_tag + 1) % 64;
        if ($urandom_range(0, 2) == 0 && wait_tag[a] < 0 && !used[a] &&
            missing[next_tag] == 0 && !tag_taken[next_tag]) begin
          wr_v[d] = 1'b1; wr_a[d] = preg_t'(a); used[a] = 1'b1;
          wr_i[d].tag = 6'(next_tag); tag_taken[next_tag] = 1'b1;
          if ($urandom_range(0, 1) == 0 && wait_tag[b] < 0 && !used[b]) begin
            wr_two[d] = 1'b1; wr_b[d] = preg_t'(b); used[b] = 1'b1; n_two++;
          end
        end
      end
      settle_and_check();
    end
    check(n_two > 0 && n_same_cycle > 0 && n_fwd > 0, "coverage");
    $display("two-entry waiters=%0d same-cycle pairs=%0d forwards=%0d", n_two, n_same_cycle, n_fwd);
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
