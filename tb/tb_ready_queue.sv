// tb_ready_queue: self-checking test of ready_queue against a reference
// FIFO. Every cycle a random set of push ports carries new instructions
// (tags count up), and a random number of head entries, at most those held,
// is popped. The test compares the occupancy and the POP_W head entries with
// the model, and requires that the queue was driven to full and multi-pop
// cycles happened.
module tb_ready_queue;
  import issue_pkg::*;

  localparam int DEPTH = 16, PUSH_W = 12, POP_W = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   [PUSH_W-1:0]          push_v;
  instr_t                       push_i [PUSH_W];
  logic   [$clog2(POP_W+1)-1:0] pop_cnt;
  logic   [POP_W-1:0]           head_v;
  instr_t                       head_i [POP_W];
  logic   [$clog2(DEPTH+1)-1:0] count;

  ready_queue #(.DEPTH(DEPTH), .PUSH_W(PUSH_W), .POP_W(POP_W)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_multi = 0;
  logic [TAG_W-1:0] model [$];
  logic [TAG_W-1:0] next_tag = '0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    push_v = '0; pop_cnt = '0;
    for (int p = 0; p < PUSH_W; p++) push_i[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      int room, np, npop;
      @(negedge clk);
      // compare state with the model
      check(int'(count) == model.size(), $sformatf("count %0d vs %0d", count, model.size()));
      for (int k = 0; k < POP_W; k++) begin
        check(head_v[k] == (k < model.size()), "head_v");
        if (k < model.size()) check(head_i[k].tag == model[k], $sformatf("head %0d tag", k));
      end
      if (model.size() == DEPTH) n_full++;
      // new stimulus
      npop = $urandom_range(0, (model.size() < POP_W) ? model.size() : POP_W);
      if (npop > 1) n_multi++;
      pop_cnt = ($clog2(POP_W+1))'(npop);
      room = DEPTH - model.size();
      np = 0;
      for (int p = 0; p < PUSH_W; p++) begin
        push_v[p] = 1'b0;
        push_i[p] = '0;
        push_i[p].fu = FU_ALU;
        if (np < room && $urandom_range(0, 9) < ((c / 500) % 2 == 0 ? 1 : 4)) begin
          push_v[p] = 1'b1;
          push_i[p].tag = next_tag + TAG_W'(np);
          np++;
        end
      end
      @(posedge clk);
      for (int k = 0; k < npop; k++) void'(model.pop_front());
      for (int p = 0; p < PUSH_W; p++) if (push_v[p]) begin
        model.push_back(next_tag);
        next_tag++;
      end
    end
    check(n_full > 0, "queue never full");
    check(n_multi > 0, "no multi-pop");
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
