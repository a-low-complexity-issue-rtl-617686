// tb_issue_logic_top: end-to-end test of both issue schemes at their
// default sizes (top instantiated without parameter overrides). Each scheme
// runs its own random renamed program of N instructions through
// tb_fu_driver / tb_ds_driver, which check data-flow order, single issue,
// per-class unit limits and completion of the whole program. The test also
// counts each mechanism and fails if one never happened:
//   First-use: ready-queue dispatch, First-use table with one and with two
//              entries, forwarding from the table, I-buffer, dispatch stall;
//   Distance:  direct scheduling, wait-queue entry and departure, delay by a
//              full row, dispatch stall, load write-back.
// It prints the IPC of both schemes on the same kind of random program.
module tb_issue_logic_top;
  import issue_pkg::*;

  localparam int N = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   [DISPATCH_W-1:0]           fu_disp_v, ds_disp_v;
  instr_t                            fu_disp_i [DISPATCH_W], ds_disp_i [DISPATCH_W];
  logic   [$clog2(DISPATCH_W+1)-1:0] fu_disp_cnt, ds_disp_cnt;
  logic   [WB_W-1:0]                 fu_wb_v;
  preg_t                             fu_wb_preg [WB_W];
  logic   [ISSUE_W-1:0]              fu_iss_v, ds_iss_v;
  instr_t                            fu_iss_i [ISSUE_W], ds_iss_i [ISSUE_W];
  logic   [$clog2(DISPATCH_W+1)-1:0] fu_ev_to_rq, fu_ev_to_fut, fu_ev_to_fut2, fu_ev_to_ibuf;
  logic                              fu_ev_stall;
  logic   [$clog2(WB_W+1)-1:0]       fu_ev_fwd;
  logic   [2:0]                      ds_ld_wb_v;
  preg_t                             ds_ld_wb_preg [3];
  logic   [TIME_W-1:0]               ds_now;
  logic   [$clog2(DISPATCH_W+1)-1:0] ds_ev_to_iq, ds_ev_to_wq;
  logic   [1:0]                      ds_ev_wq_out;
  logic   [3:0]                      ds_ev_conflict;
  logic                              ds_ev_stall;

  issue_logic_top dut (.*);

  logic fu_done, ds_done;
  int fu_chk, fu_fl, fu_rq, fu_fut, fu_fut2, fu_ib, fu_stall, fu_fwd, fu_cyc;
  int ds_chk, ds_fl, ds_iq, ds_wq, ds_out, ds_conf, ds_stall, ds_ld, ds_cyc;

  tb_fu_driver #(.N_INSTR(N), .SEED(7)) fu_drv (
    .clk, .rst_n, .disp_v(fu_disp_v), .disp_i(fu_disp_i), .disp_cnt(fu_disp_cnt),
    .wb_v(fu_wb_v), .wb_preg(fu_wb_preg), .iss_v(fu_iss_v), .iss_i(fu_iss_i),
    .ev_to_rq(fu_ev_to_rq), .ev_to_fut(fu_ev_to_fut), .ev_to_fut2(fu_ev_to_fut2),
    .ev_to_ibuf(fu_ev_to_ibuf), .ev_stall(fu_ev_stall), .ev_fwd(fu_ev_fwd),
    .done(fu_done), .checks(fu_chk), .failures(fu_fl),
    .n_rq(fu_rq), .n_fut(fu_fut), .n_fut2(fu_fut2), .n_ibuf(fu_ib), .n_stall(fu_stall),
    .n_fwd(fu_fwd), .cycles(fu_cyc));

  tb_ds_driver #(.N_INSTR(N), .SEED(7), .LD_WB_W(3)) ds_drv (
    .clk, .rst_n, .disp_v(ds_disp_v), .disp_i(ds_disp_i), .disp_cnt(ds_disp_cnt),
    .ld_wb_v(ds_ld_wb_v), .ld_wb_preg(ds_ld_wb_preg), .iss_v(ds_iss_v), .iss_i(ds_iss_i),
    .ev_iq(int'(ds_ev_to_iq)), .ev_wq(int'(ds_ev_to_wq)), .ev_wq_out(int'(ds_ev_wq_out)),
    .ev_conf(int'(ds_ev_conflict)), .ev_stall(ds_ev_stall),
    .done(ds_done), .checks(ds_chk), .failures(ds_fl),
    .n_iq(ds_iq), .n_wq(ds_wq), .n_wq_out(ds_out), .n_conf(ds_conf), .n_stall(ds_stall),
    .n_ldwb(ds_ld), .cycles(ds_cyc));

  int checks, failures;

  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      wait (fu_done && ds_done);
      begin repeat (100000) @(posedge clk); $display("FAIL watchdog"); end
    join_any
    checks = fu_chk + ds_chk + 2;
    failures = fu_fl + ds_fl;
    if (!fu_done) begin failures++; $display("FAIL: First-use program did not finish"); end
    if (!ds_done) begin failures++; $display("FAIL: Distance program did not finish"); end
    need(fu_rq, "First-use: dispatch to ready queue");
    need(fu_fut, "First-use: dispatch to First-use table");
    need(fu_fut2, "First-use: two-entry First-use wait");
    need(fu_fwd, "First-use: forward from table");
    need(fu_ib, "First-use: dispatch to I-buffer");
    need(fu_stall, "First-use: dispatch stall");
    need(ds_iq, "Distance: direct scheduling");
    need(ds_wq, "Distance: wait-queue entry");
    need(ds_out, "Distance: wait-queue departure");
    need(ds_conf, "Distance: full-row delay");
    need(ds_stall, "Distance: dispatch stall");
    need(ds_ld, "Distance: load write-back");
    $display("First-use: %0d instr in %0d cycles, IPC %0.2f (rq %0d, table %0d, two-entry %0d, I-buffer %0d, stall cycles %0d)",
             N, fu_cyc, real'(N) / real'(fu_cyc), fu_rq, fu_fut, fu_fut2, fu_ib, fu_stall);
    $display("Distance:  %0d instr in %0d cycles, IPC %0.2f (direct %0d, wait queue %0d, row delays %0d, stall cycles %0d)",
             N, ds_cyc, real'(N) / real'(ds_cyc), ds_iq, ds_wq, ds_conf, ds_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
