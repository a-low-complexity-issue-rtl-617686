// tb_first_use_issue: self-checking test of the First-use issue scheme in
// its three organisations: with an out-of-order I-buffer (default), with an
// in-order I-buffer, and the basic scheme without I-buffer. Each instance is
// driven by tb_fu_driver with a random renamed program; the test also
// requires that each steering case (ready queue, First-use table with one
// and with two entries, I-buffer, dispatch stall, forwarding) occurred, and
// that the basic scheme never uses the I-buffer.
module tb_first_use_issue;
  import issue_pkg::*;

  localparam int NCFG = 3;
  localparam int N    = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   [DISPATCH_W-1:0]           disp_v   [NCFG];
  instr_t                            disp_i   [NCFG][DISPATCH_W];
  logic   [$clog2(DISPATCH_W+1)-1:0] disp_cnt [NCFG];
  logic   [WB_W-1:0]                 wb_v     [NCFG];
  preg_t                             wb_preg  [NCFG][WB_W];
  logic   [ISSUE_W-1:0]              iss_v    [NCFG];
  instr_t                            iss_i    [NCFG][ISSUE_W];
  logic   [$clog2(DISPATCH_W+1)-1:0] e_rq [NCFG], e_fut [NCFG], e_fut2 [NCFG], e_ib [NCFG];
  logic                              e_stall [NCFG];
  logic   [$clog2(WB_W+1)-1:0]       e_fwd [NCFG];
  logic                              done [NCFG];
  int chk [NCFG], fl [NCFG], c_rq [NCFG], c_fut [NCFG], c_fut2 [NCFG], c_ib [NCFG],
      c_stall [NCFG], c_fwd [NCFG], cyc [NCFG];

  first_use_issue #(.IBUF_EN(1'b1), .IBUF_OOO(1'b1)) dut0 (
    .clk, .rst_n, .disp_v(disp_v[0]), .disp_i(disp_i[0]), .disp_cnt(disp_cnt[0]),
    .wb_v(wb_v[0]), .wb_preg(wb_preg[0]), .iss_v(iss_v[0]), .iss_i(iss_i[0]),
    .ev_to_rq(e_rq[0]), .ev_to_fut(e_fut[0]), .ev_to_fut2(e_fut2[0]), .ev_to_ibuf(e_ib[0]),
    .ev_stall(e_stall[0]), .ev_fwd(e_fwd[0]));
  first_use_issue #(.IBUF_EN(1'b1), .IBUF_OOO(1'b0)) dut1 (
    .clk, .rst_n, .disp_v(disp_v[1]), .disp_i(disp_i[1]), .disp_cnt(disp_cnt[1]),
    .wb_v(wb_v[1]), .wb_preg(wb_preg[1]), .iss_v(iss_v[1]), .iss_i(iss_i[1]),
    .ev_to_rq(e_rq[1]), .ev_to_fut(e_fut[1]), .ev_to_fut2(e_fut2[1]), .ev_to_ibuf(e_ib[1]),
    .ev_stall(e_stall[1]), .ev_fwd(e_fwd[1]));
  first_use_issue #(.IBUF_EN(1'b0)) dut2 (
    .clk, .rst_n, .disp_v(disp_v[2]), .disp_i(disp_i[2]), .disp_cnt(disp_cnt[2]),
    .wb_v(wb_v[2]), .wb_preg(wb_preg[2]), .iss_v(iss_v[2]), .iss_i(iss_i[2]),
    .ev_to_rq(e_rq[2]), .ev_to_fut(e_fut[2]), .ev_to_fut2(e_fut2[2]), .ev_to_ibuf(e_ib[2]),
    .ev_stall(e_stall[2]), .ev_fwd(e_fwd[2]));

  for (genvar g = 0; g < NCFG; g++) begin : g_drv
    tb_fu_driver #(.N_INSTR(N), .SEED(11 + g)) drv (
      .clk, .rst_n, .disp_v(disp_v[g]), .disp_i(disp_i[g]), .disp_cnt(disp_cnt[g]),
      .wb_v(wb_v[g]), .wb_preg(wb_preg[g]), .iss_v(iss_v[g]), .iss_i(iss_i[g]),
      .ev_to_rq(e_rq[g]), .ev_to_fut(e_fut[g]), .ev_to_fut2(e_fut2[g]), .ev_to_ibuf(e_ib[g]),
      .ev_stall(e_stall[g]), .ev_fwd(e_fwd[g]),
      .done(done[g]), .checks(chk[g]), .failures(fl[g]),
      .n_rq(c_rq[g]), .n_fut(c_fut[g]), .n_fut2(c_fut2[g]), .n_ibuf(c_ib[g]),
      .n_stall(c_stall[g]), .n_fwd(c_fwd[g]), .cycles(cyc[g]));
  end

  int checks = 0, failures = 0;

  task automatic finish();
    for (int g = 0; g < NCFG; g++) begin
      checks += chk[g]; failures += fl[g];
      $display("cfg %0d: cycles=%0d IPC=%0.2f rq=%0d fut=%0d fut2=%0d ibuf=%0d stall=%0d fwd=%0d",
               g, cyc[g], real'(N) / real'(cyc[g]), c_rq[g], c_fut[g], c_fut2[g], c_ib[g],
               c_stall[g], c_fwd[g]);
      checks += 5;
      if (!done[g])                         begin failures++; $display("FAIL cfg %0d did not finish", g); end
      if (c_rq[g] == 0 || c_fut[g] == 0)    begin failures++; $display("FAIL cfg %0d: rq/fut unused", g); end
      if (c_fut2[g] == 0 || c_fwd[g] == 0)  begin failures++; $display("FAIL cfg %0d: no two-entry wait", g); end
      if (c_stall[g] == 0)                  begin failures++; $display("FAIL cfg %0d: no stall", g); end
      if ((g < 2) != (c_ib[g] > 0))         begin failures++; $display("FAIL cfg %0d: I-buffer use %0d", g, c_ib[g]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin wait (done[0] && done[1] && done[2]); end
      begin repeat (40000) @(posedge clk); $display("FAIL watchdog"); end
    join_any
    finish();
  end

endmodule
