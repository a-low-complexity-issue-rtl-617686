// tb_distance_issue: self-checking test of the Distance issue scheme with
// its 8-entry wait queue (default) and in the basic form without wait queue.
// Each instance is driven by tb_ds_driver with a random renamed program
// containing loads that hit or miss. The test also requires that each
// mechanism occurred: direct scheduling into the issue queue, a wait-queue
// entry and its departure (default form only), a slot pushed to a later row
// by a full row, a dispatch stall and a load write-back.
module tb_distance_issue;
  import issue_pkg::*;

  localparam int NCFG = 2;
  localparam int N    = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   [DISPATCH_W-1:0]           disp_v   [NCFG];
  instr_t                            disp_i   [NCFG][DISPATCH_W];
  logic   [$clog2(DISPATCH_W+1)-1:0] disp_cnt [NCFG];
  logic   [2:0]                      ld_v     [NCFG];
  preg_t                             ld_p     [NCFG][3];
  logic   [ISSUE_W-1:0]              iss_v    [NCFG];
  instr_t                            iss_i    [NCFG][ISSUE_W];
  logic   [TIME_W-1:0]               now      [NCFG];
  logic   [$clog2(DISPATCH_W+1)-1:0] e_iq [NCFG], e_wq [NCFG];
  logic   [1:0]                      e_out [NCFG];
  logic   [3:0]                      e_conf [NCFG];
  logic                              e_stall [NCFG];
  logic                              done [NCFG];
  int chk [NCFG], fl [NCFG], c_iq [NCFG], c_wq [NCFG], c_out [NCFG], c_conf [NCFG],
      c_stall [NCFG], c_ld [NCFG], cyc [NCFG];

  distance_issue #(.WQ_EN(1'b1)) dut0 (
    .clk, .rst_n, .disp_v(disp_v[0]), .disp_i(disp_i[0]), .disp_cnt(disp_cnt[0]),
    .ld_wb_v(ld_v[0]), .ld_wb_preg(ld_p[0]), .iss_v(iss_v[0]), .iss_i(iss_i[0]), .now(now[0]),
    .ev_to_iq(e_iq[0]), .ev_to_wq(e_wq[0]), .ev_wq_out(e_out[0]), .ev_conflict(e_conf[0]),
    .ev_stall(e_stall[0]));
  distance_issue #(.WQ_EN(1'b0)) dut1 (
    .clk, .rst_n, .disp_v(disp_v[1]), .disp_i(disp_i[1]), .disp_cnt(disp_cnt[1]),
    .ld_wb_v(ld_v[1]), .ld_wb_preg(ld_p[1]), .iss_v(iss_v[1]), .iss_i(iss_i[1]), .now(now[1]),
    .ev_to_iq(e_iq[1]), .ev_to_wq(e_wq[1]), .ev_wq_out(e_out[1]), .ev_conflict(e_conf[1]),
    .ev_stall(e_stall[1]));

  for (genvar g = 0; g < NCFG; g++) begin : g_drv
    tb_ds_driver #(.N_INSTR(N), .SEED(21 + g), .LD_WB_W(3)) drv (
      .clk, .rst_n, .disp_v(disp_v[g]), .disp_i(disp_i[g]), .disp_cnt(disp_cnt[g]),
      .ld_wb_v(ld_v[g]), .ld_wb_preg(ld_p[g]), .iss_v(iss_v[g]), .iss_i(iss_i[g]),
      .ev_iq(int'(e_iq[g])), .ev_wq(int'(e_wq[g])), .ev_wq_out(int'(e_out[g])),
      .ev_conf(int'(e_conf[g])), .ev_stall(e_stall[g]),
      .done(done[g]), .checks(chk[g]), .failures(fl[g]),
      .n_iq(c_iq[g]), .n_wq(c_wq[g]), .n_wq_out(c_out[g]), .n_conf(c_conf[g]),
      .n_stall(c_stall[g]), .n_ldwb(c_ld[g]), .cycles(cyc[g]));
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin wait (done[0] && done[1]); end
      begin repeat (40000) @(posedge clk); $display("FAIL watchdog"); end
    join_any
    for (int g = 0; g < NCFG; g++) begin
      checks += chk[g]; failures += fl[g];
      $display("cfg %0d: cycles=%0d IPC=%0.2f iq=%0d wq=%0d wq_out=%0d conflict=%0d stall=%0d ld_wb=%0d",
               g, cyc[g], real'(N) / real'(cyc[g]), c_iq[g], c_wq[g], c_out[g], c_conf[g],
               c_stall[g], c_ld[g]);
      checks += 5;
      if (!done[g])                        begin failures++; $display("FAIL cfg %0d did not finish", g); end
      if (c_iq[g] == 0 || c_ld[g] == 0)    begin failures++; $display("FAIL cfg %0d: no iq/ld_wb", g); end
      if (c_conf[g] == 0)                  begin failures++; $display("FAIL cfg %0d: no row conflict", g); end
      if (c_stall[g] == 0)                 begin failures++; $display("FAIL cfg %0d: no stall", g); end
      if ((g == 0) != (c_wq[g] > 0 && c_out[g] == c_wq[g]))
                                           begin failures++; $display("FAIL cfg %0d: wait queue %0d/%0d", g, c_wq[g], c_out[g]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
