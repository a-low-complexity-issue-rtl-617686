// tb_size_sweep: runs the buffer-size sweeps of the evaluation on random
// renamed programs and prints IPC per size.
//
// Three series, each at buffer sizes 0, 2, 4, 8, 16, 32 and 64 entries:
//   - First-use scheme with an out-of-order I-buffer (size 0 is the basic
//     scheme without I-buffer),
//   - First-use scheme with an in-order I-buffer,
//   - Distance scheme with a wait queue of that size in front of the 4 x 4
//     issue queue (size 0 is the scheme without wait queue).
// Every instance in one scheme runs the same program (same driver seed), so
// the IPC figures compare only the buffer organisation. The instruction mix
// and latencies are those of the drivers (ALU 1, multiply 3, loads 1 or 7
// cycles); they are not the benchmark programs of the evaluation, so the IPC
// values are not expected to match it, only its trends.
// Checks: all driver checks (data-flow order, unit limits, completion) in
// every instance; every instance finishes; in each series the 8-entry buffer
// reaches at least the IPC of no buffer; and at 8 entries the out-of-order
// I-buffer reaches at least the IPC of the in-order one. Larger buffers are
// not required to help: an in-order I-buffer loses IPC beyond a few entries
// because everything placed in it waits for all older entries.
module tb_size_sweep;
  import issue_pkg::*;

  localparam int NS = 7;
  localparam int N  = 1500;
  localparam int SZ [NS] = '{0, 2, 4, 8, 16, 32, 64};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // series 0: First-use, out-of-order I-buffer; 1: First-use, in-order;
  // 2: Distance, wait queue
  logic done [3][NS];
  int   chk  [3][NS], fl [3][NS], cyc [3][NS];

  for (genvar s = 0; s < 2; s++) begin : g_fu
    for (genvar k = 0; k < NS; k++) begin : g_sz
      logic   [DISPATCH_W-1:0]           disp_v;
      instr_t                            disp_i [DISPATCH_W];
      logic   [$clog2(DISPATCH_W+1)-1:0] disp_cnt, e_rq, e_fut, e_fut2, e_ib;
      logic   [WB_W-1:0]                 wb_v;
      preg_t                             wb_preg [WB_W];
      logic   [ISSUE_W-1:0]              iss_v;
      instr_t                            iss_i [ISSUE_W];
      logic                              e_stall;
      logic   [$clog2(WB_W+1)-1:0]       e_fwd;
      int n_rq, n_fut, n_fut2, n_ib, n_st, n_fw;

      first_use_issue #(
        .IBUF_EN(SZ[k] != 0), .IBUF_OOO(s == 0), .IBUF_DEPTH((SZ[k] == 0) ? 2 : SZ[k])
      ) dut (
        .clk, .rst_n, .disp_v, .disp_i, .disp_cnt, .wb_v, .wb_preg, .iss_v, .iss_i,
        .ev_to_rq(e_rq), .ev_to_fut(e_fut), .ev_to_fut2(e_fut2), .ev_to_ibuf(e_ib),
        .ev_stall(e_stall), .ev_fwd(e_fwd));

      tb_fu_driver #(.N_INSTR(N), .SEED(5)) drv (
        .clk, .rst_n, .disp_v, .disp_i, .disp_cnt, .wb_v, .wb_preg, .iss_v, .iss_i,
        .ev_to_rq(e_rq), .ev_to_fut(e_fut), .ev_to_fut2(e_fut2), .ev_to_ibuf(e_ib),
        .ev_stall(e_stall), .ev_fwd(e_fwd),
        .done(done[s][k]), .checks(chk[s][k]), .failures(fl[s][k]),
        .n_rq, .n_fut, .n_fut2, .n_ibuf(n_ib), .n_stall(n_st), .n_fwd(n_fw), .cycles(cyc[s][k]));
    end
  end

  for (genvar k = 0; k < NS; k++) begin : g_ds
    logic   [DISPATCH_W-1:0]           disp_v;
    instr_t                            disp_i [DISPATCH_W];
    logic   [$clog2(DISPATCH_W+1)-1:0] disp_cnt, e_iq, e_wq;
    logic   [2:0]                      ld_v;
    preg_t                             ld_p [3];
    logic   [ISSUE_W-1:0]              iss_v;
    instr_t                            iss_i [ISSUE_W];
    logic   [TIME_W-1:0]               now;
    logic   [1:0]                      e_out;
    logic   [3:0]                      e_conf;
    logic                              e_stall;
    int n_iq, n_wq, n_out, n_conf, n_st, n_ld;

    distance_issue #(.WQ_EN(SZ[k] != 0), .WQ_DEPTH((SZ[k] == 0) ? 2 : SZ[k])) dut (
      .clk, .rst_n, .disp_v, .disp_i, .disp_cnt, .ld_wb_v(ld_v), .ld_wb_preg(ld_p),
      .iss_v, .iss_i, .now, .ev_to_iq(e_iq), .ev_to_wq(e_wq), .ev_wq_out(e_out),
      .ev_conflict(e_conf), .ev_stall(e_stall));

    tb_ds_driver #(.N_INSTR(N), .SEED(9), .LD_WB_W(3)) drv (
      .clk, .rst_n, .disp_v, .disp_i, .disp_cnt, .ld_wb_v(ld_v), .ld_wb_preg(ld_p),
      .iss_v, .iss_i, .ev_iq(int'(e_iq)), .ev_wq(int'(e_wq)), .ev_wq_out(int'(e_out)),
      .ev_conf(int'(e_conf)), .ev_stall(e_stall),
      .done(done[2][k]), .checks(chk[2][k]), .failures(fl[2][k]),
      .n_iq, .n_wq, .n_wq_out(n_out), .n_conf, .n_stall(n_st), .n_ldwb(n_ld), .cycles(cyc[2][k]));
  end

  int checks = 0, failures = 0;

  function automatic bit all_done();
    for (int s = 0; s < 3; s++) for (int k = 0; k < NS; k++) if (!done[s][k]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic real ipc(input int s, input int k);
    return real'(N) / real'(cyc[s][k]);
  endfunction

  initial begin
    string name [3];
    name[0] = "First-use, out-of-order I-buffer";
    name[1] = "First-use, in-order I-buffer    ";
    name[2] = "Distance, wait queue            ";
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      while (!all_done()) @(posedge clk);
      begin repeat (60000) @(posedge clk); $display("FAIL watchdog"); end
    join_any
    $display("IPC by buffer size:          0     2     4     8    16    32    64");
    for (int s = 0; s < 3; s++) begin
      string line;
      line = name[s];
      for (int k = 0; k < NS; k++) begin
        checks += chk[s][k] + 1;
        failures += fl[s][k];
        if (!done[s][k]) begin failures++; $display("FAIL series %0d size %0d did not finish", s, SZ[k]); end
        line = {line, $sformatf(" %5.2f", ipc(s, k))};
      end
      $display("%s", line);
      checks++;
      if (ipc(s, 3) < ipc(s, 0)) begin
        failures++;
        $display("FAIL series %0d: 8-entry buffer slower than none", s);
      end
    end
    checks++;
    if (ipc(0, 3) < ipc(1, 3)) begin
      failures++;
      $display("FAIL out-of-order I-buffer slower than in-order at 8 entries");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
