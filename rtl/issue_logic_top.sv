// issue_logic_top: the two low-complexity issue schemes side by side.
//
// Both replace the associatively searched instruction window of an
// out-of-order superscalar core. They are alternatives for the same place in
// the pipeline, between rename/dispatch and the functional units, and do not
// share state, so this top simply brings out the ports of each:
//   fu_*  First-use scheme (first_use_issue): ready queues per unit class, a
//         First-use table indexed by physical register and an 8-entry
//         out-of-order I-buffer. Completions (fu_wb_*) come from the
//         functional units and wake instructions up.
//   ds_*  Distance scheme (distance_issue): register-availability table,
//         8-entry wait queue and a 4 x 4 issue queue whose head row issues
//         every cycle. Only loads report completion (ds_ld_wb_*); every other
//         latency is known at decode.
// Each scheme takes a dispatch group of up to 8 renamed instructions in
// program order, reports how many it accepted (the rest are offered again),
// and issues up to 4 instructions per cycle. Timing is that of the two
// sub-blocks; see their headers. Which configuration is built (I-buffer
// out-of-order, wait queue present, sizes 8, 8 and 4 x 4) follows the sizes
// the document recommends.
module issue_logic_top
  import issue_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  // First-use scheme
  input  logic   [DISPATCH_W-1:0]           fu_disp_v,
  input  instr_t                            fu_disp_i  [DISPATCH_W],
  output logic   [$clog2(DISPATCH_W+1)-1:0] fu_disp_cnt,
  input  logic   [WB_W-1:0]                 fu_wb_v,
  input  preg_t                             fu_wb_preg [WB_W],
  output logic   [ISSUE_W-1:0]              fu_iss_v,
  output instr_t                            fu_iss_i   [ISSUE_W],
  output logic   [$clog2(DISPATCH_W+1)-1:0] fu_ev_to_rq,
  output logic   [$clog2(DISPATCH_W+1)-1:0] fu_ev_to_fut,
  output logic   [$clog2(DISPATCH_W+1)-1:0] fu_ev_to_fut2,
  output logic   [$clog2(DISPATCH_W+1)-1:0] fu_ev_to_ibuf,
  output logic                              fu_ev_stall,
  output logic   [$clog2(WB_W+1)-1:0]       fu_ev_fwd,
  // Distance scheme
  input  logic   [DISPATCH_W-1:0]           ds_disp_v,
  input  instr_t                            ds_disp_i  [DISPATCH_W],
  output logic   [$clog2(DISPATCH_W+1)-1:0] ds_disp_cnt,
  input  logic   [2:0]                      ds_ld_wb_v,
  input  preg_t                             ds_ld_wb_preg [3],
  output logic   [ISSUE_W-1:0]              ds_iss_v,
  output instr_t                            ds_iss_i   [ISSUE_W],
  output logic   [TIME_W-1:0]               ds_now,
  output logic   [$clog2(DISPATCH_W+1)-1:0] ds_ev_to_iq,
  output logic   [$clog2(DISPATCH_W+1)-1:0] ds_ev_to_wq,
  output logic   [1:0]                      ds_ev_wq_out,
  output logic   [3:0]                      ds_ev_conflict,
  output logic                              ds_ev_stall
);

  first_use_issue #(
    .IBUF_EN(1'b1), .IBUF_OOO(1'b1), .IBUF_DEPTH(8), .RQ_DEPTH(16)
  ) u_first_use (
    .clk, .rst_n,
    .disp_v(fu_disp_v), .disp_i(fu_disp_i), .disp_cnt(fu_disp_cnt),
    .wb_v(fu_wb_v), .wb_preg(fu_wb_preg),
    .iss_v(fu_iss_v), .iss_i(fu_iss_i),
    .ev_to_rq(fu_ev_to_rq), .ev_to_fut(fu_ev_to_fut), .ev_to_fut2(fu_ev_to_fut2),
    .ev_to_ibuf(fu_ev_to_ibuf), .ev_stall(fu_ev_stall), .ev_fwd(fu_ev_fwd)
  );

  distance_issue #(
    .WQ_EN(1'b1), .WQ_DEPTH(8), .IQ_DEPTH(4), .WQ_OUT_W(2), .LD_WB_W(3)
  ) u_distance (
    .clk, .rst_n,
    .disp_v(ds_disp_v), .disp_i(ds_disp_i), .disp_cnt(ds_disp_cnt),
    .ld_wb_v(ds_ld_wb_v), .ld_wb_preg(ds_ld_wb_preg),
    .iss_v(ds_iss_v), .iss_i(ds_iss_i), .now(ds_now),
    .ev_to_iq(ds_ev_to_iq), .ev_to_wq(ds_ev_to_wq), .ev_wq_out(ds_ev_wq_out),
    .ev_conflict(ds_ev_conflict), .ev_stall(ds_ev_stall)
  );

endmodule
