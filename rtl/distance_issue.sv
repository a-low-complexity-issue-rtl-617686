// distance_issue: the Distance issue scheme.
//
// Latencies are known at decode for everything except loads, so the cycle
// in which each instruction can issue is computed when it is dispatched,
// much as a static scheduler would, and the instruction is written straight
// into the row of that cycle in a circular issue queue that issues its head
// row every cycle. Three structures do this:
//   register-availability table  per physical register, the cycle from
//                                which its value can be used, or "unknown"
//   wait queue                   instructions with an unknown source time;
//                                they snoop broadcast (register, time) pairs
//   issue queue                  IQ_DEPTH rows x ISSUE_W slots
// For an instruction whose source times are all known, MaxSource is the
// latest of them; its displacement from the head is MaxSource minus the
// coming issue cycle (at least 0), and it takes the first free slot from
// that row on. Its result time is its issue cycle plus its latency (the
// issue cycle already includes any delay from a full row) and is written to
// the table. A load's result time is left unknown; when the load writes back
// (ld_wb) the table gets that cycle and the pair is broadcast to the wait
// queue. Instructions leaving the wait queue for the issue queue likewise
// write the table and broadcast their result time.
//
// Each cycle, in this order: load write-backs, up to WQ_OUT_W wait-queue
// entries (oldest first), then the dispatch group in program order. Later
// steps see the table updates of earlier ones. Dispatch stops at the first
// instruction that finds no slot (displacement beyond the queue or no free
// slot) or, with an unknown source, no room in the wait queue; WQ_EN = 0 is
// the basic scheme without a wait queue, where such an instruction stalls
// dispatch. disp_cnt reports how many instructions were taken.
//
// Follows the document: the three structures, the displacement rule, the
// result-time rule, load handling and the broadcasts. This design's
// choices: a row also respects the number of units per class (3 memory, 1
// multiplier, 3 ALU), issue is registered (an instruction placed in row r
// during cycle `now` is on iss_v/iss_i during cycle now+1+r), results of
// instructions scheduled directly at dispatch are not broadcast (only
// younger instructions can read them and those see the table), times are
// TIME_W-bit cycle numbers compared modulo 2^TIME_W, and there is no
// misprediction recovery port.
module distance_issue
  import issue_pkg::*;
#(
  parameter bit          WQ_EN    = 1'b1,
  parameter int unsigned WQ_DEPTH = 8,
  parameter int unsigned IQ_DEPTH = 4,
  parameter int unsigned WQ_OUT_W = 2,
  parameter int unsigned LD_WB_W  = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic   [DISPATCH_W-1:0]       disp_v,
  input  instr_t                        disp_i  [DISPATCH_W],
  output logic   [$clog2(DISPATCH_W+1)-1:0] disp_cnt,
  input  logic   [LD_WB_W-1:0]          ld_wb_v,
  input  preg_t                         ld_wb_preg [LD_WB_W],
  output logic   [ISSUE_W-1:0]          iss_v,
  output instr_t                        iss_i   [ISSUE_W],
  output logic   [TIME_W-1:0]           now,
  output logic   [$clog2(DISPATCH_W+1)-1:0] ev_to_iq,
  output logic   [$clog2(DISPATCH_W+1)-1:0] ev_to_wq,
  output logic   [$clog2(WQ_OUT_W+1)-1:0]   ev_wq_out,
  output logic   [$clog2(DISPATCH_W+WQ_OUT_W+1)-1:0] ev_conflict,
  output logic                          ev_stall
);

  localparam int unsigned N_BC  = LD_WB_W + WQ_OUT_W;
  localparam int unsigned N_IQW = WQ_OUT_W + DISPATCH_W;
  localparam int unsigned N_TW  = LD_WB_W + WQ_OUT_W + DISPATCH_W;
  localparam int unsigned RW    = $clog2(IQ_DEPTH);
  localparam int unsigned SW    = $clog2(ISSUE_W);
  localparam int unsigned WQ_CW = $clog2(WQ_DEPTH+1);
  localparam int unsigned DC_W  = $clog2(DISPATCH_W+1);

  typedef logic [TIME_W-1:0] time_t;

  // ----------------------------------------------------------- structures
  logic  [N_TW-1:0]      tw_v, tw_known;
  preg_t                 tw_preg [N_TW];
  time_t                 tw_time [N_TW];
  logic  [NUM_PREGS-1:0] av_known;
  time_t                 av_time [NUM_PREGS];

  reg_avail_table #(.N_REGS(NUM_PREGS), .N_WR(N_TW)) u_rat (
    .clk, .rst_n,
    .wr_v(tw_v), .wr_preg(tw_preg), .wr_known(tw_known), .wr_time(tw_time),
    .known(av_known), .avail_time(av_time)
  );

  logic   [DISPATCH_W-1:0] wq_push_v, wq_push_k1, wq_push_k2;
  instr_t                  wq_push_i  [DISPATCH_W];
  time_t                   wq_push_t1 [DISPATCH_W];
  time_t                   wq_push_t2 [DISPATCH_W];
  logic   [N_BC-1:0]       bc_v;
  preg_t                   bc_preg [N_BC];
  time_t                   bc_time [N_BC];
  logic   [WQ_DEPTH-1:0]   wq_rdy, wq_pop;
  instr_t                  wq_i  [WQ_DEPTH];
  time_t                   wq_t1 [WQ_DEPTH];
  time_t                   wq_t2 [WQ_DEPTH];
  logic   [WQ_CW-1:0]      wq_count;

  wait_queue #(.DEPTH(WQ_DEPTH), .N_IN(DISPATCH_W), .N_BC(N_BC)) u_wq (
    .clk, .rst_n,
    .push_v(wq_push_v), .push_i(wq_push_i),
    .push_k1(wq_push_k1), .push_t1(wq_push_t1), .push_k2(wq_push_k2), .push_t2(wq_push_t2),
    .bc_v, .bc_preg, .bc_time,
    .rdy_v(wq_rdy), .ent_i(wq_i), .ent_t1(wq_t1), .ent_t2(wq_t2),
    .pop(wq_pop), .count(wq_count)
  );

  logic   [N_IQW-1:0]  iq_wr_v;
  logic   [RW-1:0]     iq_wr_row  [N_IQW];
  logic   [SW-1:0]     iq_wr_slot [N_IQW];
  instr_t              iq_wr_i    [N_IQW];
  logic   [ISSUE_W-1:0] iq_occ_v  [IQ_DEPTH];
  fu_e                 iq_occ_fu  [IQ_DEPTH][ISSUE_W];

  dist_issue_queue #(.DEPTH(IQ_DEPTH), .WIDTH(ISSUE_W), .N_WR(N_IQW)) u_iq (
    .clk, .rst_n,
    .wr_v(iq_wr_v), .wr_row(iq_wr_row), .wr_slot(iq_wr_slot), .wr_i(iq_wr_i),
    .occ_v(iq_occ_v), .occ_fu(iq_occ_fu),
    .iss_v, .iss_i
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  // ------------------------------------------------------------ scheduler
  // Displacement from the head for a source available at time t: t minus
  // the coming issue cycle (now+1), at least 0.
  function automatic int disp_of(input time_t t, input time_t cur);
    logic signed [TIME_W-1:0] d;
    d = $signed(t - cur - 1'b1);
    return (d < 0) ? 0 : ((d > IQ_DEPTH) ? IQ_DEPTH : int'(d));
  endfunction

  // First free slot, row by row from row d0 on, in a row that still has a
  // unit of class f; returns row*ISSUE_W+slot, or -1 if there is none.
  function automatic int find_slot(input logic [ISSUE_W-1:0] ov [IQ_DEPTH],
                                   input int unsigned fuc [IQ_DEPTH][NUM_FU_TYPES],
                                   input fu_e f, input int d0);
    int res;
    res = -1;
    for (int r = IQ_DEPTH-1; r >= 0; r--) begin
      if (r >= d0 && fuc[r][int'(f)] < fu_units(int'(f))) begin
        for (int s = ISSUE_W-1; s >= 0; s--) begin
          if (!ov[r][s]) res = r * ISSUE_W + s;
        end
      end
    end
    return res;
  endfunction

  always_comb begin
    logic [NUM_PREGS-1:0] k;
    time_t                t [NUM_PREGS];
    logic   [ISSUE_W-1:0] ov [IQ_DEPTH];
    int unsigned          fuc [IQ_DEPTH][NUM_FU_TYPES];
    int unsigned          n_wq_out, n_iq, n_wq, n_ok, n_conf, wq_used, port;
    int                   d0, d1, pl, row, slot;
    logic                 stop, k1, k2;
    instr_t               in;

    k = av_known;
    t = av_time;
    for (int r = 0; r < IQ_DEPTH; r++) begin
      ov[r] = iq_occ_v[r];
      for (int c = 0; c < NUM_FU_TYPES; c++) fuc[r][c] = 0;
      for (int s = 0; s < ISSUE_W; s++)
        if (iq_occ_v[r][s]) for (int cx = 0; cx < NUM_FU_TYPES; cx++) if (cx == int'(iq_occ_fu[r][s])) fuc[r][cx]++;
    end

    tw_v = '0; tw_known = '0;
    for (int w = 0; w < N_TW; w++) begin tw_preg[w] = '0; tw_time[w] = '0; end
    bc_v = '0;
    for (int b = 0; b < N_BC; b++) begin bc_preg[b] = '0; bc_time[b] = '0; end
    iq_wr_v = '0;
    for (int w = 0; w < N_IQW; w++) begin
      iq_wr_row[w] = '0; iq_wr_slot[w] = '0;
      iq_wr_i[w] = (w < WQ_OUT_W) ? wq_i[w] : disp_i[w - WQ_OUT_W];
    end
    wq_pop = '0;
    n_wq_out = 0; n_iq = 0; n_wq = 0; n_ok = 0; n_conf = 0;
    d0 = 0; d1 = 0; pl = 0; row = 0; slot = 0; k1 = 1'b0; k2 = 1'b0; in = '0;
    wq_used = 0; stop = 1'b0;

    // 1. load write-backs: value usable from now on
    for (int l = 0; l < LD_WB_W; l++) begin
      if (ld_wb_v[l]) begin
        k[ld_wb_preg[l]] = 1'b1;
        t[ld_wb_preg[l]] = now;
        tw_v[l] = 1'b1; tw_known[l] = 1'b1; tw_preg[l] = ld_wb_preg[l]; tw_time[l] = now;
        bc_v[l] = 1'b1; bc_preg[l] = ld_wb_preg[l]; bc_time[l] = now;
      end
    end

    // 2. wait-queue entries whose source times are now all known
    port = 0;
    for (int e = 0; e < WQ_DEPTH; e++) begin
      if (wq_rdy[e] && port < WQ_OUT_W) begin
        d0 = wq_i[e].src1_v ? disp_of(wq_t1[e], now) : 0;
        d1 = wq_i[e].src2_v ? disp_of(wq_t2[e], now) : 0;
        if (d1 > d0) d0 = d1;
        pl   = find_slot(ov, fuc, wq_i[e].fu, d0);
        row  = pl / ISSUE_W;
        slot = pl % ISSUE_W;
        if (pl < 0) row = -1;
        if (row >= 0) begin
          wq_pop[e] = 1'b1;
          iq_wr_v[port]    = 1'b1;
          iq_wr_row[port]  = RW'(row);
          iq_wr_slot[port] = SW'(slot);
          iq_wr_i[port]    = wq_i[e];
          for (int rx = 0; rx < IQ_DEPTH; rx++) if (rx == row) begin
            for (int sx = 0; sx < ISSUE_W; sx++) if (sx == slot) ov[rx][sx] = 1'b1;
            for (int cx = 0; cx < NUM_FU_TYPES; cx++) if (cx == int'(wq_i[e].fu)) fuc[rx][cx]++;
          end
          if (row > d0) n_conf++;
          if (wq_i[e].dst_v && !wq_i[e].is_load) begin
            k[wq_i[e].dst] = 1'b1;
            t[wq_i[e].dst] = now + 1 + TIME_W'(row) + TIME_W'(wq_i[e].lat);
            tw_v[LD_WB_W + port] = 1'b1;  tw_known[LD_WB_W + port] = 1'b1;
            tw_preg[LD_WB_W + port] = wq_i[e].dst;
            tw_time[LD_WB_W + port] = t[wq_i[e].dst];
            bc_v[LD_WB_W + port] = 1'b1;
            bc_preg[LD_WB_W + port] = wq_i[e].dst;
            bc_time[LD_WB_W + port] = t[wq_i[e].dst];
          end
          port++;
          n_wq_out++;
        end
      end
    end

    // 3. the dispatch group, in program order
    wq_used = int'(wq_count) - n_wq_out;
    stop = 1'b0;
    wq_push_v = '0; wq_push_k1 = '0; wq_push_k2 = '0;
    for (int d = 0; d < DISPATCH_W; d++) begin
      in = disp_i[d];
      k1 = !in.src1_v || k[in.src1];
      k2 = !in.src2_v || k[in.src2];
      wq_push_i[d]  = in;
      wq_push_t1[d] = t[in.src1];
      wq_push_t2[d] = t[in.src2];
      if (!stop && disp_v[d]) begin
        if (k1 && k2) begin
          d0 = in.src1_v ? disp_of(t[in.src1], now) : 0;
          d1 = in.src2_v ? disp_of(t[in.src2], now) : 0;
          if (d1 > d0) d0 = d1;
          pl   = find_slot(ov, fuc, in.fu, d0);
          row  = pl / ISSUE_W;
          slot = pl % ISSUE_W;
          if (pl < 0) row = -1;
          if (row >= 0) begin
            iq_wr_v[WQ_OUT_W + d]    = 1'b1;
            iq_wr_row[WQ_OUT_W + d]  = RW'(row);
            iq_wr_slot[WQ_OUT_W + d] = SW'(slot);
            for (int rx = 0; rx < IQ_DEPTH; rx++) if (rx == row) begin
              for (int sx = 0; sx < ISSUE_W; sx++) if (sx == slot) ov[rx][sx] = 1'b1;
              for (int cx = 0; cx < NUM_FU_TYPES; cx++) if (cx == int'(in.fu)) fuc[rx][cx]++;
            end
            if (row > d0) n_conf++;
            n_iq++;
            if (in.dst_v) begin
              k[in.dst] = !in.is_load;
              t[in.dst] = now + 1 + TIME_W'(row) + TIME_W'(in.lat);
              tw_v[LD_WB_W + WQ_OUT_W + d]     = 1'b1;
              tw_known[LD_WB_W + WQ_OUT_W + d] = !in.is_load;
              tw_preg[LD_WB_W + WQ_OUT_W + d]  = in.dst;
              tw_time[LD_WB_W + WQ_OUT_W + d]  = t[in.dst];
            end
          end else stop = 1'b1;
        end else if (WQ_EN && wq_used < WQ_DEPTH) begin
          wq_push_v[d]  = 1'b1;
          wq_push_k1[d] = k1;
          wq_push_k2[d] = k2;
          wq_used++;
          n_wq++;
          if (in.dst_v) begin
            k[in.dst] = 1'b0;
            tw_v[LD_WB_W + WQ_OUT_W + d]     = 1'b1;
            tw_known[LD_WB_W + WQ_OUT_W + d] = 1'b0;
            tw_preg[LD_WB_W + WQ_OUT_W + d]  = in.dst;
          end
        end else stop = 1'b1;
        if (!stop) n_ok++;
      end
    end

    disp_cnt    = DC_W'(n_ok);
    ev_to_iq    = DC_W'(n_iq);
    ev_to_wq    = DC_W'(n_wq);
    ev_wq_out   = ($clog2(WQ_OUT_W+1))'(n_wq_out);
    ev_conflict = ($clog2(DISPATCH_W+WQ_OUT_W+1))'(n_conf);
    ev_stall    = stop;
  end

endmodule
