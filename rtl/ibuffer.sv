// ibuffer: the optional I-buffer of the First-use issue scheme.
//
// It holds instructions that have a non-ready operand which is not the first
// use of that value, so dispatch need not stall for them. Two organisations
// are offered, as in the document:
//   OOO = 1  out-of-order: every entry keeps a ready bit per source and
//            compares each produced register against its sources (the only
//            associative search of the scheme); any entry whose operands are
//            ready may issue, oldest first.
//   OOO = 0  in-order: the entries are offered as a run from the oldest,
//            up to the first one whose sources are not all ready in the
//            register scoreboard, so no comparison against the entries is
//            needed. The issue stage must take a prefix of that run.
// Entries are kept compacted in age order (entry 0 oldest). The depth
// default of 8 is the size the document recommends; the compacting
// organisation, ports and timing are this design's choice.
//
// Interface: push_v/push_i/push_r1/push_r2 (new entries in program order
// with their source-ready bits as seen at dispatch, after this cycle's
// completions), wb_v/wb_preg (registers produced this cycle), preg_ready
// (scoreboard, in-order mode), cand_v/cand_i (entries allowed to issue this
// cycle), grant (entries taken by the issue stage), count. A produced
// register is visible to cand_v from the next cycle on.
module ibuffer
  import issue_pkg::*;
#(
  parameter int unsigned DEPTH  = 8,
  parameter bit          OOO    = 1'b1,
  parameter int unsigned N_IN   = DISPATCH_W,
  parameter int unsigned N_WB   = WB_W,
  parameter int unsigned N_REGS = NUM_PREGS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic   [N_IN-1:0]           push_v,
  input  instr_t                      push_i  [N_IN],
  input  logic   [N_IN-1:0]           push_r1,
  input  logic   [N_IN-1:0]           push_r2,
  input  logic   [N_WB-1:0]           wb_v,
  input  preg_t                       wb_preg [N_WB],
  input  logic   [N_REGS-1:0]         preg_ready,
  output logic   [DEPTH-1:0]          cand_v,
  output instr_t                      cand_i  [DEPTH],
  input  logic   [DEPTH-1:0]          grant,
  output logic   [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned CW = $clog2(DEPTH+1);

  instr_t           e_i  [DEPTH];
  logic [DEPTH-1:0] e_r1, e_r2;

  instr_t           n_i  [DEPTH];
  logic [DEPTH-1:0] n_r1, n_r2;
  logic [CW-1:0]    n_count;

  function automatic logic woken(input logic [N_WB-1:0] v, input preg_t p [N_WB], input preg_t s);
    logic hit;
    hit = 1'b0;
    for (int w = 0; w < N_WB; w++) hit |= v[w] && (p[w] == s);
    return hit;
  endfunction

  always_comb begin
    logic run;
    run = 1'b1;
    for (int k = 0; k < DEPTH; k++) begin
      cand_i[k] = e_i[k];
      run = run && (k < int'(count)) &&
            (!e_i[k].src1_v || preg_ready[e_i[k].src1]) &&
            (!e_i[k].src2_v || preg_ready[e_i[k].src2]);
      if (OOO) cand_v[k] = (k < int'(count)) && e_r1[k] && e_r2[k];
      else     cand_v[k] = run;
    end
  end

  // Remove granted entries, compact, wake up, append.
  always_comb begin
    int unsigned j;
    j = 0;
    for (int k = 0; k < DEPTH; k++) begin
      n_i[k]  = e_i[k];
      n_r1[k] = 1'b0;
      n_r2[k] = 1'b0;
    end
    for (int k = 0; k < DEPTH; k++) begin
      if (k < int'(count) && !grant[k]) begin
        n_i[j[$clog2(DEPTH)-1:0]]  = e_i[k];
        n_r1[j[$clog2(DEPTH)-1:0]] = e_r1[k] || (OOO && woken(wb_v, wb_preg, e_i[k].src1));
        n_r2[j[$clog2(DEPTH)-1:0]] = e_r2[k] || (OOO && woken(wb_v, wb_preg, e_i[k].src2));
        j++;
      end
    end
    for (int p = 0; p < N_IN; p++) begin
      if (push_v[p] && j < DEPTH) begin
        n_i[j[$clog2(DEPTH)-1:0]]  = push_i[p];
        n_r1[j[$clog2(DEPTH)-1:0]] = push_r1[p] || (OOO && woken(wb_v, wb_preg, push_i[p].src1));
        n_r2[j[$clog2(DEPTH)-1:0]] = push_r2[p] || (OOO && woken(wb_v, wb_preg, push_i[p].src2));
        j++;
      end
    end
    n_count = CW'(j);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      e_r1  <= '0;
      e_r2  <= '0;
    end else begin
      count <= n_count;
      e_r1  <= n_r1;
      e_r2  <= n_r2;
    end
  end

  always_ff @(posedge clk) e_i <= n_i;

  int unsigned n_push_chk;
  always_comb begin
    n_push_chk = 0;
    for (int p = 0; p < N_IN; p++) n_push_chk += int'(push_v[p]);
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert ((grant & ~cand_v) == '0) else $error("ibuffer: grant of a non-candidate");
      assert (int'(count) + n_push_chk <= DEPTH) else $error("ibuffer: overflow");
    end
  end

endmodule
