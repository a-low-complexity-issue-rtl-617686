// wait_queue: the Wait queue of the Distance issue scheme.
//
// It holds instructions for which the availability time of at least one
// source register is not yet known (typically a value produced by a load,
// or by an instruction that is itself still waiting here). Each entry keeps,
// per source, a known bit and the availability time. Every cycle a set of
// (register, time) pairs is broadcast to all entries; an entry whose unknown
// source matches a broadcast register records that time. This comparison
// against every entry is the associative part of the Distance scheme. An
// entry whose sources are all known is offered to the scheduler, which
// removes it when it has found it a place in the issue queue.
//
// Entries are kept compacted in age order (entry 0 oldest). The queue, its
// broadcast and the "all times known -> leave" rule are the document's; the
// depth default of 8 is the size it recommends; the compacting organisation
// and port counts are this design's choice. Broadcasts are also applied to
// instructions entering in the same cycle, so none is missed.
//
// Interface: push_* (new entries in program order with the known bits and
// times seen at dispatch), bc_v/bc_preg/bc_time (broadcasts), rdy_v/ent_*
// (entries whose times are all known, with their times), pop (entries
// removed this cycle), count. Updates take effect at the next rising edge.
module wait_queue
  import issue_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned N_IN  = DISPATCH_W,
  parameter int unsigned N_BC  = 5
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic   [N_IN-1:0]           push_v,
  input  instr_t                      push_i  [N_IN],
  input  logic   [N_IN-1:0]           push_k1,
  input  logic   [TIME_W-1:0]         push_t1 [N_IN],
  input  logic   [N_IN-1:0]           push_k2,
  input  logic   [TIME_W-1:0]         push_t2 [N_IN],
  input  logic   [N_BC-1:0]           bc_v,
  input  preg_t                       bc_preg [N_BC],
  input  logic   [TIME_W-1:0]         bc_time [N_BC],
  output logic   [DEPTH-1:0]          rdy_v,
  output instr_t                      ent_i   [DEPTH],
  output logic   [TIME_W-1:0]         ent_t1  [DEPTH],
  output logic   [TIME_W-1:0]         ent_t2  [DEPTH],
  input  logic   [DEPTH-1:0]          pop,
  output logic   [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned IW = $clog2(DEPTH);

  typedef struct packed {
    instr_t            i;
    logic              k1;
    logic [TIME_W-1:0] t1;
    logic              k2;
    logic [TIME_W-1:0] t2;
  } went_t;

  went_t e [DEPTH];
  went_t n [DEPTH];
  logic [CW-1:0] n_count;

  // Capture a broadcast time for a still-unknown source.
  function automatic went_t snoop(input went_t x, input logic [N_BC-1:0] v,
                                  input preg_t p [N_BC], input logic [TIME_W-1:0] t [N_BC]);
    went_t y;
    y = x;
    for (int b = 0; b < N_BC; b++) begin
      if (v[b] && !y.k1 && p[b] == x.i.src1) begin y.k1 = 1'b1; y.t1 = t[b]; end
      if (v[b] && !y.k2 && p[b] == x.i.src2) begin y.k2 = 1'b1; y.t2 = t[b]; end
    end
    return y;
  endfunction

  always_comb begin
    for (int k = 0; k < DEPTH; k++) begin
      rdy_v[k]  = (k < int'(count)) && e[k].k1 && e[k].k2;
      ent_i[k]  = e[k].i;
      ent_t1[k] = e[k].t1;
      ent_t2[k] = e[k].t2;
    end
  end

  always_comb begin
    int unsigned j;
    went_t x;
    j = 0;
    x = '0;
    for (int k = 0; k < DEPTH; k++) n[k] = e[k];
    for (int k = 0; k < DEPTH; k++) begin
      if (k < int'(count) && !pop[k]) begin
        n[IW'(j)] = snoop(e[k], bc_v, bc_preg, bc_time);
        j++;
      end
    end
    for (int p = 0; p < N_IN; p++) begin
      if (push_v[p] && j < DEPTH) begin
        x.i  = push_i[p];
        x.k1 = push_k1[p];
        x.t1 = push_t1[p];
        x.k2 = push_k2[p];
        x.t2 = push_t2[p];
        n[IW'(j)] = snoop(x, bc_v, bc_preg, bc_time);
        j++;
      end
    end
    n_count = CW'(j);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= n_count;
  end

  always_ff @(posedge clk) e <= n;

  int unsigned n_push_chk, n_pop_chk;
  always_comb begin
    n_push_chk = 0;
    n_pop_chk  = 0;
    for (int p = 0; p < N_IN; p++) n_push_chk += int'(push_v[p]);
    for (int k = 0; k < DEPTH; k++) n_pop_chk += int'(pop[k]);
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert ((pop & ~rdy_v) == '0) else $error("wait_queue: pop of an entry that is not ready");
      assert (int'(count) + n_push_chk - n_pop_chk <= DEPTH) else $error("wait_queue: overflow");
    end
  end

endmodule
