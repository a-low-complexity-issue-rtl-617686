// ready_queue: in-order queue of instructions whose operands are all
// available (First-use scheme, one queue per functional-unit class).
//
// Instructions enter when dispatch finds all their operands available, or
// when the First-use table forwards them after their last missing operand
// was produced. The queue issues strictly from its head, in order, so it
// needs no associative search. Several instructions may enter and leave in
// one cycle: valid push ports are appended at the tail in port order, and
// the issue stage removes the first pop_cnt head entries. The queue itself
// is in the document; its depth, the number of ports and the circular-buffer
// organisation are this design's choice.
//
// Interface: push_v/push_i (PUSH_W ports, appended in port order),
// head_v/head_i (the POP_W oldest entries, combinational from state),
// pop_cnt (entries taken this cycle), count (occupancy before this cycle's
// pushes and pops). Pushes and pops take effect at the next rising edge.
// The user must keep count + pushes within DEPTH; an assertion checks it.
module ready_queue
  import issue_pkg::*;
#(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned PUSH_W = WB_W + DISPATCH_W,
  parameter int unsigned POP_W  = MAX_UNITS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic   [PUSH_W-1:0]        push_v,
  input  instr_t                     push_i [PUSH_W],
  input  logic   [$clog2(POP_W+1)-1:0] pop_cnt,
  output logic   [POP_W-1:0]         head_v,
  output instr_t                     head_i [POP_W],
  output logic   [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = $clog2(DEPTH);

  instr_t            mem [DEPTH];
  logic [PW-1:0]     head;

  function automatic logic [PW-1:0] wrap(input int unsigned x);
    return PW'(x % DEPTH);
  endfunction

  always_comb begin
    for (int k = 0; k < POP_W; k++) begin
      head_v[k] = (k < int'(count));
      head_i[k] = mem[wrap(int'(head) + k)];
    end
  end

  // number of valid pushes
  int unsigned n_push;
  always_comb begin
    n_push = 0;
    for (int p = 0; p < PUSH_W; p++) n_push += int'(push_v[p]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      count <= '0;
    end else begin
      int unsigned slot;
      slot = int'(head) + int'(count);
      for (int p = 0; p < PUSH_W; p++) begin
        if (push_v[p]) begin
          mem[wrap(slot)] <= push_i[p];
          slot++;
        end
      end
      head  <= wrap(int'(head) + int'(pop_cnt));
      count <= ($clog2(DEPTH+1))'(int'(count) + n_push - int'(pop_cnt));
    end
  end

  // Rules of use: never pop more than is held, never overfill.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (int'(pop_cnt) <= int'(count))
        else $error("ready_queue: pop of %0d with %0d held", pop_cnt, count);
      assert (int'(count) + n_push <= DEPTH)
        else $error("ready_queue: overflow");
    end
  end

endmodule
