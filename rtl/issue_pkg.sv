// issue_pkg: machine parameters and the instruction record shared by both
// low-complexity issue schemes (First-use and Distance).
//
// The sizes follow the integer datapath of the evaluated machine: 96
// physical registers, dispatch (decode/rename) width 8, issue width 4, three
// integer ALUs, one integer multiply/divide unit and three data-cache ports,
// and at most 64 instructions in flight. The instruction record carries what
// the issue logic needs after renaming: a tag naming the instruction (wide
// enough for 64 in flight), the functional-unit class, up to two physical
// source registers, an optional physical destination and the execution
// latency known at decode. Which fields exist, their widths and the
// three-class functional-unit split are this design's choice; the number of
// write-back ports (one per issue slot) and the cycle-counter width are too.
package issue_pkg;

  parameter int unsigned NUM_PREGS  = 96;   // physical registers
  parameter int unsigned PREG_W     = $clog2(NUM_PREGS);
  parameter int unsigned DISPATCH_W = 8;    // instructions dispatched per cycle
  parameter int unsigned ISSUE_W    = 4;    // instructions issued per cycle
  parameter int unsigned WB_W       = 4;    // results signalled per cycle
  parameter int unsigned TAG_W      = 6;    // 64 in-flight instructions
  parameter int unsigned LAT_W      = 4;    // latency field
  parameter int unsigned TIME_W     = 32;   // cycle counter of the Distance scheme

  // Functional-unit classes, in issue priority order of the First-use scheme
  typedef enum logic [1:0] {
    FU_MEM = 2'd0,   // loads and stores (data-cache ports)
    FU_MUL = 2'd1,   // integer multiply / divide
    FU_ALU = 2'd2    // integer ALU, branches included
  } fu_e;

  parameter int unsigned NUM_FU_TYPES = 3;
  parameter int unsigned MAX_UNITS    = 3;

  // Units of each class: 3 data-cache ports, 1 mul/div, 3 ALUs
  function automatic int unsigned fu_units(input int unsigned t);
    case (t)
      0:       return 3;
      1:       return 1;
      default: return 3;
    endcase
  endfunction

  typedef logic [PREG_W-1:0] preg_t;

  typedef struct packed {
    logic [TAG_W-1:0] tag;      // identifies the instruction (reorder-buffer slot)
    fu_e              fu;       // functional-unit class
    logic             is_load;  // result latency unknown at decode
    logic             src1_v;   // source 1 is a register
    preg_t            src1;
    logic             src2_v;   // source 2 is a register
    preg_t            src2;
    logic             dst_v;    // writes a register
    preg_t            dst;
    logic [LAT_W-1:0] lat;      // execution latency (ignored for loads)
  } instr_t;

endpackage
