// tb_dist_issue_queue: self-checking test of the Distance scheme's issue
// queue. Every cycle the test writes random instructions into free slots of
// random rows (row r relative to the head) and records the cycle in which
// each must appear at the issue outputs: a write into row r during cycle c
// issues during cycle c+1+r. The occupancy and unit-class view of the rows
// and the issued row are compared with that schedule each cycle, so the
// head advances one row per cycle and wraps around the circular buffer.
module tb_dist_issue_queue;
  import issue_pkg::*;

  localparam int DEPTH = 4, WIDTH = ISSUE_W, NW = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   [NW-1:0]            wr_v;
  logic   [$clog2(DEPTH)-1:0] wr_row  [NW];
  logic   [$clog2(WIDTH)-1:0] wr_slot [NW];
  instr_t                     wr_i    [NW];
  logic   [WIDTH-1:0]         occ_v   [DEPTH];
  fu_e                        occ_fu  [DEPTH][WIDTH];
  logic   [WIDTH-1:0]         iss_v;
  instr_t                     iss_i   [WIDTH];

  dist_issue_queue #(.DEPTH(DEPTH), .WIDTH(WIDTH), .N_WR(NW)) dut (.*);

  // schedule, indexed by issue cycle modulo 16
  bit     s_v [16][WIDTH];
  instr_t s_i [16][WIDTH];
  int checks = 0, failures = 0, n_issued = 0, n_row0 = 0, n_full_row = 0, tag = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    wr_v = '0;
    for (int w = 0; w < NW; w++) begin wr_row[w] = '0; wr_slot[w] = '0; wr_i[w] = '0; end
    for (int c = 0; c < 16; c++) for (int s = 0; s < WIDTH; s++) s_v[c][s] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 1; c < 3000; c++) begin
      @(negedge clk);
      // issued row
      for (int s = 0; s < WIDTH; s++) begin
        check(iss_v[s] == s_v[c % 16][s], $sformatf("cycle %0d iss_v[%0d]", c, s));
        if (s_v[c % 16][s]) begin
          check(iss_i[s] == s_i[c % 16][s], "issued instruction");
          n_issued++;
        end
        s_v[c % 16][s] = 1'b0;
      end
      // occupancy of the rows still waiting
      for (int r = 0; r < DEPTH; r++) begin
        bit full;
        full = 1'b1;
        for (int s = 0; s < WIDTH; s++) begin
          check(occ_v[r][s] == s_v[(c + 1 + r) % 16][s], $sformatf("occ row %0d slot %0d", r, s));
          if (occ_v[r][s]) check(occ_fu[r][s] == s_i[(c + 1 + r) % 16][s].fu, "occ_fu");
          full &= occ_v[r][s];
        end
        if (full) n_full_row++;
      end
      // new writes into free slots
      wr_v = '0;
      for (int w = 0; w < NW; w++) begin
        int r, s;
        r = $urandom_range(0, DEPTH - 1);
        s = $urandom_range(0, WIDTH - 1);
        wr_row[w] = 2'(r); wr_slot[w] = 2'(s);
        wr_i[w] = '0;
        wr_i[w].tag = 6'(tag);
        wr_i[w].fu  = fu_e'($urandom_range(0, 2));
        if ($urandom_range(0, 2) == 0 && !s_v[(c + 1 + r) % 16][s]) begin
          wr_v[w] = 1'b1;
          s_v[(c + 1 + r) % 16][s] = 1'b1;
          s_i[(c + 1 + r) % 16][s] = wr_i[w];
          tag = (tag + 1) % 64;
          if (r == 0) n_row0++;
        end
      end
    end
    check(n_issued > 0 && n_row0 > 0 && n_full_row > 0, "coverage");
    $display("issued=%0d head-row writes=%0d full rows seen=%0d", n_issued, n_row0, n_full_row);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
