// tb_reg_avail_table: self-checking test of the register-availability
// table. After reset every register must read as known at cycle 0. Random
// write ports then set registers known (with a time) or unknown; several
// ports often write the same register in one cycle, and the highest-numbered
// port must win. A model array is compared with the whole table each cycle.
module tb_reg_avail_table;
  import issue_pkg::*;

  localparam int NR = NUM_PREGS, NW = 13;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NW-1:0]     wr_v, wr_known;
  preg_t             wr_preg [NW];
  logic [TIME_W-1:0] wr_time [NW];
  logic [NR-1:0]     known;
  logic [TIME_W-1:0] avail_time [NR];

  reg_avail_table #(.N_REGS(NR), .N_WR(NW)) dut (.*);

  int checks = 0, failures = 0, n_clash = 0;
  bit                m_known [NR];
  logic [TIME_W-1:0] m_time  [NR];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    wr_v = '0; wr_known = '0;
    for (int w = 0; w < NW; w++) begin wr_preg[w] = '0; wr_time[w] = '0; end
    for (int r = 0; r < NR; r++) begin m_known[r] = 1'b1; m_time[r] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      bit hit [NR];
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        check(known[r] == m_known[r], $sformatf("known[%0d]", r));
        if (m_known[r]) check(avail_time[r] == m_time[r], $sformatf("time[%0d]", r));
      end
      for (int r = 0; r < NR; r++) hit[r] = 1'b0;
      for (int w = 0; w < NW; w++) begin
        wr_v[w]     = $urandom_range(0, 2) == 0;
        wr_known[w] = $urandom_range(0, 3) != 0;
        wr_preg[w]  = preg_t'($urandom_range(0, 15) + (c % 5) * 16);
        wr_time[w]  = $urandom();
        if (wr_v[w]) begin
          if (hit[wr_preg[w]]) n_clash++;
          hit[wr_preg[w]] = 1'b1;
        end
      end
      @(posedge clk);
      for (int w = 0; w < NW; w++) if (wr_v[w]) begin
        m_known[wr_preg[w]] = wr_known[w];
        m_time[wr_preg[w]]  = wr_time[w];
      end
    end
    check(n_clash > 0, "no same-register writes in one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
