// tb_issue_pkg: checks the shared machine description against the machine
// it models: 96 physical registers, 8-wide dispatch, 4-wide issue, 64
// instructions in flight, 3 data-cache ports, 1 multiply/divide unit and 3
// ALUs. It checks the derived widths (a register number and a tag
// must hold every register and every in-flight instruction), that
// MAX_UNITS is the largest class, that the classes together have no more
// units than 7, and that every instr_t field keeps its value when the
// packed record is built from random field values. A clocked watchdog
// bounds the run.
module tb_issue_pkg;
  import issue_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int total, mx;
    check(NUM_PREGS == 96, "physical registers");
    check(DISPATCH_W == 8, "dispatch width");
    check(ISSUE_W == 4, "issue width");
    check((1 << TAG_W) == 64, "tag width for 64 in flight");
    check((1 << PREG_W) >= NUM_PREGS && (1 << (PREG_W - 1)) < NUM_PREGS, "register width");
    check(fu_units(FU_MEM) == 3, "data-cache ports");
    check(fu_units(FU_MUL) == 1, "multiply/divide units");
    check(fu_units(FU_ALU) == 3, "ALUs");
    total = 0; mx = 0;
    for (int t = 0; t < NUM_FU_TYPES; t++) begin
      total += fu_units(t);
      if (fu_units(t) > mx) mx = fu_units(t);
    end
    check(total == 7, "total units");
    check(mx == MAX_UNITS, "MAX_UNITS");
    check(ISSUE_W <= total, "issue width within the units");
    for (int n = 0; n < 200; n++) begin
      instr_t in;
      int tg, s1, s2, ds, lt;
      tg = $urandom_range(0, 63);
      s1 = $urandom_range(0, NUM_PREGS - 1);
      s2 = $urandom_range(0, NUM_PREGS - 1);
      ds = $urandom_range(0, NUM_PREGS - 1);
      lt = $urandom_range(0, (1 << LAT_W) - 1);
      in = '0;
      in.tag = TAG_W'(tg); in.src1 = preg_t'(s1); in.src2 = preg_t'(s2);
      in.dst = preg_t'(ds); in.lat = LAT_W'(lt); in.fu = fu_e'(n % 3);
      in.src1_v = n[0]; in.src2_v = n[1]; in.dst_v = n[2]; in.is_load = n[3];
      check(int'(in.tag) == tg && int'(in.src1) == s1 && int'(in.src2) == s2 &&
            int'(in.dst) == ds && int'(in.lat) == lt && int'(in.fu) == n % 3 &&
            in.src1_v == n[0] && in.src2_v == n[1] && in.dst_v == n[2] && in.is_load == n[3],
            "instruction record fields");
    end
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
