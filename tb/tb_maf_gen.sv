// tb_maf_gen: self-checking test of the MAF vector generator.
//
// After a T_start pulse the generator must produce 8 vectors per wire, wire 0 as
// victim first, for all 32 wires, in 8*32 consecutive cycles, then go idle and
// pulse done. Every vector is compared with the table of victim and aggressor
// values per state, written out here independently. A second run checks that the
// generator restarts cleanly.
module tb_maf_gen;
  localparam int W = 32;
  logic clk = 0, rst_n = 0, start = 0;
  logic valid, done;
  logic [W-1:0] vec;
  logic [3:0] state;
  logic [$clog2(W)-1:0] victim;
  int checks = 0, failures = 0;

  maf_gen #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // states s1..s8: victim value, aggressor value
  bit vt[8] = '{1, 0, 1, 1, 0, 1, 0, 0};
  bit ag[8] = '{1, 0, 1, 0, 1, 0, 0, 1};

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run;
    int cycles = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int v = 0; v < W; v++)
      for (int s = 0; s < 8; s++) begin
        logic [W-1:0] e;
        e = {W{ag[s]}};
        e[v] = vt[s];
        check(valid, "valid");
        check(vec == e, $sformatf("vector wire %0d state s%0d", v, s + 1));
        check(state == 4'(s + 1) && victim == 5'(v), "state/victim");
        cycles++;
        @(negedge clk);
      end
    check(cycles == 8 * W, "cycle count");
    check(!valid && state == 0, "idle after last wire");
    check(done, "done pulse");
    @(negedge clk);
    check(!done && !valid, "stays idle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(!valid && vec == '0, "idle without T_start");
    run();
    repeat (4) @(negedge clk);
    run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
