// tb_noc_link: self-checking test of one link direction.
//
// Random flits of all four kinds are sent with random valid; each must arrive
// unchanged exactly one cycle later (the one-cycle link latency), and nothing may
// arrive in a cycle after which nothing was sent. The ready wire must follow the
// receiver's ready in the same cycle. Reset must clear the link.
module tb_noc_link;
  import noc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tx_valid, tx_ready, rx_valid, rx_ready;
  flit_t tx_flit, rx_flit;
  int checks = 0, failures = 0;

  noc_link dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic  pv;
    flit_t pf;
    tx_valid = 0; tx_flit = '0; rx_ready = 0;
    @(negedge clk);
    check(!rx_valid, "reset clears valid");
    rst_n = 1;
    pv = 0; pf = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // what was driven in the previous cycle arrives now
      check(rx_valid == pv, "valid after one cycle");
      if (pv) check(rx_flit == pf, "flit unchanged after one cycle");
      tx_valid = 1'($urandom);
      tx_flit.kind = flit_kind_e'($urandom);
      tx_flit.data = $urandom;
      rx_ready = 1'($urandom);
      #1 check(tx_ready == rx_ready, "ready passes back in the same cycle");
      pv = tx_valid; pf = tx_flit;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
