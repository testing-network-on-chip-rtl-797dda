// tb_mwu: self-checking test of the multicast wrapper unit (switch address 2).
//
// Input queues stand in for the input FIFOs; every flit written to a target is
// recorded and compared with the expected packet. Cases:
//   - a multicast packet whose route lists switch 2 with ports {1,2} reaches
//     outputs 1 and 2 complete and unchanged, flit by flit in the same cycle, and
//     waits while one target has no room (stall counted);
//   - a multicast packet that does not list switch 2 goes to the TC target;
//   - a unicast test packet for switch 2 goes to the TC; one for switch 3 and a
//     functional packet are not taken;
//   - a claim waits while the RLB holds a target.
module tb_mwu;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] in_valid, rlb_bound, pop, busy, takes, rlb_busy;
  flit_t [NPORTS-1:0] in_flit;
  logic [NPORTS:0] tgt_ready, tgt_push, tgt_own;
  flit_t [NPORTS:0] tgt_flit;
  int checks = 0, failures = 0, stalls = 0;

  flit_t q_in[NPORTS][$];
  flit_t q_out[NPORTS+1][$];

  mwu #(.MY_ADDR(4'd2), .MAX_ROUTE(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = q_in[p].size() != 0;
      in_flit[p]  = in_valid[p] ? q_in[p][0] : '0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) if (pop[p]) void'(q_in[p].pop_front());
    for (int t = 0; t <= NPORTS; t++) if (tgt_push[t]) begin
      q_out[t].push_back(tgt_flit[t]);
      if (!tgt_ready[t]) begin failures++; $display("FAIL push without room"); end
    end
    if (tgt_push[1] != tgt_push[2] && tgt_own[1] && tgt_own[2] && dut.own_p_q[1] == dut.own_p_q[2])
      begin failures++; $display("FAIL copies not in the same cycle"); end
  end

  function automatic void make_pkt(ref flit_t pkt[$], input logic [FLIT_W-1:0] hdr,
                                   input logic [FLIT_W-1:0] routes[$], input int ndata);
    pkt.delete();
    pkt.push_back('{FK_HEAD, hdr});
    foreach (routes[i]) pkt.push_back('{FK_BODY, routes[i]});
    pkt.push_back('{FK_BODY, mk_ctrl(CUT_FIFO, 8'd1, 16'd0)});
    pkt.push_back('{FK_BODY, T_START});
    for (int i = 0; i < ndata; i++) pkt.push_back('{FK_BODY, $urandom});
    pkt.push_back('{FK_TAIL, ~T_START});
  endfunction

  task automatic expect_pkt(int t, flit_t pkt[$], string what);
    check(q_out[t].size() == pkt.size(), {what, ": length"});
    for (int i = 0; i < pkt.size() && i < q_out[t].size(); i++)
      check(q_out[t][i] == pkt[i], $sformatf("%s: flit %0d", what, i));
    q_out[t].delete();
  endtask

  task automatic wait_idle;
    int n = 0;
    while ((busy != 0 || q_in[0].size() + q_in[1].size() + q_in[2].size() + q_in[3].size() != 0) && n < 500) begin
      @(negedge clk);
      n++;
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    flit_t pkt[$];
    logic [FLIT_W-1:0] rt[$];
    rlb_bound = '0; rlb_busy = '0; tgt_ready = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1: multicast through switch 2 to ports 1 and 2, with back-pressure
    rt = '{mk_route(4'd1, 4'b0011), mk_route(4'd2, 4'b0110), mk_route(4'd3, 4'b0100)};
    make_pkt(pkt, mk_header(PK_TEST_MC, 8'd3, 4'd0), rt, 6);
    foreach (pkt[i]) q_in[0].push_back(pkt[i]);
    @(negedge clk);
    check(takes[0] || busy[0], "multicast taken");
    repeat (8) @(negedge clk);
    tgt_ready[2] = 0;
    repeat (3) begin
      @(negedge clk);
      if (busy[0] && tgt_push == 0) stalls++;
    end
    tgt_ready[2] = 1;
    wait_idle();
    expect_pkt(1, pkt, "mc port 1");
    expect_pkt(2, pkt, "mc port 2");
    check(q_out[0].size() == 0 && q_out[3].size() == 0 && q_out[4].size() == 0, "no stray copies");
    check(stalls > 0, "stall seen");

    // 2: multicast not listing switch 2 -> TC
    rt = '{mk_route(4'd1, 4'b0001), mk_route(4'd3, 4'b0100)};
    make_pkt(pkt, mk_header(PK_TEST_MC, 8'd2, 4'd0), rt, 3);
    foreach (pkt[i]) q_in[1].push_back(pkt[i]);
    wait_idle();
    expect_pkt(4, pkt, "mc destination -> TC");

    // 3: unicast test for switch 2 -> TC
    rt = {};
    make_pkt(pkt, mk_header(PK_TEST_UC, 8'd0, 4'd2), rt, 4);
    foreach (pkt[i]) q_in[3].push_back(pkt[i]);
    wait_idle();
    expect_pkt(4, pkt, "uc to own TC");

    // 4: unicast test for switch 3 and a functional packet are left alone
    q_in[2].push_back('{FK_HEAD, mk_header(PK_TEST_UC, 8'd0, 4'd3)});
    @(negedge clk);
    check(!takes[2] && !busy[2] && !pop[2], "uc for another switch not taken");
    q_in[2].delete();
    q_in[2].push_back('{FK_HEAD, mk_header(PK_FUNC, 8'd0, 4'd2)});
    @(negedge clk);
    check(!takes[2] && !busy[2] && !pop[2], "functional packet not taken");
    q_in[2].delete();

    // 5: claim waits for the RLB to release the output
    rlb_busy[1] = 1;
    rt = '{mk_route(4'd2, 4'b0010)};
    make_pkt(pkt, mk_header(PK_TEST_MC, 8'd1, 4'd0), rt, 2);
    foreach (pkt[i]) q_in[0].push_back(pkt[i]);
    repeat (10) @(negedge clk);
    check(tgt_own[1] == 0 && q_out[1].size() == 0, "waits while RLB holds output");
    rlb_busy[1] = 0;
    wait_idle();
    expect_pkt(1, pkt, "after RLB release");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
