// tb_noc_fabric: end-to-end test of the four-switch network at its default size.
//
// A tester on the local port of S1 tests the whole network, following the
// multicast test schedule of the example network: S1 first, then links l1 and l2,
// then S2 and S3 together (one multicast packet per test), then links l1', l2',
// l3, l4, l5 and l5' at once, then S4, then links l3' and l4'. RLB scan tests go by
// unicast (their expected responses depend on each switch's routing table), which
// also carries them through the RLBs of the switches on the way. The input FIFOs on
// which the test packets arrive are tested afterwards through packets that reach
// the switch by another port. The local input FIFO of S1, through which every test
// packet enters, is the one FIFO not tested.
//
// The pass/fail register is then read out (all pass). The local ports then carry
// functional packets between all pairs of switches, under random stalls on the
// local outputs, and every packet must arrive whole at its destination. Last, a
// FIFO test with one wrong expected word is sent to S3, and the read-out must show
// S3, and only S3, failed.
//
// Every mechanism is counted and reported: unicast test delivery, multicast copies,
// FIFO, RLB and link tests, forwarding of test packets through an RLB, functional
// delivery, flow-control stalls, pass/fail read-out, fault detection. A mechanism
// that never happened is a failure. The cycle count of each schedule step is
// printed.
module tb_noc_fabric;
  import noc_pkg::*;
  import noc_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic  [3:0] loc_in_valid, loc_in_ready, loc_out_valid, loc_out_ready;
  flit_t [3:0] loc_in_flit, loc_out_flit;
  logic pf_shift, pf_out;
  logic [3:0] pkt_done, fail_evt;
  logic [3:0][NPORTS-1:0] link_done;
  int checks = 0, failures = 0;

  noc_fabric dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // routing tables of S1..S4 (destination -> port), own address -> port 3
  function automatic logic [(1<<ADDR_W)*PORT_W-1:0] tbl(int sw);
    logic [(1<<ADDR_W)*PORT_W-1:0] t;
    int d2p[5];
    case (sw)
      1: d2p = '{0, 0, 0, 1, 0};
      2: d2p = '{0, 0, 0, 1, 2};
      3: d2p = '{0, 0, 1, 0, 2};
      default: d2p = '{0, 0, 0, 1, 0};
    endcase
    t = '0;
    for (int d = 1; d <= 4; d++) t[d*2 +: 2] = 2'(d2p[d]);
    return t;
  endfunction

  // ---------------- event counters ----------------
  int cyc = 0;
  int pd[4], nfail = 0, nlink = 0, nmc_copy = 0, nstall = 0, nrlb_fwd = 0;
  int n_uc = 0, n_mc = 0, n_fifo = 0, n_rlb = 0, n_link = 0, n_func = 0, n_pf = 0, n_det = 0;
  int link_seen[4][NPORTS];
  bit stall_mode = 0;
  flit_t rxq[4][$];

  // internal probes, per switch
  logic [3:0]              p_lout_empty;   // local output FIFO empty
  logic [3:0][NPORTS:0]    p_mwu_push;     // MWU writes per target
  logic [3:0][NPORTS-1:0]  p_rlb_test;     // RLB moves a test-packet head
  logic [3:0][63:0]        p_rlb_state;    // RLB scan flops
  for (genvar g = 0; g < 4; g++) begin : g_probe
    assign p_lout_empty[g] = dut.g_sw[g].u_sw.o_ef[3];
    assign p_mwu_push[g]   = dut.g_sw[g].u_sw.mwu_push;
    assign p_rlb_state[g]  = dut.g_sw[g].u_sw.u_rlb.chain_q;
    for (genvar q = 0; q < NPORTS; q++) begin : g_q
      flit_t f;
      assign f = dut.g_sw[g].u_sw.ih_flit[dut.g_sw[g].u_sw.rlb_sel[q]];
      assign p_rlb_test[g][q] = dut.g_sw[g].u_sw.rlb_push[q] && f.kind == FK_HEAD &&
                                hdr_kind(f.data) == PK_TEST_UC;
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int k = 0; k < 4; k++) begin
        if (pkt_done[k]) pd[k]++;
        if (fail_evt[k]) nfail++;
        for (int p = 0; p < NPORTS; p++) if (link_done[k][p]) begin
          nlink++;
          link_seen[k][p]++;
        end
        if (loc_out_valid[k] && loc_out_ready[k]) rxq[k].push_back(loc_out_flit[k]);
        if (!loc_out_ready[k] && !p_lout_empty[k]) nstall++;
        if ($countones(p_mwu_push[k]) >= 2) nmc_copy++;
        nrlb_fwd += $countones(p_rlb_test[k]);
      end
    end
  end

  always @(negedge clk) begin
    for (int k = 0; k < 4; k++)
      loc_out_ready[k] <= stall_mode ? ($urandom % 4 != 0) : 1'b1;
  end

  // ---------------- drivers ----------------
  task automatic send(int k, pkt_t pkt);
    foreach (pkt[i]) begin
      loc_in_valid[k] = 0;
      #1;
      while (!loc_in_ready[k]) begin @(posedge clk); #1; end
      loc_in_valid[k] = 1; loc_in_flit[k] = pkt[i];
      @(posedge clk);
      #1;
    end
    loc_in_valid[k] = 0;
  endtask

  // wait until switch k (bit k of mask) has finished n more test packets
  task automatic wait_pd(int base[4], logic [3:0] mask, output bit ok);
    ok = 0;
    for (int i = 0; i < 5000 && !ok; i++) begin
      @(negedge clk);
      ok = 1;
      for (int k = 0; k < 4; k++) if (mask[k] && pd[k] <= base[k]) ok = 0;
    end
    repeat (2) @(negedge clk);
  endtask

  // send one test packet from the tester and wait for the test controllers in mask
  task automatic test(pkt_t pkt, logic [3:0] mask, string what);
    int base[4];
    bit ok;
    int f0;
    base = pd; f0 = nfail;
    send(0, pkt);
    wait_pd(base, mask, ok);
    check(ok, {what, ": done"});
    check(nfail == f0, {what, ": passes"});
    for (int k = 0; k < 4; k++)
      if (!mask[k]) check(pd[k] == base[k], {what, ": no other switch takes it"});
  endtask

  // read the pass/fail register; result bit k-1 = switch k failed
  task automatic read_pf(output logic [3:0] r);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      r[3 - i] = pf_out;
      pf_shift = 1;
      @(negedge clk);
      pf_shift = 0;
    end
    n_pf++;
  endtask

  // ---------------- test packets ----------------
  task automatic fifo_tests(int dest, int mca[$], int mcm[$], logic [3:0] mask,
                            int fifos[$], string who);
    pkt_t pkt;
    foreach (fifos[i]) begin
      int f;
      f = fifos[i];
      if (mca.size() == 0) uc_head(pkt, dest); else mc_head(pkt, mca, mcm);
      add_ctrl(pkt, CUT_FIFO, f); add_fifo_data(pkt, 4, -1); add_tail(pkt);
      test(pkt, mask, $sformatf("%s FIFO %0d", who, f));
      n_fifo += $countones(mask);
      if (mca.size() == 0) n_uc++; else n_mc++;
    end
  endtask

  task automatic rlb_test(int sw);
    pkt_t pkt;
    uc_head(pkt, sw); add_ctrl(pkt, CUT_RLB, 0);
    add_rlb_data(pkt, 8, -1, 64'd0, sw, 3, tbl(sw)); add_tail(pkt);
    test(pkt, 4'(1 << (sw - 1)), $sformatf("S%0d RLB", sw));
    check(p_rlb_state[sw-1] == '0, "RLB left idle");
    n_rlb++; n_uc++;
  endtask

  // link test from the switches in mask (by unicast or multicast), then check
  // that exactly the expected far-end checkers finished
  task automatic link_test(pkt_t hdr, logic [3:0] mask, int ports, int exp[$], string what);
    pkt_t pkt;
    int l0;
    int seen0[4][NPORTS];
    pkt = hdr;
    add_ctrl(pkt, CUT_LINK, ports); add_tail(pkt);
    seen0 = link_seen; l0 = nlink;
    test(pkt, mask, what);
    repeat (10) @(negedge clk);
    check(nlink - l0 == exp.size() / 2, $sformatf("%s: %0d link checks", what, nlink - l0));
    for (int i = 0; i < exp.size(); i += 2)
      check(link_seen[exp[i]][exp[i+1]] == seen0[exp[i]][exp[i+1]] + 1,
            $sformatf("%s: checker S%0d port %0d", what, exp[i] + 1, exp[i+1]));
    n_link += nlink - l0;
  endtask

  // Every local port sends three packets to each other switch, all at once, with
  // random stalls on the local outputs; each switch must receive its packets whole.
  flit_t exp[4][$];   // functional flits expected per destination switch
  int    nexp = 0;

  task automatic source(int src);
    pkt_t fp;
    for (int r = 0; r < 3; r++)
      for (int d = 1; d <= 4; d++) begin
        if (d == src) continue;
        func_pkt(fp, d, 2 + $urandom % 10);
        foreach (fp[i]) exp[d-1].push_back(fp[i]);
        nexp++;
        send(src - 1, fp);
      end
  endtask

  task automatic functional_traffic();
    stall_mode = 1;
    fork
      source(1);
      source(2);
      source(3);
      source(4);
    join
    repeat (200) @(negedge clk);
    stall_mode = 0;
    repeat (20) @(negedge clk);
    // split the flits received at each switch into packets and match them
    for (int k = 0; k < 4; k++) begin
      pkt_t cur;
      int got;
      got = 0;
      check(rxq[k].size() == exp[k].size(),
            $sformatf("S%0d received %0d of %0d flits", k + 1, rxq[k].size(), exp[k].size()));
      foreach (rxq[k][i]) begin
        cur.push_back(rxq[k][i]);
        if (rxq[k][i].kind == FK_TAIL) begin
          bit found;
          found = 0;
          for (int j = 0; j + cur.size() <= exp[k].size() && !found; j++)
            if (exp[k][j].kind == FK_HEAD) begin
              bit eq;
              eq = 1;
              foreach (cur[m]) if (exp[k][j + m] != cur[m]) eq = 0;
              if (eq) found = 1;
            end
          check(found, $sformatf("S%0d packet %0d arrived whole", k + 1, got));
          got++;
          n_func++;
          cur.delete();
        end
      end
      check(cur.size() == 0, "no partial packet");
    end
    check(n_func == nexp, $sformatf("%0d of %0d functional packets delivered", n_func, nexp));
  endtask

  int t_step;
  task automatic step(string name);
    $display("schedule step %s: %0d cycles", name, cyc - t_step);
    t_step = cyc;
  endtask

  initial begin
    pkt_t pkt;
    logic [3:0] pf;
    loc_in_valid = '0; loc_in_flit = '0; pf_shift = 0;
    pd = '{0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    t_step = cyc;

    // ---- RLBs first, while they hold their reset state ----
    rlb_test(1);
    step("S1 RLB");

    // ---- S1 ----
    fifo_tests(1, '{}, '{}, 4'b0001, '{0, 1, 2, 4, 5, 6, 7}, "S1");
    step("S1 FIFOs");
    // ---- l1, l2 ----
    uc_head(pkt, 1);
    link_test(pkt, 4'b0001, 4'b0011, '{1, 0, 2, 0}, "links l1 l2");
    step("l1 l2");

    // ---- S2 and S3 together ----
    rlb_test(2);
    rlb_test(3);
    fifo_tests(0, '{1}, '{4'b0011}, 4'b0110, '{1, 2, 3, 4, 5, 6, 7}, "S2+S3");
    step("S2 S3");
    // ---- l1' l5' l3 from S2, l2' l5 l4 from S3 ----
    mc_head(pkt, '{1}, '{4'b0011});
    link_test(pkt, 4'b0110, 4'b0111, '{0, 0, 2, 1, 3, 0, 0, 1, 1, 1, 3, 1},
              "links l1' l2' l3 l4 l5 l5'");
    step("l1' l2' l3 l4 l5 l5'");

    // ---- S4 ----
    rlb_test(4);
    fifo_tests(0, '{1, 2}, '{4'b0001, 4'b0100}, 4'b1000, '{1, 2, 3, 4, 5, 6, 7}, "S4");
    step("S4");
    // ---- l3', l4' ----
    uc_head(pkt, 4);
    link_test(pkt, 4'b1000, 4'b0011, '{1, 2, 2, 2}, "links l3' l4'");
    step("l3' l4'");

    // ---- arrival FIFOs of S2, S3, S4, reached by another port ----
    fifo_tests(0, '{1, 3}, '{4'b0010, 4'b0010}, 4'b0010, '{0}, "S2 via S3");
    fifo_tests(0, '{1, 2}, '{4'b0001, 4'b0010}, 4'b0100, '{0}, "S3 via S2");
    fifo_tests(0, '{1, 3}, '{4'b0010, 4'b0100}, 4'b1000, '{0}, "S4 via S3");
    step("remaining input FIFOs");

    read_pf(pf);
    check(pf == 4'b0000, $sformatf("pass/fail after the schedule: %b", pf));
    check(nfail == 0, "no failure during the schedule");

    // ---- functional traffic between all local ports ----
    functional_traffic();
    step("functional traffic");

    // ---- a failing test: wrong expected word for a FIFO of S3 ----
    begin
      int f0, base[4];
      bit ok;
      f0 = nfail; base = pd;
      uc_head(pkt, 3); add_ctrl(pkt, CUT_FIFO, 6); add_fifo_data(pkt, 4, 7); add_tail(pkt);
      send(0, pkt);
      wait_pd(base, 4'b0100, ok);
      check(ok && nfail == f0 + 1, "fault in the S3 test is reported");
      read_pf(pf);
      check(pf == 4'b0100, $sformatf("pass/fail read-out names S3: %b", pf));
      if (pf == 4'b0100) n_det++;
      read_pf(pf);
      check(pf == 4'b0000, "read-out clears the register");
    end

    // ---- every mechanism must have happened ----
    $display("unicast test packets      %0d", n_uc);
    $display("multicast test packets    %0d", n_mc);
    $display("multicast copy cycles     %0d", nmc_copy);
    $display("FIFO tests                %0d", n_fifo);
    $display("RLB scan tests            %0d", n_rlb);
    $display("link checks               %0d", n_link);
    $display("test packets through RLB  %0d", nrlb_fwd);
    $display("functional packets        %0d", n_func);
    $display("flow-control stall cycles %0d", nstall);
    $display("pass/fail read-outs       %0d", n_pf);
    $display("faults detected           %0d", n_det);
    check(n_uc > 0, "unicast test transport happened");
    check(n_mc > 0 && nmc_copy > 0, "multicast copying happened");
    check(n_fifo == 4 * 8 - 1, "every FIFO but the tester's input tested");
    check(n_rlb == 4, "every RLB tested");
    check(n_link == 10, "every link tested");
    check(nrlb_fwd > 0, "test packets forwarded through RLBs");
    check(n_func > 0, "functional packets delivered");
    check(nstall > 0, "flow-control stalls happened");
    check(n_pf > 0, "pass/fail register read");
    check(n_det > 0, "a fault was detected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
