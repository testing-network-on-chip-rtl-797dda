// tb_noc_fabric_unicast: the four-switch network tested by unicast only.
//
// The tester on S1's local port tests one element after the other, in the order of
// the unicast schedule for this network with S1 as the source: S1, l1, l2, S2, l1',
// S3, l2', l5, l5', l3, S4, l3', l4, l4'. Every test packet is a unicast packet,
// routed through the RLBs of the switches on its way; every link is tested on its
// own. The input FIFO on which unicast packets reach each switch (and S1's local
// input FIFO) cannot be reached this way and is left out. The cycle count of each
// step is printed and the pass/fail register must read all pass. The switch tests
// must differ in time only by the transport latency, one link cycle and three switch
// cycles per extra hop for each packet, as the test-time model of the method has it.
//
// Then the RLB and FIFO tests of S2 and S3 are repeated with the FIFO tests sent as
// multicast packets to both switches at once; that must take fewer cycles than
// the same tests by unicast. Every mechanism used is counted; one that never
// happened is a failure.
module tb_noc_fabric_unicast;
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
    // the first unload returns the state the RLB holds now: after earlier traffic
    // its round-robin pointers are no longer at their reset values
    uc_head(pkt, sw); add_ctrl(pkt, CUT_RLB, 0);
    add_rlb_data(pkt, 8, -1, p_rlb_state[sw-1], sw, 3, tbl(sw)); add_tail(pkt);
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
  int t_step;
  int last_step;
  task automatic step(string name);
    $display("schedule step %s: %0d cycles", name, cyc - t_step);
    last_step = cyc - t_step;
    t_step = cyc;
  endtask

  // unicast link test of one output port of switch sw, checked at (dsw, dport)
  task automatic uc_link(int sw, int port, int dsw, int dport, string name);
    pkt_t pkt;
    uc_head(pkt, sw);
    link_test(pkt, 4'(1 << (sw - 1)), 4'(1 << port), '{dsw, dport}, name);
    n_uc++;
  endtask

  initial begin
    logic [3:0] pf;
    int t_uc, t_mc, t0;
    int ts[4];   // cycles of the switch test steps S1..S4
    loc_in_valid = '0; loc_in_flit = '0; pf_shift = 0;
    pd = '{0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    t_step = cyc;

    // the unicast schedule, one element after the other
    rlb_test(1);
    fifo_tests(1, '{}, '{}, 4'b0001, '{0, 1, 2, 4, 5, 6, 7}, "S1");
    step("S1");
    ts[0] = last_step;
    uc_link(1, 0, 1, 0, "l1");   step("l1");
    uc_link(1, 1, 2, 0, "l2");   step("l2");
    t0 = cyc;
    rlb_test(2);
    fifo_tests(2, '{}, '{}, 4'b0010, '{1, 2, 3, 4, 5, 6, 7}, "S2");
    t_uc = cyc - t0;
    step("S2");
    ts[1] = last_step;
    uc_link(2, 0, 0, 0, "l1'");  step("l1'");
    t0 = cyc;
    rlb_test(3);
    fifo_tests(3, '{}, '{}, 4'b0100, '{1, 2, 3, 4, 5, 6, 7}, "S3");
    t_uc += cyc - t0;
    step("S3");
    ts[2] = last_step;
    uc_link(3, 0, 0, 1, "l2'");  step("l2'");
    uc_link(3, 1, 1, 1, "l5");   step("l5");
    uc_link(2, 1, 2, 1, "l5'");  step("l5'");
    uc_link(2, 2, 3, 0, "l3");   step("l3");
    rlb_test(4);
    fifo_tests(4, '{}, '{}, 4'b1000, '{1, 2, 3, 4, 5, 6, 7}, "S4");
    step("S4");
    ts[3] = last_step;
    uc_link(4, 0, 1, 2, "l3'");  step("l3'");
    uc_link(3, 2, 3, 1, "l4");   step("l4");
    uc_link(4, 1, 2, 2, "l4'");  step("l4'");
    $display("unicast schedule: %0d cycles in all", cyc);

    // transport latency per hop is one link cycle plus three switch cycles; each
    // switch test is 8 packets (RLB and 7 FIFOs), S2 and S3 one hop away, S4 two
    check(ts[1] - ts[0] == 8 * (1 + 3), $sformatf("S2 costs 8 hops more than S1 (%0d)", ts[1] - ts[0]));
    check(ts[2] == ts[1], "S3 costs the same as S2");
    check(ts[3] - ts[1] == 8 * (1 + 3), $sformatf("S4 costs 8 hops more than S2 (%0d)", ts[3] - ts[1]));

    read_pf(pf);
    check(pf == 4'b0000, $sformatf("pass/fail after the schedule: %b", pf));
    check(nfail == 0, "no failure during the schedule");

    // the same S2 and S3 tests again, the FIFOs by multicast: must be faster
    t0 = cyc;
    rlb_test(2);
    rlb_test(3);
    fifo_tests(0, '{1}, '{4'b0011}, 4'b0110, '{1, 2, 3, 4, 5, 6, 7}, "S2+S3");
    t_mc = cyc - t0;
    $display("S2 and S3: %0d cycles by unicast, %0d with multicast", t_uc, t_mc);
    check(t_mc < t_uc, "multicast shortens the test of S2 and S3");
    read_pf(pf);
    check(pf == 4'b0000, "still all pass");

    $display("unicast test packets      %0d", n_uc);
    $display("multicast test packets    %0d", n_mc);
    $display("multicast copy cycles     %0d", nmc_copy);
    $display("FIFO tests                %0d", n_fifo);
    $display("RLB scan tests            %0d", n_rlb);
    $display("link checks               %0d", n_link);
    $display("test packets through RLB  %0d", nrlb_fwd);
    $display("pass/fail read-outs       %0d", n_pf);
    check(n_uc > 0, "unicast test transport happened");
    check(n_mc > 0 && nmc_copy > 0, "multicast copying happened");
    check(n_fifo == 7 * 4 + 14, "FIFO tests");
    check(n_rlb == 6, "RLB tests");
    check(n_link == 10, "every link tested, one at a time");
    check(nrlb_fwd > 0, "test packets forwarded through RLBs");
    check(n_pf > 0, "pass/fail register read");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
