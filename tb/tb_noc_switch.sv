// tb_noc_switch: self-checking test of one switch with its test hardware.
//
// The switch has address 2 and the routing table of a middle switch (1 -> port 0,
// 3 -> port 1, 4 -> port 2, own address -> local port 3). The testbench drives the
// four input ports directly and collects every output port, with the outputs'
// ready wires under its control. Cases:
//   - scan test of the RLB with expected data from an independent RLB model;
//   - march test of all eight FIFOs through test packets, then one with a wrong
//     expected word, which must set the pass/fail flop;
//   - functional packets routed by destination, three cycles from input to output
//     through an idle switch; two packets for one output at once, under random
//     output stalls, arrive whole and one after the other;
//   - a unicast test packet for another switch passes through like a functional one;
//   - a multicast test packet whose route names this switch is copied to the listed
//     ports; one whose route does not is kept by the test controller;
//   - a link test sends 8 vectors per wire, 256 in consecutive cycles, on the named
//     port only, equal to the MAF model; incoming MAF vectors are checked, and a
//     wrong one is reported.
module tb_noc_switch;
  import noc_pkg::*;
  import noc_tb_pkg::*;

  localparam logic [(1<<ADDR_W)*PORT_W-1:0] TBL =
    (32'd0 << 2) | (32'd1 << 6) | (32'd2 << 8);   // 1 -> 0, 3 -> 1, 4 -> 2

  logic clk = 0, rst_n = 0;
  logic  [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready, link_done;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  logic pf_shift, pf_in, pf_out, pkt_done, fail_evt;
  int checks = 0, failures = 0;

  noc_switch #(.MY_ADDR(4'd2), .LOCAL_PORT(2'd3), .ROUTE_TBL(TBL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- output collection ----------------
  flit_t outq[NPORTS][$];
  flit_t ltq[NPORTS][$];
  int    lt_first[NPORTS], lt_last[NPORTS];
  int    cyc = 0, ndone = 0, nfail = 0, nstall = 0;
  int    first_out[NPORTS];
  bit    stall_mode = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (pkt_done) ndone++;
      if (fail_evt) nfail++;
      for (int q = 0; q < NPORTS; q++) begin
        if (out_valid[q] && out_flit[q].kind == FK_LTEST) begin
          if (ltq[q].size() == 0) lt_first[q] = cyc;
          lt_last[q] = cyc;
          ltq[q].push_back(out_flit[q]);
        end else if (out_valid[q] && out_ready[q]) begin
          if (first_out[q] < 0) first_out[q] = cyc;
          outq[q].push_back(out_flit[q]);
        end else if (!out_ready[q] && !dut.o_ef[q]) nstall++;
      end
    end
  end

  always @(negedge clk) begin
    if (stall_mode) out_ready <= 4'($urandom) | 4'b1011;
    else            out_ready <= '1;
    if (stall_mode && ($urandom % 3 == 0)) out_ready[2] <= 1'b0;
  end

  // ---------------- input drivers ----------------
  task automatic send(int p, pkt_t pkt);
    // like a link sender: a flit goes out only in a cycle where ready is high
    foreach (pkt[i]) begin
      in_valid[p] = 0;
      #1;
      while (!in_ready[p]) begin @(posedge clk); #1; end
      in_valid[p] = 1; in_flit[p] = pkt[i];
      @(posedge clk);
      #1;
    end
    in_valid[p] = 0;
  endtask

  task automatic wait_done(int n0, int n);
    for (int i = 0; i < 3000 && ndone < n0 + n; i++) @(negedge clk);
  endtask

  function automatic bit same(pkt_t a, pkt_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  task automatic clear_out;
    for (int q = 0; q < NPORTS; q++) begin
      outq[q].delete(); ltq[q].delete(); first_out[q] = -1;
    end
  endtask

  initial begin
    pkt_t pkt, pa, pb;
    int n0, t0;
    in_valid = '0; in_flit = '0; pf_shift = 0; pf_in = 0;
    clear_out();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- RLB scan test (the RLB is still in its reset state) ----
    n0 = ndone;
    uc_head(pkt, 2); add_ctrl(pkt, CUT_RLB, 0);
    add_rlb_data(pkt, 6, -1, 64'd0, 2, 3, TBL); add_tail(pkt);
    send(0, pkt);
    wait_done(n0, 1);
    check(ndone == n0 + 1 && nfail == 0 && !pf_out, "RLB scan test passes");
    check(dut.u_rlb.chain_q == '0, "RLB left idle");

    // ---- FIFO tests: input FIFO 0 through port 1, the rest through port 0 ----
    for (int f = 0; f < 8; f++) begin
      n0 = ndone;
      uc_head(pkt, 2); add_ctrl(pkt, CUT_FIFO, f); add_fifo_data(pkt, 4, -1); add_tail(pkt);
      send((f == 0) ? 1 : 0, pkt);
      wait_done(n0, 1);
      check(ndone == n0 + 1 && nfail == 0, $sformatf("FIFO %0d test passes", f));
    end
    check(!pf_out, "pass/fail flop clear");
    n0 = ndone;
    uc_head(pkt, 2); add_ctrl(pkt, CUT_FIFO, 5); add_fifo_data(pkt, 4, 3); add_tail(pkt);
    send(0, pkt);
    wait_done(n0, 1);
    check(nfail == 1 && pf_out, "FIFO fault reported");
    pf_shift = 1; @(negedge clk); pf_shift = 0; nfail = 0;
    check(!pf_out, "pass/fail flop read out and cleared");
    for (int q = 0; q < NPORTS; q++) check(outq[q].size() == 0, "test packets stay inside");

    // ---- functional routing and latency ----
    begin
      int dests[3] = '{4, 2, 3};
      int ports[3] = '{2, 3, 1};
      foreach (dests[i]) begin
        clear_out();
        func_pkt(pkt, dests[i], 5);
        t0 = cyc + 1;   // the edge that writes the head flit
        send(0, pkt);
        repeat (8) @(negedge clk);
        check(same(outq[ports[i]], pkt), $sformatf("packet for %0d on port %0d", dests[i], ports[i]));
        check(first_out[ports[i]] - t0 == 3, $sformatf("latency %0d cycles", first_out[ports[i]] - t0));
      end
    end

    // ---- two packets for one output, random stalls ----
    clear_out();
    stall_mode = 1;
    func_pkt(pa, 4, 9);
    func_pkt(pb, 4, 7);
    fork
      send(0, pa);
      send(1, pb);
    join
    repeat (60) @(negedge clk);
    stall_mode = 0;
    check(outq[2].size() == pa.size() + pb.size(), "both packets delivered");
    begin
      pkt_t first, second;
      bit b_first;
      b_first = (outq[2].size() > 1 && outq[2][1] == pb[1]);
      foreach (outq[2][i])
        if (i < (b_first ? pb.size() : pa.size())) first.push_back(outq[2][i]);
        else second.push_back(outq[2][i]);
      check(b_first ? (same(first, pb) && same(second, pa)) : (same(first, pa) && same(second, pb)),
            "packets whole, one after the other");
    end
    check(nstall > 0, "output stalls happened");

    // ---- unicast test packet for another switch passes through ----
    clear_out();
    uc_head(pkt, 3); add_ctrl(pkt, CUT_NONE, 0); add_tail(pkt);
    n0 = ndone;
    send(3, pkt);
    repeat (8) @(negedge clk);
    check(same(outq[1], pkt) && ndone == n0, "unicast test packet forwarded to port 1");

    // ---- multicast: copies to ports 0 and 2 ----
    clear_out();
    mc_head(pkt, '{3, 2}, '{4'b0001, 4'b0101});
    add_ctrl(pkt, CUT_NONE, 0);
    for (int i = 0; i < 6; i++) pkt.push_back('{FK_BODY, $urandom});
    add_tail(pkt);
    n0 = ndone;
    send(1, pkt);
    repeat (10) @(negedge clk);
    check(same(outq[0], pkt) && same(outq[2], pkt), "multicast copies on ports 0 and 2");
    check(outq[1].size() == 0 && outq[3].size() == 0 && ndone == n0, "no other copies");
    // not in the route: kept by the test controller
    clear_out();
    mc_head(pkt, '{1, 3}, '{4'b0011, 4'b0100});
    add_ctrl(pkt, CUT_NONE, 0); add_tail(pkt);
    send(0, pkt);
    wait_done(n0, 1);
    check(ndone == n0 + 1 && nfail == 0, "multicast destination takes the packet");
    for (int q = 0; q < NPORTS; q++) check(outq[q].size() == 0, "nothing forwarded");

    // ---- link test on port 1 ----
    clear_out();
    n0 = ndone;
    uc_head(pkt, 2); add_ctrl(pkt, CUT_LINK, 4'b0010); add_tail(pkt);
    send(0, pkt);
    wait_done(n0, 1);
    check(ltq[1].size() == 8 * FLIT_W, $sformatf("%0d link vectors", ltq[1].size()));
    check(lt_last[1] - lt_first[1] == 8 * FLIT_W - 1, "vectors in consecutive cycles");
    check(ltq[0].size() == 0 && ltq[2].size() == 0 && ltq[3].size() == 0, "only port 1 driven");
    if (ltq[1].size() == 8 * FLIT_W)
      for (int v = 0; v < FLIT_W; v++)
        for (int s = 0; s < 8; s++)
          check(ltq[1][v*8 + s].data == maf_vec(v, s), "MAF vector");
    check(nfail == 0, "link test raises no failure");

    // ---- incoming MAF vectors on port 1: good, then one wrong ----
    for (int run = 0; run < 2; run++) begin
      int nd;
      nd = 0;
      nfail = 0;
      @(negedge clk);
      for (int i = 0; i < 8 * FLIT_W; i++) begin
        in_valid[1] = 1;
        in_flit[1] = '{FK_LTEST, maf_vec(i / 8, i % 8)};
        if (run == 1 && i == 100) in_flit[1].data[7] = ~in_flit[1].data[7];
        @(negedge clk);
        if (link_done[1]) nd++;
      end
      in_valid[1] = 0;
      repeat (4) begin @(negedge clk); if (link_done[1]) nd++; end
      check(nd == 1, $sformatf("incoming link check finishes (%0d)", nd));
      check(nfail == run, $sformatf("incoming link check, run %0d: %0d failures", run, nfail));
    end
    check(pf_out, "link fault in the pass/fail flop");
    check(dut.i_ef == '1, "MAF vectors bypass the input FIFOs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
