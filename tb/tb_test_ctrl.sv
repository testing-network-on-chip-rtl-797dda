// tb_test_ctrl: self-checking test of the test controller.
//
// The TC is connected to a real FIFO (as FIFO 4), to a scan-chain model of an RLB
// (32 chains of two flops whose capture inverts every bit) and to a loop-back of
// its link outputs 0 and 2 through one register each (the links). Test packets are
// built here from the packet layout; expected data are computed here. Cases:
//   - FIFO test, the four patterns 0101.., 1010.., 0000.., 1111.., passes and keeps
//     the TC busy exactly one cycle per flit;
//   - the same with one wrong expected word sets the pass/fail flop, which shifts
//     out as 1; so does a full flag stuck at 1;
//   - RLB scan test with correct expected words passes, and with one wrong word
//     fails;
//   - link test on ports 0 and 2 passes in 8*32 cycles; with one wire stuck on the
//     loop-back of port 2 it fails;
//   - a wrong T_start fails; a multicast header's route flits are skipped.
module tb_test_ctrl;
  import noc_pkg::*;
  localparam int L = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  flit_t in_flit;
  logic fifo_act, fifo_wo, fifo_ro, fifo_ef, fifo_ff;
  logic [2:0] fifo_idx;
  logic [FLIT_W+1:0] fifo_wdata, fifo_rdata;
  logic [2:0] fifo_free;
  logic rlb_test_mode, rlb_scan_en, rlb_capture;
  logic [FLIT_W-1:0] rlb_scan_in, rlb_scan_out;
  logic [NPORTS-1:0] lt_tx_en, lt_rx_valid, link_done;
  logic [FLIT_W-1:0] lt_tx_vec;
  logic [NPORTS-1:0][FLIT_W-1:0] lt_rx_data;
  logic pf_shift, pf_in, pf_out, pkt_done, fail_evt;
  logic [FLIT_W-1:0] stuck_mask;
  int checks = 0, failures = 0;

  test_ctrl #(.FIFO_DEPTH(4), .RLB_SCAN_LEN(L)) dut (.*);

  noc_fifo #(.WIDTH(FLIT_W + 2), .DEPTH(4)) u_fifo (
    .clk, .rst_n, .wo(fifo_act && fifo_wo), .wdata(fifo_wdata), .ro(fifo_act && fifo_ro),
    .rdata(fifo_rdata), .ef(fifo_ef), .ff(fifo_ff_raw), .free(fifo_free));
  // a full flag stuck at 1 can be injected
  logic fifo_ff_raw, ff_stuck;
  assign fifo_ff = fifo_ff_raw | ff_stuck;

  // RLB scan model: chain c = {sc[c][1], sc[c][0]}, scan_out = sc[c][1]
  logic [FLIT_W-1:0] sc0, sc1;
  assign rlb_scan_out = sc1;
  logic sc_clr;
  always @(posedge clk) begin
    if (sc_clr) begin sc1 <= '0; sc0 <= '0; end
    else if (rlb_test_mode && rlb_scan_en) begin sc1 <= sc0; sc0 <= rlb_scan_in; end
    else if (rlb_test_mode && rlb_capture) begin sc1 <= ~sc1; sc0 <= ~sc0; end
  end

  // link loop-back
  always_ff @(posedge clk) begin
    lt_rx_valid <= lt_tx_en;
    for (int p = 0; p < NPORTS; p++)
      lt_rx_data[p] <= (p == 2) ? (lt_tx_vec | stuck_mask) : lt_tx_vec;
  end

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

  int nfail;
  always @(posedge clk) if (rst_n && fail_evt) nfail++;

  // send a packet, one flit per cycle when ready; return the cycles it took
  task automatic send(flit_t pkt[$], output int cycles);
    cycles = 0;
    foreach (pkt[i]) begin
      in_valid = 1; in_flit = pkt[i];
      #1;
      while (!in_ready) begin @(posedge clk); #1; cycles++; end
      @(posedge clk);
      #1;
      cycles++;
    end
    in_valid = 0;
  endtask

  function automatic void frame(ref flit_t pkt[$], input cut_e c, input logic [7:0] tgt);
    pkt.delete();
    pkt.push_back('{FK_HEAD, mk_header(PK_TEST_UC, 8'd0, 4'd1)});
    pkt.push_back('{FK_BODY, mk_ctrl(c, tgt, 16'd0)});
    pkt.push_back('{FK_BODY, T_START});
  endfunction

  // FIFO packet: per pattern I0, (I1,E0), (I2,E1), (I3,E2), E3
  function automatic void fifo_pkt(ref flit_t pkt[$], input int bad);
    logic [FLIT_W-1:0] pats[4];
    int n = 0;
    pats = '{{16{2'b01}}, {16{2'b10}}, '0, '1};
    frame(pkt, CUT_FIFO, 8'd4);
    foreach (pats[p]) begin
      logic [FLIT_W-1:0] w[4];
      for (int k = 0; k < 4; k++) w[k] = (k % 2) ? ~pats[p] : pats[p];
      pkt.push_back('{FK_BODY, w[0]});
      for (int k = 1; k < 4; k++) begin
        pkt.push_back('{FK_BODY, w[k]});
        pkt.push_back('{FK_BODY, (n == bad) ? ~w[k-1] : w[k-1]});
        n++;
      end
      pkt.push_back('{FK_BODY, w[3]});
    end
    pkt.push_back('{FK_TAIL, ~T_START});
  endfunction

  // RLB packet: three patterns of L (scan-in, expected scan-out) pairs, then an
  // unload of zeros. Expected words follow the model: shift, then capture inverts.
  function automatic void rlb_pkt(ref flit_t pkt[$], input int bad);
    logic [FLIT_W-1:0] chain[L];   // chain[L-1] is at scan_out
    logic [FLIT_W-1:0] si, so;
    frame(pkt, CUT_RLB, 8'd0);
    for (int j = 0; j < L; j++) chain[j] = '0;
    for (int k = 0; k < 4 * L; k++) begin
      si = (k >= 3 * L) ? 32'h0 : 32'($urandom);
      so = chain[L-1];
      pkt.push_back('{FK_BODY, si});
      pkt.push_back('{FK_BODY, (k == bad) ? ~so : so});
      for (int j = L - 1; j > 0; j--) chain[j] = chain[j-1];
      chain[0] = si;
      if (k % L == L - 1)
        for (int j = 0; j < L; j++) chain[j] = ~chain[j];   // capture
    end
    pkt.push_back('{FK_TAIL, ~T_START});
  endfunction

  initial begin
    flit_t pkt[$];
    int cyc;
    in_valid = 0; in_flit = '0; pf_shift = 0; pf_in = 0; stuck_mask = '0; ff_stuck = 0;
    sc_clr = 1; nfail = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    sc_clr = 0;

    // FIFO test, good
    fifo_pkt(pkt, -1);
    nfail = 0;
    send(pkt, cyc);
    @(negedge clk);
    check(nfail == 0 && !pf_out, "FIFO test passes");
    check(cyc == pkt.size(), "FIFO test: one flit per cycle");
    check(fifo_idx == 3'd4, "FIFO index from control field");
    // FIFO test, one bad expected word
    fifo_pkt(pkt, 5);
    send(pkt, cyc);
    @(negedge clk);
    check(nfail == 1 && pf_out, "FIFO mismatch detected");
    // pass/fail flop shifts out and is cleared by the shift-in
    pf_shift = 1; pf_in = 0;
    @(negedge clk);
    pf_shift = 0;
    check(!pf_out, "pass/fail shifted");
    // full flag stuck at 1
    nfail = 0;
    ff_stuck = 1;
    fifo_pkt(pkt, -1);
    send(pkt, cyc);
    @(negedge clk);
    ff_stuck = 0;
    check(nfail > 0 && pf_out, "stuck full flag detected");
    pf_shift = 1; @(negedge clk); pf_shift = 0;

    // RLB scan test
    nfail = 0;
    rlb_pkt(pkt, -1);
    send(pkt, cyc);
    @(negedge clk);
    check(nfail == 0 && !pf_out, $sformatf("RLB scan test passes (%0d)", nfail));
    check(cyc == pkt.size() + 4, "RLB scan test: one capture cycle per pattern");
    check(!rlb_test_mode, "RLB released");
    sc_clr = 1; @(negedge clk); sc_clr = 0;
    rlb_pkt(pkt, 3);
    send(pkt, cyc);
    @(negedge clk);
    check(nfail == 1 && pf_out, "RLB mismatch detected");
    pf_shift = 1; @(negedge clk); pf_shift = 0;

    // link test on ports 0 and 2
    nfail = 0;
    frame(pkt, CUT_LINK, 8'b0101);
    pkt.push_back('{FK_TAIL, ~T_START});
    fork
      send(pkt, cyc);
      begin
        int n0 = 0, d0 = 0, d2 = 0;
        for (int i = 0; i < 8 * FLIT_W + 40; i++) begin
          @(posedge clk);
          if (lt_tx_en == 4'b0101) n0++;
          else check(lt_tx_en == 0, "only ports 0 and 2 driven");
          if (link_done[0]) d0++;
          if (link_done[2]) d2++;
        end
        check(n0 == 8 * FLIT_W, "link test: 8 vectors per wire");
        check(d0 == 1 && d2 == 1, "both link checks finished");
      end
    join
    @(negedge clk);
    check(nfail == 0 && !pf_out, "link test passes");
    // stuck wire on link 2
    stuck_mask = 32'h0000_0100;
    send(pkt, cyc);
    repeat (8 * FLIT_W + 10) @(negedge clk);
    check(nfail > 0 && pf_out, "stuck wire detected");
    stuck_mask = '0;
    pf_shift = 1; @(negedge clk); pf_shift = 0;

    // wrong T_start
    nfail = 0;
    pkt.delete();
    pkt.push_back('{FK_HEAD, mk_header(PK_TEST_UC, 8'd0, 4'd1)});
    pkt.push_back('{FK_BODY, mk_ctrl(CUT_NONE, 8'd0, 16'd0)});
    pkt.push_back('{FK_BODY, ~T_START});
    pkt.push_back('{FK_TAIL, ~T_START});
    send(pkt, cyc);
    @(negedge clk);
    check(nfail == 1, "wrong T_start detected");

    // multicast header: two route flits skipped, then a passing FIFO test
    nfail = 0;
    fifo_pkt(pkt, -1);
    pkt[0] = '{FK_HEAD, mk_header(PK_TEST_MC, 8'd2, 4'd0)};
    pkt.insert(1, '{FK_BODY, mk_route(4'd3, 4'b0001)});
    pkt.insert(1, '{FK_BODY, mk_route(4'd2, 4'b0010)});
    send(pkt, cyc);
    @(negedge clk);
    check(nfail == 0, "multicast route flits skipped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
