// noc_tb_pkg: packet builders and reference models shared by the switch and network
// testbenches.
//
// Packets are queues of flits. The builders write the test-packet layout (header,
// optional route flits, test-control flit, T_start, data, ~T_start) and compute the
// expected data of each test here, from models written independently of the RTL:
//   - maf_vec: the MAF link-test vector for a victim wire and a generator step;
//   - rlb_capture: the next state of the routing logic block for a scan state,
//     i.e. what one capture cycle must leave in the scan chains;
//   - FIFO test data: the march sequence with the four background patterns.
package noc_tb_pkg;
  import noc_pkg::*;

  typedef flit_t pkt_t[$];

  // MAF steps s1..s8: value of the victim wire and of all other wires
  localparam bit MAF_VT[8] = '{1, 0, 1, 1, 0, 1, 0, 0};
  localparam bit MAF_AG[8] = '{1, 0, 1, 0, 1, 0, 0, 1};

  function automatic logic [FLIT_W-1:0] maf_vec(int victim, int step);
    logic [FLIT_W-1:0] v;
    v = {FLIT_W{MAF_AG[step]}};
    v[victim] = MAF_VT[step];
    return v;
  endfunction

  // ---------------- packet framing ----------------
  function automatic void uc_head(ref pkt_t pkt, input int dest);
    pkt.delete();
    pkt.push_back('{FK_HEAD, mk_header(PK_TEST_UC, 8'd0, ADDR_W'(dest))});
  endfunction

  // multicast header: route entry i is (addr[i], port mask[i])
  function automatic void mc_head(ref pkt_t pkt, input int addr[$], input int mask[$]);
    pkt.delete();
    pkt.push_back('{FK_HEAD, mk_header(PK_TEST_MC, 8'(addr.size()), '0)});
    foreach (addr[i]) pkt.push_back('{FK_BODY, mk_route(ADDR_W'(addr[i]), NPORTS'(mask[i]))});
  endfunction

  function automatic void add_ctrl(ref pkt_t pkt, input cut_e c, input int tgt);
    pkt.push_back('{FK_BODY, mk_ctrl(c, 8'(tgt), 16'd0)});
    pkt.push_back('{FK_BODY, T_START});
  endfunction

  function automatic void add_tail(ref pkt_t pkt);
    pkt.push_back('{FK_TAIL, ~T_START});
  endfunction

  // ---------------- FIFO test ----------------
  // For each background pattern: I0, (I1,E0), ..., (I_n-1,E_n-2), E_n-1, with the
  // pattern and its complement in alternate cells. bad >= 0 spoils that expected word.
  function automatic void add_fifo_data(ref pkt_t pkt, input int depth, input int bad);
    logic [FLIT_W-1:0] pats[4];
    logic [FLIT_W-1:0] w[$];
    int n = 0;
    pats = '{{16{2'b01}}, {16{2'b10}}, '0, '1};
    foreach (pats[p]) begin
      w.delete();
      for (int k = 0; k < depth; k++) w.push_back((k % 2) ? ~pats[p] : pats[p]);
      pkt.push_back('{FK_BODY, w[0]});
      for (int k = 1; k < depth; k++) begin
        pkt.push_back('{FK_BODY, w[k]});
        pkt.push_back('{FK_BODY, (n == bad) ? ~w[k-1] : w[k-1]});
        n++;
      end
      pkt.push_back('{FK_BODY, w[depth-1]});
    end
  endfunction

  // ---------------- RLB model ----------------
  // Scan state layout, low bit first: w_req[3:0], w_head[7:4], w_tail[11:8],
  // w_dest[27:12] (4 bits per port), w_ready[31:28], bound[35:32], bport[43:36]
  // (2 bits per port), lock[47:44], rr[55:48], w_push[59:56], w_pop[63:60].
  function automatic logic [63:0] rlb_capture(logic [63:0] s, int my, int lp,
                                              logic [(1<<ADDR_W)*PORT_W-1:0] tbl);
    logic [63:0] n;
    bit req[4], head[4], tail[4], rdy[4], bound[4], lock[4];
    int dest[4], bport[4], rr[4], tq[4];
    bit pop[4], push[4], nbound[4], nlock[4];
    int nbport[4], nrr[4];
    for (int p = 0; p < 4; p++) begin
      req[p]   = s[p];
      head[p]  = s[4 + p];
      tail[p]  = s[8 + p];
      dest[p]  = s[12 + 4*p +: 4];
      rdy[p]   = s[28 + p];
      bound[p] = s[32 + p];
      bport[p] = s[36 + 2*p +: 2];
      lock[p]  = s[44 + p];
      rr[p]    = s[48 + 2*p +: 2];
      tq[p]    = (dest[p] == my) ? lp : int'(tbl[dest[p]*2 +: 2]);
      pop[p] = 0; push[p] = 0;
    end
    nbound = bound; nlock = lock; nbport = bport; nrr = rr;
    // connected inputs move a flit; the tail disconnects
    for (int p = 0; p < 4; p++)
      if (bound[p] && req[p] && rdy[bport[p]]) begin
        pop[p] = 1;
        push[bport[p]] = 1;
        if (tail[p]) begin nbound[p] = 0; nlock[bport[p]] = 0; end
      end
    // free outputs grant the next requesting head after the last winner
    for (int q = 0; q < 4; q++)
      if (!lock[q])
        for (int k = 1; k <= 4; k++) begin
          int c = (rr[q] + k) % 4;
          if (req[c] && head[c] && !bound[c] && tq[c] == q) begin
            nlock[q] = 1; nrr[q] = c; nbound[c] = 1; nbport[c] = q;
            break;
          end
        end
    n = s;
    for (int p = 0; p < 4; p++) begin
      n[32 + p]         = nbound[p];
      n[36 + 2*p +: 2]  = 2'(nbport[p]);
      n[44 + p]         = nlock[p];
      n[48 + 2*p +: 2]  = 2'(nrr[p]);
      n[56 + p]         = push[p];
      n[60 + p]         = pop[p];
    end
    return n;
  endfunction

  // RLB scan data: npat random states, each loaded while the previous response is
  // unloaded, then an all-zero load that leaves the RLB idle. init is the state the
  // chains hold before the test. With 32 chains of two flops, chain c holds state
  // bits 2c (entry side) and 2c+1 (scan_out side).
  function automatic void add_rlb_data(ref pkt_t pkt, input int npat, input int bad,
                                       input logic [63:0] init, input int my, input int lp,
                                       input logic [(1<<ADDR_W)*PORT_W-1:0] tbl);
    logic [63:0] cur, load;
    int n = 0;
    cur = init;
    for (int k = 0; k <= npat; k++) begin
      load = (k == npat) ? 64'd0 : {$urandom, $urandom};
      for (int j = 0; j < 2; j++) begin
        logic [FLIT_W-1:0] si, so;
        for (int c = 0; c < FLIT_W; c++) begin
          si[c] = load[2*c + 1 - j];
          so[c] = cur[2*c + 1 - j];
        end
        pkt.push_back('{FK_BODY, si});
        pkt.push_back('{FK_BODY, (n == bad) ? ~so : so});
        n++;
      end
      cur = rlb_capture(load, my, lp, tbl);
    end
  endfunction

  // ---------------- functional packet ----------------
  function automatic void func_pkt(ref pkt_t pkt, input int dest, input int nbody);
    pkt.delete();
    pkt.push_back('{FK_HEAD, mk_header(PK_FUNC, 8'd0, ADDR_W'(dest))});
    for (int i = 0; i < nbody; i++) pkt.push_back('{FK_BODY, $urandom});
    pkt.push_back('{FK_TAIL, $urandom});
  endfunction

endpackage
