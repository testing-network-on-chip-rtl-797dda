// noc_switch: four-port wormhole switch with test support for itself and its links.
//
// Each port has an input FIFO and an output FIFO (FIFO_DEPTH flits each). Between
// them sit two paths: the routing logic block (RLB) for functional packets and
// unicast test packets passing through, and the multicast wrapper unit (MWU) for
// test packets that this switch copies to several outputs or keeps for itself.
// Each output FIFO is written either by the RLB crossbar or by the MWU, whichever
// holds it. Test packets kept by the switch go to the test controller (TC), which
// can take one FIFO, the RLB, or a set of outgoing links out of normal operation
// and test it:
//   - a FIFO under test has its write and read ports driven by the TC; the flow
//     control of its port is held off meanwhile;
//   - the RLB under test is switched to its scan chains and wrapper;
//   - links under test are driven straight from the TC's MAF generator, past the
//     output FIFO. Incoming MAF vectors (FK_LTEST) bypass the input FIFO and go to
//     the TC's link checker for that port.
//
// Port interface, per port p: in_valid/in_flit/in_ready from the incoming link,
// out_valid/out_flit/out_ready to the outgoing link. in_ready is high while the
// input FIFO has at least two free cells (one flit may still be on the link);
// out_valid is raised only while out_ready is high. Latency through an idle switch
// is three cycles from the input FIFO write to the output port (FIFO, RLB grant,
// output FIFO).
//
// The structure (input and output FIFOs around an RLB, MWU multiplexers that bypass
// the RLB, a TC shared by the switch and its links, the pass/fail flop) follows the
// design; port flow control and the multiplexing details are this design's own.
module noc_switch
  import noc_pkg::*;
#(
  parameter logic [ADDR_W-1:0]             MY_ADDR    = '0,
  parameter logic [PORT_W-1:0]             LOCAL_PORT = 2'd3,
  parameter logic [(1<<ADDR_W)*PORT_W-1:0] ROUTE_TBL  = '0,
  parameter int unsigned                   FIFO_DEPTH = 4,
  parameter int unsigned                   MAX_ROUTE  = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic  [NPORTS-1:0]         in_valid,
  input  flit_t [NPORTS-1:0]         in_flit,
  output logic  [NPORTS-1:0]         in_ready,
  output logic  [NPORTS-1:0]         out_valid,
  output flit_t [NPORTS-1:0]         out_flit,
  input  logic  [NPORTS-1:0]         out_ready,
  // pass/fail shift register
  input  logic                       pf_shift,
  input  logic                       pf_in,
  output logic                       pf_out,
  // test observation
  output logic                       pkt_done,
  output logic  [NPORTS-1:0]         link_done,
  output logic                       fail_evt
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  // ---------------- wires ----------------
  flit_t [NPORTS-1:0]      ih_flit, oh_flit;      // FIFO heads
  logic  [NPORTS-1:0]      i_ef, i_ff, o_ef, o_ff;
  logic  [NPORTS-1:0][CW-1:0] i_free, o_free;
  logic  [NPORTS-1:0]      i_wo, i_ro, o_wo, o_ro;
  flit_t [NPORTS-1:0]      i_wd, o_wd;
  logic  [NPORTS-1:0]      i_tst, o_tst;          // FIFO under test
  logic  [NPORTS-1:0]      i_valid;

  logic  [NPORTS-1:0]      rlb_req, rlb_head, rlb_tail, rlb_oready;
  logic  [NPORTS-1:0][ADDR_W-1:0] rlb_dest;
  logic  [NPORTS-1:0]      rlb_pop, rlb_push, rlb_busy, rlb_bound;
  logic  [NPORTS-1:0][PORT_W-1:0] rlb_sel;

  logic  [NPORTS-1:0]      mwu_pop, mwu_busy, mwu_takes;
  logic  [NPORTS:0]        mwu_tready, mwu_push, mwu_own;
  flit_t [NPORTS:0]        mwu_flit;

  logic                    tc_ready, tc_fifo_act, tc_wo, tc_ro;
  logic  [2:0]             tc_fifo_idx;
  logic  [FLIT_W+1:0]      tc_wdata, tc_rdata;
  logic                    tc_ef, tc_ff;
  logic                    tc_tmode, tc_sen, tc_cap;
  logic  [FLIT_W-1:0]      tc_si, tc_so;
  logic  [NPORTS-1:0]      lt_tx_en, lt_rx_valid;
  logic  [FLIT_W-1:0]      lt_tx_vec;
  logic  [NPORTS-1:0][FLIT_W-1:0] lt_rx_data;

  // ---------------- FIFO isolation select ----------------
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      i_tst[p] = tc_fifo_act && tc_fifo_idx == 3'(p);
      o_tst[p] = tc_fifo_act && tc_fifo_idx == 3'(p + NPORTS);
    end
    tc_rdata = tc_fifo_idx[2] ? oh_flit[tc_fifo_idx[1:0]] : ih_flit[tc_fifo_idx[1:0]];
    tc_ef    = tc_fifo_idx[2] ? o_ef[tc_fifo_idx[1:0]]        : i_ef[tc_fifo_idx[1:0]];
    tc_ff    = tc_fifo_idx[2] ? o_ff[tc_fifo_idx[1:0]]        : i_ff[tc_fifo_idx[1:0]];
  end

  // ---------------- input ports ----------------
  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    assign lt_rx_valid[p] = in_valid[p] && in_flit[p].kind == FK_LTEST;
    assign lt_rx_data[p]  = in_flit[p].data;
    assign i_wo[p] = i_tst[p] ? tc_wo : (in_valid[p] && in_flit[p].kind != FK_LTEST);
    assign i_wd[p] = i_tst[p] ? flit_t'(tc_wdata) : in_flit[p];
    assign i_ro[p] = i_tst[p] ? tc_ro : (rlb_pop[p] || mwu_pop[p]);
    assign in_ready[p] = !i_tst[p] && (i_free[p] >= CW'(2));
    assign i_valid[p]  = !i_tst[p] && !i_ef[p];

    noc_fifo #(.WIDTH(FLIT_W + 2), .DEPTH(FIFO_DEPTH)) u_ififo (
      .clk, .rst_n, .wo(i_wo[p]), .wdata(i_wd[p]), .ro(i_ro[p]), .rdata(ih_flit[p]),
      .ef(i_ef[p]), .ff(i_ff[p]), .free(i_free[p])
    );

    assign rlb_req[p]  = i_valid[p] && !mwu_busy[p] && !mwu_takes[p];
    assign rlb_head[p] = ih_flit[p].kind == FK_HEAD;
    assign rlb_tail[p] = ih_flit[p].kind == FK_TAIL;
    assign rlb_dest[p] = hdr_dest(ih_flit[p].data);
  end

  // ---------------- RLB ----------------
  rlb #(
    .SCAN_CHAINS(FLIT_W), .MY_ADDR(MY_ADDR), .LOCAL_PORT(LOCAL_PORT), .ROUTE_TBL(ROUTE_TBL)
  ) u_rlb (
    .clk, .rst_n,
    .in_req(rlb_req), .in_head(rlb_head), .in_tail(rlb_tail), .in_dest(rlb_dest),
    .out_ready(rlb_oready), .pop(rlb_pop), .push(rlb_push), .out_sel(rlb_sel),
    .out_busy(rlb_busy), .in_bound(rlb_bound),
    .test_mode(tc_tmode), .scan_en(tc_sen), .capture(tc_cap),
    .scan_in(tc_si), .scan_out(tc_so)
  );

  // ---------------- MWU ----------------
  mwu #(.MY_ADDR(MY_ADDR), .MAX_ROUTE(MAX_ROUTE)) u_mwu (
    .clk, .rst_n,
    .in_valid(i_valid), .in_flit(ih_flit), .rlb_bound(rlb_bound),
    .pop(mwu_pop), .busy(mwu_busy), .takes(mwu_takes),
    .tgt_ready(mwu_tready), .rlb_busy(rlb_busy),
    .tgt_push(mwu_push), .tgt_flit(mwu_flit), .tgt_own(mwu_own)
  );

  assign mwu_tready[NPORTS] = tc_ready;

  // ---------------- output ports ----------------
  for (genvar q = 0; q < NPORTS; q++) begin : g_out
    assign rlb_oready[q] = !o_ff[q] && !o_tst[q] && !mwu_own[q];
    assign mwu_tready[q] = !o_ff[q] && !o_tst[q];
    assign o_wo[q] = o_tst[q] ? tc_wo : (mwu_own[q] ? mwu_push[q] : rlb_push[q]);
    assign o_wd[q] = o_tst[q] ? flit_t'(tc_wdata) :
                     (mwu_own[q] ? mwu_flit[q] : ih_flit[rlb_sel[q]]);

    noc_fifo #(.WIDTH(FLIT_W + 2), .DEPTH(FIFO_DEPTH)) u_ofifo (
      .clk, .rst_n, .wo(o_wo[q]), .wdata(o_wd[q]), .ro(o_ro[q]), .rdata(oh_flit[q]),
      .ef(o_ef[q]), .ff(o_ff[q]), .free(o_free[q])
    );

    always_comb begin
      if (lt_tx_en[q]) begin
        out_valid[q]      = 1'b1;
        out_flit[q].kind  = FK_LTEST;
        out_flit[q].data  = lt_tx_vec;
        o_ro[q]           = o_tst[q] && tc_ro;
      end else begin
        out_valid[q] = !o_tst[q] && !o_ef[q] && out_ready[q];
        out_flit[q]  = oh_flit[q];
        o_ro[q]      = o_tst[q] ? tc_ro : out_valid[q];
      end
    end
  end

  // ---------------- TC ----------------
  test_ctrl #(.FIFO_DEPTH(FIFO_DEPTH), .RLB_SCAN_LEN(rlb_scan_len(FLIT_W))) u_tc (
    .clk, .rst_n,
    .in_valid(mwu_push[NPORTS]), .in_flit(mwu_flit[NPORTS]), .in_ready(tc_ready),
    .fifo_act(tc_fifo_act), .fifo_idx(tc_fifo_idx), .fifo_wo(tc_wo), .fifo_ro(tc_ro),
    .fifo_wdata(tc_wdata), .fifo_rdata(tc_rdata), .fifo_ef(tc_ef), .fifo_ff(tc_ff),
    .rlb_test_mode(tc_tmode), .rlb_scan_en(tc_sen), .rlb_capture(tc_cap),
    .rlb_scan_in(tc_si), .rlb_scan_out(tc_so),
    .lt_tx_en(lt_tx_en), .lt_tx_vec(lt_tx_vec),
    .lt_rx_valid(lt_rx_valid), .lt_rx_data(lt_rx_data),
    .pf_shift, .pf_in, .pf_out, .pkt_done, .link_done, .fail_evt
  );

endmodule
