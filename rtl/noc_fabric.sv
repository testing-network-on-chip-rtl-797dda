// noc_fabric: the four-switch example network S1..S4 with the test hardware in
// every switch, as a self-testing communication fabric.
//
// Topology (every link is a pair of one-way links, each with one cycle of latency):
//   S1 -l1-> S2, S2 -l1'-> S1,  S1 -l2-> S3, S3 -l2'-> S1,
//   S3 -l5-> S2, S2 -l5'-> S3,  S2 -l3-> S4, S4 -l3'-> S2,
//   S3 -l4-> S4, S4 -l4'-> S3.
// Switch Sk has address k. Port use per switch:
//   S1: 0 -> S2, 1 -> S3, 2 unused, 3 local
//   S2: 0 -> S1, 1 -> S3, 2 -> S4, 3 local
//   S3: 0 -> S1, 1 -> S2, 2 -> S4, 3 local
//   S4: 0 -> S2, 1 -> S3, 2 unused, 3 local
// The local port (3) of each switch is brought out (loc_*); it is where a core
// attaches, and on S1 it is also where the tester injects test packets, the chip
// I/Os being multiplexed onto that NoC channel. Functional packets are routed on
// shortest paths (S1<->S4 through S2). Test packets travel either the same way
// (unicast) or along the route listed in their header (multicast, through the
// MWUs).
//
// The pass/fail flops of the four test controllers form one shift register,
// S1 -> S2 -> S3 -> S4 -> pf_out; pf_shift moves it one place per cycle, so four
// shifts read all four results, S4's first. pkt_done, link_done and fail_evt expose
// the test controllers' events for observation.
//
// The topology and the link names follow the example network of the design; the
// link directions were derived from the order in which its schedule tests them,
// and the port numbering is this design's choice.
module noc_fabric
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned MAX_ROUTE  = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // local port (3) of switch k at index k-1
  input  logic  [3:0]                 loc_in_valid,
  input  flit_t [3:0]                 loc_in_flit,
  output logic  [3:0]                 loc_in_ready,
  output logic  [3:0]                 loc_out_valid,
  output flit_t [3:0]                 loc_out_flit,
  input  logic  [3:0]                 loc_out_ready,
  // pass/fail shift register
  input  logic                        pf_shift,
  output logic                        pf_out,
  // test observation, switch k at index k-1
  output logic  [3:0]                 pkt_done,
  output logic  [3:0][NPORTS-1:0]     link_done,
  output logic  [3:0]                 fail_evt
);

  localparam int unsigned NSW = 4;

  // Routing tables: ROUTE_TBL[dest*2 +: 2] = output port towards switch dest.
  function automatic logic [(1<<ADDR_W)*PORT_W-1:0] route_tbl(int unsigned sw);
    logic [(1<<ADDR_W)*PORT_W-1:0] t;
    t = '0;
    unique case (sw)
      1: begin t[2*2 +: 2] = 2'd0; t[3*2 +: 2] = 2'd1; t[4*2 +: 2] = 2'd0; end
      2: begin t[1*2 +: 2] = 2'd0; t[3*2 +: 2] = 2'd1; t[4*2 +: 2] = 2'd2; end
      3: begin t[1*2 +: 2] = 2'd0; t[2*2 +: 2] = 2'd1; t[4*2 +: 2] = 2'd2; end
      default: begin t[1*2 +: 2] = 2'd0; t[2*2 +: 2] = 2'd0; t[3*2 +: 2] = 2'd1; end
    endcase
    return t;
  endfunction

  // Link table: link j goes from (src switch, src port) to (dst switch, dst port),
  // switches numbered 0..3 here for S1..S4.
  localparam int unsigned NLINK = 10;
  localparam int unsigned L_SSW [NLINK] = '{0, 1, 0, 2, 2, 1, 1, 3, 2, 3};
  localparam int unsigned L_SPT [NLINK] = '{0, 0, 1, 0, 1, 1, 2, 0, 2, 1};
  localparam int unsigned L_DSW [NLINK] = '{1, 0, 2, 0, 1, 2, 3, 1, 3, 2};
  localparam int unsigned L_DPT [NLINK] = '{0, 0, 0, 1, 1, 1, 0, 2, 1, 2};
  //                          l1  l1' l2  l2' l5  l5' l3  l3' l4  l4'

  logic  [NSW-1:0][NPORTS-1:0] sw_in_valid, sw_in_ready, sw_out_valid, sw_out_ready;
  flit_t [NSW-1:0][NPORTS-1:0] sw_in_flit, sw_out_flit;
  logic  [NSW:0]               pf_chain;

  logic  [NLINK-1:0] lk_tx_ready, lk_rx_valid;
  flit_t [NLINK-1:0] lk_rx_flit;

  for (genvar j = 0; j < NLINK; j++) begin : g_link
    noc_link u_link (
      .clk, .rst_n,
      .tx_valid(sw_out_valid[L_SSW[j]][L_SPT[j]]),
      .tx_flit (sw_out_flit [L_SSW[j]][L_SPT[j]]),
      .tx_ready(lk_tx_ready[j]),
      .rx_valid(lk_rx_valid[j]),
      .rx_flit (lk_rx_flit[j]),
      .rx_ready(sw_in_ready[L_DSW[j]][L_DPT[j]])
    );
  end

  // Wire switch ports to links, the local port to the top, unused ports off.
  always_comb begin
    sw_in_valid  = '0;
    sw_in_flit   = '0;
    sw_out_ready = '0;
    for (int j = 0; j < NLINK; j++) begin
      sw_in_valid [L_DSW[j]][L_DPT[j]] = lk_rx_valid[j];
      sw_in_flit  [L_DSW[j]][L_DPT[j]] = lk_rx_flit[j];
      sw_out_ready[L_SSW[j]][L_SPT[j]] = lk_tx_ready[j];
    end
    for (int k = 0; k < NSW; k++) begin
      sw_in_valid [k][3] = loc_in_valid[k];
      sw_in_flit  [k][3] = loc_in_flit[k];
      sw_out_ready[k][3] = loc_out_ready[k];
      loc_in_ready[k]    = sw_in_ready[k][3];
      loc_out_valid[k]   = sw_out_valid[k][3];
      loc_out_flit[k]    = sw_out_flit[k][3];
    end
  end

  assign pf_chain[0] = 1'b0;

  for (genvar k = 0; k < NSW; k++) begin : g_sw
    noc_switch #(
      .MY_ADDR(ADDR_W'(k + 1)), .LOCAL_PORT(2'd3), .ROUTE_TBL(route_tbl(k + 1)),
      .FIFO_DEPTH(FIFO_DEPTH), .MAX_ROUTE(MAX_ROUTE)
    ) u_sw (
      .clk, .rst_n,
      .in_valid(sw_in_valid[k]), .in_flit(sw_in_flit[k]), .in_ready(sw_in_ready[k]),
      .out_valid(sw_out_valid[k]), .out_flit(sw_out_flit[k]), .out_ready(sw_out_ready[k]),
      .pf_shift, .pf_in(pf_chain[k]), .pf_out(pf_chain[k+1]),
      .pkt_done(pkt_done[k]), .link_done(link_done[k]), .fail_evt(fail_evt[k])
    );
  end

  assign pf_out = pf_chain[NSW];

endmodule
