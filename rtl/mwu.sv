// mwu: multicast wrapper unit. It takes test packets away from the routing logic
// block (RLB) and copies them, unchanged, to a set of output ports, or hands them
// to the switch's own test controller (TC).
//
// Per input port a small state machine watches the head flit of the input FIFO.
// A multicast test packet (header type PK_TEST_MC) carries NROUTE route flits after
// its header, each a switch address and that switch's set of output ports. The MWU
// reads the header and the route flits into a replay buffer and looks for its own
// address (MY_ADDR): found, the packet goes to the listed output ports; not found,
// this switch is a destination and the packet goes to the TC. A unicast test packet
// addressed to this switch (PK_TEST_UC, destination MY_ADDR) goes to the TC too.
// Other packets are left to the RLB.
//
// Targets 0..NPORTS-1 are the output FIFOs, target NPORTS is the TC. Once its
// target set is known an input claims all of its targets together, as soon as none
// is held by another MWU input or locked by the RLB; it then replays the buffered
// header and route flits and streams the rest of the packet, each flit written to
// all targets in the same cycle when all of them have room. The tail flit releases
// the targets. There is no other arbitration, because test packets are scheduled
// offline so that they never compete for an output; if two inputs claim at once
// the lower-numbered one wins. A claim waits while the RLB holds a target.
//
// The MWU's job (recognising test packets, decoding the multicast route of
// address/port-set pairs, copying the packet to those ports, bypassing the RLB) is
// the design's. The replay buffer, its size MAX_ROUTE, the port set as a bit mask
// and the delivery of non-listed destinations to the TC are this design's choices.
module mwu
  import noc_pkg::*;
#(
  parameter logic [ADDR_W-1:0] MY_ADDR   = '0,
  parameter int unsigned       MAX_ROUTE = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // input FIFO heads
  input  logic [NPORTS-1:0]             in_valid,
  input  flit_t [NPORTS-1:0]            in_flit,
  input  logic [NPORTS-1:0]             rlb_bound,   // RLB owns this input
  output logic [NPORTS-1:0]             pop,
  output logic [NPORTS-1:0]             busy,        // MWU owns this input now
  output logic [NPORTS-1:0]             takes,       // head flit is MWU traffic
  // targets: output FIFOs 0..NPORTS-1, TC = NPORTS
  input  logic [NPORTS:0]               tgt_ready,
  input  logic [NPORTS-1:0]             rlb_busy,    // RLB holds this output
  output logic [NPORTS:0]               tgt_push,
  output flit_t [NPORTS:0]              tgt_flit,
  output logic [NPORTS:0]               tgt_own
);

  localparam int unsigned NT = NPORTS + 1;
  localparam int unsigned BW = $clog2(MAX_ROUTE + 2);

  typedef enum logic [2:0] {M_IDLE, M_COLLECT, M_CLAIM, M_REPLAY, M_STREAM} mstate_e;

  mstate_e                          st_q   [NPORTS];
  logic [NT-1:0]                    mask_q [NPORTS];
  logic                             hit_q  [NPORTS];
  logic [BW-1:0]                    nbuf_q [NPORTS];
  logic [BW-1:0]                    idx_q  [NPORTS];
  logic [FLIT_W-1:0]                buf_q  [NPORTS][MAX_ROUTE+1];
  logic [NT-1:0]                    own_v_q;
  logic [NT-1:0][PORT_W-1:0]        own_p_q;

  function automatic logic is_mwu_head(flit_t f);
    return f.kind == FK_HEAD &&
           (hdr_kind(f.data) == PK_TEST_MC ||
            (hdr_kind(f.data) == PK_TEST_UC && hdr_dest(f.data) == MY_ADDR));
  endfunction

  // Per-input combinational view
  logic [NPORTS-1:0] all_ready, can_claim, sending;
  flit_t [NPORTS-1:0] cur_flit;
  logic [NT-1:0] claimed_now;

  always_comb begin
    claimed_now = '0;
    for (int p = 0; p < NPORTS; p++) begin
      takes[p]     = (st_q[p] == M_IDLE) && in_valid[p] && !rlb_bound[p] && is_mwu_head(in_flit[p]);
      busy[p]      = (st_q[p] != M_IDLE);
      all_ready[p] = ((mask_q[p] & ~tgt_ready) == '0);
      can_claim[p] = 1'b0;
      if (st_q[p] == M_CLAIM) begin
        can_claim[p] = ((mask_q[p] & own_v_q) == '0) &&
                       ((mask_q[p][NPORTS-1:0] & rlb_busy) == '0) &&
                       ((mask_q[p] & claimed_now) == '0);
        if (can_claim[p]) claimed_now = claimed_now | mask_q[p];
      end
      // flit offered by this input in the replay or stream phase
      cur_flit[p].kind = (idx_q[p] == '0) ? FK_HEAD : FK_BODY;
      cur_flit[p].data = buf_q[p][idx_q[p]];
      sending[p] = 1'b0;
      if (st_q[p] == M_REPLAY) begin
        sending[p] = all_ready[p];
      end else if (st_q[p] == M_STREAM) begin
        cur_flit[p] = in_flit[p];
        sending[p]  = all_ready[p] && in_valid[p];
      end
    end
  end

  always_comb begin
    for (int t = 0; t < NT; t++) begin
      tgt_own[t]  = own_v_q[t];
      tgt_flit[t] = cur_flit[own_p_q[t]];
      tgt_push[t] = own_v_q[t] && sending[own_p_q[t]] && mask_q[own_p_q[t]][t];
    end
    for (int p = 0; p < NPORTS; p++) begin
      pop[p] = ((st_q[p] == M_IDLE) && takes[p]) ||
               (st_q[p] == M_COLLECT && in_valid[p]) ||
               (st_q[p] == M_STREAM && sending[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        st_q[p]   <= M_IDLE;
        mask_q[p] <= '0;
        hit_q[p]  <= 1'b0;
        nbuf_q[p] <= '0;
        idx_q[p]  <= '0;
      end
      own_v_q <= '0;
      own_p_q <= '0;
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        unique case (st_q[p])
          M_IDLE: if (takes[p]) begin
            nbuf_q[p]   <= BW'(1);
            idx_q[p]    <= '0;
            hit_q[p]    <= 1'b0;
            mask_q[p]   <= NT'(1) << NPORTS;  // TC unless the route says otherwise
            if (hdr_kind(in_flit[p].data) == PK_TEST_MC && hdr_nroute(in_flit[p].data) != 8'd0)
              st_q[p] <= M_COLLECT;
            else
              st_q[p] <= M_CLAIM;
          end
          M_COLLECT: if (in_valid[p]) begin
            nbuf_q[p]           <= nbuf_q[p] + 1'b1;
            if (rt_addr(in_flit[p].data) == MY_ADDR && !hit_q[p]) begin
              hit_q[p]  <= 1'b1;
              mask_q[p] <= {1'b0, rt_mask(in_flit[p].data)};
            end
            if (8'(nbuf_q[p]) == hdr_nroute(buf_q[p][0])) st_q[p] <= M_CLAIM;
          end
          M_CLAIM: if (can_claim[p]) st_q[p] <= M_REPLAY;
          M_REPLAY: if (sending[p]) begin
            if (idx_q[p] == nbuf_q[p] - 1'b1) st_q[p] <= M_STREAM;
            else                              idx_q[p] <= idx_q[p] + 1'b1;
          end
          M_STREAM: if (sending[p] && in_flit[p].kind == FK_TAIL) st_q[p] <= M_IDLE;
          default: st_q[p] <= M_IDLE;
        endcase
      end
      // target ownership
      for (int t = 0; t < NT; t++) begin
        if (own_v_q[t] && st_q[own_p_q[t]] == M_STREAM && sending[own_p_q[t]] &&
            in_flit[own_p_q[t]].kind == FK_TAIL)
          own_v_q[t] <= 1'b0;
        for (int p = 0; p < NPORTS; p++) begin
          if (can_claim[p] && mask_q[p][t]) begin
            own_v_q[t] <= 1'b1;
            own_p_q[t] <= PORT_W'(p);
          end
        end
      end
    end
  end

  // Replay buffer (data only, no reset needed)
  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (st_q[p] == M_IDLE && takes[p])         buf_q[p][0]         <= in_flit[p].data;
      if (st_q[p] == M_COLLECT && in_valid[p])   buf_q[p][nbuf_q[p]] <= in_flit[p].data;
    end
  end

  // A multicast route never overflows the replay buffer.
  for (genvar gp = 0; gp < NPORTS; gp++) begin : g_chk
    a_route_fits: assert property (@(posedge clk) disable iff (!rst_n)
      !(st_q[gp] == M_COLLECT && nbuf_q[gp] > BW'(MAX_ROUTE)))
      else $error("mwu: multicast route longer than MAX_ROUTE");
  end

endmodule
