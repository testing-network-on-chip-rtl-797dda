// rlb: routing and arbitration logic block of a four-port wormhole switch, made
// scan-testable.
//
// Function. Each input port presents the flit at the head of its input FIFO. A
// head flit that is not yet connected is routed by looking up its destination
// address: the own address goes to LOCAL_PORT, any other address to the port in
// ROUTE_TBL. Every free output grants one requesting input per cycle, round robin
// starting after the last winner, and is then locked to that input until its tail
// flit has passed. A connected input moves one flit per cycle to its output when
// the output can take it (out_ready): pop[p] empties the input FIFO's head,
// push[q] writes the output FIFO and out_sel[q] names the input whose flit goes
// there. A grant made in one cycle moves the first flit in the next.
//
// Test. All flip-flops of the block sit on SCAN_CHAINS parallel scan chains, as many
// as the link is wide. Besides the routing state (per input: connected, port;
// per output: locked, round-robin pointer) the chains hold an input wrapper (the
// requests the logic sees in test mode) and an output wrapper (pop and push as
// computed in the capture cycle), so in test mode the block is cut off from the
// rest of the switch: pop and push are held at zero and the logic sees only the
// wrapper. scan_en shifts all chains by one bit (scan_in enters bit 0 of each
// chain, scan_out is the last bit); capture clocks the logic once. The chain
// length is SCAN_LEN; unused chain positions are plain padding flops.
//
// Routing by table, round-robin arbitration, wormhole locking and the wrapper
// cells are this design's choices: the block's function (routing and arbitration)
// and its scan test with one chain per link wire are the design's.
module rlb
  import noc_pkg::*;
#(
  parameter int unsigned                       SCAN_CHAINS = FLIT_W,
  parameter logic [ADDR_W-1:0]                 MY_ADDR     = '0,
  parameter logic [PORT_W-1:0]                 LOCAL_PORT  = 2'd3,
  parameter logic [(1<<ADDR_W)*PORT_W-1:0]     ROUTE_TBL   = '0
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // functional side
  input  logic [NPORTS-1:0]                  in_req,
  input  logic [NPORTS-1:0]                  in_head,
  input  logic [NPORTS-1:0]                  in_tail,
  input  logic [NPORTS-1:0][ADDR_W-1:0]      in_dest,
  input  logic [NPORTS-1:0]                  out_ready,
  output logic [NPORTS-1:0]                  pop,
  output logic [NPORTS-1:0]                  push,
  output logic [NPORTS-1:0][PORT_W-1:0]      out_sel,
  output logic [NPORTS-1:0]                  out_busy,
  output logic [NPORTS-1:0]                  in_bound,
  // scan test
  input  logic                               test_mode,
  input  logic                               scan_en,
  input  logic                               capture,
  input  logic [SCAN_CHAINS-1:0]             scan_in,
  output logic [SCAN_CHAINS-1:0]             scan_out
);

  typedef struct packed {
    // output wrapper
    logic [NPORTS-1:0]               w_pop;
    logic [NPORTS-1:0]               w_push;
    // routing state
    logic [NPORTS-1:0][PORT_W-1:0]   rr;
    logic [NPORTS-1:0]               lock;
    logic [NPORTS-1:0][PORT_W-1:0]   bport;
    logic [NPORTS-1:0]               bound;
    // input wrapper
    logic [NPORTS-1:0]               w_ready;
    logic [NPORTS-1:0][ADDR_W-1:0]   w_dest;
    logic [NPORTS-1:0]               w_tail;
    logic [NPORTS-1:0]               w_head;
    logic [NPORTS-1:0]               w_req;
  } rlb_state_t;

  localparam int unsigned NBITS    = $bits(rlb_state_t);
  localparam int unsigned SCAN_LEN = rlb_scan_len(SCAN_CHAINS);
  localparam int unsigned TOTAL    = SCAN_LEN * SCAN_CHAINS;

  logic [TOTAL-1:0] chain_q, chain_d, shifted;
  rlb_state_t       st, nx;

  if (NBITS != RLB_STATE_BITS) begin : g_bad_size
    $error("rlb: RLB_STATE_BITS in noc_pkg does not match the state layout");
  end

  assign st = rlb_state_t'(chain_q[NBITS-1:0]);

  // Inputs the logic sees: the switch, or the wrapper in test mode.
  logic [NPORTS-1:0]               r_req, r_head, r_tail, r_ready;
  logic [NPORTS-1:0][ADDR_W-1:0]   r_dest;
  logic [NPORTS-1:0]               c_pop, c_push;
  logic [NPORTS-1:0][PORT_W-1:0]   c_sel;

  always_comb begin
    r_req   = test_mode ? st.w_req   : in_req;
    r_head  = test_mode ? st.w_head  : in_head;
    r_tail  = test_mode ? st.w_tail  : in_tail;
    r_dest  = test_mode ? st.w_dest  : in_dest;
    r_ready = test_mode ? st.w_ready : out_ready;
  end

  function automatic logic [PORT_W-1:0] route(logic [ADDR_W-1:0] dest);
    if (dest == MY_ADDR) return LOCAL_PORT;
    return ROUTE_TBL[dest*PORT_W +: PORT_W];
  endfunction

  // Next routing state and moves.
  always_comb begin
    logic [NPORTS-1:0]             want;
    logic [NPORTS-1:0][PORT_W-1:0] tq;
    logic                          found;
    logic [PORT_W-1:0]             cand;

    nx     = st;
    c_pop  = '0;
    c_push = '0;
    c_sel  = '0;

    for (int p = 0; p < NPORTS; p++) begin
      tq[p]   = route(r_dest[p]);
      want[p] = r_req[p] && r_head[p] && !st.bound[p];
    end

    // flit movement on established connections
    for (int q = 0; q < NPORTS; q++) c_sel[q] = PORT_W'(0);
    for (int p = 0; p < NPORTS; p++) begin
      if (st.bound[p]) begin
        c_sel[st.bport[p]] = PORT_W'(p);
        if (r_req[p] && r_ready[st.bport[p]]) begin
          c_pop[p]            = 1'b1;
          c_push[st.bport[p]] = 1'b1;
          if (r_tail[p]) begin
            nx.bound[p]         = 1'b0;
            nx.lock[st.bport[p]] = 1'b0;
          end
        end
      end
    end

    // round-robin arbitration on free outputs
    for (int q = 0; q < NPORTS; q++) begin
      found = 1'b0;
      for (int k = 1; k <= NPORTS; k++) begin
        cand = st.rr[q] + PORT_W'(k);
        if (!found && !st.lock[q] && want[cand] && tq[cand] == PORT_W'(q)) begin
          found           = 1'b1;
          nx.lock[q]      = 1'b1;
          nx.rr[q]        = cand;
          nx.bound[cand]  = 1'b1;
          nx.bport[cand]  = PORT_W'(q);
        end
      end
    end

    nx.w_pop  = c_pop;
    nx.w_push = c_push;
  end

  // Scan shift: chain c occupies bits [c*SCAN_LEN +: SCAN_LEN], bit 0 nearest scan_in.
  always_comb begin
    for (int c = 0; c < SCAN_CHAINS; c++) begin
      shifted[c*SCAN_LEN] = scan_in[c];
      for (int j = 1; j < SCAN_LEN; j++)
        shifted[c*SCAN_LEN+j] = chain_q[c*SCAN_LEN+j-1];
      scan_out[c] = chain_q[c*SCAN_LEN+SCAN_LEN-1];
    end
  end

  always_comb begin
    chain_d = chain_q;
    if (!test_mode) begin
      // functional: routing state only, wrappers hold
      chain_d[NBITS-1:0] = {st.w_pop, st.w_push, nx.rr, nx.lock, nx.bport, nx.bound,
                            st.w_ready, st.w_dest, st.w_tail, st.w_head, st.w_req};
    end else if (scan_en) begin
      chain_d = shifted;
    end else if (capture) begin
      chain_d[NBITS-1:0] = nx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain_q <= '0;
    else        chain_q <= chain_d;
  end

  assign pop      = test_mode ? '0 : c_pop;
  assign push     = test_mode ? '0 : c_push;
  assign out_sel  = c_sel;
  assign out_busy = st.lock;
  assign in_bound = st.bound;

endmodule
