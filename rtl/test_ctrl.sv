// test_ctrl: test controller (TC) of one switch and its adjacent links.
//
// The TC receives the test packets addressed to its switch (from the MWU) and
// applies them to the component they name, comparing the component's response
// with expected data on chip. A mismatch sets the switch's pass/fail flip-flop,
// one stage of a shift register through all switches that is read out at the end.
//
// Packet processing: header (and, for a multicast packet, its route flits, which
// are skipped), test-control flit, T_start flit, test data, tail flit ~T_start. A
// wrong T_start or tail value also counts as a failure. Per CUT type:
//
//   FIFO  The named FIFO (0..3 input, 4..7 output) is cut off from the switch and
//         driven by the TC with the sequence w {(wr)} r, repeated until the tail:
//         data flits I0, then (I_k, E_k-1) for k = 1..DEPTH-1, then E_DEPTH-1, where
//         I are words to write and E words expected from the read port. I0 is
//         written alone; each E_k-1 cycle writes the held I_k and reads, so writes and
//         reads hit adjacent cells; the last read empties the FIFO. The 32 data bits
//         fill the FIFO word and its two kind bits get data[1:0]. The empty flag is
//         checked low on every read and high before every first write; the full flag
//         is checked low throughout, since the sequence never holds more than one word.
//   RLB   The RLB goes into test mode. Data flits come in pairs (scan-in word,
//         expected scan-out word): the TC compares scan_out with the second word
//         and shifts the chains once with the first; after RLB_SCAN_LEN shifts it
//         gives one capture cycle. The last pairs should load zeros, which leaves the
//         RLB idle again.
//   LINK  target[3:0] names output ports. A MAF generator drives the 8*FLIT_W
//         vectors onto all those links at once, as FK_LTEST flits, one per cycle.
//         The packet carries no data. The TC at the far end of each link checks
//         the vectors against its own copy of the generator (lt_rx_* below), since
//         the expected output equals the input.
//
// Interface timing: in_valid/in_ready handshake, one flit per cycle. FIFO-test
// reads compare the FIFO's fall-through read data in the cycle of the read. Link
// checking registers the incoming vector once and compares it with the local
// generator one cycle later.
//
// Following the design: the packet layout, the local comparison with expected data
// sent in the packet, the pass/fail flop in a shift register, scan chains as wide
// as the link, the FIFO sequence and the MAF generator, the TC serving a switch and
// its links. This design's choices: the data layouts above, the far-end link check
// and the checks of the empty and full flags.
module test_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 4,
  parameter int unsigned RLB_SCAN_LEN = 2
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // test packets
  input  logic                           in_valid,
  input  flit_t                          in_flit,
  output logic                           in_ready,
  // FIFO under test
  output logic                           fifo_act,
  output logic [2:0]                     fifo_idx,
  output logic                           fifo_wo,
  output logic                           fifo_ro,
  output logic [FLIT_W+1:0]              fifo_wdata,
  input  logic [FLIT_W+1:0]              fifo_rdata,
  input  logic                           fifo_ef,
  input  logic                           fifo_ff,
  // RLB scan
  output logic                           rlb_test_mode,
  output logic                           rlb_scan_en,
  output logic                           rlb_capture,
  output logic [FLIT_W-1:0]              rlb_scan_in,
  input  logic [FLIT_W-1:0]              rlb_scan_out,
  // link test, sending side
  output logic [NPORTS-1:0]              lt_tx_en,
  output logic [FLIT_W-1:0]              lt_tx_vec,
  // link test, receiving side (incoming FK_LTEST flits per input port)
  input  logic [NPORTS-1:0]              lt_rx_valid,
  input  logic [NPORTS-1:0][FLIT_W-1:0]  lt_rx_data,
  // results
  input  logic                           pf_shift,
  input  logic                           pf_in,
  output logic                           pf_out,
  output logic                           pkt_done,     // a test packet finished
  output logic [NPORTS-1:0]              link_done,    // a link check finished
  output logic                           fail_evt      // a mismatch this cycle
);

  localparam int unsigned KW = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned SW = $clog2(RLB_SCAN_LEN + 1);

  typedef enum logic [3:0] {
    T_IDLE, T_SKIP, T_CTRL, T_BEGIN, T_LINK, T_TAIL,
    T_FW0, T_FI, T_FE, T_FL, T_SI, T_SO, T_CAP
  } tstate_e;

  tstate_e            st_q;
  cut_e               cut_q;
  logic [7:0]         tgt_q;
  logic [7:0]         skip_q;
  logic [KW-1:0]      k_q;
  logic [SW-1:0]      sh_q;
  logic [FLIT_W-1:0]  hold_q;
  logic               pf_q;

  logic               take;       // a flit is consumed this cycle
  logic               mis;        // mismatch on the packet path
  logic [NPORTS-1:0]  rx_mis;
  logic               tx_start, tx_valid, tx_done;
  logic [FLIT_W-1:0]  tx_vec;

  assign take = in_valid && in_ready;

  // ---------------- sending MAF generator ----------------
  maf_gen #(.WIDTH(FLIT_W)) u_tx (
    .clk, .rst_n, .start(tx_start), .valid(tx_valid), .vec(tx_vec),
    .state(), .victim(), .done(tx_done)
  );

  assign lt_tx_en  = (st_q == T_LINK && tx_valid) ? tgt_q[NPORTS-1:0] : '0;
  assign lt_tx_vec = tx_vec;

  // ---------------- main packet state machine ----------------
  always_comb begin
    in_ready      = 1'b0;
    mis           = 1'b0;
    tx_start      = 1'b0;
    fifo_act      = 1'b0;
    fifo_wo       = 1'b0;
    fifo_ro       = 1'b0;
    fifo_wdata    = {in_flit.data[1:0], in_flit.data};
    rlb_test_mode = 1'b0;
    rlb_scan_en   = 1'b0;
    rlb_capture   = 1'b0;
    rlb_scan_in   = hold_q;

    unique case (st_q)
      T_IDLE, T_SKIP, T_CTRL, T_TAIL: in_ready = 1'b1;
      T_BEGIN: begin
        in_ready = 1'b1;
        if (take && in_flit.data != T_START) mis = 1'b1;
        if (take && cut_q == CUT_LINK) tx_start = 1'b1;
      end
      T_LINK: ;
      T_FW0: begin
        fifo_act = 1'b1;
        in_ready = 1'b1;
        if (take && in_flit.kind != FK_TAIL) begin
          fifo_wo = 1'b1;
          if (!fifo_ef || fifo_ff) mis = 1'b1;
        end
      end
      T_FI: begin
        fifo_act = 1'b1;
        in_ready = 1'b1;
      end
      T_FE, T_FL: begin
        fifo_act = 1'b1;
        in_ready = 1'b1;
        if (take) begin
          fifo_ro = 1'b1;
          fifo_wo = (st_q == T_FE);
          fifo_wdata = {hold_q[1:0], hold_q};
          if (fifo_ef || fifo_ff || fifo_rdata != {in_flit.data[1:0], in_flit.data}) mis = 1'b1;
        end
      end
      T_SI: begin
        rlb_test_mode = 1'b1;
        in_ready      = 1'b1;
      end
      T_SO: begin
        rlb_test_mode = 1'b1;
        in_ready      = 1'b1;
        if (take) begin
          rlb_scan_en = 1'b1;
          if (rlb_scan_out != in_flit.data) mis = 1'b1;
        end
      end
      T_CAP: begin
        rlb_test_mode = 1'b1;
        rlb_capture   = 1'b1;
      end
      default: ;
    endcase
    // the tail must close the data field
    if (take && st_q inside {T_TAIL, T_FW0, T_SI} && in_flit.kind == FK_TAIL &&
        in_flit.data != ~T_START) mis = 1'b1;
    if (take && st_q == T_TAIL && in_flit.kind != FK_TAIL) mis = 1'b1;
  end

  assign fifo_idx = tgt_q[2:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= T_IDLE;
      cut_q  <= CUT_NONE;
      tgt_q  <= '0;
      skip_q <= '0;
      k_q    <= '0;
      sh_q   <= '0;
      hold_q <= '0;
      pkt_done <= 1'b0;
    end else begin
      pkt_done <= 1'b0;
      unique case (st_q)
        T_IDLE: if (take && in_flit.kind == FK_HEAD) begin
          skip_q <= hdr_nroute(in_flit.data);
          if (hdr_kind(in_flit.data) == PK_TEST_MC && hdr_nroute(in_flit.data) != 8'd0)
            st_q <= T_SKIP;
          else
            st_q <= T_CTRL;
        end
        T_SKIP: if (take) begin
          skip_q <= skip_q - 8'd1;
          if (skip_q == 8'd1) st_q <= T_CTRL;
        end
        T_CTRL: if (take) begin
          cut_q <= cut_e'(in_flit.data[31:28]);
          tgt_q <= in_flit.data[27:20];
          st_q  <= T_BEGIN;
        end
        T_BEGIN: if (take) begin
          unique case (cut_q)
            CUT_LINK: st_q <= T_LINK;
            CUT_FIFO: st_q <= T_FW0;
            CUT_RLB:  begin st_q <= T_SI; sh_q <= '0; end
            default:  st_q <= T_TAIL;
          endcase
        end
        T_LINK: if (tx_done) st_q <= T_TAIL;
        T_TAIL: if (take) begin
          st_q     <= (in_flit.kind == FK_TAIL) ? T_IDLE : T_TAIL;
          pkt_done <= (in_flit.kind == FK_TAIL);
        end
        T_FW0: if (take) begin
          if (in_flit.kind == FK_TAIL) begin
            st_q     <= T_IDLE;
            pkt_done <= 1'b1;
          end else begin
            k_q  <= KW'(1);
            st_q <= (FIFO_DEPTH > 1) ? T_FI : T_FL;
          end
        end
        T_FI: if (take) begin
          hold_q <= in_flit.data;
          st_q   <= T_FE;
        end
        T_FE: if (take) begin
          if (k_q == KW'(FIFO_DEPTH - 1)) st_q <= T_FL;
          else begin
            k_q  <= k_q + 1'b1;
            st_q <= T_FI;
          end
        end
        T_FL: if (take) st_q <= T_FW0;
        T_SI: if (take) begin
          if (in_flit.kind == FK_TAIL) begin
            st_q     <= T_IDLE;
            pkt_done <= 1'b1;
          end else begin
            hold_q <= in_flit.data;
            st_q   <= T_SO;
          end
        end
        T_SO: if (take) begin
          if (sh_q == SW'(RLB_SCAN_LEN - 1)) begin
            sh_q <= '0;
            st_q <= T_CAP;
          end else begin
            sh_q <= sh_q + 1'b1;
            st_q <= T_SI;
          end
        end
        T_CAP: st_q <= T_SI;
        default: st_q <= T_IDLE;
      endcase
    end
  end

  // ---------------- receiving link checkers ----------------
  for (genvar p = 0; p < NPORTS; p++) begin : g_rx
    logic              rx_v_q;
    logic [FLIT_W-1:0] rx_d_q;
    logic              g_valid, g_done;
    logic [FLIT_W-1:0] g_vec;

    maf_gen #(.WIDTH(FLIT_W)) u_exp (
      .clk, .rst_n, .start(lt_rx_valid[p]), .valid(g_valid), .vec(g_vec),
      .state(), .victim(), .done(g_done)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rx_v_q <= 1'b0;
        rx_d_q <= '0;
      end else begin
        rx_v_q <= lt_rx_valid[p];
        rx_d_q <= lt_rx_data[p];
      end
    end

    // a vector that differs, or a vector missing while the generator runs
    assign rx_mis[p]    = g_valid && (!rx_v_q || rx_d_q != g_vec);
    assign link_done[p] = g_done;
  end

  // ---------------- pass/fail flop ----------------
  assign fail_evt = mis || (|rx_mis);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pf_q <= 1'b0;
    else if (pf_shift) pf_q <= pf_in;
    else if (fail_evt) pf_q <= 1'b1;
  end

  assign pf_out = pf_q;

endmodule
