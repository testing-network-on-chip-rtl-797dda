// noc_pkg: types and constants shared by the switch, its test hardware and the
// network top.
//
// A flit is FLIT_W data bits (the inter-switch link width, 32) plus a two-bit kind
// carried on sideband wires of the link. Test packets follow the layout
//   header | [route flits] | test control | T_start | test data ... | ~T_start
// The header names the packet type (functional, unicast test, multicast test) and,
// for a unicast packet, the destination switch. A multicast test packet carries
// NROUTE route flits right after the header; each names one switch address and the
// set of its output ports that receive a copy. The test-control flit names the
// kind of component under test (CUT) and which one. The data field is framed by a
// T_start flit and, as the tail, its bitwise complement.
//
// The field order follows the test-packet structure of the design; the bit
// positions, the T_start value and the kind sideband are this design's own choice.
package noc_pkg;

  parameter int unsigned FLIT_W   = 32;  // inter-switch link width
  parameter int unsigned NPORTS   = 4;   // four-port switch
  parameter int unsigned ADDR_W   = 4;   // switch address width
  parameter int unsigned PORT_W   = 2;   // port index 00..11

  // Sideband flit kind. FK_LTEST marks a MAF link-test vector driven by the
  // test controller straight onto a link; it never enters a FIFO.
  typedef enum logic [1:0] {
    FK_HEAD  = 2'd0,
    FK_BODY  = 2'd1,
    FK_TAIL  = 2'd2,
    FK_LTEST = 2'd3
  } flit_kind_e;

  typedef struct packed {
    flit_kind_e          kind;
    logic [FLIT_W-1:0]   data;
  } flit_t;

  // Header flit: [31:30] packet type, [15:8] number of route flits (multicast),
  // [ADDR_W-1:0] destination switch (unicast).
  typedef enum logic [1:0] {
    PK_FUNC    = 2'd0,
    PK_TEST_UC = 2'd1,
    PK_TEST_MC = 2'd2
  } pkt_kind_e;

  // Test-control flit: [31:28] CUT type, [27:20] target, [15:0] parameter.
  //   CUT_LINK: target[3:0] = mask of output ports whose links are tested
  //   CUT_FIFO: target[2:0] = FIFO index, 0..3 input FIFOs, 4..7 output FIFOs
  //   CUT_RLB : parameter   = unused (the scan chain length is fixed by the RLB)
  typedef enum logic [3:0] {
    CUT_NONE = 4'd0,
    CUT_LINK = 4'd1,
    CUT_FIFO = 4'd2,
    CUT_RLB  = 4'd3
  } cut_e;

  // Flip-flops on the RLB scan chains: per port, the routing state (connected,
  // port, locked, round-robin pointer) and the wrapper cells (request, head, tail,
  // destination, output ready, pop, push).
  localparam int unsigned RLB_STATE_BITS = NPORTS * (8 + 2 * PORT_W + ADDR_W);

  function automatic int unsigned rlb_scan_len(int unsigned chains);
    return (RLB_STATE_BITS + chains - 1) / chains;
  endfunction

  localparam logic [FLIT_W-1:0] T_START = 32'hA5C3_3C5A;

  // Route flit: [ADDR_W+3:4] switch address, [3:0] output-port set as a bit mask.
  function automatic pkt_kind_e hdr_kind(logic [FLIT_W-1:0] d);
    return pkt_kind_e'(d[31:30]);
  endfunction

  function automatic logic [ADDR_W-1:0] hdr_dest(logic [FLIT_W-1:0] d);
    return d[ADDR_W-1:0];
  endfunction

  function automatic logic [7:0] hdr_nroute(logic [FLIT_W-1:0] d);
    return d[15:8];
  endfunction

  function automatic logic [ADDR_W-1:0] rt_addr(logic [FLIT_W-1:0] d);
    return d[ADDR_W+3:4];
  endfunction

  function automatic logic [NPORTS-1:0] rt_mask(logic [FLIT_W-1:0] d);
    return d[NPORTS-1:0];
  endfunction

  function automatic logic [FLIT_W-1:0] mk_header(pkt_kind_e k, logic [7:0] nroute,
                                                  logic [ADDR_W-1:0] dest);
    logic [FLIT_W-1:0] d;
    d = '0;
    d[31:30] = k;
    d[15:8] = nroute;
    d[ADDR_W-1:0] = dest;
    return d;
  endfunction

  function automatic logic [FLIT_W-1:0] mk_route(logic [ADDR_W-1:0] a, logic [NPORTS-1:0] m);
    logic [FLIT_W-1:0] d;
    d = '0;
    d[ADDR_W+3:4] = a;
    d[NPORTS-1:0] = m;
    return d;
  endfunction

  function automatic logic [FLIT_W-1:0] mk_ctrl(cut_e c, logic [7:0] target, logic [15:0] param);
    logic [FLIT_W-1:0] d;
    d = '0;
    d[31:28] = c;
    d[27:20] = target;
    d[15:0] = param;
    return d;
  endfunction

endpackage
