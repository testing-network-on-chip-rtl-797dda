// tb_rlb: self-checking test of the routing/arbitration logic block.
//
// Functional part: a packet from one input is routed by its destination (table
// entry, and the own address to the local port), granted in the cycle after the
// request, moved one flit per cycle while the output is ready, stalled while it is
// not, and releases the output with its tail. Two inputs that want one output are
// served in turn (round robin). Scan part: a bit pattern shifted through all 32
// chains comes out unchanged SCAN_LEN shifts later, and a state loaded by scan,
// clocked once with capture and shifted out again shows the grant the logic must
// make; pop and push stay low in test mode.
module tb_rlb;
  import noc_pkg::*;
  localparam int C = 32;
  localparam int L = 2;           // 64 flops on 32 chains
  // dest 2 -> port 0, 3 -> port 1, 4 -> port 2; own address 1 -> port 3
  localparam logic [(1<<ADDR_W)*PORT_W-1:0] TBL = (2'd0 << 4) | (2'd1 << 6) | (2'd2 << 8);

  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] in_req, in_head, in_tail, out_ready, pop, push, out_busy, in_bound;
  logic [NPORTS-1:0][ADDR_W-1:0] in_dest;
  logic [NPORTS-1:0][PORT_W-1:0] out_sel;
  logic test_mode, scan_en, capture;
  logic [C-1:0] scan_in, scan_out;
  int checks = 0, failures = 0;

  rlb #(.SCAN_CHAINS(C), .MY_ADDR(4'd1), .LOCAL_PORT(2'd3), .ROUTE_TBL(TBL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic idle;
    in_req = '0; in_head = '0; in_tail = '0; in_dest = '0; out_ready = '1;
  endtask

  // Drive a 3-flit packet from input p to dest d and expect it on output q.
  task automatic send(int p, int d, int q);
    @(negedge clk);
    in_req[p] = 1; in_head[p] = 1; in_tail[p] = 0; in_dest[p] = 4'(d);
    #1 check(pop == 0 && push == 0, "no move before grant");
    @(negedge clk);
    check(in_bound[p] && out_busy[q], "granted after one cycle");
    check(pop == (4'b1 << p) && push == (4'b1 << q) && out_sel[q] == 2'(p), "head moves");
    @(negedge clk);
    in_head[p] = 0; out_ready[q] = 0;
    #1 check(pop == 0 && push == 0, "stall while output not ready");
    @(negedge clk);
    out_ready[q] = 1;
    #1 check(pop[p] && push[q], "body moves");
    @(negedge clk);
    in_tail[p] = 1;
    #1 check(pop[p] && push[q], "tail moves");
    @(negedge clk);
    in_req[p] = 0; in_tail[p] = 0;
    #1 check(!out_busy[q] && !in_bound[p], "released after tail");
  endtask

  // scan helpers: chain c holds state bits [c*L +: L], bit c*L nearest scan_in
  task automatic scan_load(logic [C*L-1:0] v, output logic [C*L-1:0] unloaded);
    unloaded = '0;
    for (int s = L - 1; s >= 0; s--) begin
      @(negedge clk);
      scan_en = 1;
      for (int c = 0; c < C; c++) begin
        scan_in[c] = v[c*L+s];
        unloaded[c*L+s] = scan_out[c];
      end
    end
    @(negedge clk);
    scan_en = 0;
  endtask

  // state layout, lowest bits first: w_req, w_head, w_tail, w_dest, w_ready,
  // bound, bport, lock, rr, w_push, w_pop
  function automatic logic [63:0] pack(logic [3:0] w_req, w_head, w_tail,
      logic [15:0] w_dest, logic [3:0] w_ready, bound, logic [7:0] bport,
      logic [3:0] lock, logic [7:0] rr, logic [3:0] w_push, w_pop);
    return {w_pop, w_push, rr, lock, bport, bound, w_ready, w_dest, w_tail, w_head, w_req};
  endfunction

  initial begin
    logic [63:0] pat, got, exp;
    idle(); test_mode = 0; scan_en = 0; capture = 0; scan_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    send(0, 3, 1);      // table
    send(2, 4, 2);      // table
    send(1, 1, 3);      // own address -> local port
    send(3, 2, 0);
    // two inputs, one output: round robin
    @(negedge clk);
    in_req = 4'b0011; in_head = 4'b0011; in_dest[0] = 4'd2; in_dest[1] = 4'd2;
    @(negedge clk);
    check(in_bound == 4'b0010 || in_bound == 4'b0001, "one winner");
    begin
      logic [3:0] first;
      first = in_bound;
      in_tail = first; // winner sends a single tail-marked flit
      @(negedge clk);
      in_tail = 0; in_req = in_req & ~first; in_head = in_head & ~first;
      @(negedge clk);
      check(in_bound == (~first & 4'b0011), "other input served next");
      in_tail = ~first & 4'b0011;
      @(negedge clk);
      idle();
    end
    @(negedge clk);
    check(out_busy == 0 && in_bound == 0, "all released");
    // scan: shift a pattern through and back out
    test_mode = 1;
    pat = {$urandom, $urandom};
    scan_load(pat, got);
    scan_load(64'h0, got);
    check(got == pat, "scan shift through");
    // scan: load a request on input 1 for dest 4 (port 2), capture, unload
    pat = pack(4'b0010, 4'b0010, 4'b0000, 16'h0040, 4'b1111, 4'b0, 8'b0, 4'b0, 8'b0, 4'b0, 4'b0);
    scan_load(pat, got);
    @(negedge clk);
    capture = 1;
    #1 check(pop == 0 && push == 0, "isolated in test mode");
    @(negedge clk);
    capture = 0;
    scan_load(64'h0, got);
    exp = pack(4'b0010, 4'b0010, 4'b0000, 16'h0040, 4'b1111, 4'b0010, 8'b0000_1000,
               4'b0100, 8'b0001_0000, 4'b0, 4'b0);
    check(got == exp, "capture grants input 1 -> output 2");
    // capture a move: input 1 bound to port 2, tail flit, output ready
    pat = pack(4'b0010, 4'b0000, 4'b0010, 16'h0040, 4'b1111, 4'b0010, 8'b0000_1000,
               4'b0100, 8'b0, 4'b0, 4'b0);
    scan_load(pat, got);
    @(negedge clk); capture = 1; @(negedge clk); capture = 0;
    scan_load(64'h0, got);
    exp = pack(4'b0010, 4'b0000, 4'b0010, 16'h0040, 4'b1111, 4'b0, 8'b0000_1000,
               4'b0, 8'b0, 4'b0100, 4'b0010);
    check(got == exp, "capture moves tail and releases");
    test_mode = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
