// noc_fifo: the dual-port switch buffer, one write-only port and one read-only port.
//
// A write operation (wo) stores wdata in the cell selected by the write pointer
// and advances it; a read operation (ro) advances the read pointer. The cell at the
// read pointer is always visible on rdata (first-word fall-through), so a read
// consumes the word shown in the same cycle. The empty flag (ef) and full flag (ff)
// come from an occupancy count. A write and a read in the same cycle are both
// performed, which is what the FIFO test sequence w {(wr)} r relies on: after the
// first write the pointers sit on cells one and zero and every later cycle writes
// one cell while reading its neighbour.
//
// The memory array, the two pointers and the EF/FF flags follow the FIFO structure
// of the design. Using one clock for both ports (the structure allows separate
// write and read clocks) and ignoring a write while full or a read while empty are
// this design's choices. `free` gives the number of empty cells, for link flow
// control.
module noc_fifo #(
  parameter int unsigned WIDTH = noc_pkg::FLIT_W + 2,  // flit and its kind
  parameter int unsigned DEPTH = 4                      // four flits per buffer
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wo,
  input  logic [WIDTH-1:0]             wdata,
  input  logic                         ro,
  output logic [WIDTH-1:0]             rdata,
  output logic                         ef,
  output logic                         ff,
  output logic [$clog2(DEPTH+1)-1:0]   free
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;
  logic [CW-1:0]    count;
  logic             do_w, do_r;

  assign ef   = (count == '0);
  assign ff   = (count == CW'(DEPTH));
  assign free = CW'(DEPTH) - count;
  assign do_w = wo && !ff;
  assign do_r = ro && !ef;
  assign rdata = mem[rptr];

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_w) wptr <= incr(wptr);
      if (do_r) rptr <= incr(rptr);
      count <= count + CW'(do_w) - CW'(do_r);
    end
  end

  always_ff @(posedge clk) begin
    if (do_w) mem[wptr] <= wdata;
  end

endmodule
