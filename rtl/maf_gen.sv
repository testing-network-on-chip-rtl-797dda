// maf_gen: maximal-aggressor-fault (MAF) link test-vector generator.
//
// A state machine with states s0..s8 and a victim-line counter. s0 is idle and
// waits for T_start. From s1 to s8 it produces one WIDTH-bit vector per cycle: the
// victim wire takes the victim value of the current state and every other wire
// (the aggressors) the aggressor value, per this table:
//
//   state   s1 s2 s3 s4 s5 s6 s7 s8
//   victim   1  0  1  1  0  1  0  0
//   others   1  0  1  0  1  0  0  1
//
// Consecutive vectors form the two-vector tests for speedy fall (s1->s2), speedy
// rise (s2->s3), negative glitch (s3->s4), delayed fall (s4->s5), delayed rise
// (s5->s6) and positive glitch (s7->s8). After s8 the victim counter advances, so
// the same eight vectors are applied again shifted by one wire, and the machine
// returns to s1; after the last wire (count = WIDTH-1) it returns to s0 and pulses
// done. A full run takes 8*WIDTH cycles. The table, the state graph and the
// victim order (first wire first) follow the design; the done pulse is an addition.
//
// Timing: start is sampled in s0; the first vector (s1, victim 0) is on `vec` with
// `valid` high in the cycle after start.
module maf_gen #(
  parameter int unsigned WIDTH = noc_pkg::FLIT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,    // T_start
  output logic                       valid,    // state is s1..s8
  output logic [WIDTH-1:0]           vec,
  output logic [3:0]                 state,    // 0..8
  output logic [$clog2(WIDTH)-1:0]   victim,
  output logic                       done      // one cycle, on return to s0
);

  localparam int unsigned VW = $clog2(WIDTH);

  // Victim and aggressor values indexed by state number 1..8 (bit 0 unused).
  localparam logic [8:0] VICTIM_VAL = 9'b0_0101_1010;  // s8..s1 = 0,0,1,0,1,1,0,1
  localparam logic [8:0] AGGR_VAL   = 9'b1_0010_1010;  // s8..s1 = 1,0,0,1,0,1,0,1

  logic [3:0]    st_q;
  logic [VW-1:0] vic_q;

  assign state  = st_q;
  assign victim = vic_q;
  assign valid  = (st_q != 4'd0);

  always_comb begin
    vec = {WIDTH{AGGR_VAL[st_q]}};
    vec[vic_q] = VICTIM_VAL[st_q];
    if (st_q == 4'd0) vec = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= 4'd0;
      vic_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        4'd0: begin
          vic_q <= '0;
          if (start) st_q <= 4'd1;
        end
        4'd8: begin
          if (vic_q == VW'(WIDTH - 1)) begin
            st_q  <= 4'd0;
            vic_q <= '0;
            done  <= 1'b1;
          end else begin
            st_q  <= 4'd1;
            vic_q <= vic_q + 1'b1;
          end
        end
        default: st_q <= st_q + 4'd1;
      endcase
    end
  end

endmodule
