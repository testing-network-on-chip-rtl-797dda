// tb_noc_fifo: self-checking test of the dual-port FIFO.
//
// Random writes and reads, several at once, are checked against a queue model:
// read data, empty and full flags and the free count, every cycle. Then the FIFO
// test sequence w {(wr)} r is run with the four bridging-fault patterns
// (0101.., 1010.., 0000.., 1111..) and each read is checked against the word
// written DEPTH-1 operations earlier.
module tb_noc_fifo;
  localparam int W = 34;
  localparam int D = 4;

  logic clk = 0, rst_n = 0;
  logic wo, ro, ef, ff;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D+1)-1:0] free;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  noc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // compare outputs against the model, then apply one operation
  task automatic step(bit w, bit r, logic [W-1:0] d);
    check(ef == (model.size() == 0), "ef");
    check(ff == (model.size() == D), "ff");
    check(free == D - model.size(), "free");
    if (model.size() != 0) check(rdata == model[0], "rdata");
    wo = w; ro = r; wdata = d;
    @(posedge clk);
    #1;
    begin
      int n0 = model.size();
      if (r && n0 != 0) void'(model.pop_front());
      if (w && n0 < D) model.push_back(d);
    end
  endtask

  logic [W-1:0] pats[4];
  initial begin
    wo = 0; ro = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < 3000; i++) begin
      bit w, r;
      w = $urandom_range(0, 1);
      r = $urandom_range(0, 1);
      step(w, r, {$urandom, 2'(i)});
    end
    // drain
    while (model.size() != 0) step(0, 1, '0);
    // FIFO test sequence w {(wr)} r for each pattern
    pats[0] = {17{2'b01}}; pats[1] = {17{2'b10}}; pats[2] = '0; pats[3] = '1;
    for (int p = 0; p < 4; p++) begin
      logic [W-1:0] seq[D];
      for (int k = 0; k < D; k++) seq[k] = (k % 2) ? ~pats[p] : pats[p];
      check(ef, "empty before pattern");
      step(1, 0, seq[0]);
      for (int k = 1; k < D; k++) begin
        check(rdata == seq[k-1], "wr read");
        step(1, 1, seq[k]);
      end
      check(rdata == seq[D-1], "last read");
      step(0, 1, '0);
      check(ef, "empty after pattern");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
