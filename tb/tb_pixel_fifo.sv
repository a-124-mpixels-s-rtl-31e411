// tb_pixel_fifo -- the two-entry buffer against a queue model.
//
// Random pushes and pops that respect full and empty (a push to a full FIFO
// only together with a pop), with the data, count, full and empty flags
// compared with a queue after every cycle.
module tb_pixel_fifo;
  logic clk = 1'b0, rst_n = 1'b0, push = 1'b0, pop = 1'b0;
  logic [63:0] wdata = '0, rdata;
  logic full, empty;
  logic [1:0] count;
  logic [63:0] q [$];
  int checks = 0, failures = 0, n_full = 0;

  always #5 clk = ~clk;

  pixel_fifo #(.DW(64), .DEPTH(2)) dut (.clk, .rst_n, .push, .wdata, .full, .pop, .rdata, .empty, .count);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (count != 2'(q.size()) || empty != (q.size() == 0) || full != (q.size() == 2) ||
          (q.size() > 0 && rdata !== q[0])) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count %0d model %0d", n, count, q.size());
      end
      if (full) n_full++;
      pop   = !empty && ($urandom % 2 == 0);
      push  = (!full || pop) && ($urandom % 3 != 0);
      wdata = {$urandom, $urandom};
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
