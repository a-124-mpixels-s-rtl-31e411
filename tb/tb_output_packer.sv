// tb_output_packer -- result pixels into addressed 8-pixel words.
//
// Stripe rows of 60 and of 13 results (a stripe cut by the frame edge) are fed
// with random stalls. Every word pushed must carry the address of its first
// lane, the pixels in their lanes and byte enables for exactly the lanes
// filled: seven full words and one of four lanes for a 60-pixel row, one full
// word and one of five lanes for a 13-pixel row. push_pending must be high
// exactly when a word completes.
module tb_output_packer;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, in_valid = 1'b0, in_last = 1'b0;
  logic [7:0] in_pix = '0;
  logic [5:0] in_t = '0;
  logic [31:0] in_addr0 = '0;
  logic push_pending, push;
  logic [103:0] out_entry;
  logic [103:0] expq [$];
  int checks = 0, failures = 0, words = 0;

  always #5 clk = ~clk;

  output_packer #(.WS(60)) dut (.clk, .rst_n, .en, .in_valid, .in_pix, .in_t, .in_last, .in_addr0,
                                .push_pending, .push, .out_entry);

  always @(posedge clk) if (rst_n && push) begin
    words++;
    checks++;
    if (expq.size() == 0 || out_entry !== expq[0]) begin
      failures++;
      if (failures < 10) $display("word %0d: got %h expected %h", words, out_entry,
                                  (expq.size() > 0) ? expq[0] : '0);
    end
    if (expq.size() > 0) void'(expq.pop_front());
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 12; r++) begin
      int n;
      logic [31:0] a0;
      logic [63:0] d;
      logic [7:0] be;
      n  = (r % 3 == 2) ? 13 : 60;
      a0 = 32'h1000 + 32'(r * 1920 + (r % 4) * 60);
      d = '0; be = '0;
      for (int t = 0; t < n; t++) begin
        @(negedge clk);
        while ($urandom % 4 == 0) begin
          en = 1'b0; in_valid = 1'b1;
          @(negedge clk);
        end
        en       = 1'b1;
        in_valid = 1'b1;
        in_t     = 6'(t);
        in_last  = (t == n - 1);
        in_pix   = 8'($urandom);
        in_addr0 = a0;
        d[8 * (t % 8) +: 8] = in_pix;
        be[t % 8] = 1'b1;
        #1;
        checks++;
        if (push_pending != (t % 8 == 7 || t == n - 1)) begin
          failures++;
          $display("push_pending wrong at row %0d t %0d", r, t);
        end
        if (t % 8 == 7 || t == n - 1) begin
          expq.push_back({a0 + 32'(t - t % 8), be, d});
          d = '0; be = '0;
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (words != 8 * 8 + 4 * 2) begin failures++; $display("%0d words, expected 72", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
