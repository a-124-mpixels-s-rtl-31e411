// tb_range_table -- write port and parallel read-out of the range table.
//
// After reset every entry must read 0. Random writes then update exactly the
// addressed entry, checked against a model of all 32 entries after each
// cycle; cycles with wr_en low must change nothing.
module tb_range_table;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic [4:0] wr_addr = '0;
  logic [9:0] wr_data = '0;
  logic [31:0][9:0] table_out;
  logic [9:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  range_table #(.TBL_N(32), .G_W(10)) dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .table_out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (table_out[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("cycle %0d entry %0d: %0d expected %0d", n, i, table_out[i], model[i]);
        end
      end
      wr_en   = ($urandom % 3) != 0;
      wr_addr = 5'($urandom);
      wr_data = 10'($urandom);
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
