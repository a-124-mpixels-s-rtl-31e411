// tb_table_selection -- weight per bin from the shared table.
//
// For random tables and every target bin 0..63, each bin's weight must be the
// table entry at the absolute bin distance, or 0 from distance 32 on.
module tb_table_selection;
  logic [31:0][9:0] table_in;
  logic [5:0] bin_c;
  logic [63:0][9:0] weight;
  int checks = 0, failures = 0;

  table_selection #(.NB(64), .TBL_N(32), .G_W(10)) dut (.table_in, .bin_c, .weight);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < 32; i++) table_in[i] = 10'($urandom | 1);
      for (int c = 0; c < 64; c++) begin
        bin_c = 6'(c);
        #1;
        for (int b = 0; b < 64; b++) begin
          int d;
          logic [9:0] e;
          d = (c > b) ? c - b : b - c;
          e = (d < 32) ? table_in[d] : 10'd0;
          checks++;
          if (weight[b] !== e) begin
            failures++;
            if (failures < 10) $display("bin_c %0d bin %0d: %0d expected %0d", c, b, weight[b], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
