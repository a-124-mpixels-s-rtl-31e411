// tb_sba -- selected-bin adder against a direct per-bin model.
//
// Random histograms, bins and values, including the cases where the entering
// and leaving pixel share a bin and where either enable is off; every bin of
// every result is compared. Combinational, so no clock: a small delay
// separates the vectors.
module tb_sba;
  localparam int unsigned NB = 64, W = 20, VW = 8;

  logic [NB-1:0][W-1:0] hin, hout;
  logic add_en, sub_en;
  logic [5:0] add_bin, sub_bin;
  logic [VW-1:0] add_val, sub_val;
  int checks = 0, failures = 0;

  sba #(.NB(NB), .W(W), .VW(VW)) dut (
    .hist_in(hin), .add_en, .add_bin, .add_val, .sub_en, .sub_bin, .sub_val, .hist_out(hout)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int b = 0; b < int'(NB); b++) hin[b] = W'($urandom);
      add_en  = ($urandom % 4) != 0;
      sub_en  = ($urandom % 4) != 0;
      add_bin = 6'($urandom);
      sub_bin = (n % 5 == 0) ? add_bin : 6'($urandom);
      add_val = VW'($urandom);
      sub_val = VW'($urandom);
      #1;
      for (int b = 0; b < int'(NB); b++) begin
        logic [W-1:0] e;
        e = hin[b];
        if (add_en && add_bin == 6'(b)) e = e + W'(add_val);
        if (sub_en && sub_bin == 6'(b)) e = e - W'(sub_val);
        checks++;
        if (hout[b] !== e) begin
          failures++;
          if (failures < 10) $display("vector %0d bin %0d: got %0h expected %0h", n, b, hout[b], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
